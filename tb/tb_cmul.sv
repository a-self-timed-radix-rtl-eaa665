// tb_cmul: self-checking testbench for the complex multiplier (n = 32).
// Products of random and corner complex operands are compared with the
// testbench's own (ar*br - ai*bi) + j(ar*bi + ai*br) in 64-bit arithmetic.
// Also measured: the latency of an isolated request (4 real multiplications
// on one signed multiplier), how many requests are taken before the first
// result is read, and a random stream with random read delays.
module tb_cmul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic prefire = 0, sucfire = 0, prefull, sucfull;
  logic [2*N-1:0] n1 = '0, n2 = '0;
  logic [4*N-1:0] res;
  int checks = 0, failures = 0;
  logic [4*N-1:0] expq[$];

  always #5 clk = ~clk;

  cmul #(.N_BITS(N)) dut (.clk, .rst_n, .prefire, .n1, .n2, .prefull, .sucfire, .sucfull, .res);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  function automatic logic [4*N-1:0] cref(input logic [2*N-1:0] a, input logic [2*N-1:0] b);
    longint ar, ai, br, bi, re, im;
    ar = longint'($signed(a[2*N-1:N])); ai = longint'($signed(a[N-1:0]));
    br = longint'($signed(b[2*N-1:N])); bi = longint'($signed(b[N-1:0]));
    re = ar * br - ai * bi;
    im = ar * bi + ai * br;
    return {re[2*N-1:0], im[2*N-1:0]};
  endfunction

  function automatic logic [2*N-1:0] rnd();
    logic [2*N-1:0] v;
    v = {N'($urandom), N'($urandom)};
    return v;
  endfunction

  task automatic one(input logic [2*N-1:0] a, input logic [2*N-1:0] b, output int lat);
    while (prefull) tick();
    prefire = 1; n1 = a; n2 = b; tick(); prefire = 0;
    lat = 1;
    while (!sucfull && lat < 5000) begin tick(); lat++; end
    check(res == cref(a, b), $sformatf("(%h)*(%h) = %h, got %h", a, b, cref(a, b), res));
    sucfire = 1; tick(); sucfire = 0;
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat, lat0, accepted;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tick();
    one({32'sd3, 32'sd4}, {32'sd5, -32'sd6}, lat0);   // (3+4j)(5-6j) = 39+2j
    check(res == {64'sd39, 64'sd2}, "(3+4j)(5-6j) = 39+2j");
    one({32'sh4000_0000, 32'sd0}, {-32'sd7, 32'sd9}, lat);
    one({32'sh8000_0000, 32'sh7fff_ffff}, {32'sh7fff_ffff, 32'sh8000_0000}, lat);
    for (int k = 0; k < 20; k++) begin
      one(rnd(), rnd(), lat);
      check(lat == lat0, $sformatf("isolated latency %0d, same as the first %0d", lat, lat0));
    end
    check(lat0 == 264, $sformatf("isolated latency %0d, expected 264 = 4 * (2n+2) + 8", lat0));
    // pipelining depth
    accepted = 0;
    for (int c = 0; c < 5000; c++) begin
      if (!prefull) begin
        prefire = 1; n1 = rnd(); n2 = rnd();
        expq.push_back(cref(n1, n2));
        accepted++;
      end
      tick(); prefire = 0;
    end
    $display("requests accepted before the first read: %0d", accepted);
    check(accepted == 3, "three requests taken before the first result is read");
    for (int c = 0; c < 60000 && (expq.size() > 0 || c < 40000); c++) begin
      if (c < 40000 && !prefull && $urandom_range(0, 1) == 1) begin
        prefire = 1; n1 = rnd(); n2 = rnd();
        expq.push_back(cref(n1, n2));
      end
      if (sucfull && $urandom_range(0, 3) != 0) begin
        check(expq.size() > 0 && res == expq[0], "streamed product in order");
        void'(expq.pop_front());
        sucfire = 1;
      end
      tick(); prefire = 0; sucfire = 0;
    end
    check(expq.size() == 0, "all streamed products returned");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
