// tb_smul: self-checking testbench for the signed multiplier (n = 32).
// Checks: products of random and corner two's complement operands against the
// testbench's own signed 64-bit multiplication; the latency of 2n+3 cycles
// for an isolated request; that exactly four requests are accepted before
// the first result is read (the document's pipelining depth); and that a
// random stream with random read delays returns every product in order.
module tb_smul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic prefire = 0, sucfire = 0, prefull, sucfull;
  logic signed [N-1:0] m1 = '0, m2 = '0;
  logic signed [2*N-1:0] res;
  int checks = 0, failures = 0;
  logic signed [2*N-1:0] expq[$];

  always #5 clk = ~clk;

  smul #(.N_BITS(N)) dut (.clk, .rst_n, .prefire, .m1, .m2, .prefull, .sucfire, .sucfull, .res);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  task automatic one(input logic signed [N-1:0] a, input logic signed [N-1:0] b);
    int lat;
    logic signed [2*N-1:0] e;
    e = 64'(a) * 64'(b);
    while (prefull) tick();
    prefire = 1; m1 = a; m2 = b; tick(); prefire = 0;
    lat = 1;
    while (!sucfull && lat < 1000) begin tick(); lat++; end
    check(res == e, $sformatf("%0d * %0d = %0d, got %0d", a, b, e, res));
    check(lat == 2 * N + 3, $sformatf("latency %0d, expected %0d", lat, 2 * N + 3));
    sucfire = 1; tick(); sucfire = 0;
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int accepted;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tick();
    one(0, -1);
    one(-1, -1);
    one(-5, 7);
    one(32'sh8000_0000, 32'sh8000_0000);
    one(32'sh8000_0000, 32'sh7fff_ffff);
    one(32'sh7fff_ffff, -1);
    for (int k = 0; k < 40; k++) one(N'($urandom), N'($urandom));
    // pipelining depth: push while accepted, never read
    accepted = 0;
    for (int c = 0; c < 2000; c++) begin
      if (!prefull) begin
        prefire = 1; m1 = N'($urandom); m2 = N'($urandom);
        expq.push_back(64'(m1) * 64'(m2));
        accepted++;
      end
      tick(); prefire = 0;
    end
    check(accepted == 4, $sformatf("%0d requests accepted before the first read, expected 4", accepted));
    // drain, then random stream
    for (int c = 0; c < 20000 && (expq.size() > 0 || c < 12000); c++) begin
      if (c < 12000 && !prefull && $urandom_range(0, 1) == 1) begin
        prefire = 1; m1 = N'($urandom); m2 = N'($urandom);
        if ($urandom_range(0, 7) == 0) m1 = 32'sh8000_0000;
        expq.push_back(64'(m1) * 64'(m2));
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
