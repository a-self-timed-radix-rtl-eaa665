// tb_umul: self-checking testbench for the unsigned multiplier (n = 32).
// Checks: products of random and corner operands against the testbench's own
// 64-bit multiplication; the latency of 2n+1 cycles from the prefire edge to
// sucfull; and pipelining: a second request is accepted (prefull falls)
// while the first result is still unread, and its result follows in order.
module tb_umul;
  localparam int N = 32;
  logic clk = 0, rst_n = 0;
  logic prefire = 0, sucfire = 0, prefull, sucfull;
  logic [N-1:0] m1 = '0, m2 = '0;
  logic [2*N-1:0] res;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  umul #(.N_BITS(N)) dut (.clk, .rst_n, .prefire, .m1, .m2, .prefull, .sucfire, .sucfull, .res);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  // one isolated multiplication; returns latency in cycles
  task automatic one(input logic [N-1:0] a, input logic [N-1:0] b);
    int lat;
    while (prefull) tick();
    prefire = 1; m1 = a; m2 = b; tick(); prefire = 0;
    lat = 1;
    while (!sucfull && lat < 1000) begin tick(); lat++; end
    check(res == 64'(a) * 64'(b), $sformatf("%0d * %0d = %0d, got %0d", a, b, 64'(a) * 64'(b), res));
    check(lat == 2 * N + 1, $sformatf("latency %0d, expected %0d", lat, 2 * N + 1));
    check(!prefull, "prefull falls when the result is written");
    sucfire = 1; tick(); sucfire = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] a[3], b[3];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tick();
    one('0, '0);
    one('1, '1);
    one('1, 1);
    one(32'h8000_0000, 32'h8000_0000);
    one(12345, 6789);
    for (int k = 0; k < 60; k++) one(N'($urandom), N'($urandom));
    // pipelining: three requests, result read only at the end
    for (int k = 0; k < 3; k++) begin a[k] = N'($urandom); b[k] = N'($urandom); end
    prefire = 1; m1 = a[0]; m2 = b[0]; tick(); prefire = 0;
    while (!sucfull) tick();
    check(!prefull, "ready for a second request while the first result waits");
    prefire = 1; m1 = a[1]; m2 = b[1]; tick(); prefire = 0;
    repeat (4 * N) tick();
    check(prefull && sucfull && res == 64'(a[0]) * 64'(b[0]),
          "second request stalls at its end while result 1 is unread");
    sucfire = 1; tick(); sucfire = 0;
    tick();
    check(sucfull && res == 64'(a[1]) * 64'(b[1]), "second result follows at once");
    check(!prefull, "free again after the second result is written");
    sucfire = 1; tick(); sucfire = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
