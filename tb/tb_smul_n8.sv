// tb_smul_n8: exhaustive test of an 8-bit signed multiplier (and through it
// the unsigned multiplier): all 65,536 operand pairs are streamed through
// with the result read as soon as it appears, and each product is compared
// with the testbench's own signed multiplication.
module tb_smul_n8;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic prefire = 0, sucfire = 0, prefull, sucfull;
  logic signed [N-1:0] m1 = '0, m2 = '0;
  logic signed [2*N-1:0] res;
  int checks = 0, failures = 0;
  logic signed [2*N-1:0] expq[$];

  always #5 clk = ~clk;

  smul #(.N_BITS(N)) dut (.clk, .rst_n, .prefire, .m1, .m2, .prefull, .sucfire, .sucfull, .res);

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int next;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    next = 0;
    while (next < 65536 || expq.size() > 0) begin
      if (next < 65536 && !prefull) begin
        prefire = 1;
        m1 = N'(next >> 8);
        m2 = N'(next);
        expq.push_back(16'(m1) * 16'(m2));
        next++;
      end
      if (sucfull) begin
        checks++;
        if (expq.size() == 0 || res != expq[0]) begin
          failures++;
          if (failures < 10) $display("FAIL: got %0d expected %0d", res, expq[0]);
        end
        void'(expq.pop_front());
        sucfire = 1;
      end
      @(posedge clk); #1;
      prefire = 0; sucfire = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
