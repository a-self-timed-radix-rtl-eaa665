// tb_lj_link: self-checking testbench for lj_link.
// Drives random legal write/read firings into an 8-bit link (and a link with
// INIT_FULL = 1) and compares the full flag and data word, cycle by cycle,
// with a reference model kept in the testbench.
module tb_lj_link;
  logic clk = 0, rst_n = 0;
  logic wr_fire = 0, rd_fire = 0;
  logic [7:0] din = '0, dout;
  logic full, full_i;
  logic [7:0] dout_i;
  int checks = 0, failures = 0;
  logic exp_full;
  logic [7:0] exp_data;

  always #5 clk = ~clk;

  lj_link #(.W(8)) dut (.clk, .rst_n, .wr_fire, .din, .rd_fire, .full, .dout);
  lj_link #(.W(8), .INIT_FULL(1'b1)) dut_i (.clk, .rst_n, .wr_fire(1'b0), .din('0),
    .rd_fire(1'b0), .full(full_i), .dout(dout_i));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    check(full == 0 && dout == 0, "reset empties the link");
    check(full_i == 1 && dout_i == 0, "INIT_FULL link comes out of reset full");
    exp_full = 0; exp_data = 0;
    for (int n = 0; n < 2000; n++) begin
      // choose a legal firing for this cycle
      rd_fire <= exp_full && ($urandom_range(0, 1) == 1);
      wr_fire <= 0;
      din     <= 8'($urandom);
      #1;
      if ((!exp_full || rd_fire) && $urandom_range(0, 2) != 0) wr_fire <= 1;
      #1;
      @(posedge clk);
      if (wr_fire) begin exp_full = 1; exp_data = din; end
      else if (rd_fire) exp_full = 0;
      #1;
      check(full == exp_full, "full flag");
      if (exp_full) check(dout == exp_data, "data word");
    end
    wr_fire <= 0; rd_fire <= 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
