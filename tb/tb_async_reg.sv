// tb_async_reg: self-checking testbench for async_reg.
// Directed sequences: a load reaches Lout two cycles later; an update written
// while Lout is full waits in Lin and the old value stays readable; releasing
// Lout lets the update through; a load has priority over a waiting update
// and discards it; an update into an empty register passes straight through.
module tb_async_reg;
  logic clk = 0, rst_n = 0;
  logic ld_fire = 0, wr_fire = 0, rd_fire = 0;
  logic [15:0] ld_data = '0, wr_data = '0, rd_data;
  logic ld_full, wr_full, rd_full;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  async_reg #(.W(16)) dut (.clk, .rst_n, .ld_fire, .ld_data, .ld_full,
    .wr_fire, .wr_data, .wr_full, .rd_fire, .rd_full, .rd_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  task automatic tick(); @(posedge clk); #1; endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    tick();
    check(!ld_full && !wr_full && !rd_full, "empty after reset");
    for (int rep = 0; rep < 20; rep++) begin
      logic [15:0] a, b, c;
      a = 16'($urandom); b = 16'($urandom); c = 16'($urandom);
      // load a
      ld_fire = 1; ld_data = a; tick(); ld_fire = 0;
      check(ld_full && !rd_full, "load sits in Li for one cycle");
      tick();
      check(!ld_full && rd_full && rd_data == a, "load reaches Lout after two cycles");
      // update b while a is still held
      wr_fire = 1; wr_data = b; tick(); wr_fire = 0;
      check(wr_full && rd_full && rd_data == a, "update waits, old value readable");
      tick(); tick();
      check(wr_full && rd_full && rd_data == a, "old value kept until released");
      // release a: b moves
      rd_fire = 1; tick(); rd_fire = 0;
      check(!rd_full && wr_full, "Lout released");
      tick();
      check(!wr_full && rd_full && rd_data == b, "update moves to Lout");
      // update c waits, then a load of a discards it
      wr_fire = 1; wr_data = c; tick(); wr_fire = 0;
      ld_fire = 1; ld_data = a ^ 16'h5a5a; tick(); ld_fire = 0;
      tick();
      check(!ld_full && !wr_full && rd_full && rd_data == (a ^ 16'h5a5a),
            "load has priority and discards the waiting update");
      // empty the register, then an update passes straight through
      rd_fire = 1; tick(); rd_fire = 0;
      wr_fire = 1; wr_data = c; tick(); wr_fire = 0;
      tick();
      check(!wr_full && rd_full && rd_data == c, "update into empty register passes through");
      rd_fire = 1; tick(); rd_fire = 0;
      check(!rd_full, "empty at end of sequence");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
