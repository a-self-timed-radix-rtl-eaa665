// tb_lj_queue: self-checking testbench for lj_queue.
// Random pushes and pops on a 4-deep queue of 12-bit words; every popped word
// is compared with a SystemVerilog queue used as the reference. Also checks
// that the queue holds exactly DEPTH words when nothing is popped.
module tb_lj_queue;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push_fire = 0, pop_fire = 0, push_full, pop_full;
  logic [11:0] push_data = '0, pop_data;
  int checks = 0, failures = 0;
  logic [11:0] model[$];
  int accepted;

  always #5 clk = ~clk;

  lj_queue #(.W(12), .DEPTH(DEPTH)) dut (.clk, .rst_n, .push_fire, .push_data, .push_full,
    .pop_fire, .pop_full, .pop_data);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    // capacity: push whenever possible, never pop
    accepted = 0;
    for (int n = 0; n < 40; n++) begin
      push_fire = !push_full; push_data = 12'(n);
      if (push_fire) begin model.push_back(push_data); accepted++; end
      @(posedge clk); #1;
    end
    push_fire = 0;
    check(accepted == DEPTH, $sformatf("capacity %0d", accepted));
    // random traffic
    for (int n = 0; n < 5000; n++) begin
      push_fire = !push_full && ($urandom_range(0, 1) == 1);
      push_data = 12'($urandom);
      pop_fire  = pop_full && ($urandom_range(0, 2) != 0);
      if (pop_fire) begin
        check(model.size() > 0 && pop_data == model[0], "pop data in order");
        void'(model.pop_front());
      end
      if (push_fire) model.push_back(push_data);
      @(posedge clk); #1;
    end
    push_fire = 0; pop_fire = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
