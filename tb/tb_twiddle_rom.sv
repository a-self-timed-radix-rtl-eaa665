// tb_twiddle_rom: self-checking testbench for twiddle_rom.
// For N = 8 (DW = 32) and N = 16 (DW = 16) every entry is compared with
// cos(2*pi*z/N) and -sin(2*pi*z/N) computed here in double precision
// (allowing half an LSB of rounding), and the exact values at z = 0, N/4 and
// N/2 are checked.
module tb_twiddle_rom;
  int checks = 0, failures = 0;
  logic [2:0] z8;
  logic [3:0] z16;
  logic signed [31:0] re8, im8;
  logic signed [15:0] re16, im16;
  localparam real PI = 3.14159265358979323846;

  twiddle_rom #(.NPT(8), .DW(32)) dut8 (.z(z8), .w_re(re8), .w_im(im8));
  twiddle_rom #(.NPT(16), .DW(16)) dut16 (.z(z16), .w_re(re16), .w_im(im16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic bit near(input real got, input real want);
    return (got - want) <= 0.5 && (want - got) <= 0.5;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int z = 0; z < 8; z++) begin
      z8 = 3'(z); #1;
      check(near(real'(re8), $cos(2.0 * PI * z / 8) * (2.0 ** 30)), $sformatf("N=8 re[%0d]", z));
      check(near(real'(im8), -$sin(2.0 * PI * z / 8) * (2.0 ** 30)), $sformatf("N=8 im[%0d]", z));
    end
    z8 = 0; #1; check(re8 == 32'sd1 <<< 30 && im8 == 0, "W^0 = 1");
    z8 = 2; #1; check(re8 == 0 && im8 == -(32'sd1 <<< 30), "W^(N/4) = -j");
    z8 = 4; #1; check(re8 == -(32'sd1 <<< 30) && im8 == 0, "W^(N/2) = -1");
    for (int z = 0; z < 16; z++) begin
      z16 = 4'(z); #1;
      check(near(real'(re16), $cos(2.0 * PI * z / 16) * (2.0 ** 14)), $sformatf("N=16 re[%0d]", z));
      check(near(real'(im16), -$sin(2.0 * PI * z / 16) * (2.0 ** 14)), $sformatf("N=16 im[%0d]", z));
    end
    z16 = 12; #1; check(re16 == 0 && im16 == 16'sd16384, "W^(3N/4) = +j");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
