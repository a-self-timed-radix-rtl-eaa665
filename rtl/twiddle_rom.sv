// twiddle_rom: read-only table of the FFT constants W_N^z = exp(-j*2*pi*z/N).
//
// Entry z (0 <= z < N) holds re = cos(2*pi*z/N) and im = -sin(2*pi*z/N) as
// DW-bit two's complement fixed-point numbers with FRAC = DW-2 fraction bits
// (so +1.0 and -1.0 are both representable), rounded to nearest. The table is
// computed at elaboration by a constant function; nothing is read from a
// file. The lookup is combinational: the controller joint that reads the ROM
// sees the entry in the same cycle, so the ROM behaves as a link that is
// always full. The document names the ROM and the formula for W; the number
// format and the combinational read are this design's choices.
module twiddle_rom #(
  parameter int NPT  = 8,
  parameter int DW   = 32,
  localparam int AW  = (NPT > 1) ? $clog2(NPT) : 1,
  localparam int FRAC = DW - 2
) (
  input  logic [AW-1:0]        z,
  output logic signed [DW-1:0] w_re,
  output logic signed [DW-1:0] w_im
);

  typedef logic signed [DW-1:0] tab_t [NPT];

  localparam real PI    = 3.14159265358979323846;
  localparam real SCALE = 2.0 ** FRAC;

  function automatic tab_t make_cos();
    tab_t t;
    for (int k = 0; k < NPT; k++)
      t[k] = DW'($rtoi($floor($cos(2.0 * PI * k / NPT) * SCALE + 0.5)));
    return t;
  endfunction

  function automatic tab_t make_msin();
    tab_t t;
    for (int k = 0; k < NPT; k++)
      t[k] = DW'($rtoi($floor(-$sin(2.0 * PI * k / NPT) * SCALE + 0.5)));
    return t;
  endfunction

  localparam tab_t COS_TAB  = make_cos();
  localparam tab_t MSIN_TAB = make_msin();

  assign w_re = COS_TAB[z];
  assign w_im = MSIN_TAB[z];

endmodule
