// umul: self-timed n-bit unsigned shift-and-add multiplier (a complex link).
//
// Structure, following the document's link-joint drawing of the multiplier:
//   Lstart  0-bit link (here 1 bit), full while a request is being computed;
//           its full flag is the module's prefull output
//   L1      multiplicand, read (never written) by the centre joint J1
//   Ji2     asynchronous register L2 (load) / L4 (update) / L3 (current):
//           the multiplier word, shifted left once per iteration
//   Ji1     asynchronous register LDm1 / Lcnt2 / Lcnt1: the iteration counter,
//           loaded with 0
//   Ji3     asynchronous register LDm2 / Lacc2 / Lacc1: the 2n-bit
//           accumulator, loaded with 0
//   L5      2n-bit result link; its full flag is sucfull
// The outside joint fires prefire with the operands m1 (multiplicand) and m2
// (multiplier); this loads Lstart, L1, L2, LDm1 and LDm2 together. The centre
// joint J1 fires when Lstart, L1 and the three register outputs are full and
// their update links are empty. Each firing takes the MSB of the multiplier
// word: acc <= (acc << 1) + (MSB ? m1 : 0), multiplier <= multiplier << 1,
// cnt <= cnt + 1. When cnt = n-1 it instead writes the final sum to L5
// (waiting while L5 is full) and releases Lstart and L1, so the next request
// can be loaded while the result still waits to be read (two requests in
// flight).
//
// Timing (synchronous equivalent, one fire per clock edge): with L5 empty,
// sucfull rises 2n+1 cycles after the prefire edge, and prefull falls at the
// same edge. Reading the result is sucfire for one cycle while sucfull is 1.
// Links are the document's; the clocked firing and the 1-bit stand-in for
// the 0-bit Lstart link are this implementation's choices.
module umul #(
  parameter int N_BITS = 32,
  localparam int CW = (N_BITS > 1) ? $clog2(N_BITS) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  prefire,
  input  logic [N_BITS-1:0]     m1,
  input  logic [N_BITS-1:0]     m2,
  output logic                  prefull,
  input  logic                  sucfire,
  output logic                  sucfull,
  output logic [2*N_BITS-1:0]   res
);

  logic                start_full, start_q, l1_full;
  logic [N_BITS-1:0]   mcand;
  logic                cnt_full, cnt_in_full, mpl_full, mpl_in_full, acc_full, acc_in_full;
  logic [CW-1:0]       cnt;
  logic [N_BITS-1:0]   mpl;
  logic [2*N_BITS-1:0] acc, acc_next;
  logic                j1_ready, j1_step, j1_finish;

  lj_link #(.W(1)) u_lstart (
    .clk, .rst_n, .wr_fire(prefire), .din(1'b1), .rd_fire(j1_finish),
    .full(start_full), .dout(start_q));

  lj_link #(.W(N_BITS)) u_l1 (
    .clk, .rst_n, .wr_fire(prefire), .din(m1), .rd_fire(j1_finish),
    .full(l1_full), .dout(mcand));

  async_reg #(.W(CW)) u_cnt (
    .clk, .rst_n,
    .ld_fire(prefire), .ld_data('0), .ld_full(),
    .wr_fire(j1_step), .wr_data(cnt + CW'(1)), .wr_full(cnt_in_full),
    .rd_fire(j1_step || j1_finish), .rd_full(cnt_full), .rd_data(cnt));

  async_reg #(.W(N_BITS)) u_mpl (
    .clk, .rst_n,
    .ld_fire(prefire), .ld_data(m2), .ld_full(),
    .wr_fire(j1_step), .wr_data(mpl << 1), .wr_full(mpl_in_full),
    .rd_fire(j1_step || j1_finish), .rd_full(mpl_full), .rd_data(mpl));

  async_reg #(.W(2*N_BITS)) u_acc (
    .clk, .rst_n,
    .ld_fire(prefire), .ld_data('0), .ld_full(),
    .wr_fire(j1_step), .wr_data(acc_next), .wr_full(acc_in_full),
    .rd_fire(j1_step || j1_finish), .rd_full(acc_full), .rd_data(acc));

  // Centre joint J1
  always_comb begin
    acc_next  = (acc << 1) + (mpl[N_BITS-1] ? {{N_BITS{1'b0}}, mcand} : '0);
    j1_ready  = start_full && start_q && l1_full && cnt_full && mpl_full && acc_full
                && !cnt_in_full && !mpl_in_full && !acc_in_full;
    j1_step   = j1_ready && (cnt != CW'(N_BITS - 1));
    j1_finish = j1_ready && (cnt == CW'(N_BITS - 1)) && !sucfull;
  end

  lj_link #(.W(2*N_BITS)) u_l5 (
    .clk, .rst_n, .wr_fire(j1_finish), .din(acc_next), .rd_fire(sucfire),
    .full(sucfull), .dout(res));

  assign prefull = start_full;

  a_prefire_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
    prefire |-> !prefull);

endmodule
