// async_reg: the asynchronous register (links Li, Lin, Lout and joint Ji).
//
// The link-joint model forbids a joint from reading and writing the same
// link, and a link from having two writers. The asynchronous register gets
// round both rules: an outside joint loads an initial value into Li
// (ld_fire), the processing joint writes updates into Lin (wr_fire) and reads
// the current value from Lout. The internal joint Ji follows the document's
// fire rule:
//   if Li is full              : Lout <= Li; fire Li, Lin and Lout
//   else if Lin full, Lout empty: Lout <= Lin; fire Lin and Lout
// so a load has priority and discards any pending update, and a value written
// into Lin waits there, while the old value stays readable in Lout, until the
// reader releases Lout with rd_fire.
//
// Timing (synchronous equivalent of the self-timed circuit, one fire per
// clock edge): a load or write becomes visible in Lout two cycles after the
// firing edge if Lout is free. Reset empties all three links, except that
// OUT_INIT_FULL = 1 makes Lout start full with the value 0, for a register
// that is never loaded and simply circulates a joint's state.
module async_reg #(
  parameter int W             = 8,
  parameter bit OUT_INIT_FULL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  // load port (Li)
  input  logic         ld_fire,
  input  logic [W-1:0] ld_data,
  output logic         ld_full,
  // update port (Lin)
  input  logic         wr_fire,
  input  logic [W-1:0] wr_data,
  output logic         wr_full,
  // read port (Lout)
  input  logic         rd_fire,
  output logic         rd_full,
  output logic [W-1:0] rd_data
);

  logic [W-1:0] li_q, lin_q;
  logic         ji_from_li, ji_from_lin, lout_wr, li_rd, lin_rd;

  // Joint Ji
  always_comb begin
    ji_from_li  = ld_full;
    ji_from_lin = !ld_full && wr_full && !rd_full;
    li_rd       = ji_from_li;
    lin_rd      = (ji_from_li && wr_full) || ji_from_lin;
    lout_wr     = ji_from_li || ji_from_lin;
  end

  lj_link #(.W(W)) u_li (
    .clk, .rst_n, .wr_fire(ld_fire), .din(ld_data), .rd_fire(li_rd),
    .full(ld_full), .dout(li_q));

  lj_link #(.W(W)) u_lin (
    .clk, .rst_n, .wr_fire(wr_fire), .din(wr_data), .rd_fire(lin_rd),
    .full(wr_full), .dout(lin_q));

  // Lout is written by Ji; when Ji overrides from Li while Lout is still
  // full, the outside reader's release and Ji's write coincide.
  lj_link #(.W(W), .INIT_FULL(OUT_INIT_FULL)) u_lout (
    .clk, .rst_n, .wr_fire(lout_wr), .din(ji_from_li ? li_q : lin_q),
    .rd_fire(rd_fire || (ji_from_li && rd_full)),
    .full(rd_full), .dout(rd_data));

endmodule
