// lj_link: one link of the link-joint model.
//
// A link is a storage element: a data word plus a full flag. The joint that
// writes the link asserts wr_fire together with din; the data is captured and
// the link becomes full. The joint that reads the link asserts rd_fire; the
// link becomes empty (the data word keeps its value, only the full flag
// changes). The document builds a link from D-latches for the data and an SR
// latch for the full flag, fired by self-timed joints. This implementation is
// a synchronous equivalent: every fire is sampled on the rising clock edge,
// so a joint's fire rule is a combinational expression of the full flags and
// a firing takes effect one clock cycle later.
//
// Interface: wr_fire/din from the writer joint, rd_fire from the reader
// joint, full/dout to both. Firing rd_fire and wr_fire in the same cycle
// replaces the word and leaves the link full. Writing a full link without
// reading it in the same cycle is a protocol error (checked by an assertion).
// Reset (synchronous, active low) empties the link and clears the data
// word; a link instantiated with INIT_FULL = 1 instead comes out of reset
// full, holding a zero word (an initial token, used for links that carry a
// joint's running state).
module lj_link #(
  parameter int W         = 8,
  parameter bit INIT_FULL = 1'b0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_fire,
  input  logic [W-1:0] din,
  input  logic         rd_fire,
  output logic         full,
  output logic [W-1:0] dout
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full <= INIT_FULL;
      dout <= '0;
    end else begin
      if (wr_fire) begin
        dout <= din;
        full <= 1'b1;
      end else if (rd_fire) begin
        full <= 1'b0;
      end
    end
  end

  // A writer may only fire into an empty link (or one read in the same cycle);
  // a reader may only fire on a full link.
  a_no_overwrite : assert property (@(posedge clk) disable iff (!rst_n)
    wr_fire |-> (!full || rd_fire));
  a_no_empty_read : assert property (@(posedge clk) disable iff (!rst_n)
    rd_fire |-> full);

endmodule
