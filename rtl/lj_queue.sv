// lj_queue: a first-in first-out queue built as a chain of links.
//
// DEPTH links are placed in a row with a joint between each neighbouring
// pair. Each joint fires when the link before it is full and the link after
// it is empty, moving the word one place forward (the document's sign queue
// Lsign1 -> J2 -> Lsign2 is the DEPTH = 2 case). The queue therefore behaves
// as a complex link: the writer sees the full flag of the first link
// (push_full), the reader sees the full flag and data of the last link.
//
// Timing: a word pushed at an edge reaches the head DEPTH-1 cycles later if
// the queue is empty; the queue holds up to DEPTH words. Reset empties it.
module lj_queue #(
  parameter int W     = 8,
  parameter int DEPTH = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         push_fire,
  input  logic [W-1:0] push_data,
  output logic         push_full,
  input  logic         pop_fire,
  output logic         pop_full,
  output logic [W-1:0] pop_data
);

  logic [DEPTH-1:0]        full_q;
  logic [DEPTH-1:0][W-1:0] data_q;
  logic [DEPTH-1:0]        wr, rd;

  // Joints between stage k-1 and stage k
  always_comb begin
    wr[0] = push_fire;
    for (int k = 1; k < DEPTH; k++) begin
      wr[k]   = full_q[k-1] && !full_q[k];
      rd[k-1] = wr[k];
    end
    rd[DEPTH-1] = pop_fire;
  end

  for (genvar k = 0; k < DEPTH; k++) begin : g_stage
    lj_link #(.W(W)) u_link (
      .clk, .rst_n, .wr_fire(wr[k]),
      .din(k == 0 ? push_data : data_q[(k == 0) ? 0 : k-1]),
      .rd_fire(rd[k]), .full(full_q[k]), .dout(data_q[k]));
  end

  assign push_full = full_q[0];
  assign pop_full  = full_q[DEPTH-1];
  assign pop_data  = data_q[DEPTH-1];

endmodule
