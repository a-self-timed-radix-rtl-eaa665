// smul: self-timed n-bit signed (two's complement) multiplier.
//
// The unsigned multiplier is used as a link between two joints:
//   J1  fires when the request links (L-busy, L1 = multiplicand,
//       L2 = multiplier) are full, the unsigned multiplier is not prefull and
//       the sign queue has room. It hands the magnitudes |m1| and |m2| to the
//       unsigned multiplier, pushes the product's sign (m1[n-1] ^ m2[n-1])
//       into the sign queue, and releases the request links.
//   J2  the joint inside the two-link sign queue (Lsign1 -> Lsign2).
//   J3  fires when the unsigned multiplier holds a result, the sign queue
//       head is full and the result link L3 is empty. It writes the result,
//       negated if the sign is 1, into L3 and reads both.
// Because the unsigned multiplier can hold one finished and one running
// product, up to four requests are held at once: one in L3, two in the
// unsigned multiplier and one in L1/L2.
//
// Interface: prefire with m1/m2 while prefull is 0 loads a request; sucfull
// and res (2n-bit two's complement) present the result, sucfire reads it.
// Timing (synchronous equivalent): an isolated request appears in L3
// 2n+3 cycles after its prefire edge. The magnitude of -2^(n-1) is 2^(n-1),
// which still fits the n-bit unsigned operand, so every input pair is exact.
module smul #(
  parameter int N_BITS = 32
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         prefire,
  input  logic signed [N_BITS-1:0]     m1,
  input  logic signed [N_BITS-1:0]     m2,
  output logic                         prefull,
  input  logic                         sucfire,
  output logic                         sucfull,
  output logic signed [2*N_BITS-1:0]   res
);

  logic                  busy_full, busy_q, l1_full, l2_full;
  logic [N_BITS-1:0]     a_q, b_q, a_mag, b_mag;
  logic                  u_prefull, u_sucfull;
  logic [2*N_BITS-1:0]   u_res;
  logic                  sq_push_full, sq_pop_full, sq_sign;
  logic                  j1_fire, j3_fire;
  logic [2*N_BITS-1:0]   signed_res;

  lj_link #(.W(1)) u_busy (
    .clk, .rst_n, .wr_fire(prefire), .din(1'b1), .rd_fire(j1_fire),
    .full(busy_full), .dout(busy_q));

  lj_link #(.W(N_BITS)) u_l1 (
    .clk, .rst_n, .wr_fire(prefire), .din(m1), .rd_fire(j1_fire),
    .full(l1_full), .dout(a_q));

  lj_link #(.W(N_BITS)) u_l2 (
    .clk, .rst_n, .wr_fire(prefire), .din(m2), .rd_fire(j1_fire),
    .full(l2_full), .dout(b_q));

  // J1: two's complement the negative operands
  always_comb begin
    a_mag   = a_q[N_BITS-1] ? (~a_q + 1'b1) : a_q;
    b_mag   = b_q[N_BITS-1] ? (~b_q + 1'b1) : b_q;
    j1_fire = busy_full && busy_q && l1_full && l2_full && !u_prefull && !sq_push_full;
  end

  umul #(.N_BITS(N_BITS)) u_umul (
    .clk, .rst_n, .prefire(j1_fire), .m1(a_mag), .m2(b_mag), .prefull(u_prefull),
    .sucfire(j3_fire), .sucfull(u_sucfull), .res(u_res));

  lj_queue #(.W(1), .DEPTH(2)) u_signq (
    .clk, .rst_n, .push_fire(j1_fire), .push_data(a_q[N_BITS-1] ^ b_q[N_BITS-1]),
    .push_full(sq_push_full), .pop_fire(j3_fire), .pop_full(sq_pop_full),
    .pop_data(sq_sign));

  // J3: two's complement the result if it is to be negative
  always_comb begin
    signed_res = sq_sign ? (~u_res + 1'b1) : u_res;
    j3_fire    = u_sucfull && sq_pop_full && !sucfull;
  end

  lj_link #(.W(2*N_BITS)) u_l3 (
    .clk, .rst_n, .wr_fire(j3_fire), .din(signed_res), .rd_fire(sucfire),
    .full(sucfull), .dout(res));

  assign prefull = busy_full;

  a_prefire_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
    prefire |-> !prefull);

endmodule
