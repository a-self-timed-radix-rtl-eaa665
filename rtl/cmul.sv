// cmul: self-timed complex multiplier built on one signed multiplier.
//
// (ar + j ai)(br + j bi) = (ar*br - ai*bi) + j (ar*bi + ai*br) is computed
// with four real multiplications, all on a single signed multiplier that is
// used as a link between an issue joint and a collect joint:
//   JI  issue joint. It fires when the request links (L-busy, L1 = N1,
//       L2 = N2) are full, the signed multiplier is not prefull and the
//       state queue has room. Its phase (0..3) is held in an asynchronous
//       register that circulates a 2-bit count. Phase 0..3 issue ar*br,
//       ai*bi, ar*bi, ai*br; each issue pushes a 1-bit state into the state
//       queue (1 = subtract this product, set only for ai*bi). Phase 3 also
//       releases the request links, so prefull falls.
//   State1..State4  a four-link queue of those 1-bit states, one per product
//       the signed multiplier can hold.
//   JC  collect joint. It fires when a product and its state are present;
//       its running sums (2-bit position, real sum, imaginary sum) circulate
//       in a second asynchronous register. Position 3 writes
//       {re, im} into the 4n-bit result link L3 (waiting while L3 is full).
//
// Interface: n1/n2 are {re, im} pairs of n-bit two's complement numbers
// (real part in the upper half); prefire loads a request while prefull is 0.
// res is {re, im} with 2n-bit parts; sucfull/sucfire as for any link. The
// 2n-bit real and imaginary sums wrap only for the single input corner
// (-2^(n-1))^2 + (-2^(n-1))^2.
// The four-product split, the state queue and the use of the signed
// multiplier follow the document; the product order, the meaning of the
// 1-bit state and the phase/position registers are this design's choices.
module cmul #(
  parameter int N_BITS = 32
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  prefire,
  input  logic [2*N_BITS-1:0]   n1,
  input  logic [2*N_BITS-1:0]   n2,
  output logic                  prefull,
  input  logic                  sucfire,
  output logic                  sucfull,
  output logic [4*N_BITS-1:0]   res
);

  typedef logic signed [N_BITS-1:0]   half_t;
  typedef logic signed [2*N_BITS-1:0] prod_t;

  // collect-side running state
  typedef struct packed {
    logic [1:0] pos;
    prod_t      re;
    prod_t      im;
  } part_t;

  logic                busy_full, busy_q, l1_full, l2_full;
  logic [2*N_BITS-1:0] a_q, b_q;
  half_t               ar, ai, br, bi, op1, op2;
  logic                ph_full, ph_in_full;
  logic [1:0]          phase;
  logic                s_prefull, s_sucfull;
  prod_t               s_res;
  logic                st_push_full, st_pop_full, st_sub;
  logic                ji_fire, ji_last, jc_ready, jc_acc, jc_out;
  part_t               part, part_next;
  logic                pt_full, pt_in_full;
  logic [4*N_BITS-1:0] res_next;

  lj_link #(.W(1)) u_busy (
    .clk, .rst_n, .wr_fire(prefire), .din(1'b1), .rd_fire(ji_last),
    .full(busy_full), .dout(busy_q));

  lj_link #(.W(2*N_BITS)) u_l1 (
    .clk, .rst_n, .wr_fire(prefire), .din(n1), .rd_fire(ji_last),
    .full(l1_full), .dout(a_q));

  lj_link #(.W(2*N_BITS)) u_l2 (
    .clk, .rst_n, .wr_fire(prefire), .din(n2), .rd_fire(ji_last),
    .full(l2_full), .dout(b_q));

  async_reg #(.W(2), .OUT_INIT_FULL(1'b1)) u_phase (
    .clk, .rst_n,
    .ld_fire(1'b0), .ld_data('0), .ld_full(),
    .wr_fire(ji_fire), .wr_data(phase + 2'd1), .wr_full(ph_in_full),
    .rd_fire(ji_fire), .rd_full(ph_full), .rd_data(phase));

  // Issue joint JI
  always_comb begin
    ar = a_q[2*N_BITS-1:N_BITS];
    ai = a_q[N_BITS-1:0];
    br = b_q[2*N_BITS-1:N_BITS];
    bi = b_q[N_BITS-1:0];
    unique case (phase)
      2'd0:    begin op1 = ar; op2 = br; end
      2'd1:    begin op1 = ai; op2 = bi; end
      2'd2:    begin op1 = ar; op2 = bi; end
      default: begin op1 = ai; op2 = br; end
    endcase
    ji_fire = busy_full && busy_q && l1_full && l2_full && ph_full && !ph_in_full
              && !s_prefull && !st_push_full;
    ji_last = ji_fire && (phase == 2'd3);
  end

  smul #(.N_BITS(N_BITS)) u_smul (
    .clk, .rst_n, .prefire(ji_fire), .m1(op1), .m2(op2), .prefull(s_prefull),
    .sucfire(jc_acc || jc_out), .sucfull(s_sucfull), .res(s_res));

  lj_queue #(.W(1), .DEPTH(4)) u_stateq (
    .clk, .rst_n, .push_fire(ji_fire), .push_data(phase == 2'd1),
    .push_full(st_push_full), .pop_fire(jc_acc || jc_out), .pop_full(st_pop_full),
    .pop_data(st_sub));

  async_reg #(.W($bits(part_t)), .OUT_INIT_FULL(1'b1)) u_part (
    .clk, .rst_n,
    .ld_fire(1'b0), .ld_data('0), .ld_full(),
    .wr_fire(jc_acc || jc_out), .wr_data(part_next), .wr_full(pt_in_full),
    .rd_fire(jc_acc || jc_out), .rd_full(pt_full), .rd_data(part));

  // Collect joint JC
  always_comb begin
    part_next     = part;
    part_next.pos = part.pos + 2'd1;
    unique case (part.pos)
      2'd0:    part_next.re = s_res;
      2'd1:    part_next.re = st_sub ? part.re - s_res : part.re + s_res;
      2'd2:    part_next.im = s_res;
      default: part_next.im = st_sub ? part.im - s_res : part.im + s_res;
    endcase
    res_next = {part_next.re, part_next.im};
    jc_ready = s_sucfull && st_pop_full && pt_full && !pt_in_full;
    jc_acc   = jc_ready && (part.pos != 2'd3);
    jc_out   = jc_ready && (part.pos == 2'd3) && !sucfull;
  end

  lj_link #(.W(4*N_BITS)) u_l3 (
    .clk, .rst_n, .wr_fire(jc_out), .din(res_next), .rd_fire(sucfire),
    .full(sucfull), .dout(res));

  assign prefull = busy_full;

  a_prefire_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
    prefire |-> !prefull);

endmodule
