// fft_r2: self-timed N-point radix-2 decimation-in-time FFT with a single
// complex multiplier (top of the design).
//
// The N complex numbers live in N asynchronous registers X0..X(N-1). A
// request (prefire with the N inputs) loads the inputs into the registers'
// load links in bit-reversed order (X_i = input[bitrev(i)]), a zero into the
// state register CNT, and marks the 0-bit L-busy link full. The FFT then runs
// log2(N) steps; in step s every index i in 0..N-1 is processed once:
//   y = i with bit s flipped,  z = (i << (log2(N)-1-s)) mod N
//   next_i = prev_lo + prev_hi * W_N^z
// where hi/lo are the one of i, y with bit s set/clear. This one formula is
// both halves of every butterfly, so each step makes N complex
// multiplications.
//   J1  controller joint. CNT holds {step, index}. For each index it reads
//       prev_hi from the register outputs and W_N^z from the ROM, starts the
//       complex multiplication, pushes i into the index queue and prev_lo
//       into the number queue, and advances CNT. With the last index of a
//       step it releases all register outputs, so the new values that J2
//       has parked in the update links move forward. When step = log2(N)
//       and every register output is full again, it copies them to the
//       result links R0..R(N-1) (waiting while those are full) and releases
//       the registers, CNT and L-busy.
//   J2  writer joint. For each product it takes the index and the number
//       from the two queues and writes number + product into X_index's
//       update link. Old values stay readable in the register outputs until
//       the step's last index has been issued.
// Numbers are {re, im} pairs of DW-bit two's complement integers. A product
// with W (DW-2 fraction bits) is shifted right by DW-2 bits (arithmetic,
// truncating) before the addition; sums wrap at DW bits, so inputs must be
// scaled to leave log2(N) bits of headroom.
//
// Interface: prefire/x_in/prefull on the input side, sucfull/r_out/sucfire on
// the output side (all results are written and read together). Timing: one
// J1 issue per complex multiplier acceptance, about 8*DW cycles per complex
// multiplication; the complex multiplier limits throughput.
// The registers, joints, queues, ROM and index formulas are the document's;
// the fixed-point format, the bit-reversed load wiring, the result order and
// the clocked firing are this design's choices.
module fft_r2 #(
  parameter int NPT    = 8,
  parameter int DW     = 32,
  parameter int QDEPTH = 4,
  localparam int LOGN  = $clog2(NPT),
  localparam int IW    = (LOGN > 0) ? LOGN : 1,
  localparam int SW    = $clog2(LOGN + 1),
  localparam int CW    = SW + IW
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              prefire,
  input  logic [NPT-1:0][1:0][DW-1:0]       x_in,
  output logic                              prefull,
  input  logic                              sucfire,
  output logic                              sucfull,
  output logic [NPT-1:0][1:0][DW-1:0]       r_out
);

  localparam int FRAC = DW - 2;

  typedef logic [1:0][DW-1:0] cplx_t;   // [1] = re, [0] = im
  typedef logic signed [DW-1:0] comp_t;

  typedef struct packed {
    logic [SW-1:0] step;
    logic [IW-1:0] idx;
  } cnt_t;

  function automatic logic [IW-1:0] bitrev(input logic [IW-1:0] v);
    logic [IW-1:0] r;
    for (int b = 0; b < IW; b++) r[b] = v[IW-1-b];
    return r;
  endfunction

  // ---------------------------------------------------------------- links
  logic              busy_full, busy_q;
  cnt_t              cnt, cnt_next;
  logic              cnt_full, cnt_in_full;
  logic [NPT-1:0]    x_out_full, x_in_full, x_wr;
  cplx_t             x_val [NPT];
  logic [NPT-1:0]    r_full;

  logic              j1_ready, j1_issue, j1_last, j1_done;
  logic              j2_fire;

  lj_link #(.W(1)) u_busy (
    .clk, .rst_n, .wr_fire(prefire), .din(1'b1), .rd_fire(j1_done),
    .full(busy_full), .dout(busy_q));

  async_reg #(.W(CW)) u_cnt (
    .clk, .rst_n,
    .ld_fire(prefire), .ld_data('0), .ld_full(),
    .wr_fire(j1_issue), .wr_data(cnt_next), .wr_full(cnt_in_full),
    .rd_fire(j1_issue || j1_done), .rd_full(cnt_full), .rd_data(cnt));

  cplx_t j2_data;
  logic [IW-1:0] j2_idx;

  for (genvar i = 0; i < NPT; i++) begin : g_x
    async_reg #(.W(2*DW)) u_x (
      .clk, .rst_n,
      .ld_fire(prefire), .ld_data(x_in[bitrev(IW'(i))]), .ld_full(),
      .wr_fire(x_wr[i]), .wr_data(j2_data), .wr_full(x_in_full[i]),
      .rd_fire(j1_last || j1_done), .rd_full(x_out_full[i]), .rd_data(x_val[i]));

    lj_link #(.W(2*DW)) u_r (
      .clk, .rst_n, .wr_fire(j1_done), .din(x_val[i]), .rd_fire(sucfire),
      .full(r_full[i]), .dout(r_out[i]));
  end

  // ---------------------------------------------------------------- J1
  logic [IW-1:0] i_hi, i_lo, z;
  comp_t         w_re, w_im;
  logic          cm_prefull, iq_push_full, nq_push_full;

  twiddle_rom #(.NPT(NPT), .DW(DW)) u_rom (.z(z), .w_re(w_re), .w_im(w_im));

  always_comb begin
    logic [IW-1:0] sbit;
    sbit = IW'(1) << cnt.step;
    i_hi = cnt.idx | sbit;
    i_lo = cnt.idx & ~sbit;
    z    = IW'(cnt.idx << (LOGN - 1 - int'(cnt.step)));

    cnt_next = cnt;
    if (cnt.idx == IW'(NPT - 1)) begin
      cnt_next.step = cnt.step + 1'b1;
      cnt_next.idx  = '0;
    end else begin
      cnt_next.idx  = cnt.idx + 1'b1;
    end

    j1_ready = busy_full && busy_q && cnt_full && !cnt_in_full && (&x_out_full);
    j1_issue = j1_ready && (cnt.step < SW'(LOGN))
               && !cm_prefull && !iq_push_full && !nq_push_full;
    j1_last  = j1_issue && (cnt.idx == IW'(NPT - 1));
    j1_done  = j1_ready && (cnt.step == SW'(LOGN)) && !(|r_full);
  end

  // ---------------------------------------------------------------- datapath
  logic                cm_sucfull;
  logic [4*DW-1:0]     cm_res;
  logic                iq_pop_full, nq_pop_full;
  cplx_t               nq_data;

  cmul #(.N_BITS(DW)) u_cmul (
    .clk, .rst_n, .prefire(j1_issue), .n1(x_val[i_hi]), .n2({w_re, w_im}),
    .prefull(cm_prefull), .sucfire(j2_fire), .sucfull(cm_sucfull), .res(cm_res));

  lj_queue #(.W(IW), .DEPTH(QDEPTH)) u_indexq (
    .clk, .rst_n, .push_fire(j1_issue), .push_data(cnt.idx), .push_full(iq_push_full),
    .pop_fire(j2_fire), .pop_full(iq_pop_full), .pop_data(j2_idx));

  lj_queue #(.W(2*DW), .DEPTH(QDEPTH)) u_numq (
    .clk, .rst_n, .push_fire(j1_issue), .push_data(x_val[i_lo]), .push_full(nq_push_full),
    .pop_fire(j2_fire), .pop_full(nq_pop_full), .pop_data(nq_data));

  // ---------------------------------------------------------------- J2
  always_comb begin
    logic signed [2*DW-1:0] p_re, p_im;
    p_re = cm_res[4*DW-1:2*DW];
    p_im = cm_res[2*DW-1:0];
    j2_data[1] = comp_t'(nq_data[1]) + comp_t'(p_re >>> FRAC);
    j2_data[0] = comp_t'(nq_data[0]) + comp_t'(p_im >>> FRAC);
    j2_fire = cm_sucfull && iq_pop_full && nq_pop_full && !x_in_full[j2_idx];
    x_wr = '0;
    x_wr[j2_idx] = j2_fire;
  end

  assign prefull = busy_full;
  assign sucfull = &r_full;

  a_prefire_when_empty : assert property (@(posedge clk) disable iff (!rst_n)
    prefire |-> !prefull);
  a_results_together : assert property (@(posedge clk) disable iff (!rst_n)
    (|r_full) |-> (&r_full));

endmodule
