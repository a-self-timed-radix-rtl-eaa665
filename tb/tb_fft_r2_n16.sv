// tb_fft_r2_n16: the end-to-end FFT testbench of tb_fft_r2, run on a
// 16-point FFT with 16-bit real and imaginary parts (four steps instead of
// three, a wider step counter and a 16-entry twiddle table).
// Runs a series of transforms (impulse, constant, single tones, random data)
// and checks every output twice: bit-exactly against a fixed-point model of
// the same iterative radix-2 algorithm computed here, and against a
// double-precision DFT within a small tolerance. Results are read after
// random delays and new requests are loaded while results wait, so each of
// the design's mechanisms is exercised; the testbench counts how often each
// happened and fails if one never did:
//   J1 waiting for the complex multiplier, J1 waiting at a step boundary for
//   the step's new values, a J2 write parked in a register's update link
//   while the old value is still held, J1 waiting for the result links, a
//   request loaded while the previous results are unread.
module tb_fft_r2_n16;
  localparam int NPT  = 16;
  localparam int DW   = 16;
  localparam int LOGN = $clog2(NPT);
  localparam int FRAC = DW - 2;
  localparam int NFFT = 12;
  localparam real PI  = 3.14159265358979323846;
  localparam real AMP = 2.0 ** (DW - LOGN - 3);   // input amplitude with headroom

  logic clk = 0, rst_n = 0;
  logic prefire = 0, sucfire = 0, prefull, sucfull;
  logic [NPT-1:0][1:0][DW-1:0] x_in = '0, r_out;
  int checks = 0, failures = 0;

  typedef logic signed [DW-1:0] comp_t;
  typedef struct packed { comp_t re; comp_t im; } cx_t;
  typedef cx_t [NPT-1:0] vec_t;

  vec_t in_q[$];
  int   n_loaded = 0, n_checked = 0;
  int   cnt_mul_wait = 0, cnt_step_wait = 0, cnt_parked = 0, cnt_result_wait = 0,
        cnt_load_while_unread = 0;

  always #5 clk = ~clk;

  fft_r2 #(.NPT(NPT), .DW(DW)) dut (.clk, .rst_n, .prefire, .x_in, .prefull, .sucfire, .sucfull, .r_out);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ---- reference: fixed-point iterative radix-2 DIT, same number format
  function automatic comp_t tw(input int z, input bit im);
    real v;
    v = im ? -$sin(2.0 * PI * z / NPT) : $cos(2.0 * PI * z / NPT);
    return comp_t'($rtoi($floor(v * (2.0 ** FRAC) + 0.5)));
  endfunction

  function automatic int rev(input int v);
    int r = 0;
    for (int b = 0; b < LOGN; b++) if (v[b]) r |= 1 << (LOGN - 1 - b);
    return r;
  endfunction

  function automatic vec_t fixed_fft(input vec_t x);
    vec_t prev = '0, next = '0;
    for (int i = 0; i < NPT; i++) prev[i] = x[rev(i)];
    for (int s = 0; s < LOGN; s++) begin
      for (int i = 0; i < NPT; i++) begin
        int hi, lo, z;
        longint pr, pi_;
        hi = i | (1 << s);
        lo = i & ~(1 << s);
        z  = (i << (LOGN - 1 - s)) % NPT;
        pr  = longint'(prev[hi].re) * longint'(tw(z, 0)) - longint'(prev[hi].im) * longint'(tw(z, 1));
        pi_ = longint'(prev[hi].re) * longint'(tw(z, 1)) + longint'(prev[hi].im) * longint'(tw(z, 0));
        next[i].re = prev[lo].re + comp_t'(pr >>> FRAC);
        next[i].im = prev[lo].im + comp_t'(pi_ >>> FRAC);
      end
      prev = next;
    end
    return prev;
  endfunction

  function automatic vec_t make_input(input int kind);
    vec_t x = '0;
    for (int i = 0; i < NPT; i++) begin
      x[i].re = 0; x[i].im = 0;
      case (kind)
        0: if (i == 0) x[i].re = comp_t'($rtoi(AMP));
        1: begin x[i].re = comp_t'($rtoi(AMP / 3.0)); x[i].im = -comp_t'($rtoi(AMP / 7.0)); end
        2: begin
             x[i].re = comp_t'($rtoi(AMP / 2.0 * $cos(2.0 * PI * i / NPT)));
             x[i].im = comp_t'($rtoi(AMP / 2.0 * $sin(2.0 * PI * i / NPT)));
           end
        3: x[i].re = comp_t'($rtoi(AMP * $cos(2.0 * PI * 3 * i / NPT)));
        default: begin
             x[i].re = comp_t'($signed(DW'($urandom)) >>> (LOGN + 2));
             x[i].im = comp_t'($signed(DW'($urandom)) >>> (LOGN + 2));
           end
      endcase
    end
    return x;
  endfunction

  task automatic check_result(input vec_t x);
    vec_t e;
    e = fixed_fft(x);
    for (int k = 0; k < NPT; k++) begin
      real dre, dim;
      comp_t gre, gim;
      gre = comp_t'(r_out[k][1]);
      gim = comp_t'(r_out[k][0]);
      check(gre == e[k].re && gim == e[k].im,
            $sformatf("fft %0d bin %0d: got %0d,%0dj, fixed-point model %0d,%0dj",
                      n_checked, k, gre, gim, e[k].re, e[k].im));
      dre = 0.0; dim = 0.0;
      for (int n = 0; n < NPT; n++) begin
        real a;
        a = -2.0 * PI * n * k / NPT;
        dre += real'(x[n].re) * $cos(a) - real'(x[n].im) * $sin(a);
        dim += real'(x[n].re) * $sin(a) + real'(x[n].im) * $cos(a);
      end
      check((real'(gre) - dre) < 16.0 && (dre - real'(gre)) < 16.0 &&
            (real'(gim) - dim) < 16.0 && (dim - real'(gim)) < 16.0,
            $sformatf("fft %0d bin %0d: got %0d,%0dj, DFT %f,%fj", n_checked, k, gre, gim, dre, dim));
    end
  endtask

  // ---- mechanism counters (sampled from the design's joints)
  always @(posedge clk) if (rst_n) begin
    if (dut.j1_ready && int'(dut.cnt.step) < LOGN && dut.cm_prefull) cnt_mul_wait++;
    if (dut.busy_full && dut.cnt_full && !dut.cnt_in_full && dut.cnt.step != 0
        && !(&dut.x_out_full)) cnt_step_wait++;
    if (dut.j2_fire && dut.x_out_full[dut.j2_idx]) cnt_parked++;
    if (dut.j1_ready && int'(dut.cnt.step) == LOGN && (|dut.r_full)) cnt_result_wait++;
    if (prefire && sucfull) cnt_load_while_unread++;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- producer: loads a request whenever prefull is low
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk); #1;
    while (n_loaded < NFFT) begin
      if (!prefull) begin
        vec_t x;
        x = make_input(n_loaded < 4 ? n_loaded : 4);
        for (int i = 0; i < NPT; i++) begin
          x_in[i][1] = x[i].re;
          x_in[i][0] = x[i].im;
        end
        in_q.push_back(x);
        prefire = 1;
        n_loaded++;
      end
      @(posedge clk); #1;
      prefire = 0;
    end
  end

  // ---- consumer: reads results after a random delay
  initial begin
    @(posedge rst_n);
    while (n_checked < NFFT) begin
      @(posedge clk); #1;
      if (sucfull) begin
        repeat ($urandom_range(0, 1) == 1 ? $urandom_range(1, NPT * LOGN * 12 * DW) : 0) begin
          @(posedge clk); #1;
        end
        check(in_q.size() > 0, "result belongs to a loaded request");
        check_result(in_q.pop_front());
        n_checked++;
        sucfire = 1;
        @(posedge clk); #1;
        sucfire = 0;
      end
    end
    $display("mechanisms: mul_wait=%0d step_wait=%0d parked=%0d result_wait=%0d load_while_unread=%0d",
             cnt_mul_wait, cnt_step_wait, cnt_parked, cnt_result_wait, cnt_load_while_unread);
    check(cnt_mul_wait > 0, "J1 waited for the complex multiplier");
    check(cnt_step_wait > 0, "J1 waited at a step boundary");
    check(cnt_parked > 0, "a new value was parked while the old one was held");
    check(cnt_result_wait > 0, "J1 waited for the result links");
    check(cnt_load_while_unread > 0, "a request was loaded while results were unread");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
