// tb_ntt_rns_processor: end-to-end test of the 128-point RNS NTT processor,
// at its default size.
//
// The reference is a direct O(N^2) transform computed here in each of the
// three fields (complex integers mod 191 with alpha = 66 + 6j; x + y*sqrt(r)
// mod 193 and 449 with alpha = sqrt(125), sqrt(391)), independent of the
// look-up tables.  The sequence of operations:
//   1  forward transform of random signed integer data (through the
//      distributor): every residue of every output point is compared
//   2  inverse transform of that spectrum, loaded as raw residues: the
//      reconstructed integers must equal the original data
//   3  cyclic convolution of a random integer block with a short real
//      sequence: forward transforms of both, pointwise product in each field
//      (done here), inverse transform; the reconstructed integers must equal
//      the directly computed convolution, including values beyond 193*449
//      which only the full three-prime range can hold
// Each transform must take the stated number of cycles from the last input
// point to the first result, and deliver 128 results on consecutive cycles.
// Mechanisms counted (each must occur): forward and inverse transforms,
// distributor loads, raw-residue loads, even- and odd-power twiddle factors
// in the 4n+1 units, zero operands in the index multiplication, bank
// exchanges, negative reconstructed results, strobe pulses of every stage.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_ntt_rns_processor;
  import ntt_pkg::*;

  localparam int N = 128;
  localparam int DW = 16;
  // cycles from the last accepted input point to the first out_valid
  localparam int LOAD_TO_OUT = 448 + 7 + 1;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  logic                 start, inv, busy, done, in_valid, in_ready, in_raw, out_valid;
  logic signed [DW-1:0] in_re, in_im;
  rns_point_t           in_point, out_point;
  logic [6:0]           out_index;
  logic signed [OW-1:0] out_re, out_im;
  logic [3:0]           strobe_count;
  logic [4:0]           stage_strobe;

  ntt_rns_processor dut (.*);

  // ---------------- reference arithmetic ------------------------------------
  localparam int MODS [3] = '{191, 193, 449};
  localparam int RR   [3] = '{190, 125, 391};   // square of the unit element

  typedef int field_vec_t [N][2];                 // [point][re/im]

  function automatic void fmul(input int f, input int ar, input int ai, input int br,
                               input int bi, output int yr, output int yi);
    int m;
    m = MODS[f];
    yr = (ar * br + ((RR[f] * ai) % m) * bi) % m;
    yi = (ar * bi + ai * br) % m;
  endfunction

  // alpha^k in field f
  function automatic void apow(input int f, input int k, output int yr, output int yi);
    int xr, xi, ar, ai;
    if (f == 0) begin ar = 66; ai = 6; end else begin ar = 0; ai = 1; end
    yr = 1; yi = 0;
    for (int i = 0; i < k % N; i++) begin
      fmul(f, yr, yi, ar, ai, xr, xi);
      yr = xr; yi = xi;
    end
  endfunction

  // direct transform: X[k] = sum_n x[n] alpha^(+/- nk)
  function automatic field_vec_t dft(input int f, input field_vec_t x, input bit inverse);
    field_vec_t y;
    int tab_r [N], tab_i [N];
    int pr, pi, sr, si;
    for (int k = 0; k < N; k++) apow(f, k, tab_r[k], tab_i[k]);
    for (int k = 0; k < N; k++) begin
      sr = 0; si = 0;
      for (int n = 0; n < N; n++) begin
        int e;
        e = (n * k) % N;
        if (inverse) e = (N - e) % N;
        fmul(f, x[n][0], x[n][1], tab_r[e], tab_i[e], pr, pi);
        sr = (sr + pr) % MODS[f];
        si = (si + pi) % MODS[f];
      end
      y[k][0] = sr; y[k][1] = si;
    end
    return y;
  endfunction

  function automatic int md(input int x, input int m);
    int r;
    r = x % m;
    return (r < 0) ? r + m : r;
  endfunction

  function automatic logic [RW-1:0] comp(input rns_point_t p, input int f, input int c);
    case (f)
      0: return c ? p.f191.im : p.f191.re;
      1: return c ? p.f193.im : p.f193.re;
      default: return c ? p.f449.im : p.f449.re;
    endcase
  endfunction

  function automatic rns_point_t mkpoint(input field_vec_t v [3], input int n);
    rns_point_t p;
    p.f191.re = RW'(v[0][n][0]); p.f191.im = RW'(v[0][n][1]);
    p.f193.re = RW'(v[1][n][0]); p.f193.im = RW'(v[1][n][1]);
    p.f449.re = RW'(v[2][n][0]); p.f449.im = RW'(v[2][n][1]);
    return p;
  endfunction

  // ---------------- mechanism counters -------------------------------------
  int n_fwd = 0, n_inv = 0, n_dist = 0, n_raw = 0, n_odd = 0, n_even = 0;
  int n_zero = 0, n_swap = 0, n_neg = 0, n_big = 0;
  int n_strobe [5] = '{default: 0};
  logic rd_bank_q = 1'b0;

  always @(posedge clk) begin
    if (dut.in_ready && in_valid) begin
      if (in_raw) n_raw++; else n_dist++;
    end
    if (dut.bf_valid) begin
      if (dut.rd_bank != rd_bank_q) n_swap++;
      rd_bank_q <= dut.rd_bank;
      if (dut.u_bf.u_193.odd3) n_odd++; else n_even++;
      if (dut.u_bf.u_449.idx3[0][0] == 5'd31 || dut.u_bf.u_193.idx3[1][1] == 5'd31 ||
          dut.u_bf.u_191.idx3[0][0] == 5'd31)
        n_zero++;
    end
    if (out_valid && (out_re < 0 || out_im < 0)) n_neg++;
    if (out_valid && (out_re > 86657 || out_re < -86657)) n_big++;
    for (int k = 0; k < 5; k++) if (stage_strobe[k]) n_strobe[k]++;
  end

  // ---------------- transaction tasks --------------------------------------
  rns_point_t res [N];
  int         res_re [N], res_im [N];

  task automatic run(input bit inverse, input bit raw, input int xr [N], input int xi [N],
                     input rns_point_t xp [N]);
    int t_last, t_first, got;
    @(negedge clk);
    start = 1'b1; inv = inverse;
    @(negedge clk);
    start = 1'b0;
    if (inverse) n_inv++; else n_fwd++;
    for (int n = 0; n < N; n++) begin
      // occasional idle cycles on the input side
      while ($urandom_range(9) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      in_valid = 1'b1; in_raw = raw;
      in_re = DW'(xr[n]); in_im = DW'(xi[n]); in_point = xp[n];
      checks++;
      if (!in_ready) begin
        failures++;
        $display("FAIL: not ready for point %0d", n);
      end
      @(negedge clk);
    end
    t_last = cycle - 1;
    in_valid = 1'b0;
    got = 0;
    t_first = -1;
    while (got < N) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        if (t_first < 0) t_first = cycle;
        checks++;
        if (out_index != 7'(got) || cycle != t_first + got) begin
          failures++;
          $display("FAIL: result %0d came as index %0d at cycle offset %0d",
                   got, out_index, cycle - t_first);
        end
        res[got] = out_point;
        res_re[got] = int'(out_re);
        res_im[got] = int'(out_im);
        got++;
      end
    end
    checks++;
    if (t_first - t_last != LOAD_TO_OUT + 1) begin
      failures++;
      $display("FAIL: first result %0d cycles after the last input, expected %0d",
               t_first - t_last, LOAD_TO_OUT + 1);
    end
    checks++;
    if (!done) begin
      failures++;
      $display("FAIL: done not with the last result");
    end
  endtask

  task automatic check_fields(input field_vec_t e [3], input string what);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++)
      for (int f = 0; f < 3; f++)
        for (int c = 0; c < 2; c++) begin
          checks++;
          if (int'(comp(res[k], f, c)) != e[f][k][c]) begin
            failures++;
            if (bad++ < 5)
              $display("FAIL %s: point %0d field %0d comp %0d got %0d expected %0d",
                       what, k, f, c, comp(res[k], f, c), e[f][k][c]);
          end
        end
  endtask

  task automatic check_ints(input int er [N], input int ei [N], input string what);
    int bad;
    bad = 0;
    for (int k = 0; k < N; k++) begin
      checks++;
      if (res_re[k] != er[k] || res_im[k] != ei[k]) begin
        failures++;
        if (bad++ < 5)
          $display("FAIL %s: point %0d got (%0d, %0d) expected (%0d, %0d)",
                   what, k, res_re[k], res_im[k], er[k], ei[k]);
      end
    end
  endtask

  // ---------------- test sequence -----------------------------------------
  int         xr [N], xi [N], hr [N], zero_i [N], cr [N];
  rns_point_t none [N], rawp [N];
  field_vec_t xv [3], xf [3], hv [3], hf [3], pv [3];

  initial begin
    start = 0; inv = 0; in_valid = 0; in_raw = 0; in_re = '0; in_im = '0; in_point = '0;
    for (int n = 0; n < N; n++) begin none[n] = '0; zero_i[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: forward transform of random data, a few zeros and equal pairs included
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom_range(20000)) - 10000;
      xi[n] = int'($urandom_range(20000)) - 10000;
      if (n % 17 == 3) begin xr[n] = 0; xi[n] = 0; end
    end
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < N; n++) begin
        xv[f][n][0] = md(xr[n], MODS[f]);
        xv[f][n][1] = md(xi[n], MODS[f]);
      end
    for (int f = 0; f < 3; f++) xf[f] = dft(f, xv[f], 1'b0);
    run(1'b0, 1'b0, xr, xi, none);
    check_fields(xf, "forward");

    // 2: inverse transform of the spectrum, loaded as residues
    for (int n = 0; n < N; n++) rawp[n] = mkpoint(xf, n);
    run(1'b1, 1'b1, zero_i, zero_i, rawp);
    check_ints(xr, xi, "inverse");

    // 3: cyclic convolution of x (real part only) with a short sequence h
    for (int n = 0; n < N; n++) begin
      xr[n] = int'($urandom_range(6000)) - 3000;
      hr[n] = (n < 8) ? int'($urandom_range(300)) - 150 : 0;
    end
    for (int k = 0; k < N; k++) begin
      longint s;
      s = 0;
      for (int n = 0; n < N; n++) s += longint'(xr[n]) * hr[(k - n + N) % N];
      cr[k] = int'(s);
    end
    run(1'b0, 1'b0, xr, zero_i, none);
    for (int f = 0; f < 3; f++) for (int n = 0; n < N; n++) begin
      xf[f][n][0] = int'(comp(res[n], f, 0));
      xf[f][n][1] = int'(comp(res[n], f, 1));
    end
    run(1'b0, 1'b0, hr, zero_i, none);
    for (int f = 0; f < 3; f++) for (int n = 0; n < N; n++) begin
      int yr, yi;
      fmul(f, xf[f][n][0], xf[f][n][1], int'(comp(res[n], f, 0)), int'(comp(res[n], f, 1)),
           yr, yi);
      pv[f][n][0] = yr; pv[f][n][1] = yi;
    end
    for (int n = 0; n < N; n++) rawp[n] = mkpoint(pv, n);
    run(1'b1, 1'b1, zero_i, zero_i, rawp);
    check_ints(cr, zero_i, "convolution");

    // mechanisms
    checks++;
    if (n_fwd == 0 || n_inv == 0 || n_dist == 0 || n_raw == 0 || n_odd == 0 ||
        n_even == 0 || n_zero == 0 || n_swap == 0 || n_neg == 0 || n_big == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    for (int k = 0; k < 5; k++) begin
      checks++;
      if (n_strobe[k] == 0) begin
        failures++;
        $display("FAIL: stage %0d strobe never pulsed", k + 1);
      end
    end
    $display("mechanisms: forward=%0d inverse=%0d distributor_loads=%0d raw_loads=%0d",
             n_fwd, n_inv, n_dist, n_raw);
    $display("mechanisms: odd_twiddle=%0d even_twiddle=%0d zero_operand=%0d bank_exchange=%0d negative_results=%0d beyond_two_primes=%0d",
             n_odd, n_even, n_zero, n_swap, n_neg, n_big);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6 * 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
