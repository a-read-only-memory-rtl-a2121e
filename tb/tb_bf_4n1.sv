// tb_bf_4n1: self-checking testbench for the 4n+1 butterfly.
//
// Two instances run side by side: M = 193 (alpha = sqrt(125)) and M = 449
// (alpha = sqrt(391)).  Every cycle new random operands, stage, position and
// direction are applied; the expected outputs are computed here by direct
// arithmetic in GF(M^2) (no index tables) and queued.  Each result must come
// out exactly five cycles after its operands.  The hardware measurement of the
// source design is replayed first: 30+65*sqrt(125) and 41+103*sqrt(125) with
// twiddle alpha^2 = 125 give 71+168*sqrt(125) and 169+75*sqrt(125), and with
// the first value changed to 31, 72+168*sqrt(125) and 101+75*sqrt(125).
module tb_bf_4n1;
  localparam int LAT = 5;
  localparam int NVEC = 3000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---- reference arithmetic ------------------------------------------------
  function automatic void gmul(input int m, input int r, input int ar, input int ai,
                               input int br, input int bi, output int yr, output int yi);
    yr = (ar * br + ((r * ai) % m) * bi) % m;
    yi = (ar * bi + ai * br) % m;
  endfunction

  function automatic void twiddle(input int m, input int r, input bit inv, input int stg,
                                  input int pos, output int tr, output int ti);
    int p, xr, xi;
    p = (pos >> stg) << stg;
    if (inv && p != 0) p = 128 - p;
    tr = 1; ti = 0;
    for (int k = 0; k < p; k++) begin
      gmul(m, r, tr, ti, 0, 1, xr, xi);  // times sqrt(r)
      tr = xr; ti = xi;
    end
  endfunction

  // ---- stimulus ----------------------------------------------------------
  logic       in_valid;
  logic       inv;
  logic [2:0] stg;
  logic [5:0] pos;
  logic [8:0] ar [2], ai [2], br [2], bi [2];
  logic       ov [2];
  logic [8:0] cr [2], ci [2], dr [2], di [2];

  bf_4n1 #(.M(193), .G(5), .R(125)) dut0 (
    .clk, .rst_n, .in_valid, .inv, .stg, .pos,
    .a_re(ar[0]), .a_im(ai[0]), .b_re(br[0]), .b_im(bi[0]),
    .out_valid(ov[0]), .c_re(cr[0]), .c_im(ci[0]), .d_re(dr[0]), .d_im(di[0]));
  bf_4n1 #(.M(449), .G(3), .R(391)) dut1 (
    .clk, .rst_n, .in_valid, .inv, .stg, .pos,
    .a_re(ar[1]), .a_im(ai[1]), .b_re(br[1]), .b_im(bi[1]),
    .out_valid(ov[1]), .c_re(cr[1]), .c_im(ci[1]), .d_re(dr[1]), .d_im(di[1]));

  typedef struct { int cr, ci, dr, di, t; } exp_t;
  exp_t q [2][$];

  localparam int MODS [2] = '{193, 449};
  localparam int RS   [2] = '{125, 391};

  task automatic push(input int u);
    exp_t e;
    int tr, ti, xr, xi, m;
    m = MODS[u];
    e.cr = (ar[u] + br[u]) % m;
    e.ci = (ai[u] + bi[u]) % m;
    twiddle(m, RS[u], inv, stg, pos, tr, ti);
    gmul(m, RS[u], (ar[u] + m - br[u]) % m, (ai[u] + m - bi[u]) % m, tr, ti, xr, xi);
    e.dr = xr; e.di = xi; e.t = cycle;
    q[u].push_back(e);
  endtask

  int n_zero = 0, n_odd = 0;

  task automatic apply(input int a0r, input int a0i, input int b0r, input int b0i,
                       input int s, input int p, input bit iv);
    @(negedge clk);
    in_valid = 1'b1; inv = iv; stg = 3'(s); pos = 6'(p);
    ar[0] = 9'(a0r); ai[0] = 9'(a0i); br[0] = 9'(b0r); bi[0] = 9'(b0i);
    ar[1] = 9'($urandom_range(448)); ai[1] = 9'($urandom_range(448));
    br[1] = 9'($urandom_range(448)); bi[1] = 9'($urandom_range(448));
    if ($urandom_range(7) == 0) br[1] = ar[1];       // zero difference
    if ($urandom_range(7) == 0) bi[1] = ai[1];
    if (ar[0] == br[0] || ai[0] == bi[0]) n_zero++;
    if (((p >> s) << s) % 2 == 1) n_odd++;
    push(0);
    push(1);
  endtask

  // ---- checking ----------------------------------------------------------
  for (genvar u = 0; u < 2; u++) begin : g_chk
    always @(posedge clk) begin
      if (rst_n && ov[u]) begin
        exp_t e;
        checks++;
        if (q[u].size() == 0) begin
          failures++;
          $display("FAIL unit %0d: output without input", u);
        end else begin
          e = q[u].pop_front();
          if (cycle - e.t != LAT) begin
            failures++;
            $display("FAIL unit %0d: lag %0d, expected %0d", u, cycle - e.t, LAT);
          end
          if (cr[u] != e.cr || ci[u] != e.ci || dr[u] != e.dr || di[u] != e.di) begin
            failures++;
            $display("FAIL unit %0d: got %0d+%0dr %0d+%0dr expected %0d+%0dr %0d+%0dr",
                     u, cr[u], ci[u], dr[u], di[u], e.cr, e.ci, e.dr, e.di);
          end
        end
      end
    end
  end

  // known values from the hardware measurement (checked on top of the model)
  int known_seen = 0;
  always @(posedge clk) begin
    if (rst_n && ov[0] && known_seen < 2 && cr[0] != 0) begin
      known_seen++;
      checks++;
      if (known_seen == 1 && !(cr[0] == 71 && ci[0] == 168 && dr[0] == 169 && di[0] == 75)) begin
        failures++;
        $display("FAIL measured vector 1: %0d %0d %0d %0d", cr[0], ci[0], dr[0], di[0]);
      end
      if (known_seen == 2 && !(cr[0] == 72 && ci[0] == 168 && dr[0] == 101 && di[0] == 75)) begin
        failures++;
        $display("FAIL measured vector 2: %0d %0d %0d %0d", cr[0], ci[0], dr[0], di[0]);
      end
    end
  end

  initial begin
    in_valid = 1'b0; inv = 1'b0; stg = '0; pos = '0;
    for (int u = 0; u < 2; u++) begin ar[u] = '0; ai[u] = '0; br[u] = '0; bi[u] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    // stage number 1, position 2: alpha^2 = 125
    apply(30, 65, 41, 103, 1, 2, 1'b0);
    apply(31, 65, 41, 103, 1, 2, 1'b0);
    // a gap in the stream: nothing valid for two cycles
    @(negedge clk); in_valid = 1'b0;
    @(negedge clk);
    for (int k = 0; k < NVEC; k++) begin
      int a_r, a_i, b_r, b_i;
      a_r = $urandom_range(192); a_i = $urandom_range(192);
      b_r = $urandom_range(192); b_i = $urandom_range(192);
      if ($urandom_range(7) == 0) b_r = a_r;
      if ($urandom_range(7) == 0) b_i = a_i;
      apply(a_r, a_i, b_r, b_i, $urandom_range(6), $urandom_range(63), 1'($urandom_range(1)));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    for (int u = 0; u < 2; u++) if (q[u].size() != 0) begin
      failures++;
      $display("FAIL unit %0d: %0d results missing", u, q[u].size());
    end
    checks++;
    if (n_zero == 0 || n_odd == 0) begin
      failures++;
      $display("FAIL: zero differences %0d, odd powers %0d", n_zero, n_odd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
