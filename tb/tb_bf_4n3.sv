// tb_bf_4n3: self-checking testbench for the 4n+3 butterfly (M = 191).
//
// Random operands, stages, positions and directions are applied every cycle
// (with a gap and with forced zero differences).  The expected outputs are
// computed here by complex-integer arithmetic mod 191, the twiddle factor
// being (66 + 6j) raised to the power by repeated multiplication.  Each
// result must appear exactly seven cycles after its operands.  Directed
// cases cover power 0 (twiddle 1), a purely imaginary difference and the
// inverse direction.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_bf_4n3;
  localparam int LAT = 7;
  localparam int NVEC = 3000;
  localparam int M = 191;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  function automatic void cmul(input int ar, input int ai, input int br, input int bi,
                               output int yr, output int yi);
    yr = (ar * br + (M - ai) * bi) % M;
    yi = (ar * bi + ai * br) % M;
  endfunction

  function automatic void twiddle(input bit inv, input int stg, input int pos,
                                  output int tr, output int ti);
    int p, xr, xi;
    p = (pos >> stg) << stg;
    if (inv && p != 0) p = 128 - p;
    tr = 1; ti = 0;
    for (int k = 0; k < p; k++) begin
      cmul(tr, ti, 66, 6, xr, xi);
      tr = xr; ti = xi;
    end
  endfunction

  logic       in_valid, inv, ov;
  logic [2:0] stg;
  logic [5:0] pos;
  logic [8:0] ar, ai, br, bi, cr, ci, dr, di;

  bf_4n3 dut (
    .clk, .rst_n, .in_valid, .inv, .stg, .pos,
    .a_re(ar), .a_im(ai), .b_re(br), .b_im(bi),
    .out_valid(ov), .c_re(cr), .c_im(ci), .d_re(dr), .d_im(di));

  typedef struct { int cr, ci, dr, di, t; } exp_t;
  exp_t q [$];
  int n_zero = 0, n_inv = 0;

  task automatic apply(input int a_r, input int a_i, input int b_r, input int b_i,
                       input int s, input int p, input bit iv);
    exp_t e;
    int tr, ti, xr, xi;
    @(negedge clk);
    in_valid = 1'b1; inv = iv; stg = 3'(s); pos = 6'(p);
    ar = 9'(a_r); ai = 9'(a_i); br = 9'(b_r); bi = 9'(b_i);
    if (a_r == b_r || a_i == b_i) n_zero++;
    if (iv) n_inv++;
    e.cr = (a_r + b_r) % M;
    e.ci = (a_i + b_i) % M;
    twiddle(iv, s, p, tr, ti);
    cmul((a_r + M - b_r) % M, (a_i + M - b_i) % M, tr, ti, xr, xi);
    e.dr = xr; e.di = xi; e.t = cycle;
    q.push_back(e);
  endtask

  always @(posedge clk) begin
    if (rst_n && ov) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: output without input");
      end else begin
        e = q.pop_front();
        if (cycle - e.t != LAT) begin
          failures++;
          $display("FAIL: lag %0d, expected %0d", cycle - e.t, LAT);
        end
        if (cr != e.cr || ci != e.ci || dr != e.dr || di != e.di) begin
          failures++;
          $display("FAIL: got %0d+%0dj %0d+%0dj expected %0d+%0dj %0d+%0dj",
                   cr, ci, dr, di, e.cr, e.ci, e.dr, e.di);
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; inv = 1'b0; stg = '0; pos = '0;
    ar = '0; ai = '0; br = '0; bi = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    apply(10, 20, 3, 5, 0, 0, 1'b0);        // twiddle 1
    apply(7, 100, 7, 50, 0, 1, 1'b0);       // difference 50j, twiddle alpha
    apply(190, 190, 1, 1, 6, 63, 1'b1);     // stage 6, power 64, inverse
    @(negedge clk); in_valid = 1'b0;
    @(negedge clk);
    for (int k = 0; k < NVEC; k++) begin
      int a_r, a_i, b_r, b_i;
      a_r = $urandom_range(M - 1); a_i = $urandom_range(M - 1);
      b_r = $urandom_range(M - 1); b_i = $urandom_range(M - 1);
      if ($urandom_range(7) == 0) b_r = a_r;
      if ($urandom_range(7) == 0) b_i = a_i;
      apply(a_r, a_i, b_r, b_i, $urandom_range(6), $urandom_range(63), 1'($urandom_range(1)));
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    checks++;
    if (n_zero == 0 || n_inv == 0) begin
      failures++;
      $display("FAIL: zero differences %0d, inverse %0d", n_zero, n_inv);
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
