// tb_rom_twiddle: exhaustive check of the twiddle factor tables.
//
// For every direction, stage 0..6 and position 0..63 the expected power is
// p = position with its `stage` low bits cleared (128 - p for the inverse,
// p = 0 staying 0).  alpha^p is computed here by repeated multiplication in
// the field.  The index pair from the mod-30 and mod-31 tables must identify
// an exponent k with g^k equal to the non-zero component of alpha^p:
//   4n+1 (193, alpha = sqrt(125)): the rational part for even p, the
//        sqrt(125) part for odd p; bit 5 must equal the parity of p
//   4n+3 (191, alpha = 66 + 6j): real part (gamma) and imaginary part (beta)
//        from separate tables; a zero component must give 31
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rom_twiddle;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;
  int n_odd = 0, n_zero = 0;

  logic       inv;
  logic [2:0] stg;
  logic [5:0] pos;
  logic [5:0] b0, b1, g0, g1, e0, e1;

  rom_twiddle #(.M(193), .G(5), .IS_4N3(1'b0), .R(125), .MS(30)) u_b0 (.inv, .stg, .pos, .data(b0));
  rom_twiddle #(.M(193), .G(5), .IS_4N3(1'b0), .R(125), .MS(31)) u_b1 (.inv, .stg, .pos, .data(b1));
  rom_twiddle #(.M(191), .G(19), .IS_4N3(1'b1), .ARE(66), .AIM(6), .COMP(1'b0), .MS(30)) u_g0 (.inv, .stg, .pos, .data(g0));
  rom_twiddle #(.M(191), .G(19), .IS_4N3(1'b1), .ARE(66), .AIM(6), .COMP(1'b0), .MS(31)) u_g1 (.inv, .stg, .pos, .data(g1));
  rom_twiddle #(.M(191), .G(19), .IS_4N3(1'b1), .ARE(66), .AIM(6), .COMP(1'b1), .MS(30)) u_e0 (.inv, .stg, .pos, .data(e0));
  rom_twiddle #(.M(191), .G(19), .IS_4N3(1'b1), .ARE(66), .AIM(6), .COMP(1'b1), .MS(31)) u_e1 (.inv, .stg, .pos, .data(e1));

  // g^k mod m for the k identified by (k mod 30, k mod 31); -1 for the marker
  function automatic int from_idx(input int i0, input int i1, input int g, input int m);
    int k, v;
    if (i0 == 31 || i1 == 31) return (i0 == i1) ? 0 : -1;
    k = -1;
    for (int c = 0; c < m - 1; c++) if (c % 30 == i0 && c % 31 == i1) k = c;
    if (k < 0) return -1;
    v = 1;
    for (int c = 0; c < k; c++) v = (v * g) % m;
    return v;
  endfunction

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s inv=%0d stg=%0d pos=%0d: got %0d expected %0d", what, inv, stg, pos, got, exp);
    end
  endtask

  initial begin
    for (int a = 0; a < 2 * 7 * 64; a++) begin
      int p, br, bi, cr, ci, xr, xi;
      inv = 1'(a / 448); stg = 3'((a / 64) % 7); pos = 6'(a % 64);
      p = (int'(pos) >> stg) << stg;
      if (inv && p != 0) p = 128 - p;
      // 4n+1: alpha^p = sqrt(125)^p
      br = 1; bi = 0;
      for (int k = 0; k < p; k++) begin
        xr = (bi * 125) % 193; xi = br;
        br = xr; bi = xi;
      end
      // 4n+3: (66 + 6j)^p
      cr = 1; ci = 0;
      for (int k = 0; k < p; k++) begin
        xr = (cr * 66 + (191 - ci) * 6) % 191; xi = (cr * 6 + ci * 66) % 191;
        cr = xr; ci = xi;
      end
      @(posedge clk);
      if (p % 2 == 1) n_odd++;
      if (cr == 0 || ci == 0) n_zero++;
      expect_eq(int'(b0[5]), p % 2, "193 parity");
      expect_eq(int'(b1[5]), p % 2, "193 parity (31)");
      expect_eq(from_idx(int'(b0[4:0]), int'(b1[4:0]), 5, 193), (p % 2) ? bi : br, "193 factor");
      expect_eq(from_idx(int'(g0[4:0]), int'(g1[4:0]), 19, 191), cr, "191 gamma");
      expect_eq(from_idx(int'(e0[4:0]), int'(e1[4:0]), 19, 191), ci, "191 beta");
    end
    checks++;
    if (n_odd == 0 || n_zero == 0) begin
      failures++;
      $display("FAIL: odd powers %0d, zero components %0d", n_odd, n_zero);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
