// tb_rns_butterfly: check of the three-prime butterfly unit.
//
// Random points (each a residue pair in 191, 193 and 449) and random control
// words are applied every cycle, with a few idle cycles and forced equal
// operands.  Each field's results are computed here directly (complex
// integers mod 191 with alpha = 66 + 6j; x + y*sqrt(r) mod 193 and 449 with
// alpha = sqrt(125), sqrt(391)) and must appear, all three together, exactly
// seven cycles after the operands, marked by out_valid.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_rns_butterfly;
  import ntt_pkg::*;
  localparam int LAT = 7;
  localparam int NVEC = 2000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  localparam int MODS [3] = '{191, 193, 449};
  localparam int RR   [3] = '{190, 125, 391};

  function automatic void fmul(input int f, input int ar, input int ai, input int br,
                               input int bi, output int yr, output int yi);
    int m;
    m = MODS[f];
    yr = (ar * br + ((RR[f] * ai) % m) * bi) % m;
    yi = (ar * bi + ai * br) % m;
  endfunction

  function automatic void apow(input int f, input int k, output int yr, output int yi);
    int xr, xi, ar, ai;
    if (f == 0) begin ar = 66; ai = 6; end else begin ar = 0; ai = 1; end
    yr = 1; yi = 0;
    for (int i = 0; i < k; i++) begin
      fmul(f, yr, yi, ar, ai, xr, xi);
      yr = xr; yi = xi;
    end
  endfunction

  logic       in_valid, inv, out_valid;
  logic [2:0] stg;
  logic [5:0] pos;
  rns_point_t a, b, c, d;

  rns_butterfly dut (.*);

  typedef struct { rns_point_t c, d; int t; } exp_t;
  exp_t q [$];

  function automatic gf2_t get(input rns_point_t p, input int f);
    return (f == 0) ? p.f191 : (f == 1) ? p.f193 : p.f449;
  endfunction

  task automatic apply();
    exp_t e;
    gf2_t ga, gb, gc, gd;
    int m, p, tr, ti, yr, yi;
    @(negedge clk);
    in_valid = 1'b1;
    inv = 1'($urandom_range(1)); stg = 3'($urandom_range(6)); pos = 6'($urandom);
    p = (int'(pos) >> stg) << stg;
    if (inv && p != 0) p = 128 - p;
    for (int f = 0; f < 3; f++) begin
      m = MODS[f];
      ga.re = RW'($urandom_range(m - 1)); ga.im = RW'($urandom_range(m - 1));
      gb.re = RW'($urandom_range(m - 1)); gb.im = RW'($urandom_range(m - 1));
      if ($urandom_range(5) == 0) gb = ga;
      gc.re = RW'((ga.re + gb.re) % m);
      gc.im = RW'((ga.im + gb.im) % m);
      apow(f, p, tr, ti);
      fmul(f, (int'(ga.re) + m - int'(gb.re)) % m, (int'(ga.im) + m - int'(gb.im)) % m, tr, ti, yr, yi);
      gd.re = RW'(yr); gd.im = RW'(yi);
      case (f)
        0: begin a.f191 = ga; b.f191 = gb; e.c.f191 = gc; e.d.f191 = gd; end
        1: begin a.f193 = ga; b.f193 = gb; e.c.f193 = gc; e.d.f193 = gd; end
        default: begin a.f449 = ga; b.f449 = gb; e.c.f449 = gc; e.d.f449 = gd; end
      endcase
    end
    e.t = cycle;
    q.push_back(e);
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      exp_t e;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: output without input");
      end else begin
        e = q.pop_front();
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("FAIL: lag %0d, expected %0d", cycle - e.t, LAT);
        end
        for (int f = 0; f < 3; f++) begin
          checks++;
          if (get(c, f) != get(e.c, f) || get(d, f) != get(e.d, f)) begin
            failures++;
            $display("FAIL field %0d: c %0d+%0d d %0d+%0d expected c %0d+%0d d %0d+%0d", f,
                     get(c, f).re, get(c, f).im, get(d, f).re, get(d, f).im,
                     get(e.c, f).re, get(e.c, f).im, get(e.d, f).re, get(e.d, f).im);
          end
        end
      end
    end
  end

  initial begin
    in_valid = 1'b0; inv = 1'b0; stg = '0; pos = '0; a = '0; b = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < NVEC; k++) begin
      if ($urandom_range(15) == 0) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
      apply();
    end
    @(negedge clk); in_valid = 1'b0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (q.size() != 0) begin
      failures++;
      $display("FAIL: %0d results missing", q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NVEC + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
