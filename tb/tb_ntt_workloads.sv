// tb_ntt_workloads: the three test programs used to validate the transform,
// run on the complete 128-point processor at its default size.
//
//   1  invertibility: real part a ramp 0..127, second part a ramp 127..0;
//      forward transform, then inverse transform of the spectrum (fed back as
//      residues); the ramps must come back exactly
//   2  convolution of one real block: a rectangular pulse of height 1 with a
//      rectangular pulse of height 2 (imaginary parts zero); forward
//      transforms, pointwise product in each field, inverse transform; the
//      result must be the trapezoid computed directly
//   3  convolution of two real blocks at once: the first block as real part,
//      the second as the second component, convolved with a sequence of
//      constant value over an interval; both results are checked
// The pointwise product is done here, outside the processor.
//
// What is checked comes from the original design where it specifies it
// (arithmetic, table contents, latency); everything else follows this
// implementation's own interface choices.
module tb_ntt_workloads;
  import ntt_pkg::*;
  localparam int N = 128;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0;
  int failures = 0;

  logic                 start, inv, busy, done, in_valid, in_ready, in_raw, out_valid;
  logic signed [15:0]   in_re, in_im;
  rns_point_t           in_point, out_point;
  logic [6:0]           out_index;
  logic signed [OW-1:0] out_re, out_im;
  logic [3:0]           strobe_count;
  logic [4:0]           stage_strobe;

  ntt_rns_processor dut (.*);

  localparam int MODS [3] = '{191, 193, 449};
  localparam int RR   [3] = '{190, 125, 391};

  rns_point_t res [N];
  int         res_re [N], res_im [N];

  function automatic gf2_t get(input rns_point_t p, input int f);
    return (f == 0) ? p.f191 : (f == 1) ? p.f193 : p.f449;
  endfunction

  // product of two points, field by field
  function automatic rns_point_t pmul(input rns_point_t a, input rns_point_t b);
    rns_point_t y;
    gf2_t ga, gb, gy;
    int m;
    for (int f = 0; f < 3; f++) begin
      m = MODS[f];
      ga = get(a, f); gb = get(b, f);
      gy.re = RW'((int'(ga.re) * int'(gb.re) + ((RR[f] * int'(ga.im)) % m) * int'(gb.im)) % m);
      gy.im = RW'((int'(ga.re) * int'(gb.im) + int'(ga.im) * int'(gb.re)) % m);
      case (f)
        0: y.f191 = gy;
        1: y.f193 = gy;
        default: y.f449 = gy;
      endcase
    end
    return y;
  endfunction

  task automatic run(input bit inverse, input bit raw, input int xr [N], input int xi [N],
                     input rns_point_t xp [N]);
    int got;
    @(negedge clk);
    start = 1'b1; inv = inverse;
    @(negedge clk);
    start = 1'b0;
    for (int n = 0; n < N; n++) begin
      in_valid = 1'b1; in_raw = raw;
      in_re = 16'(xr[n]); in_im = 16'(xi[n]); in_point = xp[n];
      @(negedge clk);
    end
    in_valid = 1'b0;
    got = 0;
    while (got < N) begin
      @(posedge clk);
      #1;
      if (out_valid) begin
        res[out_index] = out_point;
        res_re[out_index] = int'(out_re);
        res_im[out_index] = int'(out_im);
        got++;
      end
    end
  endtask

  task automatic expect_ints(input int er [N], input int ei [N], input string what);
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

  function automatic int cconv(input int a [N], input int b [N], input int k);
    int s;
    s = 0;
    for (int n = 0; n < N; n++) s += a[n] * b[(k - n + N) % N];
    return s;
  endfunction

  int         ar [N], ai [N], br [N], zero [N], er [N], ei [N];
  rns_point_t none [N], sa [N], sb [N], prod [N];

  initial begin
    start = 0; inv = 0; in_valid = 0; in_raw = 0; in_re = '0; in_im = '0; in_point = '0;
    for (int n = 0; n < N; n++) begin none[n] = '0; zero[n] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // 1: ramps
    for (int n = 0; n < N; n++) begin ar[n] = n; ai[n] = 127 - n; end
    run(1'b0, 1'b0, ar, ai, none);
    sa = res;
    run(1'b1, 1'b1, zero, zero, sa);
    expect_ints(ar, ai, "ramp inverse");

    // 2: pulse of height 1 (16 points) with pulse of height 2 (24 points)
    for (int n = 0; n < N; n++) begin
      ar[n] = (n < 16) ? 1 : 0;
      br[n] = (n < 24) ? 2 : 0;
    end
    for (int k = 0; k < N; k++) er[k] = cconv(ar, br, k);
    run(1'b0, 1'b0, ar, zero, none);  sa = res;
    run(1'b0, 1'b0, br, zero, none);  sb = res;
    for (int k = 0; k < N; k++) prod[k] = pmul(sa[k], sb[k]);
    run(1'b1, 1'b1, zero, zero, prod);
    expect_ints(er, zero, "pulse convolution");

    // 3: two real blocks (a ramp segment and a signed pulse) with a constant
    for (int n = 0; n < N; n++) begin
      ar[n] = (n < 40) ? n * 50 : 0;
      ai[n] = (n >= 20 && n < 60) ? -300 : 0;
      br[n] = (n < 32) ? 7 : 0;
    end
    for (int k = 0; k < N; k++) begin er[k] = cconv(ar, br, k); ei[k] = cconv(ai, br, k); end
    run(1'b0, 1'b0, ar, ai, none);    sa = res;
    run(1'b0, 1'b0, br, zero, none);  sb = res;
    for (int k = 0; k < N; k++) prod[k] = pmul(sa[k], sb[k]);
    run(1'b1, 1'b1, zero, zero, prod);
    expect_ints(er, ei, "two-block convolution");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8 * 800) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
