// rns_butterfly: the computational unit of the residue-number-system NTT.
//
// Three butterflies work side by side on the three images of the same pair of
// points: a 4n+3 unit for 191 (alpha = 66 + 6j) and two 4n+1 units for 193
// (alpha = sqrt(125)) and 449 (alpha = sqrt(391)).  They share the control
// word (direction, stage, position).  The 4n+3 unit is seven stages deep, the
// 4n+1 units five, so the outputs of the 4n+1 units pass two further latch
// stages; every field then delivers its results LAT_4N3 = 7 cycles after the
// operands, and one valid flag (from the 191 unit) serves all three.
//
// Interface: a, b are the butterfly inputs, c = a + b and d = (a - b)*alpha^p
// the outputs, each an rns_point_t.  One butterfly can start every cycle.
//
// The three primes, their generators and the two-stage delay of the 4n+1
// units follow the source design; the shared valid flag is this design's own.
module rns_butterfly
  import ntt_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  logic       inv,
  input  logic [2:0] stg,
  input  logic [5:0] pos,
  input  rns_point_t a,
  input  rns_point_t b,
  output logic       out_valid,
  output rns_point_t c,
  output rns_point_t d
);
  localparam int unsigned DLY = LAT_4N3 - LAT_4N1;   // 2

  logic v191, v193, v449;
  gf2_t c193, d193, c449, d449;

  bf_4n3 #(.M(M_A), .G(G_A), .ARE(ALPHA_A_RE), .AIM(ALPHA_A_IM)) u_191 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inv(inv), .stg(stg), .pos(pos),
    .a_re(a.f191.re), .a_im(a.f191.im), .b_re(b.f191.re), .b_im(b.f191.im),
    .out_valid(v191), .c_re(c.f191.re), .c_im(c.f191.im),
    .d_re(d.f191.re), .d_im(d.f191.im));

  bf_4n1 #(.M(M_B), .G(G_B), .R(R_B)) u_193 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inv(inv), .stg(stg), .pos(pos),
    .a_re(a.f193.re), .a_im(a.f193.im), .b_re(b.f193.re), .b_im(b.f193.im),
    .out_valid(v193), .c_re(c193.re), .c_im(c193.im), .d_re(d193.re), .d_im(d193.im));

  bf_4n1 #(.M(M_C), .G(G_C), .R(R_C)) u_449 (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .inv(inv), .stg(stg), .pos(pos),
    .a_re(a.f449.re), .a_im(a.f449.im), .b_re(b.f449.re), .b_im(b.f449.im),
    .out_valid(v449), .c_re(c449.re), .c_im(c449.im), .d_re(d449.re), .d_im(d449.im));

  // two extra latch stages for the 4n+1 results and their valid flag
  logic v193_d;
  delay_line #(.W(4 * $bits(gf2_t) + 1), .DEPTH(DLY)) u_align (
    .clk(clk), .rst_n(rst_n),
    .d({v193, c193, d193, c449, d449}),
    .q({v193_d, c.f193, d.f193, c.f449, d.f449}));

  assign out_valid = v191;

  // all three units see the same operand stream
  always_comb assert (!rst_n || (v193_d == v191 && v449 == v193));
endmodule
