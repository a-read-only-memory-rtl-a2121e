// bf_4n1: pipelined radix-2 decimation-in-frequency NTT butterfly for a
// prime M of the form 4n+1, built only from look-up tables and latches.
//
// The field is GF(M^2) = {x + y*sqrt(R)}, with alpha = sqrt(R) of order 128.
// For inputs A = a + b*sqrt(R) and B = a' + b'*sqrt(R) the unit computes
//   C = A + B                 (c = a + a',  d = b + b')
//   D = (A - B) * alpha^p     with p set by stage, position and direction.
// All sums, differences and index sums are carried out in the sub-moduli 30
// and 31; multiplication adds indices (discrete logarithms).
//
// Pipeline (every stage is a bank of ROMs followed by a register):
//   1  TRSM: the four input components reduced mod 30 and mod 31 (8 ROMs)
//   2  TADD / TSUB: sums and differences in the sub-moduli (8 ROMs)
//   3  TFIN rebuilds the two sums mod M; TSUIN turns each difference into its
//      index mod 30 / mod 31; the twiddle table gives the index of alpha^p
//      and its parity (4 + 2 + 2 ROMs)
//   4  index addition: TADD for even p; for odd p the imaginary difference
//      uses TADMUL, which also adds the index of R (4 ROMs, 2 enabled)
//   5  TINV returns the two products mod M; for odd p they are swapped, since
//      (x + y*sqrt(R)) * q*sqrt(R) = R*q*y + q*x*sqrt(R) (2 ROMs, 2 muxes)
// That is 32 ROMs and a lag of LAT_4N1 = 5 clock cycles: inputs presented in
// cycle t appear on the outputs after the fifth rising edge.  The sums travel
// past stages 4 and 5 in plain registers.  The control inputs (inv, stg, pos)
// accompany the data and are delayed two stages before they address the
// twiddle table, so the twiddle index reaches stage 3 with its data.
// in_valid travels along unchanged as out_valid; the unit never stalls.
// An active-low asynchronous reset clears all registers.
//
// The stage contents, the table counts and the zero marker follow the source
// design; the valid flag and the reset are this implementation's additions.
module bf_4n1
  import ntt_pkg::*;
#(
  parameter int unsigned M = M_B,
  parameter int unsigned G = G_B,
  parameter int unsigned R = R_B
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          inv,       // 1: inverse transform twiddle factors
  input  logic [2:0]    stg,       // stage of computation 0..6
  input  logic [5:0]    pos,       // position of the butterfly 0..63
  input  logic [RW-1:0] a_re,      // input A, rational part
  input  logic [RW-1:0] a_im,      // input A, sqrt(R) part
  input  logic [RW-1:0] b_re,
  input  logic [RW-1:0] b_im,
  output logic          out_valid,
  output logic [RW-1:0] c_re,      // A + B
  output logic [RW-1:0] c_im,
  output logic [RW-1:0] d_re,      // (A - B) * alpha^p
  output logic [RW-1:0] d_im
);
  localparam int unsigned AW   = $clog2(M);
  localparam int unsigned KIND = dlog(R, G, M);  // index of R, for TADMUL

  // ---------------- stage 1: residue tables --------------------------------
  logic [4:0] t1 [4][2];           // [component][sub-modulus]
  logic [4:0] s1 [4][2];
  logic [RW-1:0] in_v [4];
  assign in_v = '{a_re, a_im, b_re, b_im};

  for (genvar c = 0; c < 4; c++) begin : g_trsm
    rom_trsm #(.M(M), .MS(SUBM0)) u_r0 (.addr(in_v[c][AW-1:0]), .data(t1[c][0]));
    rom_trsm #(.M(M), .MS(SUBM1)) u_r1 (.addr(in_v[c][AW-1:0]), .data(t1[c][1]));
  end

  // control: inv, stg, pos delayed two stages to address the twiddle table
  logic [9:0] ctl2;
  delay_line #(.W(10), .DEPTH(2)) u_ctl (
    .clk(clk), .rst_n(rst_n), .d({inv, stg, pos}), .q(ctl2));

  // ---------------- stage 2: sub-modulo add / subtract ---------------------
  logic [4:0] sum2_t [2][2], dif2_t [2][2];    // [re/im][sub-modulus]
  logic [4:0] sum2 [2][2],   dif2 [2][2];
  for (genvar c = 0; c < 2; c++) begin : g_addsub
    rom_tadd #(.MS(SUBM0)) u_a0 (.a(s1[c][0]), .b(s1[c+2][0]), .data(sum2_t[c][0]));
    rom_tadd #(.MS(SUBM1)) u_a1 (.a(s1[c][1]), .b(s1[c+2][1]), .data(sum2_t[c][1]));
    rom_tsub #(.MS(SUBM0)) u_s0 (.a(s1[c][0]), .b(s1[c+2][0]), .data(dif2_t[c][0]));
    rom_tsub #(.MS(SUBM1)) u_s1 (.a(s1[c][1]), .b(s1[c+2][1]), .data(dif2_t[c][1]));
  end

  // ---------------- stage 3: reconstruction, index, twiddle ----------------
  logic [RW-1:0] sum3_t [2], sum3 [2];
  logic [4:0]    idx3_t [2][2], idx3 [2][2];   // [re/im][sub-modulus]
  logic [5:0]    tw3_t [2];
  logic [4:0]    tw3 [2];
  logic          odd3;
  for (genvar c = 0; c < 2; c++) begin : g_rec
    rom_tfin  #(.M(M), .SIGNED(1'b0)) u_fin (.r0(sum2[c][0]), .r1(sum2[c][1]), .data(sum3_t[c]));
    rom_tsuin #(.M(M), .G(G), .MS(SUBM0)) u_i0 (.r0(dif2[c][0]), .r1(dif2[c][1]), .data(idx3_t[c][0]));
    rom_tsuin #(.M(M), .G(G), .MS(SUBM1)) u_i1 (.r0(dif2[c][0]), .r1(dif2[c][1]), .data(idx3_t[c][1]));
  end
  rom_twiddle #(.M(M), .G(G), .IS_4N3(1'b0), .R(R), .MS(SUBM0)) u_tw0 (
    .inv(ctl2[9]), .stg(ctl2[8:6]), .pos(ctl2[5:0]), .data(tw3_t[0]));
  rom_twiddle #(.M(M), .G(G), .IS_4N3(1'b0), .R(R), .MS(SUBM1)) u_tw1 (
    .inv(ctl2[9]), .stg(ctl2[8:6]), .pos(ctl2[5:0]), .data(tw3_t[1]));

  // ---------------- stage 4: index addition --------------------------------
  logic [4:0] px4_t [2], pyev_t [2], pyod_t [2];
  logic [4:0] px4 [2], py4 [2];
  logic [RW-1:0] sum4 [2];
  logic       odd4;
  rom_tadd #(.MS(SUBM0))                 u_x0 (.a(idx3[0][0]), .b(tw3[0]), .data(px4_t[0]));
  rom_tadd #(.MS(SUBM1))                 u_x1 (.a(idx3[0][1]), .b(tw3[1]), .data(px4_t[1]));
  rom_tadd #(.MS(SUBM0))                 u_y0 (.a(idx3[1][0]), .b(tw3[0]), .data(pyev_t[0]));
  rom_tadd #(.MS(SUBM1))                 u_y1 (.a(idx3[1][1]), .b(tw3[1]), .data(pyev_t[1]));
  rom_tadd #(.MS(SUBM0), .K(KIND % SUBM0)) u_m0 (.a(idx3[1][0]), .b(tw3[0]), .data(pyod_t[0]));
  rom_tadd #(.MS(SUBM1), .K(KIND % SUBM1)) u_m1 (.a(idx3[1][1]), .b(tw3[1]), .data(pyod_t[1]));

  // ---------------- stage 5: inverse index and even/odd multiplexer --------
  logic [RW-1:0] vx5, vy5;
  rom_tinv #(.M(M), .G(G)) u_vx (.r0(px4[0]), .r1(px4[1]), .data(vx5));
  rom_tinv #(.M(M), .G(G)) u_vy (.r0(py4[0]), .r1(py4[1]), .data(vy5));

  // valid flag alongside the data
  logic [LAT_4N1-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= '{default: '0};
      sum2 <= '{default: '0};
      dif2 <= '{default: '0};
      sum3 <= '{default: '0};
      idx3 <= '{default: '0};
      tw3  <= '{default: '0};
      odd3 <= 1'b0;
      px4  <= '{default: '0};
      py4  <= '{default: '0};
      sum4 <= '{default: '0};
      odd4 <= 1'b0;
      c_re <= '0;
      c_im <= '0;
      d_re <= '0;
      d_im <= '0;
      vld  <= '0;
    end else begin
      // stage 1
      s1   <= t1;
      // stage 2
      sum2 <= sum2_t;
      dif2 <= dif2_t;
      // stage 3
      sum3 <= sum3_t;
      idx3 <= idx3_t;
      tw3  <= '{tw3_t[0][4:0], tw3_t[1][4:0]};
      odd3 <= tw3_t[0][5];
      // stage 4: the parity bit enables TADD or TADMUL for the sqrt(R) part
      px4  <= px4_t;
      py4  <= odd3 ? pyod_t : pyev_t;
      sum4 <= sum3;
      odd4 <= odd3;
      // stage 5
      c_re <= sum4[0];
      c_im <= sum4[1];
      d_re <= odd4 ? vy5 : vx5;
      d_im <= odd4 ? vx5 : vy5;
      vld  <= {vld[LAT_4N1-2:0], in_valid};
    end
  end

  assign out_valid = vld[LAT_4N1-1];

  // the twiddle tables of both sub-moduli must agree on the parity
  always_comb assert (!rst_n || tw3_t[0][5] == tw3_t[1][5]);
endmodule
