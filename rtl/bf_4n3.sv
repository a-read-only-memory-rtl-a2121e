// bf_4n3: pipelined radix-2 decimation-in-frequency NTT butterfly for a
// prime M of the form 4n+3, built only from look-up tables and latches.
//
// For such a prime -1 has no square root, so GF(M^2) = {x + y*j}, j*j = -1,
// is a complex-integer field.  The generator of order 128 is
// alpha = ARE + AIM*j (66 + 6j for M = 191), so the twiddle factor
// alpha^p = gamma + beta*j has two non-zero components in general.  With
// A - B = x + y*j the unit computes
//   C = A + B
//   D = (x*gamma - y*beta) + (y*gamma + x*beta)*j
// which takes four index multiplications.
//
// Pipeline (each stage is a bank of ROMs followed by a register):
//   1  TRSM: four input components reduced mod 30 and mod 31 (8 ROMs)
//   2  TADD / TSUB: sums and differences in the sub-moduli (8 ROMs)
//   3  TSUIN: indices of x and y; twiddle tables: indices of gamma and beta,
//      each in both sub-moduli (4 + 4 ROMs); the sums wait in registers
//   4  index addition for x*gamma, y*gamma, x*beta, y*beta (8 ROMs)
//   5  TINV: the four products mod M, delivered directly mod 30 and mod 31
//      (8 ROMs)
//   6  TSUB for x*gamma - y*beta, TADD for y*gamma + x*beta (4 ROMs)
//   7  TFIN: the two sums and the two products rebuilt mod M (4 ROMs); the
//      real part is a difference and uses the signed correction
// That is 48 ROMs and a lag of LAT_4N3 = 7 cycles: operands presented in
// cycle t appear after the seventh rising edge.  The sums stay in sub-modulus
// form from stage 2 to stage 6 and are rebuilt in stage 7 with the products.
// Control (inv, stg, pos) is delayed two stages to address the twiddle
// tables.  in_valid travels along as out_valid; an active-low asynchronous
// reset clears every register.
//
// The stage contents, the 48-table count and the zero marker 31 follow the
// source design; the valid flag and the reset are this implementation's own.
module bf_4n3
  import ntt_pkg::*;
#(
  parameter int unsigned M   = M_A,
  parameter int unsigned G   = G_A,
  parameter int unsigned ARE = ALPHA_A_RE,
  parameter int unsigned AIM = ALPHA_A_IM
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic          inv,       // 1: inverse transform twiddle factors
  input  logic [2:0]    stg,       // stage of computation 0..6
  input  logic [5:0]    pos,       // position of the butterfly 0..63
  input  logic [RW-1:0] a_re,      // input A, real part
  input  logic [RW-1:0] a_im,      // input A, imaginary part
  input  logic [RW-1:0] b_re,
  input  logic [RW-1:0] b_im,
  output logic          out_valid,
  output logic [RW-1:0] c_re,      // A + B
  output logic [RW-1:0] c_im,
  output logic [RW-1:0] d_re,      // (A - B) * alpha^p
  output logic [RW-1:0] d_im
);
  localparam int unsigned AW = $clog2(M);
  localparam int unsigned MSV [2] = '{SUBM0, SUBM1};

  // ---------------- stage 1: residue tables --------------------------------
  logic [4:0]    t1 [4][2], s1 [4][2];        // [component][sub-modulus]
  logic [RW-1:0] in_v [4];
  assign in_v = '{a_re, a_im, b_re, b_im};

  for (genvar c = 0; c < 4; c++) begin : g_trsm
    for (genvar s = 0; s < 2; s++) begin : g_s
      rom_trsm #(.M(M), .MS(MSV[s])) u_r (.addr(in_v[c][AW-1:0]), .data(t1[c][s]));
    end
  end

  logic [9:0] ctl2;
  delay_line #(.W(10), .DEPTH(2)) u_ctl (
    .clk(clk), .rst_n(rst_n), .d({inv, stg, pos}), .q(ctl2));

  // ---------------- stage 2: sub-modulo add / subtract ---------------------
  logic [4:0] sum2_t [2][2], dif2_t [2][2];   // [re/im][sub-modulus]
  logic [4:0] sum2 [2][2],   dif2 [2][2];
  for (genvar c = 0; c < 2; c++) begin : g_addsub
    for (genvar s = 0; s < 2; s++) begin : g_s
      rom_tadd #(.MS(MSV[s])) u_a (.a(s1[c][s]), .b(s1[c+2][s]), .data(sum2_t[c][s]));
      rom_tsub #(.MS(MSV[s])) u_d (.a(s1[c][s]), .b(s1[c+2][s]), .data(dif2_t[c][s]));
    end
  end

  // the sums wait four stages (3..6) in sub-modulus form
  logic [19:0] sum6;
  delay_line #(.W(20), .DEPTH(4)) u_sumdly (
    .clk(clk), .rst_n(rst_n),
    .d({sum2[1][1], sum2[1][0], sum2[0][1], sum2[0][0]}), .q(sum6));

  // ---------------- stage 3: indices of the difference and the twiddle -----
  logic [4:0] idx3_t [2][2], idx3 [2][2];     // [x/y][sub-modulus]
  logic [5:0] tw3_t [2][2];                   // [gamma/beta][sub-modulus]
  logic [4:0] tw3 [2][2];
  for (genvar c = 0; c < 2; c++) begin : g_idx
    for (genvar s = 0; s < 2; s++) begin : g_s
      rom_tsuin #(.M(M), .G(G), .MS(MSV[s])) u_i (
        .r0(dif2[c][0]), .r1(dif2[c][1]), .data(idx3_t[c][s]));
      rom_twiddle #(.M(M), .G(G), .IS_4N3(1'b1), .ARE(ARE), .AIM(AIM),
                    .COMP(c == 1), .MS(MSV[s])) u_tw (
        .inv(ctl2[9]), .stg(ctl2[8:6]), .pos(ctl2[5:0]), .data(tw3_t[c][s]));
    end
  end

  // ---------------- stage 4: index addition --------------------------------
  // product k: 0 = x*gamma, 1 = y*gamma, 2 = x*beta, 3 = y*beta
  logic [4:0] pi4_t [4][2], pi4 [4][2];
  for (genvar k = 0; k < 4; k++) begin : g_mul
    for (genvar s = 0; s < 2; s++) begin : g_s
      rom_tadd #(.MS(MSV[s])) u_m (.a(idx3[k % 2][s]), .b(tw3[k / 2][s]), .data(pi4_t[k][s]));
    end
  end

  // ---------------- stage 5: back from indices, into the sub-moduli --------
  logic [RW-1:0] pv5_t [4][2];
  logic [4:0]    pv5 [4][2];
  for (genvar k = 0; k < 4; k++) begin : g_inv
    for (genvar s = 0; s < 2; s++) begin : g_s
      rom_tinv #(.M(M), .G(G), .OUT_MS(MSV[s])) u_v (
        .r0(pi4[k][0]), .r1(pi4[k][1]), .data(pv5_t[k][s]));
    end
  end

  // ---------------- stage 6: combine the four products ---------------------
  logic [4:0] re6_t [2], im6_t [2], re6 [2], im6 [2];
  for (genvar s = 0; s < 2; s++) begin : g_comb
    rom_tsub #(.MS(MSV[s])) u_re (.a(pv5[0][s]), .b(pv5[3][s]), .data(re6_t[s]));
    rom_tadd #(.MS(MSV[s])) u_im (.a(pv5[1][s]), .b(pv5[2][s]), .data(im6_t[s]));
  end

  // ---------------- stage 7: reconstruction mod M --------------------------
  logic [RW-1:0] cre7, cim7, dre7, dim7;
  rom_tfin #(.M(M), .SIGNED(1'b0)) u_fc0 (.r0(sum6[4:0]),   .r1(sum6[9:5]),   .data(cre7));
  rom_tfin #(.M(M), .SIGNED(1'b0)) u_fc1 (.r0(sum6[14:10]), .r1(sum6[19:15]), .data(cim7));
  rom_tfin #(.M(M), .SIGNED(1'b1)) u_fd0 (.r0(re6[0]),      .r1(re6[1]),      .data(dre7));
  rom_tfin #(.M(M), .SIGNED(1'b0)) u_fd1 (.r0(im6[0]),      .r1(im6[1]),      .data(dim7));

  logic [LAT_4N3-1:0] vld;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1   <= '{default: '0};
      sum2 <= '{default: '0};
      dif2 <= '{default: '0};
      idx3 <= '{default: '0};
      tw3  <= '{default: '0};
      pi4  <= '{default: '0};
      pv5  <= '{default: '0};
      re6  <= '{default: '0};
      im6  <= '{default: '0};
      c_re <= '0;
      c_im <= '0;
      d_re <= '0;
      d_im <= '0;
      vld  <= '0;
    end else begin
      s1   <= t1;
      sum2 <= sum2_t;
      dif2 <= dif2_t;
      idx3 <= idx3_t;
      for (int c = 0; c < 2; c++)
        for (int s = 0; s < 2; s++) tw3[c][s] <= tw3_t[c][s][4:0];
      pi4  <= pi4_t;
      for (int k = 0; k < 4; k++)
        for (int s = 0; s < 2; s++) pv5[k][s] <= pv5_t[k][s][4:0];
      re6  <= re6_t;
      im6  <= im6_t;
      c_re <= cre7;
      c_im <= cim7;
      d_re <= dre7;
      d_im <= dim7;
      vld  <= {vld[LAT_4N3-2:0], in_valid};
    end
  end

  assign out_valid = vld[LAT_4N3-1];
endmodule
