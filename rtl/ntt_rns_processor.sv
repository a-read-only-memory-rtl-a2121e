// ntt_rns_processor: 128-point number theoretic transform processor working
// in a residue number system of three primes, 191, 193 and 449.
//
// Data path, in the order a transform flows through it:
//   distributor   each input point (a pair of signed integers) is reduced
//                 modulo the three primes; with in_raw = 1 the residues are
//                 taken directly from in_point instead (already in the fields)
//   memory        two banks of 128 points, each point holding its images in
//                 GF(191^2), GF(193^2) and GF(449^2) (54 bits)
//   butterfly     three look-up-table pipelines side by side (one 4n+3 unit,
//                 two 4n+1 units), one butterfly per clock, lag 7
//   controller    load, 7 stages of 64 butterflies with the banks exchanging
//                 roles every stage, drain, unload in natural order
//   scaling       for the inverse transform every residue is multiplied by
//                 128^-1 mod m while unloading
//   reconstruction Chinese remainder theorem back to signed integers
//   strobes       the counter/decoder strobe generator for a latch-built
//                 butterfly, brought out on its own ports
//
// Interface and timing:
//   start (with inv) begins a transform; busy is high until done pulses.
//   While in_ready is high, each cycle with in_valid stores the next point
//   (points 0..127 in order).  The butterfly runs 448 cycles plus 7 to drain.
//   Then 128 results are delivered on consecutive cycles: out_valid,
//   out_index (transform index k, natural order), out_point (residues) and
//   out_re/out_im (the reconstructed signed integers).  done pulses with the
//   last result.  One transform takes 128 + 448 + 7 + 128 cycles after start
//   (plus the wait for input points and one output register).
//
// The transform size, the primes and generators, the butterfly structure, the
// two memories with exchanging roles, the distributor and the reconstruction
// stage follow the source design.  The constant-geometry addressing, the load
// and unload protocol, the raw-residue input, the 128^-1 scaling on unload
// and the strobe outputs as separate ports are this design's own choices.
module ntt_rns_processor
  import ntt_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control
  input  logic                 start,
  input  logic                 inv,          // 0: forward, 1: inverse
  output logic                 busy,
  output logic                 done,
  // input points
  input  logic                 in_valid,
  output logic                 in_ready,
  input  logic                 in_raw,       // 1: use in_point as residues
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  input  rns_point_t           in_point,
  // results
  output logic                 out_valid,
  output logic [LOG2N-1:0]     out_index,
  output rns_point_t           out_point,
  output logic signed [OW-1:0] out_re,
  output logic signed [OW-1:0] out_im,
  // latch strobes for a latch-built 5-stage butterfly
  output logic [3:0]           strobe_count,
  output logic [4:0]           stage_strobe
);
  localparam int unsigned PW = $bits(rns_point_t);

  // ---------------- distributor ------------------------------------------
  rns_point_t dist_point, ld_point;
  rns_distributor #(.DW(DW)) u_dist (.x_re(in_re), .x_im(in_im), .y(dist_point));
  assign ld_point = in_raw ? in_point : dist_point;

  // ---------------- controller -------------------------------------------
  logic             ld_en, bf_valid, bf_inv, rd_bank, wr_en, wr_bank;
  logic             ul_valid, ul_bank;
  logic [LOG2N-1:0] ld_addr, ul_addr, ul_index;
  logic [2:0]       bf_stg;
  logic [5:0]       bf_pos, wr_pos;

  ntt_controller #(.N(NPT), .LAT(LAT_4N3)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start), .inv_req(inv),
    .in_valid(in_valid), .in_ready(in_ready), .busy(busy),
    .ld_en(ld_en), .ld_addr(ld_addr),
    .bf_valid(bf_valid), .bf_inv(bf_inv), .bf_stg(bf_stg), .bf_pos(bf_pos),
    .rd_bank(rd_bank),
    .wr_en(wr_en), .wr_bank(wr_bank), .wr_pos(wr_pos),
    .ul_valid(ul_valid), .ul_bank(ul_bank), .ul_addr(ul_addr), .ul_index(ul_index),
    .done(done));

  // ---------------- supporting memory ------------------------------------
  rns_point_t rd_a, rd_b, wr_c, wr_d, ul_point;
  logic       bf_out_valid;

  ntt_buffer #(.N(NPT), .W(PW)) u_mem (
    .clk(clk),
    .rd_bank(rd_bank), .rd_pos(bf_pos), .rd_a(rd_a), .rd_b(rd_b),
    .wr_en(wr_en), .wr_bank(wr_bank), .wr_pos(wr_pos), .wr_c(wr_c), .wr_d(wr_d),
    .ld_en(ld_en), .ld_bank(1'b0), .ld_addr(ld_addr), .ld_data(ld_point),
    .ul_bank(ul_bank), .ul_addr(ul_addr), .ul_data(ul_point));

  // ---------------- computational unit -----------------------------------
  rns_butterfly u_bf (
    .clk(clk), .rst_n(rst_n), .in_valid(bf_valid), .inv(bf_inv),
    .stg(bf_stg), .pos(bf_pos), .a(rd_a), .b(rd_b),
    .out_valid(bf_out_valid), .c(wr_c), .d(wr_d));

  // every result arrives exactly when the controller writes it
  always_comb assert (!rst_n || bf_out_valid == wr_en);

  // ---------------- scaling by 128^-1 for the inverse transform ----------
  localparam int unsigned NI_A = inv_mod(NPT, M_A);
  localparam int unsigned NI_B = inv_mod(NPT, M_B);
  localparam int unsigned NI_C = inv_mod(NPT, M_C);

  function automatic logic [RW-1:0] scl(input logic [RW-1:0] x, input int unsigned k,
                                        input int unsigned m);
    return RW'((32'(x) * k) % m);
  endfunction

  rns_point_t scaled;
  always_comb begin
    scaled = ul_point;
    if (bf_inv) begin
      scaled.f191.re = scl(ul_point.f191.re, NI_A, M_A);
      scaled.f191.im = scl(ul_point.f191.im, NI_A, M_A);
      scaled.f193.re = scl(ul_point.f193.re, NI_B, M_B);
      scaled.f193.im = scl(ul_point.f193.im, NI_B, M_B);
      scaled.f449.re = scl(ul_point.f449.re, NI_C, M_C);
      scaled.f449.im = scl(ul_point.f449.im, NI_C, M_C);
    end
  end

  // ---------------- reconstruction ---------------------------------------
  crt_reconstruct u_crt (
    .clk(clk), .rst_n(rst_n), .in_valid(ul_valid), .x(scaled),
    .out_valid(out_valid), .y_re(out_re), .y_im(out_im));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_point <= '0;
      out_index <= '0;
    end else if (ul_valid) begin
      out_point <= scaled;
      out_index <= ul_index;
    end
  end

  // ---------------- strobes for a latch-built butterfly ------------------
  stage_strobe_gen #(.NSTAGE(LAT_4N1), .CW(4)) u_strobe (
    .clk(clk), .rst_n(rst_n), .count(strobe_count), .strobe(stage_strobe));
endmodule
