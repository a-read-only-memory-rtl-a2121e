// crt_reconstruct: reconstruction stage of the residue-number-system NTT.
//
// Each component of a point, given by its residues r1 (mod 191), r2 (mod 193)
// and r3 (mod 449), is turned back into an integer with the Chinese remainder
// theorem:
//   X = (w1*r1 + w2*r2 + w3*r3) mod M,  M = 191*193*449 = 16 551 487,
//   wi = (M/mi) * ((M/mi)^-1 mod mi),
// and read as a signed number: X > (M-1)/2 stands for X - M.  Results of a
// convolution are exact while they lie in -(M-1)/2 .. (M-1)/2.
//
// Timing: one register stage; y is valid the cycle after x (in_valid ->
// out_valid).  Active-low asynchronous reset.
//
// Reconstruction with the Chinese remainder theorem follows the source design
// (which also allows mixed-radix conversion); the weights are computed, the
// single pipeline register and the signed reading are this design's own.
module crt_reconstruct
  import ntt_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  rns_point_t           x,
  output logic                 out_valid,
  output logic signed [OW-1:0] y_re,
  output logic signed [OW-1:0] y_im
);
  localparam longint unsigned W1 = crt_weight(M_A);
  localparam longint unsigned W2 = crt_weight(M_B);
  localparam longint unsigned W3 = crt_weight(M_C);

  function automatic logic signed [OW-1:0] crt(input logic [RW-1:0] r1,
                                               input logic [RW-1:0] r2,
                                               input logic [RW-1:0] r3);
    longint unsigned s;
    s = (W1 * 64'(r1) + W2 * 64'(r2) + W3 * 64'(r3)) % 64'(MPROD);
    if (s > 64'(MPROD / 2)) return OW'(longint'(s) - longint'(MPROD));
    return OW'(s);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y_re      <= '0;
      y_im      <= '0;
    end else begin
      out_valid <= in_valid;
      y_re      <= crt(x.f191.re, x.f193.re, x.f449.re);
      y_im      <= crt(x.f191.im, x.f193.im, x.f449.im);
    end
  end
endmodule
