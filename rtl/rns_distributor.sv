// rns_distributor: feeds each input point, modulo each prime, to the three
// fields of the residue-number-system NTT.
//
// A point is a pair of signed integers (re, im).  For 191 they become
// re + im*j; for the 4n+1 primes they become re + im*sqrt(r), which is how two
// blocks of real data are processed at once in those fields.  Each component
// is reduced to 0..m-1; negative values map to m - (|x| mod m).
//
// Purely combinational: the supporting memory latches the result on loading.
// The data width DW is this design's own choice (16-bit samples); the
// distribution modulo each prime follows the source design.
module rns_distributor
  import ntt_pkg::*;
#(
  parameter int unsigned DW = 16
) (
  input  logic signed [DW-1:0] x_re,
  input  logic signed [DW-1:0] x_im,
  output rns_point_t           y
);
  function automatic logic [RW-1:0] red(input logic signed [DW-1:0] x, input int unsigned m);
    int signed r;
    r = int'(x) % int'(m);
    if (r < 0) r = r + int'(m);
    return RW'(r);
  endfunction

  always_comb begin
    y.f191.re = red(x_re, M_A);
    y.f191.im = red(x_im, M_A);
    y.f193.re = red(x_re, M_B);
    y.f193.im = red(x_im, M_B);
    y.f449.re = red(x_re, M_C);
    y.f449.im = red(x_im, M_C);
  end
endmodule
