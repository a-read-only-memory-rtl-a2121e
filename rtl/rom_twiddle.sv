// rom_twiddle: twiddle factor table (TF for the direct, TFI for the inverse
// transform).
//
// The address carries the butterfly position (A0-A5), the stage number 0..6
// (A6-A8) and the direct/inverse selection (A9).  The power of alpha is the
// position with its `stage` least significant bits cleared; the inverse
// transform uses alpha^(128 - p).  The table returns the index of the twiddle
// factor, reduced to the sub-modulus MS, ready for index addition.
//
// For a 4n+1 prime (IS_4N3 = 0) alpha = sqrt(R): even powers are the real
// number R^(p/2), odd powers are R^((p-1)/2) * sqrt(R).  Only the index of the
// non-zero component is stored, and data bit 5 carries the parity of p,
// which steers the odd-power multiplication table and the output swap.
// For a 4n+3 prime (IS_4N3 = 1) alpha = ARE + AIM*sqrt(-1) and the twiddle
// factor has two components; COMP selects the real (0) or imaginary (1) one.
// A zero component gets the index-of-zero marker 31.  Bit 5 is 0 there.
//
// Stage numbers 7 (unused) give power 0.  Purely combinational.
//
// The address fields, the masking rule and the parity bit follow the source
// design; the power 128 - p for the inverse and the split of the 4n+3 factor
// into two component tables are this design's own.
module rom_twiddle
  import ntt_pkg::*;
#(
  parameter int unsigned M      = 193,
  parameter int unsigned G      = 5,
  parameter bit          IS_4N3 = 1'b0,
  parameter int unsigned R      = 125,
  parameter int unsigned ARE    = 66,
  parameter int unsigned AIM    = 6,
  parameter bit          COMP   = 1'b0,
  parameter int unsigned MS     = 30
) (
  input  logic       inv,
  input  logic [2:0] stg,
  input  logic [5:0] pos,
  output logic [5:0] data
);
  typedef logic [5:0] table_t [1024];
  typedef int unsigned pow_t [NPT];

  function automatic table_t gen_table();
    table_t      t;
    tab512_t     ind;
    pow_t        comp_v;
    int unsigned re, im, nre, nim, p, v;
    ind = index_table(G, M);
    // powers of alpha, component selected by the prime kind
    re = 1;
    im = 0;
    for (int unsigned k = 0; k < NPT; k++) begin
      if (IS_4N3) comp_v[k] = COMP ? im : re;
      else        comp_v[k] = pow_mod(R, k / 2, M);
      nre = (re * ARE + (M - im) * AIM) % M;
      nim = (re * AIM + im * ARE) % M;
      re  = nre;
      im  = nim;
    end
    for (int unsigned a = 0; a < 1024; a++) begin
      p = tw_power(a[9], (a >> 6) % 8, a % 64);
      v = comp_v[p];
      t[a] = {(IS_4N3 ? 1'b0 : 1'(p % 2)), ((v == 0) ? ZERO_IDX : 5'(ind[v] % MS))};
    end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{inv, stg, pos}];
endmodule
