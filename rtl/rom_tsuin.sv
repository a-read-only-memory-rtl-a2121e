// rom_tsuin: reconstruction, index look-up and sub-modulo reduction in one
// table (TSUIN), used on the subtracted half of the butterfly.
//
// The pair (d mod 30, d mod 31) of a difference d of two residues mod M is
// rebuilt (negative differences corrected as in rom_tfin), its index k with
// G^k = d (mod M) is looked up, and k mod MS is returned, ready for index
// addition in the sub-moduli.  Zero has no index: its entry is 31, the
// marker that the index adders pass on and the inverse-index table turns
// back into zero.  One table serves one sub-modulus, so an input needs two.
//
// Interface: r0 (mod 30) on A0-A4, r1 (mod 31) on A5-A9, 5-bit index out.
// Purely combinational.
//
// The combined table follows the source design; the address layout is this
// design's own.
module rom_tsuin
  import ntt_pkg::*;
#(
  parameter int unsigned M  = 193,
  parameter int unsigned G  = 5,
  parameter int unsigned MS = 30
) (
  input  logic [4:0] r0,
  input  logic [4:0] r1,
  output logic [4:0] data
);
  typedef logic [4:0] table_t [1024];

  function automatic table_t gen_table();
    table_t      t;
    tab512_t     ind;
    int unsigned v;
    ind = index_table(G, M);
    for (int unsigned i1 = 0; i1 < 32; i1++)
      for (int unsigned i0 = 0; i0 < 32; i0++) begin
        v = diff_to_mod(crt_sub(i0 % SUBM0, i1 % SUBM1), M);
        if (v == 0) t[i1*32 + i0] = ZERO_IDX;
        else        t[i1*32 + i0] = 5'(ind[v] % MS);
      end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{r1, r0}];
endmodule
