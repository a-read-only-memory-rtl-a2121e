// rom_tfin: final reconstruction table (TFIN).
//
// A pair (x mod 30, x mod 31) addresses the table.  It rebuilds x modulo 930
// with the Chinese remainder theorem, x = 31*r0 + 900*r1 mod 930, and returns
// the result modulo the main prime M.  With SIGNED = 1 the pair is taken to
// be a difference of two residues mod M: values from 931-M to 929 stand for
// negative differences and are corrected by x - 930 + M (for M = 193 this is
// the range 738..929 of the source design).  With SIGNED = 0 the pair is a sum
// of two residues and x mod M is returned.  Sums of two residues mod 193 fit
// both readings; for 449 they do not, so the butterflies choose per use.
//
// Interface: r0 (mod 30) on A0-A4, r1 (mod 31) on A5-A9, RW-bit residue out.
// Address pairs that are not residues (r0 > 29, r1 > 30) return 0.
// Purely combinational.
module rom_tfin
  import ntt_pkg::*;
#(
  parameter int unsigned M      = 193,
  parameter bit          SIGNED = 1'b1
) (
  input  logic [4:0]    r0,
  input  logic [4:0]    r1,
  output logic [RW-1:0] data
);
  typedef logic [RW-1:0] table_t [1024];

  function automatic table_t gen_table();
    table_t t;
    int unsigned x;
    for (int unsigned i1 = 0; i1 < 32; i1++)
      for (int unsigned i0 = 0; i0 < 32; i0++) begin
        x = crt_sub(i0, i1);
        if (i0 >= SUBM0 || i1 >= SUBM1) t[i1*32 + i0] = '0;
        else if (SIGNED)                t[i1*32 + i0] = RW'(diff_to_mod(x, M));
        else                            t[i1*32 + i0] = RW'(x % M);
      end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{r1, r0}];
endmodule
