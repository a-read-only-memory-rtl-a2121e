// rom_tinv: inverse-index table (TINV), the last step of a multiplication.
//
// The pair (s mod 30, s mod 31) of an index sum s is rebuilt with the Chinese
// remainder theorem (s < 930 always holds), reduced modulo M-1 and turned
// back into the element G^s mod M.  If either half is 31, the index-of-zero
// marker, the product is zero.  With OUT_MS = 0 the element is returned as a
// residue mod M; with OUT_MS = 30 or 31 it is returned already reduced to that
// sub-modulus, which the 4n+3 butterfly needs for its final add/subtract.
//
// Interface: r0 (mod 30) on A0-A4, r1 (mod 31) on A5-A9, RW-bit data out.
// Purely combinational.
//
// The table follows the source design; the OUT_MS variant is this design's
// own way of feeding the 4n+3 stage-6 add/subtract.
module rom_tinv
  import ntt_pkg::*;
#(
  parameter int unsigned M      = 193,
  parameter int unsigned G      = 5,
  parameter int unsigned OUT_MS = 0
) (
  input  logic [4:0]    r0,
  input  logic [4:0]    r1,
  output logic [RW-1:0] data
);
  typedef logic [RW-1:0] table_t [1024];

  function automatic table_t gen_table();
    table_t      t;
    tab512_t     pw;
    int unsigned v;
    v = 1;
    for (int unsigned k = 0; k < 512; k++) begin
      pw[k] = v;
      v = (v * G) % M;
    end
    for (int unsigned i1 = 0; i1 < 32; i1++)
      for (int unsigned i0 = 0; i0 < 32; i0++) begin
        if (i0 == 31 || i1 == 31) v = 0;
        else                      v = pw[crt_sub(i0 % SUBM0, i1 % SUBM1) % (M - 1)];
        if (OUT_MS != 0) v = v % OUT_MS;
        t[i1*32 + i0] = RW'(v);
      end
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{r1, r0}];
endmodule
