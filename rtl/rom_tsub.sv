// rom_tsub: sub-modulo subtraction table (TSUB).
//
// Two residues modulo the sub-modulus MS (30 or 31) address the table; it
// returns (a - b) mod MS.  Reconstructing the pair of such differences with
// the Chinese remainder theorem gives the difference modulo 930, where a
// negative result d appears as 930 + d.
//
// Interface: a (minuend) on A0-A4, b (subtrahend) on A5-A9, 5-bit result.
// Purely combinational.
//
// The table follows the source design; the address layout is this design's own.
module rom_tsub #(
  parameter int unsigned MS = 30
) (
  input  logic [4:0] a,
  input  logic [4:0] b,
  output logic [4:0] data
);
  typedef logic [4:0] table_t [1024];

  function automatic table_t gen_table();
    table_t t;
    for (int unsigned ib = 0; ib < 32; ib++)
      for (int unsigned ia = 0; ia < 32; ia++)
        t[ib*32 + ia] = 5'(((ia % MS) + MS - (ib % MS)) % MS);
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{b, a}];
endmodule
