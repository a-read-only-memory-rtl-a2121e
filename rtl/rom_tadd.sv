// rom_tadd: sub-modulo addition table (TADD), and with K > 0 the addition
// table "with multiplier" (TADMUL).
//
// Two residues modulo the sub-modulus MS (30 or 31) address the table; it
// returns (a + b + K) mod MS.  The same table adds data residues and indices:
// when either operand is 31, the index-of-zero marker, the result is 31 so a
// product with zero stays recognisable.  With K = index of r the table also
// multiplies by the constant r of the field GF(m^2) = {a + b*sqrt(r)} at no
// extra cost, which the butterfly needs for odd powers of alpha = sqrt(r).
//
// Interface: a on address lines A0-A4, b on A5-A9, 5-bit result.
// Purely combinational, like the 1K x 8 ROM it models.
//
// The table and its zero marker follow the source design; the offset K for
// TADMUL is computed here as the index of r (3 for sqrt(125) mod 193).
module rom_tadd #(
  parameter int unsigned MS = 30,
  parameter int unsigned K  = 0
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
        if (ia == 31 || ib == 31) t[ib*32 + ia] = 5'd31;
        else                      t[ib*32 + ia] = 5'((ia + ib + K) % MS);
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[{b, a}];
endmodule
