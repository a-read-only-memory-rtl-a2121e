// rom_trsm: residue table (TRSM), the first table of the butterfly pipeline.
//
// A residue x modulo the main prime M (0..M-1) addresses the table, which
// returns x mod MS, MS being one of the two sub-moduli (30 or 31).  Eight of
// these tables start each butterfly: one per input component and sub-modulus.
// Like every ROM in this design it is purely combinational (address in, data
// out); the pipeline latches are in the butterfly around it.
//
// Interface: addr is the residue (AW bits), data the 5-bit sub-residue.
// Addresses at or above M never occur; the table holds addr mod MS there too.
module rom_trsm #(
  parameter int unsigned M  = 193,
  parameter int unsigned MS = 30,
  parameter int unsigned AW = $clog2(M)
) (
  input  logic [AW-1:0] addr,
  output logic [4:0]    data
);
  typedef logic [4:0] table_t [2**AW];

  function automatic table_t gen_table();
    table_t t;
    for (int unsigned a = 0; a < 2**AW; a++) t[a] = 5'(a % MS);
    return t;
  endfunction

  localparam table_t TABLE = gen_table();

  assign data = TABLE[addr];
endmodule
