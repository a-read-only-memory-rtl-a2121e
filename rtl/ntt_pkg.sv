// ntt_pkg: constants and table-generating functions shared by the ROM-based
// number theoretic transform (NTT) butterfly.
//
// The arithmetic is done in residue form.  Each main prime m (191, 193, 449)
// is handled with two small sub-moduli, 30 and 31, whose product 930 is large
// enough to hold the sum of two indices or two residues without ambiguity.
// Multiplication uses the index (discrete logarithm) method: the index of a
// product is the sum of the indices modulo m-1.  Zero has no index; the value
// 31, which no legal residue mod 30 or mod 31 can take, marks it.
//
// Every look-up table of the design is filled at elaboration time by the
// functions below, so the ROM contents are written as formulas rather than
// as data files.  All functions are constant functions (no state).
//
// Prime, generator and sub-moduli choices follow the source design; the
// choice of the smallest primitive root of each prime as index base is this
// implementation's own (the source names 5 for 193, the others are computed).
package ntt_pkg;

  // Transform length and its logarithm: 128-point radix-2 transform,
  // 64 butterflies per stage, 7 stages.
  localparam int unsigned NPT      = 128;
  localparam int unsigned LOG2N    = 7;

  // Sub-moduli used for every addition, subtraction and index addition.
  localparam int unsigned SUBM0    = 30;
  localparam int unsigned SUBM1    = 31;
  localparam int unsigned SUBPROD  = SUBM0 * SUBM1;  // 930
  localparam int unsigned SW       = 5;              // sub-residue width
  localparam logic [SW-1:0] ZERO_IDX = 5'd31;        // index of zero

  // Width of a residue modulo the main primes (up to 448).
  localparam int unsigned RW       = 9;

  // The three primes of the residue ring R = GF(191^2) + GF(193^2) + GF(449^2).
  localparam int unsigned M_A      = 191;   // 4n+3 type, complex field
  localparam int unsigned M_B      = 193;   // 4n+1 type, built prototype
  localparam int unsigned M_C      = 449;   // 4n+1 type

  // Primitive roots used as index base.
  localparam int unsigned G_A      = 19;
  localparam int unsigned G_B      = 5;
  localparam int unsigned G_C      = 3;

  // Generators of order 128: alpha_A = 66 + 6*sqrt(-1), alpha_B = sqrt(125),
  // alpha_C = sqrt(391).
  localparam int unsigned ALPHA_A_RE = 66;
  localparam int unsigned ALPHA_A_IM = 6;
  localparam int unsigned R_B      = 125;
  localparam int unsigned R_C      = 391;

  // Pipeline lags of the two butterfly kinds.
  localparam int unsigned LAT_4N1  = 5;
  localparam int unsigned LAT_4N3  = 7;

  typedef int unsigned tab512_t [512];

  // Chinese-remainder reconstruction of (x mod 30, x mod 31) into x mod 930.
  // 31 is its own inverse mod 30 and 30*30 = 900 = 1 mod 31.
  function automatic int unsigned crt_sub(input int unsigned r0, input int unsigned r1);
    return (SUBM1 * r0 + 900 * r1) % SUBPROD;
  endfunction

  // b^e mod m by repeated multiplication (e is small at elaboration).
  function automatic int unsigned pow_mod(input int unsigned b, input int unsigned e,
                                          input int unsigned m);
    int unsigned v;
    v = 1;
    for (int unsigned k = 0; k < e; k++) v = (v * b) % m;
    return v;
  endfunction

  // Index table: t[v] = k with g^k = v (mod m), for v = 1..m-1.  t[0] unused.
  function automatic tab512_t index_table(input int unsigned g, input int unsigned m);
    tab512_t t;
    int unsigned v;
    for (int unsigned i = 0; i < 512; i++) t[i] = 0;
    v = 1;
    for (int unsigned k = 0; k < m - 1; k++) begin
      t[v] = k;
      v = (v * g) % m;
    end
    return t;
  endfunction

  // Index of a single value (used for constants only).
  function automatic int unsigned dlog(input int unsigned v, input int unsigned g,
                                       input int unsigned m);
    int unsigned x;
    int unsigned r;
    x = 1;
    r = 0;
    for (int unsigned k = 0; k < m - 1; k++) begin
      if (x == v) r = k;
      x = (x * g) % m;
    end
    return r;
  endfunction

  // Value mod m of a reconstructed difference of two residues mod m.
  // Differences lie in -(m-1)..(m-1); negative ones appear as 930 - |d|,
  // i.e. in the range 931-m .. 929 (738..929 for m = 193).
  function automatic int unsigned diff_to_mod(input int unsigned x, input int unsigned m);
    if (x >= SUBPROD - (m - 1)) return x + m - SUBPROD;
    return x % m;
  endfunction

  // Power of alpha used by butterfly `pos` in stage `stg` (stages 0..6):
  // the stg least significant bits of the position are cleared.  The
  // inverse transform uses alpha^(N - p).
  function automatic int unsigned tw_power(input logic inv, input int unsigned stg,
                                           input int unsigned pos);
    int unsigned p;
    p = (pos >> stg) << stg;
    if (inv && p != 0) p = NPT - p;
    return p % NPT;
  endfunction

  // Dynamic range of the residue ring: the product of the three primes.
  localparam int unsigned MPROD    = M_A * M_B * M_C;   // 16 551 487
  localparam int unsigned OW       = 25;                // signed result width

  // One element of GF(m^2): x + y*j (191) or x + y*sqrt(r) (193, 449).
  typedef struct packed {
    logic [RW-1:0] re;
    logic [RW-1:0] im;
  } gf2_t;

  // One transform point in residue form: its image in each of the three fields.
  typedef struct packed {
    gf2_t f191;
    gf2_t f193;
    gf2_t f449;
  } rns_point_t;

  // Multiplicative inverse of a mod m (m prime), by Fermat: a^(m-2).
  function automatic int unsigned inv_mod(input int unsigned a, input int unsigned m);
    return pow_mod(a % m, m - 2, m);
  endfunction

  // Chinese-remainder weight of prime m: (MPROD/m) * ((MPROD/m)^-1 mod m).
  function automatic longint unsigned crt_weight(input int unsigned m);
    int unsigned q;
    q = MPROD / m;
    return 64'(q) * 64'(inv_mod(q, m));
  endfunction

  // Seven-bit bit reversal: after the seventh stage, memory location k holds
  // transform point bitrev7(k).
  function automatic logic [LOG2N-1:0] bitrev7(input logic [LOG2N-1:0] k);
    logic [LOG2N-1:0] r;
    for (int i = 0; i < int'(LOG2N); i++) r[i] = k[LOG2N-1-i];
    return r;
  endfunction

endpackage
