// rrns_pkg: configuration, types and constant functions shared by every RRNS block.
//
// A value is held as NR = N + R residues, one per modulus. The first N moduli are
// non-redundant and fix the range M = m1*m2*...*mN; the last R are redundant and carry
// the information used to detect and correct errors. The default base set
// (139, 349, 128, 379 | 503, 509) is the (4,2) set that covers a range close to 32-bit
// binary; all residues fit in RW = 9 bits. Signed numbers use the Excess-M/2 code: the
// value x is stored as the residues of x + M/2.
//
// Every table a block needs (modular inverses, index-sum maps, correction offsets) is
// derived from MODS by the constant functions below, so changing the base set or (n, r)
// means editing N, R and MODS only. Each modulus must be a prime or a power of two
// (the index-sum multiplier needs that) and the redundant moduli must be the largest.
package rrns_pkg;

  parameter int N  = 4;          // non-redundant moduli
  parameter int R  = 2;          // redundant moduli
  parameter int NR = N + R;
  parameter int RW = 9;          // residue width in bits

  typedef int unsigned mods_t [NR];
  parameter mods_t MODS = '{139, 349, 128, 379, 503, 509};

  typedef logic [RW-1:0] residue_t;
  typedef residue_t [NR-1:0] rrns_t;   // index 0 holds the residue of MODS[0]

  // ---------------------------------------------------------------------------------
  // Constant arithmetic helpers (elaboration time only).
  function automatic longint unsigned prod_nr();
    longint unsigned p = 1;
    for (int i = 0; i < N; i++) p = p * MODS[i];
    return p;
  endfunction

  parameter longint unsigned M_RANGE = prod_nr();     // M
  parameter longint unsigned M_HALF  = M_RANGE / 2;   // Excess-M/2 offset

  // |x|_m for a (possibly negative) 64-bit number
  function automatic int unsigned smod(longint x, int unsigned m);
    longint r = x % longint'(m);
    if (r < 0) r = r + longint'(m);
    return 32'(r);
  endfunction

  // multiplicative inverse of a modulo m (a and m co-prime), extended Euclid
  function automatic int unsigned modinv(int unsigned a, int unsigned m);
    longint r0 = longint'(m), r1 = longint'(a) % longint'(m);
    longint s0 = 0, s1 = 1, q, tmp;
    for (int it = 0; it < 40 && r1 != 0; it++) begin
      q   = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = s0 - q * s1; s0 = s1; s1 = tmp;
    end
    return smod(s0, m);
  endfunction

  function automatic bit is_pow2(int unsigned m);
    return (m & (m - 1)) == 0;
  endfunction

  function automatic int unsigned clog2u(int unsigned m);
    int unsigned k = 0;
    while ((32'd1 << k) < m) k++;
    return k;
  endfunction

  // product of MODS[0..j-1], the weight of mixed-radix digit j
  function automatic longint unsigned radix_weight(int j);
    longint unsigned p = 1;
    for (int i = 0; i < j; i++) p = p * MODS[i];
    return p;
  endfunction

  // Residue vector of a signed value v in Excess-M/2 code (v + M/2 for every modulus).
  function automatic rrns_t to_rrns(longint v);
    rrns_t r;
    for (int i = 0; i < NR; i++) r[i] = residue_t'(smod(v + longint'(M_HALF), MODS[i]));
    return r;
  endfunction

  // Residue vector of an unsigned integer (no offset).
  function automatic rrns_t to_rrns_u(longint unsigned v);
    rrns_t r;
    for (int i = 0; i < NR; i++) r[i] = residue_t'(v % 64'(MODS[i]));
    return r;
  endfunction

  // Operations of a residue ALU (one per subcore).
  typedef enum logic [1:0] {
    ALU_ADD = 2'd0,   // x + y, with the Excess-M/2 correction factor
    ALU_SUB = 2'd1,   // x - y, with the Excess-M/2 correction factor
    ALU_MUL = 2'd2,   // x * y by index-sum, with the Excess-M/2 correction factor
    ALU_CMP = 2'd3    // x - y with no correction: the comparison difference
  } alu_op_e;

  // Outcome of a consistency check, see error_handling_unit.
  typedef enum logic [2:0] {
    CHK_OK        = 3'd0,   // all deltas zero
    CHK_CORRECTED = 3'd1,   // one residue was wrong and has been repaired (1EC mode)
    CHK_ERROR     = 3'd2,   // error detected, not corrected: restart from a checkpoint
    CHK_OVERFLOW  = 3'd3,   // result exceeded the positive end of the range
    CHK_UNDERFLOW = 3'd4    // result passed the negative end (X < Y after a compare)
  } chk_status_e;

endpackage
