// rrns_test_prog_pkg: the test program shared by the core and top testbenches, and its
// expected OUT values worked out in plain 64-bit arithmetic.
//
// The program exercises every mechanism of the thread-level core: residue-parallel
// arithmetic, a store/load pair through the memory address buffer, a counted loop whose
// compare+branch pairs are predicted (right and wrong), a compare that acts as a barrier,
// a branch resolved from ready flags, two predicted branches whose speculative paths fill
// a micro-instruction buffer and the memory address buffer, a register check (that repairs
// or detects an injected fault in r1), an addition that overflows and is caught by a
// check, a fractional multiply and conversions to binary (OUT).
package rrns_test_prog_pkg;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  parameter int PLEN = 64;
  typedef logic [31:0] prog_t [PLEN];

  function automatic prog_t test_program();
    prog_t p;
    for (int i = 0; i < PLEN; i++) p[i] = enc_r(OP_HALT, 0, 0, 0);
    p[0]  = enc_i(OP_LI, 1, 0, 7);
    p[1]  = enc_i(OP_LI, 2, 0, -3);
    p[2]  = enc_r(OP_CHK, 0, 1, 0);
    p[3]  = enc_r(OP_ADD, 3, 1, 2);          // 4
    p[4]  = enc_r(OP_MUL, 4, 3, 1);          // 28
    p[5]  = enc_r(OP_SUB, 5, 4, 2);          // 31
    p[6]  = enc_i(OP_ST, 0, 5, 10);
    p[7]  = enc_i(OP_LD, 6, 0, 10);
    p[8]  = enc_r(OP_OUT, 0, 6, 0);          // out 31
    p[9]  = enc_i(OP_LI, 7, 0, 0);
    p[10] = enc_i(OP_LI, 8, 0, 5);
    p[11] = enc_i(OP_LI, 9, 0, 1);
    p[12] = enc_i(OP_LI, 10, 0, 0);
    p[13] = enc_r(OP_ADD, 10, 10, 7);        // loop: acc += i
    p[14] = enc_r(OP_ADD, 7, 7, 9);          // i++
    p[15] = enc_r(OP_CMP, 0, 7, 8);
    p[16] = enc_i(OP_BLT, 0, 0, 13);
    p[17] = enc_r(OP_OUT, 0, 10, 0);         // out 0+1+2+3+4 = 10
    p[18] = enc_r(OP_CMP, 0, 8, 1);          // 5 < 7, not followed by a branch: barrier
    p[19] = enc_i(OP_LI, 11, 0, 2);
    p[20] = enc_i(OP_BGE, 0, 0, 60);         // resolved from ready flags: not taken
    p[21] = enc_r(OP_CMP, 0, 1, 8);          // 7 >= 5
    p[22] = enc_i(OP_BLT, 0, 0, 60);         // predicted, not taken
    for (int k = 0; k < 10; k++) p[23 + k] = enc_r(OP_ADD, 18 + k, 1, 2);   // fill a MIB
    p[33] = enc_r(OP_CMP, 0, 1, 8);
    p[34] = enc_i(OP_BLT, 0, 0, 60);
    for (int k = 0; k < 6; k++) p[35 + k] = enc_i(OP_ST, 0, 1, 20 + k);     // fill the MAB
    p[41] = enc_i(OP_LD, 30, 0, 25);         // 7
    p[42] = enc_r(OP_ADD, 31, 30, 3);        // 11
    p[43] = enc_r(OP_OUT, 0, 31, 0);         // out 11
    p[44] = enc_i(OP_LI, 13, 0, 30000);
    p[45] = enc_r(OP_MUL, 14, 13, 13);       // 9e8
    p[46] = enc_r(OP_ADD, 15, 14, 14);       // 1.8e9 > M/2: overflow
    p[47] = enc_r(OP_CHK, 0, 15, 0);
    p[48] = enc_r(OP_FMUL, 16, 14, 14);
    p[49] = enc_r(OP_OUT, 0, 16, 0);
    p[50] = enc_r(OP_OUT, 0, 27, 0);         // out 4 (last ADD of the MIB-filling run)
    p[51] = enc_r(OP_HALT, 0, 0, 0);
    p[60] = enc_r(OP_OUT, 0, 2, 0);          // wrong path: would print -3
    p[61] = enc_r(OP_HALT, 0, 0, 0);
    return p;
  endfunction

  parameter int NOUT = 5;
  typedef longint outs_t [NOUT];

  function automatic outs_t expected();
    outs_t e;
    longint unsigned x = (64'd900000000 + M_HALF) % M_RANGE;   // code of 9e8, unsigned
    e[0] = 31;
    e[1] = 10;
    e[2] = 11;
    e[3] = longint'((x * x) / M_RANGE) - longint'(M_HALF);
    e[4] = 4;
    return e;
  endfunction

endpackage
