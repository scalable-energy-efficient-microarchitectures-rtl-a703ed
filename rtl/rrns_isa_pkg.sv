// rrns_isa_pkg: instruction set, micro-instruction format and core constants of the
// thread-level RRNS core.
//
// Instructions are 32 bits: [31:26] opcode, [25:21] rd, [20:16] rs1, [15:11] rs2 and, for
// LI / LD / ST / branches, [15:0] imm. The source design traces ARM programs and does not
// define its own instruction set, so this small register-to-register set is this design's
// own; it has one instruction for each behaviour the microarchitecture handles:
//   ADD/SUB/MUL rd, rs1, rs2   residue-parallel arithmetic (no synchronisation)
//   LI   rd, imm               load a signed 16-bit immediate, coded into residues in ID
//   LD   rd, imm / ST rs1, imm memory access at the absolute word address imm (via the MAB)
//   CMP  rs1, rs2              comparison: an RRNS-unfriendly instruction done in the RIU
//   BLT / BGE imm              branch on the last comparison (less / greater-or-equal)
//   JMP  imm                   unconditional jump
//   CHK  rs1                   RRNS check of a register: detect, correct, flag overflow
//   FMUL rd, rs1, rs2          fractional product floor(X*Y/M) in the RIU
//   OUT  rs1                   convert a register to binary and present it on the out port
//   HALT                       stop fetching; the core is done when everything drains
// The micro-instruction carries the fields of the source design's micro-instruction buffer
// entry: Op (6 bits), Dest_# (5), SRC1_Val and SRC2_Val (one residue each), A_ID (2), plus a
// speculation bit used by the branch-predictor combination.
package rrns_isa_pkg;
  import rrns_pkg::*;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ADD  = 6'd1,
    OP_SUB  = 6'd2,
    OP_MUL  = 6'd3,
    OP_LI   = 6'd4,
    OP_LD   = 6'd5,
    OP_ST   = 6'd6,
    OP_CMP  = 6'd7,
    OP_BLT  = 6'd8,
    OP_BGE  = 6'd9,
    OP_JMP  = 6'd10,
    OP_CHK  = 6'd11,
    OP_FMUL = 6'd12,
    OP_OUT  = 6'd13,
    OP_HALT = 6'd14
  } opcode_e;

  parameter int NREGS  = 32;      // Dest_# is 5 bits
  parameter int AIDW   = 2;       // A_ID is 2 bits
  parameter int PCW    = 8;       // instruction address width

  typedef logic [4:0]      reg_idx_t;
  typedef logic [AIDW-1:0] aid_t;

  typedef struct packed {
    opcode_e  op;
    reg_idx_t dest;
    residue_t src1;
    residue_t src2;
    aid_t     a_id;
    logic     spec;      // issued under an unresolved predicted branch
  } uop_t;

  // event counters of the core, brought out for measurement
  typedef struct packed {
    logic [31:0] cycles;          // cycles while running
    logic [31:0] issued;          // instructions that left decode
    logic [31:0] stall_mib;       // decode stalled: a micro-instruction buffer was full
    logic [31:0] stall_mab;       // decode stalled: no free memory address buffer entry
    logic [31:0] stall_hazard;    // decode stalled: operand or destination not yet written
    logic [31:0] stall_barrier;   // decode stalled behind a comparison (barrier)
    logic [31:0] stall_riu;       // decode stalled: the RIU was busy
    logic [31:0] bp_combined;     // comparisons taken off the critical path
    logic [31:0] bp_mispredict;   // of those, branches that were mispredicted
    logic [31:0] corrections;     // residues repaired by the RIU
    logic [31:0] errors;          // uncorrectable errors detected
    logic [31:0] overflows;       // overflow / underflow patterns seen by a check
  } core_stats_t;

  // instruction encoders (used by testbenches to build programs)
  function automatic logic [31:0] enc_r(opcode_e op, int rd, int rs1, int rs2);
    return {op, 5'(rd), 5'(rs1), 5'(rs2), 11'd0};
  endfunction
  function automatic logic [31:0] enc_i(opcode_e op, int rd, int rs1, int imm);
    return {op, 5'(rd), 5'(rs1), 16'(imm)};
  endfunction

endpackage
