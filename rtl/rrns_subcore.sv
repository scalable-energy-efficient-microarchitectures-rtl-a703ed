// rrns_subcore: one residue channel of the thread-level RRNS core.
//
// Each subcore runs the same micro-instruction stream as the others but only on its own
// residue, and independently of them: IBUF (its micro-instruction buffer) -> EXE (residue
// ALU) -> MEM (its slice of the data memory, one residue per word) -> WB (its slice of the
// register file). Operand values travel inside the micro-instruction, so the subcore has no
// hazards of its own and never stalls once an entry has issued. A load or store reads the
// complete address from the memory address buffer by its A_ID in the MEM stage. A
// comparison, check, conversion or fractional multiply does not write the register file:
// in WB the subcore sends its residue(s) to the residue interaction unit instead.
//
// The data slice holds DMEM_WORDS words addressed by the low address bits (its size is this
// design's choice; the source design gives the slices no size). inj_valid/inj_offset add
// an offset (mod m) to the next result this subcore writes back: a transient-fault model
// for testing the error handling, not part of the source design.
module rrns_subcore
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
#(
  parameter int CH         = 0,      // residue channel
  parameter int MIB_DEPTH  = 8,
  parameter int DMEM_WORDS = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // from decode
  input  logic        push,
  input  uop_t        push_uop,
  output logic        mib_full,
  input  logic        release_spec,
  input  logic        squash_spec,
  // memory address buffer port
  output logic        mab_rd_en,
  output aid_t        mab_rd_id,
  input  logic [31:0] mab_rd_addr,
  // register file slice write
  output logic        rf_we,
  output reg_idx_t    rf_wa,
  output residue_t    rf_wd,
  // to the residue interaction unit
  output logic        riu_valid,
  output opcode_e     riu_op,
  output reg_idx_t    riu_dest,
  output residue_t    riu_val1,
  output residue_t    riu_val2,
  // fault injection
  input  logic        inj_valid,
  input  residue_t    inj_offset,
  output logic        busy
);

  localparam int unsigned MOD = MODS[CH];
  localparam int AW = $clog2(DMEM_WORDS);

  // ---------------- IBUF ----------------
  logic head_valid, mib_empty;
  uop_t head_uop;

  micro_instruction_buffer #(.DEPTH(MIB_DEPTH)) u_mib (
    .clk, .rst_n,
    .push, .push_uop,
    .full (mib_full),
    .head_valid, .head_uop,
    .pop  (head_valid),
    .release_spec, .squash_spec,
    .empty (mib_empty)
  );

  // ---------------- EXE ----------------
  logic     ex_valid;
  uop_t     ex_uop;
  residue_t alu_z;
  alu_op_e  alu_op;

  always_comb begin
    unique case (ex_uop.op)
      OP_SUB:  alu_op = ALU_SUB;
      OP_MUL:  alu_op = ALU_MUL;
      OP_CMP:  alu_op = ALU_CMP;
      default: alu_op = ALU_ADD;
    endcase
  end

  residue_alu #(.MOD(MOD)) u_alu (.op(alu_op), .x(ex_uop.src1), .y(ex_uop.src2), .z(alu_z));

  // ---------------- MEM ----------------
  logic     mem_valid;
  uop_t     mem_uop;
  residue_t mem_res;
  residue_t dmem [DMEM_WORDS];

  assign mab_rd_en = mem_valid && (mem_uop.op == OP_LD || mem_uop.op == OP_ST);
  assign mab_rd_id = mem_uop.a_id;

  // ---------------- WB ----------------
  logic     wb_valid;
  uop_t     wb_uop;
  residue_t wb_res;
  logic     inj_armed;
  residue_t inj_off_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      mem_valid <= 1'b0;
      wb_valid  <= 1'b0;
      ex_uop    <= '0;
      mem_uop   <= '0;
      wb_uop    <= '0;
      mem_res   <= '0;
      wb_res    <= '0;
      inj_armed <= 1'b0;
      inj_off_q <= '0;
      for (int a = 0; a < DMEM_WORDS; a++) dmem[a] <= '0;
    end else begin
      // IBUF -> EXE
      ex_valid <= head_valid;
      ex_uop   <= head_uop;
      // EXE -> MEM
      mem_valid <= ex_valid;
      mem_uop   <= ex_uop;
      mem_res   <= (ex_uop.op == OP_LI) ? ex_uop.src1 : alu_z;
      // MEM -> WB
      wb_valid <= mem_valid;
      wb_uop   <= mem_uop;
      wb_res   <= mem_res;
      if (mem_valid && mem_uop.op == OP_LD) wb_res <= dmem[mab_rd_addr[AW-1:0]];
      if (mem_valid && mem_uop.op == OP_ST) dmem[mab_rd_addr[AW-1:0]] <= mem_uop.src1;
      // fault injection into the next register write
      if (inj_valid) begin
        inj_armed <= 1'b1;
        inj_off_q <= inj_offset;
      end else if (rf_we) begin
        inj_armed <= 1'b0;
      end
    end
  end

  logic writes_rf;
  assign writes_rf = (wb_uop.op == OP_ADD || wb_uop.op == OP_SUB || wb_uop.op == OP_MUL ||
                      wb_uop.op == OP_LI  || wb_uop.op == OP_LD);

  assign rf_we = wb_valid && writes_rf;
  assign rf_wa = wb_uop.dest;
  assign rf_wd = inj_armed ? residue_t'((32'(wb_res) + 32'(inj_off_q)) % MOD) : wb_res;

  assign riu_valid = wb_valid && (wb_uop.op == OP_CMP || wb_uop.op == OP_CHK ||
                                  wb_uop.op == OP_OUT || wb_uop.op == OP_FMUL);
  assign riu_op    = wb_uop.op;
  assign riu_dest  = wb_uop.dest;
  assign riu_val1  = (wb_uop.op == OP_CMP) ? wb_res : wb_uop.src1;
  assign riu_val2  = wb_uop.src2;

  assign busy = !mib_empty || ex_valid || mem_valid || wb_valid;

endmodule
