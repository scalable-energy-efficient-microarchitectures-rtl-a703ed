// rrns_amt_core: thread-level RRNS core (the RRNS-AMT microarchitecture).
//
// Each value lives as NR residues, and each residue has its own narrow subcore. The fetch
// stage is shared, so only one PC adder exists; the decode stage reads both source
// registers (all residues) and splits every instruction into NR micro-instructions, one per
// subcore, carrying that subcore's residues of the operands (SRC1_Val, SRC2_Val). From the
// IBUF stage on, the subcores run independently: IF -> ID -> IBUF -> EXE -> MEM -> WB, a
// six-stage in-order pipeline, one residue per lane. Loads and stores get their complete
// address from the shared memory address buffer by A_ID.
//
// Operations that need all residues at once (compare, check, convert, fractional multiply)
// go through the residue interaction unit. A compare normally acts as a barrier: decode
// stalls until its result returns. The branch-predictor combination removes that stall
// when the instruction in the fetch stage is the branch that consumes the compare: the
// branch is predicted, younger instructions are decoded as speculative (held in the
// micro-instruction buffers, never issued), and when the compare returns they are released
// or squashed and the front end is redirected. Checks run off the critical path: decode
// only blocks the checked register until the check (and any correction) is done.
//
// Stall rules (this design's own, the source gives none in detail): decode waits while a
// source or destination register still has a pending write in any subcore (one pending
// write per register), while any micro-instruction buffer is full, while a load/store finds
// no free address buffer entry, and while the RIU is busy for a new RIU operation.
//
// Interface: program loading (prog_*), start after reset, done when halted and drained,
// out_valid/out_value from OUT, error/correction events, counters in 'stats', and a
// per-subcore fault-injection hook (test only). correct_en selects 1EC (correct) or
// detection-only handling of check results.
module rrns_amt_core
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
#(
  parameter int MIB_DEPTH  = 8,
  parameter int DMEM_WORDS = 256,
  parameter int BP_ENTRIES = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            prog_we,
  input  logic [PCW-1:0]  prog_addr,
  input  logic [31:0]     prog_data,
  input  logic            run,
  input  logic            correct_en,
  output logic            done,
  output logic            out_valid,
  output longint          out_value,
  output logic            err_detect,
  output logic            corr_event,
  output logic            ovf_detect,
  input  logic            inj_valid,
  input  logic [2:0]      inj_ch,
  input  residue_t        inj_offset,
  output core_stats_t     stats
);

  localparam int IMEM_WORDS = 1 << PCW;

  // ---------------------------------------------------------------- fetch
  logic [31:0]    imem [IMEM_WORDS];
  logic [PCW-1:0] pc;
  logic           if_valid;
  logic [31:0]    if_instr;
  logic [PCW-1:0] if_pc;
  logic           halted;

  always_ff @(posedge clk) begin
    if (prog_we) imem[prog_addr] <= prog_data;
  end

  logic [31:0] fetch_instr;
  assign fetch_instr = imem[pc];

  // ---------------------------------------------------------------- decode fields
  opcode_e   d_op;
  reg_idx_t  d_rd, d_rs1, d_rs2;
  logic [15:0] d_imm;
  assign d_op  = opcode_e'(if_instr[31:26]);
  assign d_rd  = if_instr[25:21];
  assign d_rs1 = if_instr[20:16];
  assign d_rs2 = if_instr[15:11];
  assign d_imm = if_instr[15:0];

  logic uses_rs1, uses_rs2, writes_rd, to_subcores, is_mem, is_riu, is_branch;
  always_comb begin
    uses_rs1    = d_op inside {OP_ADD, OP_SUB, OP_MUL, OP_CMP, OP_ST, OP_CHK, OP_OUT, OP_FMUL};
    uses_rs2    = d_op inside {OP_ADD, OP_SUB, OP_MUL, OP_CMP, OP_FMUL};
    writes_rd   = d_op inside {OP_ADD, OP_SUB, OP_MUL, OP_LI, OP_LD, OP_FMUL};
    to_subcores = d_op inside {OP_ADD, OP_SUB, OP_MUL, OP_LI, OP_LD, OP_ST, OP_CMP, OP_CHK,
                               OP_OUT, OP_FMUL};
    is_mem      = d_op inside {OP_LD, OP_ST};
    is_riu      = d_op inside {OP_CMP, OP_CHK, OP_OUT, OP_FMUL};
    is_branch   = d_op inside {OP_BLT, OP_BGE};
  end

  // ---------------------------------------------------------------- register file
  rrns_t rf_rd1, rf_rd2;
  logic     [NR-1:0] sl_we;
  reg_idx_t [NR-1:0] sl_wa;
  residue_t [NR-1:0] sl_wd;
  logic     riu_rf_we;
  reg_idx_t riu_rf_wa;
  rrns_t    riu_rf_wd;

  rrns_regfile u_rf (
    .clk, .rst_n, .ra1(d_rs1), .ra2(d_rs2), .rd1(rf_rd1), .rd2(rf_rd2),
    .slice_we(sl_we), .slice_wa(sl_wa), .slice_wd(sl_wd),
    .full_we(riu_rf_we), .full_wa(riu_rf_wa), .full_wd(riu_rf_wd)
  );

  // ---------------------------------------------------------------- scoreboard / state
  logic [NREGS-1:0][NR-1:0] pending;
  logic [NREGS-1:0]         spec_dest;
  logic                     riu_busy, riu_locks, spec_mode, cmp_out, combine, flags_valid, flag_lt;
  reg_idx_t                 riu_reg;
  opcode_e                  br_op;
  logic [PCW-1:0]           br_pc, br_target;
  logic                     br_pred;

  function automatic logic reg_busy(reg_idx_t r);
    return (pending[r] != '0) || (riu_busy && riu_locks && riu_reg == r);
  endfunction

  // ---------------------------------------------------------------- RIU
  logic     [NR-1:0] riu_in_valid;
  opcode_e  [NR-1:0] riu_in_op;
  reg_idx_t [NR-1:0] riu_in_dest;
  residue_t [NR-1:0] riu_in_v1, riu_in_v2;
  logic     riu_done, cmp_lt, cmp_err;
  opcode_e  riu_done_op;

  residue_interaction_unit u_riu (
    .clk, .rst_n, .correct_en,
    .in_valid(riu_in_valid), .in_op(riu_in_op), .in_dest(riu_in_dest),
    .in_val1(riu_in_v1), .in_val2(riu_in_v2),
    .done(riu_done), .done_op(riu_done_op), .cmp_lt, .cmp_err,
    .rf_we(riu_rf_we), .rf_wa(riu_rf_wa), .rf_wd(riu_rf_wd),
    .err_detect, .corr_event, .ovf_detect, .out_valid, .out_value
  );

  // branch resolution when the compare returns
  logic cmp_back, actual_taken, mispredict, resolve_ok;
  assign cmp_back     = riu_done && riu_done_op == OP_CMP;
  assign actual_taken = (br_op == OP_BLT) ? cmp_lt : !cmp_lt;
  assign mispredict   = cmp_back && spec_mode && (actual_taken != br_pred);
  assign resolve_ok   = cmp_back && spec_mode && (actual_taken == br_pred);

  // ---------------------------------------------------------------- memory address buffer
  logic     mab_ok;
  aid_t     mab_id;
  logic     [NR-1:0]       mab_rd_en;
  aid_t     [NR-1:0]       mab_rd_id;
  logic     [NR-1:0][31:0] mab_rd_addr;
  logic     [3:0]          mab_n_valid;
  logic     issue;

  memory_address_buffer #(.NRD(NR)) u_mab (
    .clk, .rst_n,
    .alloc(issue && is_mem), .alloc_addr({16'd0, d_imm}), .alloc_spec(spec_mode),
    .alloc_ok(mab_ok), .alloc_id(mab_id),
    .rd_en(mab_rd_en), .rd_id(mab_rd_id), .rd_addr(mab_rd_addr),
    .release_spec(resolve_ok), .squash_spec(mispredict), .n_valid(mab_n_valid)
  );

  // ---------------------------------------------------------------- branch predictor
  logic bp_taken;
  branch_predictor #(.ENTRIES(BP_ENTRIES)) u_bp (
    .clk, .rst_n, .pc(if_pc), .taken(bp_taken),
    .update(cmp_back && spec_mode), .upd_pc(br_pc), .upd_taken(actual_taken)
  );

  // ---------------------------------------------------------------- subcores
  logic [NR-1:0] mib_full, sc_busy;
  uop_t [NR-1:0] d_uop;
  rrns_t         li_code;
  assign li_code = to_rrns(longint'(signed'(d_imm)));

  for (genvar c = 0; c < NR; c++) begin : g_sc
    always_comb begin
      d_uop[c].op   = d_op;
      d_uop[c].dest = (d_op == OP_CHK) ? d_rs1 : d_rd;
      d_uop[c].src1 = (d_op == OP_LI) ? li_code[c] : rf_rd1[c];
      d_uop[c].src2 = rf_rd2[c];
      d_uop[c].a_id = mab_id;
      d_uop[c].spec = spec_mode;
    end
    rrns_subcore #(.CH(c), .MIB_DEPTH(MIB_DEPTH), .DMEM_WORDS(DMEM_WORDS)) u_sc (
      .clk, .rst_n,
      .push(issue && to_subcores), .push_uop(d_uop[c]), .mib_full(mib_full[c]),
      .release_spec(resolve_ok), .squash_spec(mispredict),
      .mab_rd_en(mab_rd_en[c]), .mab_rd_id(mab_rd_id[c]), .mab_rd_addr(mab_rd_addr[c]),
      .rf_we(sl_we[c]), .rf_wa(sl_wa[c]), .rf_wd(sl_wd[c]),
      .riu_valid(riu_in_valid[c]), .riu_op(riu_in_op[c]), .riu_dest(riu_in_dest[c]),
      .riu_val1(riu_in_v1[c]), .riu_val2(riu_in_v2[c]),
      .inj_valid(inj_valid && int'(inj_ch) == c), .inj_offset(inj_offset),
      .busy(sc_busy[c])
    );
  end

  // ---------------------------------------------------------------- issue decision
  logic st_hazard, st_mib, st_mab, st_barrier, st_riu, st_spec, stall;
  always_comb begin
    st_hazard  = (uses_rs1 && reg_busy(d_rs1)) || (uses_rs2 && reg_busy(d_rs2)) ||
                 (writes_rd && reg_busy(d_rd));
    st_mib     = to_subcores && (mib_full != '0);
    st_mab     = is_mem && !mab_ok;
    st_barrier = cmp_out && !combine;
    st_riu     = is_riu && riu_busy;
    // while speculating only plain arithmetic, immediates and memory instructions proceed
    st_spec    = spec_mode && !(d_op inside {OP_ADD, OP_SUB, OP_MUL, OP_LI, OP_LD, OP_ST, OP_NOP});
    stall      = st_hazard || st_mib || st_mab || st_barrier || st_riu || st_spec ||
                 cmp_back || (is_branch && !flags_valid && !(cmp_out && combine));
  end
  assign issue = run && if_valid && !stall;

  // ---------------------------------------------------------------- sequential control
  logic fetch_en;
  assign fetch_en = run && !halted && (!if_valid || issue);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pc          <= '0;
      if_valid    <= 1'b0;
      if_instr    <= '0;
      if_pc       <= '0;
      halted      <= 1'b0;
      pending     <= '0;
      spec_dest   <= '0;
      riu_busy    <= 1'b0;
      riu_locks   <= 1'b0;
      riu_reg     <= '0;
      spec_mode   <= 1'b0;
      cmp_out     <= 1'b0;
      combine     <= 1'b0;
      flags_valid <= 1'b0;
      flag_lt     <= 1'b0;
      br_op       <= OP_NOP;
      br_pc       <= '0;
      br_target   <= '0;
      br_pred     <= 1'b0;
      stats       <= '0;
    end else begin
      // ---- scoreboard: slice writes clear pending bits
      for (int c = 0; c < NR; c++)
        if (sl_we[c]) pending[sl_wa[c]][c] <= 1'b0;

      // ---- fetch
      if (fetch_en) begin
        if_instr <= fetch_instr;
        if_pc    <= pc;
        if_valid <= 1'b1;
        pc       <= pc + PCW'(1);       // the single PC adder
      end else if (issue) begin
        if_valid <= 1'b0;
      end

      // ---- decode / issue
      if (issue) begin
        if (writes_rd && d_op != OP_FMUL) begin
          pending[d_rd] <= '1;
          if (spec_mode) spec_dest[d_rd] <= 1'b1;
        end
        if (is_riu) begin
          riu_busy  <= 1'b1;
          riu_locks <= (d_op == OP_CHK) || (d_op == OP_FMUL);
          riu_reg   <= (d_op == OP_CHK) ? d_rs1 : d_rd;
        end
        unique case (d_op)
          OP_CMP: begin
            cmp_out     <= 1'b1;
            flags_valid <= 1'b0;
            combine     <= fetch_instr[31:26] inside {OP_BLT, OP_BGE};
          end
          OP_BLT, OP_BGE: begin
            if (flags_valid) begin
              if ((d_op == OP_BLT) == flag_lt) begin
                pc       <= d_imm[PCW-1:0];
                if_valid <= 1'b0;
              end
            end else begin
              // predicted branch behind an outstanding compare
              spec_mode <= 1'b1;
              br_op     <= d_op;
              br_pc     <= if_pc;
              br_target <= d_imm[PCW-1:0];
              br_pred   <= bp_taken;
              if (bp_taken) begin
                pc       <= d_imm[PCW-1:0];
                if_valid <= 1'b0;
              end
            end
          end
          OP_JMP: begin
            pc       <= d_imm[PCW-1:0];
            if_valid <= 1'b0;
          end
          OP_HALT: begin
            halted   <= 1'b1;
            if_valid <= 1'b0;
          end
          default: ;
        endcase
      end

      // ---- RIU completion
      if (riu_done) begin
        riu_busy  <= 1'b0;
        riu_locks <= 1'b0;
        if (riu_done_op == OP_CMP) begin
          cmp_out     <= 1'b0;
          combine     <= 1'b0;
          flags_valid <= 1'b1;
          flag_lt     <= cmp_lt;
        end
      end
      if (resolve_ok) begin
        spec_mode <= 1'b0;
        spec_dest <= '0;
      end
      if (mispredict) begin
        spec_mode <= 1'b0;
        spec_dest <= '0;
        for (int r = 0; r < NREGS; r++) if (spec_dest[r]) pending[r] <= '0;
        pc       <= actual_taken ? br_target : br_pc + PCW'(1);
        if_valid <= 1'b0;
        halted   <= 1'b0;
      end

      // ---- counters
      if (run && !done) begin
        stats.cycles <= stats.cycles + 1;
        if (issue) stats.issued <= stats.issued + 1;
        if (if_valid && !issue) begin
          if (st_hazard)       stats.stall_hazard  <= stats.stall_hazard + 1;
          else if (st_mib)     stats.stall_mib     <= stats.stall_mib + 1;
          else if (st_mab)     stats.stall_mab     <= stats.stall_mab + 1;
          else if (st_barrier) stats.stall_barrier <= stats.stall_barrier + 1;
          else if (st_riu)     stats.stall_riu     <= stats.stall_riu + 1;
        end
      end
      if (issue && is_branch && !flags_valid) stats.bp_combined <= stats.bp_combined + 1;
      if (mispredict)  stats.bp_mispredict <= stats.bp_mispredict + 1;
      if (corr_event)  stats.corrections   <= stats.corrections + 1;
      if (err_detect)  stats.errors        <= stats.errors + 1;
      if (ovf_detect)  stats.overflows     <= stats.overflows + 1;
    end
  end

  assign done = halted && !if_valid && (sc_busy == '0) && !riu_busy && !spec_mode;

  // a register never has two writes outstanding
  assert property (@(posedge clk) disable iff (!rst_n)
                   issue && writes_rd && d_op != OP_FMUL |-> pending[d_rd] == '0);

endmodule
