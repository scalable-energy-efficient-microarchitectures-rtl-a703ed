// residue_interaction_unit (RIU): the one place where the residues of a value meet.
//
// Subcores run decoupled, so the residues of an RRNS-unfriendly operation arrive at
// different times. An auxiliary register collects them, one slot per subcore with an
// arrived bit; the operation starts only when all NR residues are present. Then:
//   CMP  : the comparison difference X - Y (uncorrected) is checked by the error handling
//          unit; no error and no underflow means X >= Y, the underflow pattern means X < Y.
//   CHK  : the register value is checked; with correction enabled a single wrong residue
//          is repaired and written back through the register file's full-width port.
//          An uncorrectable error raises err_detect (for a checkpoint restart), an
//          overflow or underflow pattern raises ovf_detect.
//   OUT  : checked (and corrected) like CHK, then converted to binary by the RBCU and
//          presented on out_valid/out_value.
//   FMUL : the fractional computing unit forms floor(X*Y/M), written back to dest.
// The unit serves one operation at a time; the decode stage issues the next one only after
// 'done'. The RIU sits in the high-Vdd domain in the source design and is treated as
// error-free here.
//
// Timing: CMP and an error-free CHK finish 8 cycles after the last residue arrives (plus one
// cycle to start), a corrected CHK 10; OUT adds the 8-cycle conversion; FMUL takes 9.
module residue_interaction_unit
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  correct_en,
  input  logic     [NR-1:0]     in_valid,
  input  opcode_e  [NR-1:0]     in_op,
  input  reg_idx_t [NR-1:0]     in_dest,
  input  residue_t [NR-1:0]     in_val1,
  input  residue_t [NR-1:0]     in_val2,
  output logic                  done,
  output opcode_e               done_op,
  output logic                  cmp_lt,
  output logic                  cmp_err,
  output logic                  rf_we,
  output reg_idx_t              rf_wa,
  output rrns_t                 rf_wd,
  output logic                  err_detect,
  output logic                  corr_event,
  output logic                  ovf_detect,
  output logic                  out_valid,
  output longint                out_value
);

  typedef enum logic [2:0] {S_GATHER, S_RUN, S_WAIT_EHU, S_WAIT_CVT, S_WAIT_FCU} state_e;
  state_e state;

  rrns_t        v1, v2;
  logic [NR-1:0] arrived;
  opcode_e      op_q;
  reg_idx_t     dest_q;

  // error handling unit
  logic         ehu_start, ehu_ready, ehu_done;
  chk_status_e  ehu_status;
  rrns_t        ehu_value;
  residue_t [N-1:0] ehu_digit;
  error_handling_unit u_ehu (
    .clk, .rst_n, .start(ehu_start), .x(v1),
    .correct_en(correct_en && op_q != OP_CMP),
    .ready(ehu_ready), .done(ehu_done), .status(ehu_status), .value(ehu_value),
    .digit(ehu_digit)
  );

  // conversion unit
  logic         cvt_start, cvt_ready, cvt_done, cvt_cons;
  longint unsigned cvt_u;
  longint       cvt_s;
  rrns_t        cvt_rrns_unused;
  rrns_t        cvt_in;
  rbcu u_rbcu (
    .clk, .rst_n, .start(cvt_start), .x(cvt_in), .ready(cvt_ready), .done(cvt_done),
    .bin_u(cvt_u), .bin_s(cvt_s), .consistent(cvt_cons), .from_bin('0),
    .to_rrns_out(cvt_rrns_unused)
  );

  // fractional computing unit
  logic         fcu_start, fcu_ready, fcu_done, fcu_bad;
  rrns_t        fcu_z;
  fcu u_fcu (
    .clk, .rst_n, .start(fcu_start), .x(v1), .y(v2), .ready(fcu_ready), .done(fcu_done),
    .z(fcu_z), .bad(fcu_bad)
  );

  assign ehu_start = (state == S_RUN) && (op_q != OP_FMUL);
  assign fcu_start = (state == S_RUN) && (op_q == OP_FMUL);
  assign cvt_start = (state == S_WAIT_EHU) && ehu_done && (op_q == OP_OUT);
  assign cvt_in    = ehu_value;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= S_GATHER;
      v1         <= '0;
      v2         <= '0;
      arrived    <= '0;
      op_q       <= OP_NOP;
      dest_q     <= '0;
      done       <= 1'b0;
      done_op    <= OP_NOP;
      cmp_lt     <= 1'b0;
      cmp_err    <= 1'b0;
      rf_we      <= 1'b0;
      rf_wa      <= '0;
      rf_wd      <= '0;
      err_detect <= 1'b0;
      corr_event <= 1'b0;
      ovf_detect <= 1'b0;
      out_valid  <= 1'b0;
      out_value  <= '0;
    end else begin
      done       <= 1'b0;
      rf_we      <= 1'b0;
      err_detect <= 1'b0;
      corr_event <= 1'b0;
      ovf_detect <= 1'b0;
      out_valid  <= 1'b0;
      unique case (state)
        S_GATHER: begin
          for (int c = 0; c < NR; c++) begin
            if (in_valid[c]) begin
              v1[c]      <= in_val1[c];
              v2[c]      <= in_val2[c];
              arrived[c] <= 1'b1;
              op_q       <= in_op[c];
              dest_q     <= in_dest[c];
            end
          end
          if ((arrived | in_valid) == '1) state <= S_RUN;
        end
        S_RUN: begin
          arrived <= '0;
          state   <= (op_q == OP_FMUL) ? S_WAIT_FCU : S_WAIT_EHU;
        end
        S_WAIT_EHU: if (ehu_done) begin
          if (op_q == OP_OUT) state <= S_WAIT_CVT;
          else begin
            state   <= S_GATHER;
            done    <= 1'b1;
            done_op <= op_q;
          end
          if (op_q == OP_CMP) begin
            cmp_lt  <= (ehu_status == CHK_UNDERFLOW);
            cmp_err <= !(ehu_status == CHK_UNDERFLOW || ehu_status == CHK_OK);
            err_detect <= !(ehu_status == CHK_UNDERFLOW || ehu_status == CHK_OK);
          end else begin
            err_detect <= (ehu_status == CHK_ERROR);
            ovf_detect <= (ehu_status == CHK_OVERFLOW || ehu_status == CHK_UNDERFLOW);
            corr_event <= (ehu_status == CHK_CORRECTED);
            if (ehu_status == CHK_CORRECTED && op_q == OP_CHK) begin
              rf_we <= 1'b1;
              rf_wa <= dest_q;
              rf_wd <= ehu_value;
            end
          end
        end
        S_WAIT_CVT: if (cvt_done) begin
          state     <= S_GATHER;
          done      <= 1'b1;
          done_op   <= op_q;
          out_valid <= 1'b1;
          out_value <= cvt_s;
        end
        S_WAIT_FCU: if (fcu_done) begin
          state      <= S_GATHER;
          done       <= 1'b1;
          done_op    <= op_q;
          rf_we      <= 1'b1;
          rf_wa      <= dest_q;
          rf_wd      <= fcu_z;
          err_detect <= fcu_bad;
        end
        default: state <= S_GATHER;
      endcase
    end
  end

  // all residues of one operation carry the same opcode
  for (genvar c = 0; c < NR; c++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n)
                     in_valid[c] |-> (state == S_GATHER && !arrived[c]));
  end

endmodule
