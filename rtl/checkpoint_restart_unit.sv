// checkpoint_restart_unit: sequences checkpoint creation, verification, commit and
// rollback.
//
// The unit sits between an interval controller (cc_req / ic_req), the error detectors
// (error) and the parts that do the work: the cache sweep and consistency checks, the CCB
// (checkpoint_buffer) and the ICB (incremental_checkpoint_buffer). Each kind of work is a
// step that the unit starts with a one-cycle *_start pulse and that reports back with
// *_done. 'busy' (feed it to the interval controller's hold) is high and the core is
// stalled while a step runs.
//  * End of an LI (cc_req): VERIFY. The sweep checks every written line and the register
//    file.
//    - Clean: COMMIT. Written lines go to the CCB, CR/CW are cleared and the ICs become
//      invalid. Then 'save' copies RF and PC for the new CC.
//    - An error: ROLLBACK.
//  * Every SI (ic_req): IC creation. The PC/RF snapshot and the stores go to the ICB.
//  * An error at any other time: ROLLBACK. RF/PC are restored from the CCB copy, written
//    and read lines are refetched from memory, and the LI's CCB lines are dropped. Then
//    the ICs taken since the CC are replayed oldest first, each verified (icv_*) before it
//    is applied (ica_*). Replay stops at the first IC that fails verification, and that IC
//    and any later ones are discarded. Then execution resumes.
// This sequence follows the source design. Verifying IC i+1 while IC i is applied, which
// the two ICB halves allow, is left out: IC steps run one after the other here. The
// handshake, the pending-request latches and the step encoding are this design's choices.
//
// Timing: a start pulse comes one cycle after the request or the previous done; done may
// come at any later cycle.
module checkpoint_restart_unit #(
  parameter int unsigned MAX_IC = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        cc_req,
  input  logic        ic_req,
  input  logic        error,
  output logic        busy,
  output logic        ver_start,
  input  logic        ver_done,
  input  logic        ver_err,
  output logic        cmt_start,
  input  logic        cmt_done,
  output logic        save,
  output logic        ic_start,
  input  logic        ic_done,
  output logic        rb_start,
  input  logic        rb_done,
  output logic        icv_start,
  input  logic        icv_done,
  input  logic        icv_err,
  output logic        ica_start,
  input  logic        ica_done,
  output logic [7:0]  ic_index,     // IC being verified or applied, 0 = oldest
  output logic [7:0]  n_ic,         // valid ICs since the last CC
  output logic [31:0] n_commit,
  output logic [31:0] n_rollback
);

  typedef enum logic [3:0] {
    S_RUN, S_VERIFY, S_COMMIT, S_SAVE, S_IC, S_RB, S_ICV, S_ICA
  } state_t;
  state_t st;
  logic   cc_pend, ic_pend, err_pend;

  assign busy = (st != S_RUN);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st         <= S_RUN;
      cc_pend    <= 1'b0;
      ic_pend    <= 1'b0;
      err_pend   <= 1'b0;
      ver_start  <= 1'b0;
      cmt_start  <= 1'b0;
      save       <= 1'b0;
      ic_start   <= 1'b0;
      rb_start   <= 1'b0;
      icv_start  <= 1'b0;
      ica_start  <= 1'b0;
      ic_index   <= '0;
      n_ic       <= '0;
      n_commit   <= '0;
      n_rollback <= '0;
    end else begin
      ver_start <= 1'b0;
      cmt_start <= 1'b0;
      save      <= 1'b0;
      ic_start  <= 1'b0;
      rb_start  <= 1'b0;
      icv_start <= 1'b0;
      ica_start <= 1'b0;
      if (cc_req) cc_pend <= 1'b1;
      if (ic_req) ic_pend <= 1'b1;
      if (error)  err_pend <= 1'b1;
      unique case (st)
        S_RUN: begin
          // an error outranks a due CC, which outranks a due IC
          if (error || err_pend) begin
            st <= S_RB;  rb_start <= 1'b1; err_pend <= 1'b0;
          end else if (cc_req || cc_pend) begin
            st <= S_VERIFY;  ver_start <= 1'b1; cc_pend <= 1'b0;
          end else if (ic_req || ic_pend) begin
            st <= S_IC;  ic_start <= 1'b1; ic_pend <= 1'b0;
          end
        end
        S_VERIFY: if (ver_done) begin
          if (ver_err) begin
            st <= S_RB;  rb_start <= 1'b1;
          end else begin
            st <= S_COMMIT;  cmt_start <= 1'b1;
          end
        end
        S_COMMIT: if (cmt_done) begin
          st       <= S_SAVE;
          save     <= 1'b1;
          n_ic     <= '0;
          n_commit <= n_commit + 1;
          ic_pend  <= 1'b0;           // an IC due during the checkpoint is covered by the CC
        end
        S_SAVE: st <= S_RUN;
        S_IC: if (ic_done) begin
          st   <= S_RUN;
          n_ic <= (n_ic == 8'(MAX_IC)) ? n_ic : n_ic + 1;
        end
        S_RB: if (rb_done) begin
          n_rollback <= n_rollback + 1;
          ic_index   <= '0;
          err_pend   <= 1'b0;
          cc_pend    <= 1'b0;
          ic_pend    <= 1'b0;
          if (n_ic != 0) begin
            st <= S_ICV;  icv_start <= 1'b1;
          end else begin
            st <= S_RUN;
          end
        end
        S_ICV: if (icv_done) begin
          if (icv_err) begin
            st   <= S_RUN;             // this IC and the later ones are discarded
            n_ic <= ic_index;
          end else begin
            st <= S_ICA;  ica_start <= 1'b1;
          end
        end
        S_ICA: if (ica_done) begin
          if (ic_index + 1 == n_ic) begin
            st <= S_RUN;
          end else begin
            st <= S_ICV;  icv_start <= 1'b1;
            ic_index <= ic_index + 1;
          end
        end
        default: st <= S_RUN;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0({ver_start, cmt_start, save, ic_start, rb_start, icv_start, ica_start}));
  assert property (@(posedge clk) disable iff (!rst_n) n_ic <= 8'(MAX_IC));

endmodule
