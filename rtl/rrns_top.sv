// rrns_top: thread-level (4,2)-RRNS core with its adaptive checkpoint-interval controller.
//
// The core (rrns_amt_core) executes a program with every value split into six residues,
// one per narrow subcore, and sends comparisons, checks, conversions and fractional
// products to its residue interaction unit. Errors that the unit detects but cannot
// correct need a restart from a checkpoint; the Error Interval Heuristics controller
// (eih_controller) learns from the spacing of those errors when complete and incremental
// checkpoints should be taken. The checkpoint storage and rollback sequencing is not part
// of this RTL: the controller's requests (cc_req, ic_req) are brought out, and ckpt_busy
// tells the controller when a checkpoint operation is running. The Stochastic Overhead
// Estimation controller (soe_controller), the source design's other adaptive scheme, stands
// beside it with its own ports (soe_*); it shares the error and hold inputs and is told
// the cost of each finished checkpoint. The two are alternatives: a system uses one.
// The incremental checkpoint buffer (incremental_checkpoint_buffer), which streams IC
// records to and from their memory segment, is included with its ports brought out
// (icb_*), and so is the complete-checkpoint buffer (checkpoint_buffer, CCB with its
// overflow CCB-O: evicted dirty lines of the current LI, the saved PC and register file)
// with ports ccb_*. The checkpoint/restart sequencer (checkpoint_restart_unit) takes the
// EIH controller's cc_req/ic_req and the core's err_detect and brings its step handshakes
// out as crs_*; crs_busy is meant to be fed back to ckpt_busy. The cache, and the logic
// that performs each step (sweep, commit, IC save, restore, IC replay), are not part of
// this RTL.
//
// Interface: program loading, run, done, the OUT port, error events, event counters,
// fault injection (test only), and the checkpoint request outputs with the current
// interval settings.
module rrns_top
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
(
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
  output core_stats_t     stats,
  input  logic            ckpt_busy,
  output logic            cc_req,
  output logic            ic_req,
  output logic [31:0]     li,
  output logic [31:0]     si,
  output logic [31:0]     n_ic,
  output logic [31:0]     ei,
  input  logic            soe_cc_done,
  input  logic [31:0]     soe_cc_cost,
  input  logic            soe_ic_done,
  input  logic [31:0]     soe_ic_cost,
  input  logic [15:0]     soe_ex_frac,
  output logic            soe_cc_req,
  output logic            soe_ic_req,
  output logic [31:0]     soe_li,
  output logic            soe_decided,
  output logic [1:0]      soe_choice,
  input  logic            icb_flush,
  input  logic            icb_wr_valid,
  output logic            icb_wr_ready,
  input  logic [31:0]     icb_wr_data,
  input  logic            icb_wr_last,
  output logic            icb_rd_valid,
  input  logic            icb_rd_ready,
  output logic [31:0]     icb_rd_data,
  output logic            icb_rd_last,
  output logic            icb_wr_half,
  output logic            icb_rd_half,
  output logic [8:0]      icb_level [2],
  input  logic            ccb_ev_valid,
  input  logic [25:0]     ccb_ev_addr,
  input  logic [511:0]    ccb_ev_data,
  output logic            ccb_ovf,
  input  logic [25:0]     ccb_lk_addr,
  output logic            ccb_lk_hit,
  output logic [511:0]    ccb_lk_data,
  input  logic            ccb_commit,
  input  logic            ccb_rollback,
  output logic            ccb_dr_valid,
  output logic [25:0]     ccb_dr_addr,
  output logic [511:0]    ccb_dr_data,
  input  logic            ccb_dr_ready,
  input  logic            ccb_save,
  input  logic [31:0]     ccb_save_pc,
  input  logic [1023:0]   ccb_save_rf,
  output logic [31:0]     ccb_ck_pc,
  output logic [1023:0]   ccb_ck_rf,
  output logic            crs_busy,
  output logic            crs_ver_start,
  input  logic            crs_ver_done,
  input  logic            crs_ver_err,
  output logic            crs_cmt_start,
  input  logic            crs_cmt_done,
  output logic            crs_save,
  output logic            crs_ic_start,
  input  logic            crs_ic_done,
  output logic            crs_rb_start,
  input  logic            crs_rb_done,
  output logic            crs_icv_start,
  input  logic            crs_icv_done,
  input  logic            crs_icv_err,
  output logic            crs_ica_start,
  input  logic            crs_ica_done,
  output logic [7:0]      crs_ic_index,
  output logic [7:0]      crs_n_ic,
  output logic [31:0]     crs_n_commit,
  output logic [31:0]     crs_n_rollback
);

  rrns_amt_core u_core (
    .clk, .rst_n, .prog_we, .prog_addr, .prog_data, .run, .correct_en, .done,
    .out_valid, .out_value, .err_detect, .corr_event, .ovf_detect,
    .inj_valid, .inj_ch, .inj_offset, .stats
  );

  eih_controller u_eih (
    .clk, .rst_n, .hold(ckpt_busy), .error(err_detect),
    .cc_req, .ic_req, .li, .si, .n_ic, .ei
  );

  soe_controller u_soe (
    .clk, .rst_n, .hold(ckpt_busy), .error(err_detect),
    .cc_done(soe_cc_done), .cc_cost(soe_cc_cost), .ic_done(soe_ic_done), .ic_cost(soe_ic_cost),
    .ex_frac(soe_ex_frac), .cc_req(soe_cc_req), .ic_req(soe_ic_req), .li(soe_li),
    .decided(soe_decided), .choice(soe_choice)
  );

  incremental_checkpoint_buffer u_icb (
    .clk, .rst_n, .flush(icb_flush),
    .wr_valid(icb_wr_valid), .wr_ready(icb_wr_ready), .wr_data(icb_wr_data), .wr_last(icb_wr_last),
    .rd_valid(icb_rd_valid), .rd_ready(icb_rd_ready), .rd_data(icb_rd_data), .rd_last(icb_rd_last),
    .wr_half(icb_wr_half), .rd_half(icb_rd_half), .level(icb_level)
  );

  checkpoint_buffer u_ccb (
    .clk, .rst_n,
    .ev_valid(ccb_ev_valid), .ev_addr(ccb_ev_addr), .ev_data(ccb_ev_data), .ovf(ccb_ovf),
    .lk_addr(ccb_lk_addr), .lk_hit(ccb_lk_hit), .lk_data(ccb_lk_data),
    .commit(ccb_commit), .rollback(ccb_rollback),
    .dr_valid(ccb_dr_valid), .dr_addr(ccb_dr_addr), .dr_data(ccb_dr_data), .dr_ready(ccb_dr_ready),
    .save(ccb_save), .save_pc(ccb_save_pc), .save_rf(ccb_save_rf), .ck_pc(ccb_ck_pc), .ck_rf(ccb_ck_rf)
  );

  checkpoint_restart_unit u_crs (
    .clk, .rst_n, .cc_req, .ic_req, .error(err_detect), .busy(crs_busy),
    .ver_start(crs_ver_start), .ver_done(crs_ver_done), .ver_err(crs_ver_err),
    .cmt_start(crs_cmt_start), .cmt_done(crs_cmt_done), .save(crs_save),
    .ic_start(crs_ic_start), .ic_done(crs_ic_done), .rb_start(crs_rb_start), .rb_done(crs_rb_done),
    .icv_start(crs_icv_start), .icv_done(crs_icv_done), .icv_err(crs_icv_err),
    .ica_start(crs_ica_start), .ica_done(crs_ica_done), .ic_index(crs_ic_index), .n_ic(crs_n_ic),
    .n_commit(crs_n_commit), .n_rollback(crs_n_rollback)
  );

endmodule
