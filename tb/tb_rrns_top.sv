// tb_rrns_top: end-to-end test of the whole design at its default sizes (no parameter
// overrides); it is also the full-size test.
//  1. Runs the shared test program with correction on and a fault injected into subcore 1
//     (r1). The OUT values must match the reference. Barrier stalls, branch-predictor
//     combinations, mispredictions, MIB-full and MAB-full stalls, hazard stalls, one
//     correction and one overflow must each be counted by the core.
//  2. Keeps the clock running and checks the checkpoint schedule of the EIH controller:
//     complete checkpoints (CC) 50k and then 30k cycles apart, one incremental checkpoint
//     (IC) 25k after the first CC, then ICs every 10k. A 500-cycle checkpoint hold must
//     push the next CC back by 500 cycles.
//     The stochastic-overhead-estimation controller must request CCs and ICs and take a
//     keep/double/halve decision after each reported CC.
//     Two ICs (4 and 3 words) are written into the incremental checkpoint buffer, which
//     must fill both halves and give the words back in order, switching halves after
//     each IC's last word.
//     Two dirty lines are evicted into the complete-checkpoint buffer with a PC/RF copy;
//     they must be found by lookup, survive no rollback, and after a commit drain with
//     their data.
//     The checkpoint/restart sequencer, answered at once by the test, must commit a CC for
//     each EIH CC request.
//  3. Reloads and runs in detection-only mode: the injected fault must be reported as an
//     error, and the EIH controller must restart with EI = cycles since the last restart
//     and LI = EI/2. The sequencer must roll back and replay the ICs held.
module tb_rrns_top;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
  import rrns_test_prog_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, prog_we = 0, run = 0, correct_en = 1, inj_valid = 0;
  logic ckpt_busy = 0;
  logic [PCW-1:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic done, out_valid, err_detect, corr_event, ovf_detect, cc_req, ic_req;
  logic [31:0] li, si, n_ic, ei;
  // stochastic-overhead-estimation controller: each requested CC is reported done 300
  // cycles later with that cost
  logic soe_cc_done = 0, soe_ic_done = 0, soe_cc_req, soe_ic_req, soe_decided;
  logic [31:0] soe_cc_cost = 32'd300, soe_ic_cost = 32'd40, soe_li;
  logic [15:0] soe_ex_frac = 16'h8000;
  logic [1:0] soe_choice;
  int n_soe_cc = 0, n_soe_ic = 0, n_soe_dec = 0;
  always @(posedge clk) if (rst_n) begin
    if (soe_cc_req) n_soe_cc++;
    if (soe_ic_req) n_soe_ic++;
    if (soe_decided) n_soe_dec++;
  end
  initial begin
    forever begin
      @(posedge clk);
      if (soe_cc_req) begin
        repeat (300) @(negedge clk);
        soe_cc_done = 1;
        @(negedge clk);
        soe_cc_done = 0;
      end
    end
  end
  // incremental checkpoint buffer
  logic icb_flush = 0, icb_wr_valid = 0, icb_wr_last = 0, icb_rd_ready = 0;
  logic [31:0] icb_wr_data = '0, icb_rd_data;
  logic icb_wr_ready, icb_rd_valid, icb_rd_last, icb_wr_half, icb_rd_half;
  logic [8:0] icb_level [2];
  logic [31:0] icb_words [7];
  task automatic icb_test();
    for (int i = 0; i < 7; i++) begin
      icb_words[i] = $urandom;
      @(negedge clk);
      icb_wr_valid = 1;
      icb_wr_data  = icb_words[i];
      icb_wr_last  = (i == 3 || i == 6);
    end
    @(negedge clk);
    icb_wr_valid = 0;
    check(icb_level[0] == 9'd4 && icb_level[1] == 9'd3, "ICB: two ICs fill both halves");
    check(icb_wr_half == 1'b0, "ICB: writer back on half 0");
    for (int i = 0; i < 7; i++) begin
      check(icb_rd_valid && icb_rd_data == icb_words[i] && icb_rd_last == (i == 3 || i == 6)
            && icb_rd_half == (i >= 4), $sformatf("ICB: word %0d read back", i));
      icb_rd_ready = 1;
      @(negedge clk);
      icb_rd_ready = 0;
    end
    check(!icb_rd_valid && icb_rd_half == 1'b0, "ICB empty, reader back on half 0");
  endtask
  // complete-checkpoint buffer
  logic ccb_ev_valid = 0, ccb_commit = 0, ccb_rollback = 0, ccb_dr_ready = 0, ccb_save = 0;
  logic [25:0] ccb_ev_addr = '0, ccb_lk_addr = '0, ccb_dr_addr;
  logic [511:0] ccb_ev_data = '0, ccb_lk_data, ccb_dr_data;
  logic ccb_ovf, ccb_lk_hit, ccb_dr_valid;
  logic [31:0] ccb_save_pc = '0, ccb_ck_pc;
  logic [1023:0] ccb_save_rf = '0, ccb_ck_rf;
  task automatic ccb_test();
    logic [511:0] d [2];
    logic [25:0] a [2];
    for (int i = 0; i < 2; i++) begin
      a[i] = 26'($urandom);
      d[i] = {16{$urandom}};
    end
    @(negedge clk);
    ccb_save = 1;
    ccb_save_pc = 32'h1234;
    ccb_save_rf = {32{32'hcafe0000 | 32'($urandom_range(0, 65535))}};
    // first line, then a rollback that must drop it
    ccb_ev_valid = 1;
    ccb_ev_addr = a[0];
    ccb_ev_data = d[0];
    @(negedge clk);
    ccb_save = 0;
    ccb_ev_valid = 0;
    ccb_lk_addr = a[0];
    #1 check(ccb_lk_hit && ccb_lk_data == d[0] && ccb_ck_pc == 32'h1234 && ccb_ck_rf == ccb_save_rf,
             "CCB: evicted line found, PC/RF saved");
    ccb_rollback = 1;
    @(negedge clk);
    ccb_rollback = 0;
    #1 check(!ccb_lk_hit, "CCB: rollback drops the LI's lines");
    for (int i = 0; i < 2; i++) begin
      @(negedge clk);
      ccb_ev_valid = 1;
      ccb_ev_addr = a[i];
      ccb_ev_data = d[i];
    end
    @(negedge clk);
    ccb_ev_valid = 0;
    check(!ccb_dr_valid && !ccb_ovf, "CCB: nothing to drain before commit");
    ccb_commit = 1;
    @(negedge clk);
    ccb_commit = 0;
    for (int i = 0; i < 2; i++) begin
      check(ccb_dr_valid && ((ccb_dr_addr == a[0] && ccb_dr_data == d[0]) || (ccb_dr_addr == a[1] && ccb_dr_data == d[1])),
            $sformatf("CCB: committed line %0d drains", i));
      ccb_dr_ready = 1;
      @(negedge clk);
      ccb_dr_ready = 0;
    end
    check(!ccb_dr_valid, "CCB: drained");
  endtask
  // checkpoint/restart sequencer: every step is reported done one cycle after its start
  logic crs_busy, crs_ver_start, crs_cmt_start, crs_save, crs_ic_start, crs_rb_start, crs_icv_start, crs_ica_start;
  logic crs_ver_done = 0, crs_cmt_done = 0, crs_ic_done = 0, crs_rb_done = 0, crs_icv_done = 0, crs_ica_done = 0;
  logic crs_ver_err = 0, crs_icv_err = 0;
  logic [7:0] crs_ic_index, crs_n_ic;
  logic [31:0] crs_n_commit, crs_n_rollback;
  int n_crs_icv = 0;
  always @(posedge clk) begin
    crs_ver_done <= crs_ver_start;
    crs_cmt_done <= crs_cmt_start;
    crs_ic_done  <= crs_ic_start;
    crs_rb_done  <= crs_rb_start;
    crs_icv_done <= crs_icv_start;
    crs_ica_done <= crs_ica_start;
    if (crs_icv_start) n_crs_icv++;
  end
  longint out_value;
  logic [2:0] inj_ch = 3'd1;
  residue_t inj_offset = 9'd77;
  core_stats_t stats;

  rrns_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint outs [$];
  longint cyc = 0;
  longint cc_at [$], ic_at [$];
  int n_err_pulses = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && out_valid) outs.push_back(out_value);
    if (rst_n && cc_req) cc_at.push_back(cyc);
    if (rst_n && ic_req) ic_at.push_back(cyc);
    if (rst_n && err_detect) n_err_pulses++;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic load_and_run(input logic ce);
    prog_t p = test_program();
    outs.delete();
    rst_n = 0; run = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < PLEN; i++) begin
      prog_we = 1; prog_addr = PCW'(i); prog_data = p[i];
      @(negedge clk);
    end
    prog_we = 0;
    correct_en = ce;
    inj_valid = 1;
    @(negedge clk);
    inj_valid = 0;
    run = 1;
    while (!done) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    outs_t e = expected();
    longint t0;
    // ---- 1: program with correction
    load_and_run(1'b1);
    check(outs.size() == NOUT, $sformatf("%0d OUT values", outs.size()));
    for (int i = 0; i < NOUT && i < outs.size(); i++)
      check(outs[i] == e[i], $sformatf("OUT %0d = %0d, expected %0d", i, outs[i], e[i]));
    check(stats.corrections == 1, "correction of the injected fault");
    check(stats.errors == 0, "no uncorrectable error");
    check(stats.overflows >= 1, "overflow detected");
    check(stats.stall_barrier > 0, "CMP barrier");
    check(stats.bp_combined > stats.bp_mispredict, "correct branch prediction");
    check(stats.bp_mispredict > 0, "misprediction and squash");
    check(stats.stall_mib > 0, "MIB full");
    check(stats.stall_mab > 0, "MAB full");
    check(stats.stall_hazard > 0, "hazard stall");
    check(stats.stall_riu > 0, "residue interaction unit busy");
    check(n_err_pulses == 0, "err_detect quiet with correction on");
    // ---- 2: checkpoint schedule
    while (cc_at.size() < 3) @(negedge clk);
    check(cc_at[1] - cc_at[0] == 50000, $sformatf("LI 2 = %0d", cc_at[1] - cc_at[0]));
    check(cc_at[2] - cc_at[1] == 30000, $sformatf("LI 3 = %0d", cc_at[2] - cc_at[1]));
    check(cc_at[0] >= 100000 - 10 && cc_at[0] <= 100000 + 1000, $sformatf("LI 1 ends at %0d", cc_at[0]));
    check(ic_at.size() == 3, $sformatf("%0d ICs", ic_at.size()));
    if (ic_at.size() == 3) begin
      check(ic_at[0] - cc_at[0] == 25000, "IC in LI 2 at SI = 25k");
      check(ic_at[1] - cc_at[1] == 10000, "first IC in LI 3 at SI = 10k");
      check(ic_at[2] - cc_at[1] == 20000, "second IC in LI 3 at 2 SI");
    end
    check(li == 30000 && n_ic == 2 && si == 10000, "LI/IC settings stay at 30k / 2 / 10k");
    check(n_soe_cc >= 1 && n_soe_ic >= 1 && n_soe_dec >= 1,
          $sformatf("SOE controller: %0d CC, %0d IC requests, %0d decisions", n_soe_cc, n_soe_ic, n_soe_dec));
    check(soe_li >= 5000 && soe_li <= 1280000 && soe_li != 100000, $sformatf("SOE LI adapted to %0d", soe_li));
    icb_test();
    ccb_test();
    check(crs_n_commit == 32'(cc_at.size()) && crs_n_rollback == 0,
          $sformatf("sequencer: %0d commits for %0d CCs", crs_n_commit, cc_at.size()));
    ckpt_busy = 1;
    repeat (500) @(negedge clk);
    ckpt_busy = 0;
    while (cc_at.size() < 4) @(negedge clk);
    check(cc_at[3] - cc_at[2] == 30500, $sformatf("held LI = %0d", cc_at[3] - cc_at[2]));
    // ---- 3: detection-only run
    t0 = cyc;
    load_and_run(1'b0);
    check(stats.errors >= 1, "error detected without correction");
    check(n_err_pulses >= 1, "err_detect pulses");
    check(ei > 0 && ei < 1000, $sformatf("EI restarted from the error: %0d", ei));
    check(li == ei / 2 || li == (ei / 2) / 2 || li < 500, $sformatf("LI = %0d after EI %0d", li, ei));
    check(n_ic == 0, "no IC right after an error");
    check(crs_n_rollback >= 1 && n_crs_icv >= 1, $sformatf("sequencer: %0d rollbacks, %0d ICs replayed", crs_n_rollback, n_crs_icv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
