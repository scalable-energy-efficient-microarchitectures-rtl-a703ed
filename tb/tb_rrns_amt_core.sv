// tb_rrns_amt_core: runs the shared test program on the thread-level core twice.
//  Run 1, correction on, a fault injected into subcore 1's first register write (r1): the
//  OUT values must match the reference, one correction and one overflow must be reported
//  and no uncorrectable error.
//  Run 2, detection only, same fault: the check of r1 must report an error.
// Every mechanism (barrier stall, predicted branch right and wrong, MIB-full stall, MAB-full
// stall, hazard stall, correction, overflow, fractional multiply, conversion) is counted and
// must have happened at least once.
module tb_rrns_amt_core;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
  import rrns_test_prog_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, prog_we = 0, run = 0, correct_en = 1, inj_valid = 0;
  logic [PCW-1:0] prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic done, out_valid, err_detect, corr_event, ovf_detect;
  longint out_value;
  logic [2:0] inj_ch = 3'd1;
  residue_t inj_offset = 9'd5;
  core_stats_t stats;

  rrns_amt_core dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint outs [$];
  always @(posedge clk) if (rst_n && out_valid) outs.push_back(out_value);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic do_run(input logic ce);
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
    $display("run ce=%0d cycles=%0d issued=%0d hz=%0d mib=%0d mab=%0d bar=%0d riu=%0d bp=%0d mis=%0d corr=%0d err=%0d ovf=%0d",
             ce, stats.cycles, stats.issued, stats.stall_hazard, stats.stall_mib, stats.stall_mab,
             stats.stall_barrier, stats.stall_riu, stats.bp_combined, stats.bp_mispredict,
             stats.corrections, stats.errors, stats.overflows);
  endtask

  initial begin
    outs_t e = expected();
    do_run(1'b1);
    check(outs.size() == NOUT, $sformatf("%0d OUT values", outs.size()));
    for (int i = 0; i < NOUT && i < outs.size(); i++)
      check(outs[i] == e[i], $sformatf("OUT %0d = %0d, expected %0d", i, outs[i], e[i]));
    check(stats.corrections == 1, "one correction");
    check(stats.errors == 0, "no uncorrectable error");
    check(stats.overflows >= 1, "overflow seen");
    check(stats.stall_barrier > 0, "barrier stall");
    check(stats.bp_combined >= 3, "branch-predictor combination");
    check(stats.bp_mispredict > 0, "misprediction");
    check(stats.bp_combined > stats.bp_mispredict, "correct prediction");
    check(stats.stall_mib > 0, "MIB full");
    check(stats.stall_mab > 0, "MAB full");
    check(stats.stall_hazard > 0, "hazard stall");
    do_run(1'b0);
    check(stats.errors >= 1, "detection-only mode reports the injected fault");
    check(stats.corrections == 0, "no correction in detection-only mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
