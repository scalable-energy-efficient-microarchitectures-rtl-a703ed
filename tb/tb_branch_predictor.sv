// tb_branch_predictor: random predictions and updates against a model of a table of
// 2-bit saturating counters indexed by the low PC bits, reset to weakly not-taken.
// The prediction is combinational; an update changes it from the next cycle.
module tb_branch_predictor;
  import rrns_isa_pkg::*;

  localparam int ENTRIES = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, update = 0, upd_taken = 0, taken;
  logic [PCW-1:0] pc = '0, upd_pc = '0;

  branch_predictor #(.ENTRIES(ENTRIES)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ctr [ENTRIES];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int e = 0; e < ENTRIES; e++) ctr[e] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      pc = PCW'($urandom);
      #1;
      check(taken == (ctr[pc % ENTRIES] >= 2), "prediction");
      update = $urandom_range(0, 1);
      upd_pc = PCW'($urandom_range(0, 3));     // a few hot branches reach saturation
      upd_taken = $urandom_range(0, 3) != 0;
      @(posedge clk);
      if (update) begin
        int e;
        e = upd_pc % ENTRIES;
        if (upd_taken && ctr[e] < 3) ctr[e]++;
        if (!upd_taken && ctr[e] > 0) ctr[e]--;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
