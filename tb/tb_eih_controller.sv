// tb_eih_controller: the checkpoint schedule with scaled-down intervals (EI 2000, LI_MIN 300,
// SI_MIN 100, the default ratios). Checked: the first LI is EI/2 with no IC; then LI 500 with
// one IC at 250; then LI 300 with ICs at 100 and 200, repeating; a hold freezes the interval
// counters; an error makes the cycles since the previous error the new EI and restarts with
// LI = EI/2 and no IC. Random error times are repeated to cover the restart.
module tb_eih_controller;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, error = 0;
  logic cc_req, ic_req;
  logic [31:0] li, si, n_ic, ei;

  eih_controller #(.EI_INIT(2000), .LI_MIN(300), .SI_MIN(100)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  longint cc_at [$], ic_at [$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (cc_req) cc_at.push_back(cyc);
    if (ic_req) ic_at.push_back(cyc);
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // after a restart at cycle t0 with the given EI, check LI EI/2 (no IC), then the
  // halving sequence down to LI_MIN
  task automatic check_sequence(input longint t0, input longint e);
    longint l1;
    l1 = e / 2;
    cc_at.delete(); ic_at.delete();
    while (cc_at.size() < 10) @(negedge clk);
    check(cc_at[0] - t0 >= l1 - 2 && cc_at[0] - t0 <= l1 + 2,
          $sformatf("first LI %0d, expected %0d", cc_at[0] - t0, l1));
    check(cc_at[1] - cc_at[0] == ((l1 / 2 < 300) ? 300 : l1 / 2), $sformatf("second LI %0d", cc_at[1] - cc_at[0]));
    check(cc_at[9] - cc_at[8] == 300, "LI settles at LI_MIN");
    foreach (ic_at[i]) check(ic_at[i] > cc_at[0], "no IC in the first LI");
    check(li == 300 && si == 100 && n_ic == 2, "settled at 300 / 100 / 2");
  endtask

  initial begin
    longint t0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- default schedule from reset
    check(ei == 2000 && li == 1000 && n_ic == 0, "initial settings");
    check_sequence(0, 2000);
    check(cc_at[1] - cc_at[0] == 500 && cc_at[2] - cc_at[1] == 300, "LI 1000, 500, 300");
    // ICs: one in LI 2 at +250, two in LI 3 at +100 and +200
    begin
      int n2 = 0, n3 = 0;
      foreach (ic_at[i]) begin
        if (ic_at[i] > cc_at[0] && ic_at[i] < cc_at[1]) begin
          n2++;
          check(ic_at[i] - cc_at[0] == 250, "IC at SI 250");
        end
        if (ic_at[i] > cc_at[1] && ic_at[i] < cc_at[2]) begin
          n3++;
          check((ic_at[i] - cc_at[1]) % 100 == 0, "IC at multiples of SI 100");
        end
      end
      check(n2 == 1 && n3 == 2, $sformatf("IC counts %0d %0d", n2, n3));
    end
    // ---- hold freezes the schedule
    @(negedge clk);
    while (!cc_req) @(negedge clk);
    t0 = cyc;
    hold = 1;
    repeat (77) @(negedge clk);
    hold = 0;
    cc_at.delete();
    while (cc_at.size() < 1) @(negedge clk);
    check(cc_at[0] - t0 >= 300 + 77 - 1 && cc_at[0] - t0 <= 300 + 77 + 1,
          $sformatf("held LI %0d", cc_at[0] - t0));
    // ---- errors at random times restart the sequence
    for (int k = 0; k < 10; k++) begin
      longint t_err, prev;
      prev = cyc;
      repeat ($urandom_range(700, 5000)) @(negedge clk);
      error = 1;
      t_err = cyc;
      @(negedge clk);
      error = 0;
      check(n_ic == 0 && li == ei / 2, "restart after an error");
      check(ei >= 700 && ei <= 50000, $sformatf("EI %0d", ei));
      check_sequence(t_err, ei);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
