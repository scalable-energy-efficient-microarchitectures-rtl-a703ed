// tb_soe_controller: the Stochastic Overhead Estimation controller with scaled intervals
// (SI 50, first LI 400). Checks the interval timing (CC every LI, ICs every SI inside it),
// then drives random checkpoint completions with random costs, random errors and random
// E(X) fractions, and compares every keep/double/halve decision (taken two cycles after a
// completed CC) and the new LI with a model that evaluates the overhead formulas in real
// arithmetic. Decisions whose two best estimates lie within a few cycles of each other are
// not judged (integer rounding may legitimately pick either); the model follows the unit.
module tb_soe_controller;
  localparam int unsigned SI = 50, LI_INIT = 400, LI_MIN = 50, LI_MAX = 12800;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, hold = 0, error = 0, cc_done = 0, ic_done = 0;
  logic [31:0] cc_cost = 0, ic_cost = 0, li;
  logic [15:0] ex_frac = 16'h8000;
  logic cc_req, ic_req, decided;
  logic [1:0] choice;

  soe_controller #(.SI(SI), .LI_INIT(LI_INIT), .LI_MIN(LI_MIN), .LI_MAX(LI_MAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // model history
  real run_cc = 0, run_ic = 0, run_li = 0, win_cc = 0, win_ic = 0, win_li = 0;
  int  run_n = 0, win_n = 0;
  bit  have_win = 0;
  int  m_li = LI_INIT;
  int  n_keep = 0, n_dbl = 0, n_hlv = 0;

  function automatic real fl(real x);
    return $floor(x);
  endfunction

  initial begin
    longint t_cc [$];
    int n_ic;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- timing: three LIs with no reports
    n_ic = 0;
    for (int c = 0; c < 1300; c++) begin
      @(posedge clk); #1;
      if (cc_req) t_cc.push_back(c);
      if (ic_req && t_cc.size() == 1) n_ic++;
    end
    check(t_cc.size() == 3, $sformatf("%0d CCs", t_cc.size()));
    if (t_cc.size() >= 2) check(t_cc[1] - t_cc[0] == LI_INIT, "CC every LI");
    check(n_ic == LI_INIT / SI - 1, $sformatf("%0d ICs in one LI", n_ic));
    // ---- decisions
    for (int it = 0; it < 3000; it++) begin
      int k;
      @(negedge clk);
      k = $urandom_range(0, 9);
      if (k == 0) begin
        error = 1;
        @(negedge clk);
        error = 0;
        win_cc = run_cc; win_ic = run_ic; win_li = run_li; win_n = run_n;
        have_win = (run_n != 0);
        run_cc = 0; run_ic = 0; run_li = 0; run_n = 0;
      end else if (k < 4) begin
        ic_done = 1; ic_cost = $urandom_range(10, 400);
        @(negedge clk);
        ic_done = 0;
        run_ic += ic_cost;
      end else begin
        real s_cc, s_ic, ave, f, n, ok, od, oh, best, second;
        int want;
        ex_frac = 16'($urandom_range(0, 65535));
        cc_done = 1; cc_cost = $urandom_range(50, 3000);
        @(negedge clk);
        cc_done = 0;
        run_cc += cc_cost; run_li += m_li; run_n++;
        s_cc = have_win ? win_cc : run_cc;
        s_ic = have_win ? win_ic : run_ic;
        ave  = have_win ? win_li / win_n : run_li / run_n;
        n    = (m_li / SI == 0) ? 1 : m_li / SI;
        f    = 1.0 - real'(ex_frac) / 65536.0;
        ok   = (fl(f * n) + 1) / n * ave + s_cc + s_ic;
        od   = (fl(f * 2 * n) + 1) / (2 * n) * 2 * ave + s_cc * 0.5 + s_ic;
        oh   = (fl(f * 0.5 * n) + 1) / (0.5 * n) * 0.5 * ave + s_cc * 2 + s_ic;
        if (ok <= od && ok <= oh) want = 0;
        else if (od <= oh) want = 1;
        else want = 2;
        best = (ok < od) ? ((ok < oh) ? ok : oh) : ((od < oh) ? od : oh);
        second = (ok + od + oh) - best - ((ok > od) ? ((ok > oh) ? ok : oh) : ((od > oh) ? od : oh));
        @(negedge clk);
        check(decided, "decision two cycles after cc_done");
        if (second - best > 4.0) check(int'(choice) == want, $sformatf("choice %0d, model %0d (%f %f %f)", choice, want, ok, od, oh));
        if (choice == 0) n_keep++;
        if (choice == 1) begin n_dbl++; m_li = (m_li * 2 > LI_MAX) ? LI_MAX : m_li * 2; end
        if (choice == 2) begin n_hlv++; m_li = (m_li / 2 < LI_MIN) ? LI_MIN : m_li / 2; end
        @(negedge clk);
        check(li == m_li, $sformatf("LI %0d, model %0d", li, m_li));
      end
    end
    check(n_keep > 0 && n_dbl > 0 && n_hlv > 0, $sformatf("keep %0d double %0d halve %0d", n_keep, n_dbl, n_hlv));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
