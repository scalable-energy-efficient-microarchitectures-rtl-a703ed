// tb_checkpoint_restart_unit: the checkpoint/restart sequencer against a cycle-level model of
// the procedure. The environment raises CC and IC requests and errors at random. It answers
// every start pulse with a done after a random 1-20 cycles, and sometimes with a
// verification error (CC or IC). Every cycle the test compares all start pulses, busy, the
// IC count, the replayed IC index and the commit/rollback counters with the model. It also
// checks that a request arriving while idle is started in the next cycle. Rollbacks that
// replay ICs, replays cut short by a bad IC, failed CC verifications and commits must all
// occur.
module tb_checkpoint_restart_unit;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, cc_req = 0, ic_req = 0, error = 0;
  logic ver_done = 0, ver_err = 0, cmt_done = 0, ic_done = 0, rb_done = 0;
  logic icv_done = 0, icv_err = 0, ica_done = 0;
  logic busy, ver_start, cmt_start, save, ic_start, rb_start, icv_start, ica_start;
  logic [7:0] ic_index, n_ic;
  logic [31:0] n_commit, n_rollback;

  checkpoint_restart_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // model state: 0 run, 1 verify, 2 commit, 3 save, 4 ic, 5 rollback, 6 ic verify, 7 ic apply
  int ms, m_nic, m_idx, m_ncm, m_nrb;
  bit p_cc, p_ic, p_err;
  logic [6:0] m_pulse;      // {ver, cmt, save, ic, rb, icv, ica}
  // environment: one outstanding step
  int pend_kind, pend_cnt;
  bit pend_err;

  initial begin
    int n_replay, n_cut, n_verr, n_fast;
    bit idle_req;
    ms = 0; m_nic = 0; m_idx = 0; m_ncm = 0; m_nrb = 0;
    p_cc = 0; p_ic = 0; p_err = 0; m_pulse = '0;
    pend_kind = -1; pend_cnt = 0; pend_err = 0;
    n_replay = 0; n_cut = 0; n_verr = 0; n_fast = 0;
    idle_req = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 150000; cyc++) begin
      @(negedge clk);
      // ---- outputs against the model
      check({ver_start, cmt_start, save, ic_start, rb_start, icv_start, ica_start} == m_pulse, "start pulses");
      check(busy == (ms != 0), "busy");
      check(n_ic == 8'(m_nic), "IC count");
      check(n_commit == 32'(m_ncm) && n_rollback == 32'(m_nrb), "counters");
      if (ms == 6 || ms == 7) check(ic_index == 8'(m_idx), "replayed IC index");
      if (idle_req) begin
        check(m_pulse != '0, "request started in the next cycle");
        n_fast++;
      end
      // ---- environment: a start pulse begins a step
      if (ver_start) begin pend_kind = 0; pend_err = ($urandom_range(0, 4) == 0); end
      if (cmt_start) pend_kind = 1;
      if (ic_start)  pend_kind = 2;
      if (rb_start)  pend_kind = 3;
      if (icv_start) begin pend_kind = 4; pend_err = ($urandom_range(0, 6) == 0); end
      if (ica_start) pend_kind = 5;
      if (m_pulse != '0 && !save) pend_cnt = $urandom_range(1, 20);
      {ver_done, cmt_done, ic_done, rb_done, icv_done, ica_done} = '0;
      ver_err = 0;
      icv_err = 0;
      if (pend_kind >= 0) begin
        pend_cnt--;
        if (pend_cnt == 0) begin
          case (pend_kind)
            0: begin ver_done = 1; ver_err = pend_err; end
            1: cmt_done = 1;
            2: ic_done = 1;
            3: rb_done = 1;
            4: begin icv_done = 1; icv_err = pend_err; end
            default: ica_done = 1;
          endcase
          pend_kind = -1;
        end
      end
      cc_req = ($urandom_range(0, 299) == 0);
      ic_req = ($urandom_range(0, 39) == 0);
      error  = ($urandom_range(0, 699) == 0);
      idle_req = (ms == 0) && (cc_req || ic_req || error);
      // ---- model of the coming edge
      m_pulse = '0;
      if (cc_req) p_cc = 1;
      if (ic_req) p_ic = 1;
      if (error)  p_err = 1;
      case (ms)
        0: if (p_err) begin ms = 5; m_pulse[2] = 1; p_err = 0; end
           else if (p_cc) begin ms = 1; m_pulse[6] = 1; p_cc = 0; end
           else if (p_ic) begin ms = 4; m_pulse[3] = 1; p_ic = 0; end
        1: if (ver_done) begin
             if (ver_err) begin ms = 5; m_pulse[2] = 1; n_verr++; end
             else begin ms = 2; m_pulse[5] = 1; end
           end
        2: if (cmt_done) begin ms = 3; m_pulse[4] = 1; m_nic = 0; m_ncm++; p_ic = 0; end
        3: ms = 0;
        4: if (ic_done) begin ms = 0; if (m_nic < 64) m_nic++; end
        5: if (rb_done) begin
             m_nrb++;
             m_idx = 0;
             p_err = 0; p_cc = 0; p_ic = 0;
             if (m_nic != 0) begin ms = 6; m_pulse[1] = 1; n_replay++; end
             else ms = 0;
           end
        6: if (icv_done) begin
             if (icv_err) begin ms = 0; m_nic = m_idx; n_cut++; end
             else begin ms = 7; m_pulse[0] = 1; end
           end
        default: if (ica_done) begin
             if (m_idx + 1 == m_nic) ms = 0;
             else begin ms = 6; m_pulse[1] = 1; m_idx++; end
           end
      endcase
    end
    check(m_ncm > 0 && m_nrb > 0, "commits and rollbacks");
    check(n_replay > 0 && n_cut > 0 && n_verr > 0 && n_fast > 0, "replays, cut replays, failed CC checks");
    $display("commits %0d, rollbacks %0d, replays %0d, cut %0d, failed CC checks %0d",
             m_ncm, m_nrb, n_replay, n_cut, n_verr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
