// tb_checkpoint_buffer: the complete-checkpoint buffer at its default sizes (8-way 32 KB
// CCB and 8-way 1 KB CCB-O, 64-byte lines). Random evictions of lines from a small pool
// that maps onto a few sets overflow the CCB sets into the CCB-O and then overflow that
// too. Random commits and rollbacks are mixed in, with a drain port that accepts at random.
// A model keeps the held lines, whether each is committed, superseded, and in the CCB or
// the CCB-O. It predicts where each eviction fits by set occupancy alone and when ovf must
// pulse. Every cycle it checks the lookup result (newest copy), that a committed line is
// offered to drain exactly when one is held, and that each drained line is a committed one
// with its latest data. It also checks the saved PC and register-file copy.
module tb_checkpoint_buffer;
  localparam int unsigned LAW = 26, D = 512, RFW = 1024, WAYS = 8, SETS = 64, OSETS = 2;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, ev_valid = 0, commit = 0, rollback = 0, dr_ready = 0, save = 0;
  logic [LAW-1:0] ev_addr = '0, lk_addr = '0, dr_addr;
  logic [D-1:0] ev_data = '0, lk_data, dr_data;
  logic ovf, lk_hit, dr_valid;
  logic [31:0] save_pc = '0, ck_pc;
  logic [RFW-1:0] save_rf = '0, ck_rf;

  checkpoint_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [LAW-1:0] a;
    logic [D-1:0]   d;
    bit c, s, o;
  } ent_t;
  ent_t E [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [LAW-1:0] pick_addr();
    if ($urandom_range(0, 19) == 0) return LAW'($urandom);
    return LAW'($urandom_range(0, 3) + SETS * $urandom_range(0, 19));
  endfunction

  function automatic logic [D-1:0] rnd_line();
    logic [D-1:0] v;
    for (int i = 0; i < D / 32; i++) v[i*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    bit exp_ovf, ins, n_ovf_seen, dr_ok;
    int n_ovf, n_ccbo, n_commit, n_rollback, n_drain, n_sup, n_hit, ui, ci, nc, no;
    logic [31:0] pc_m;
    logic [RFW-1:0] rf_m;
    exp_ovf = 0;
    n_ovf = 0; n_ccbo = 0; n_commit = 0; n_rollback = 0; n_drain = 0; n_sup = 0; n_hit = 0;
    pc_m = '0;
    rf_m = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 60000; cyc++) begin
      @(negedge clk);
      // ---- outputs against the model
      check(ovf == exp_ovf, "ovf");
      if (ovf) n_ovf++;
      ui = -1;
      ci = -1;
      foreach (E[i]) if (E[i].a == lk_addr) begin
        if (E[i].c) ci = i; else ui = i;
      end
      check(lk_hit == (ui >= 0 || ci >= 0), "lookup hit");
      if (ui >= 0) check(lk_data == E[ui].d, "lookup data (uncommitted)");
      else if (ci >= 0) check(lk_data == E[ci].d, "lookup data (committed)");
      if (lk_hit) n_hit++;
      ci = -1;
      foreach (E[i]) if (E[i].c) ci = i;
      check(dr_valid == (ci >= 0), "drain valid");
      check(ck_pc == pc_m && ck_rf == rf_m, "saved PC / RF");
      // ---- new inputs
      commit   = 0;
      rollback = 0;
      ev_valid = 0;
      save     = 0;
      case ($urandom_range(0, 999))
        0, 1, 2: commit = 1;
        3:       rollback = 1;
        default: ev_valid = ($urandom_range(0, 1) == 1);
      endcase
      if ((cyc / 4000) % 2 == 1) dr_ready = ($urandom_range(0, 9) < 8);
      else dr_ready = ($urandom_range(0, 19) == 0);
      ev_addr = pick_addr();
      ev_data = rnd_line();
      lk_addr = pick_addr();
      if ($urandom_range(0, 99) == 0) begin
        save = 1;
        save_pc = $urandom;
        save_rf = {32{$urandom}};
      end
      // ---- drain, taken at the coming edge
      dr_ok = dr_valid && dr_ready;
      if (dr_ok) begin
        ci = -1;
        foreach (E[i]) if (E[i].c && E[i].a == dr_addr) ci = i;
        check(ci >= 0 && E[ci].d == dr_data, "drained line is committed, with its data");
        n_drain++;
      end
      // ---- model update for the coming edge (insert decided on the state before it)
      exp_ovf = 0;
      ins = 0;
      ui = -1;
      nc = 0;
      no = 0;
      if (ev_valid) begin
        foreach (E[i]) begin
          if (E[i].a == ev_addr && !E[i].c) ui = i;
          if (!E[i].o && (E[i].a % SETS) == (ev_addr % SETS)) nc++;
          if (E[i].o && (E[i].a % OSETS) == (ev_addr % OSETS)) no++;
        end
      end
      if (dr_ok) begin
        foreach (E[i]) if (E[i].c && E[i].a == dr_addr) begin
          if (ui > i) ui--;
          E.delete(i);
          break;
        end
      end
      if (ev_valid) begin
        if (ui >= 0) begin
          E[ui].d = ev_data;
          ins = 1;
        end else if (nc < WAYS) begin
          E.push_back('{a: ev_addr, d: ev_data, c: 0, s: 0, o: 0});
          ins = 1;
        end else if (no < WAYS) begin
          E.push_back('{a: ev_addr, d: ev_data, c: 0, s: 0, o: 1});
          ins = 1;
          n_ccbo++;
        end else begin
          exp_ovf = 1;
        end
        if (ins) foreach (E[i]) if (E[i].c && E[i].a == ev_addr && !E[i].s) begin
          E[i].s = 1;
          n_sup++;
        end
      end
      if (commit) begin
        n_commit++;
        for (int i = E.size() - 1; i >= 0; i--) if (E[i].c && E[i].s) E.delete(i);
        foreach (E[i]) E[i].c = 1;
      end
      if (rollback) begin
        n_rollback++;
        for (int i = E.size() - 1; i >= 0; i--) if (!E[i].c) E.delete(i);
        foreach (E[i]) E[i].s = 0;
      end
      if (save) begin
        pc_m = save_pc;
        rf_m = save_rf;
      end
    end
    check(n_ovf > 0, "CCB-O overflow seen");
    check(n_ccbo > 0, "lines placed in the CCB-O");
    check(n_sup > 0, "committed line superseded");
    check(n_commit > 0 && n_rollback > 0 && n_drain > 0, "commit, rollback and drain");
    $display("ovf %0d, CCB-O inserts %0d, superseded %0d, commits %0d, rollbacks %0d, drained %0d, lookup hits %0d",
             n_ovf, n_ccbo, n_sup, n_commit, n_rollback, n_drain, n_hit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
