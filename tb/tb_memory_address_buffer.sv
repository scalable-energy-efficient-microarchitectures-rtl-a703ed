// tb_memory_address_buffer: random allocation and per-subcore reads against a model.
// An entry holds a full address; each of the NRD subcores reads it once (by A_ID) and the
// entry frees itself after the last read (Remaining# counts down from NRD). Checks:
// alloc_ok (a free entry exists), alloc_id (lowest free), the addresses read, n_valid,
// and squash/release of speculative entries.
module tb_memory_address_buffer;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  localparam int NRD = NR;
  localparam int E = 1 << AIDW;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, alloc = 0, alloc_spec = 0, release_spec = 0, squash_spec = 0;
  logic [31:0] alloc_addr = '0;
  logic alloc_ok;
  aid_t alloc_id;
  logic [NRD-1:0] rd_en = '0;
  aid_t [NRD-1:0] rd_id = '0;
  logic [NRD-1:0][31:0] rd_addr;
  logic [3:0] n_valid;

  memory_address_buffer #(.NRD(NRD)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit          mv [E];
  bit          ms [E];
  logic [31:0] ma [E];
  bit          mr [E][NRD];   // already read by subcore p
  bit          in_spec = 0;
  int          n_full = 0, n_free = 0, n_squash = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int e = 0; e < E; e++) mv[e] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int nv, lowest;
      @(negedge clk);
      nv = 0; lowest = -1;
      for (int e = E - 1; e >= 0; e--) begin
        if (mv[e]) nv++;
        else lowest = e;
      end
      check(n_valid == 4'(nv), "n_valid");
      check(alloc_ok == (lowest >= 0), "alloc_ok");
      if (lowest >= 0) check(int'(alloc_id) == lowest, "alloc_id");
      else n_full++;
      // stimulus
      alloc = 0; release_spec = 0; squash_spec = 0; rd_en = '0;
      if (in_spec && $urandom_range(0, 7) == 0) begin
        if ($urandom_range(0, 1)) begin squash_spec = 1; n_squash++; end
        else release_spec = 1;
      end
      for (int p = 0; p < NRD; p++) begin
        int e;
        e = $urandom_range(0, E - 1);
        if (mv[e] && !ms[e] && !mr[e][p] && $urandom_range(0, 2) == 0) begin
          rd_en[p] = 1; rd_id[p] = aid_t'(e);
        end
      end
      if (!squash_spec && alloc_ok && $urandom_range(0, 1)) begin
        alloc = 1; alloc_addr = $urandom; alloc_spec = in_spec && !release_spec;
      end
      if (!in_spec && $urandom_range(0, 15) == 0) in_spec = 1;
      #1;
      for (int p = 0; p < NRD; p++)
        if (rd_en[p]) check(rd_addr[p] == ma[rd_id[p]], "address read by A_ID");
      @(posedge clk);
      // model
      for (int e = 0; e < E; e++) begin
        if (!mv[e]) continue;
        if (squash_spec && ms[e]) begin mv[e] = 0; continue; end
        if (release_spec) ms[e] = 0;
        for (int p = 0; p < NRD; p++) if (rd_en[p] && int'(rd_id[p]) == e) mr[e][p] = 1;
        begin
          bit all;
          all = 1;
          for (int p = 0; p < NRD; p++) all &= mr[e][p];
          if (all) begin mv[e] = 0; n_free++; end
        end
      end
      if (squash_spec || release_spec) in_spec = 0;
      if (alloc) begin
        mv[lowest] = 1; ms[lowest] = alloc_spec; ma[lowest] = alloc_addr;
        for (int p = 0; p < NRD; p++) mr[lowest][p] = 0;
      end
    end
    check(n_full > 0 && n_free > 0 && n_squash > 0, "full, free-after-last-read and squash exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
