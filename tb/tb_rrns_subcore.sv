// tb_rrns_subcore: one subcore (channel 1, modulus 349) fed with a random stream of
// micro-instructions built from random signed values. Checked: every register write
// (order, destination, residue of the exact result) for ADD/SUB/MUL/LI, loads returning
// what earlier stores wrote (addresses from a model memory address buffer indexed by
// A_ID), CMP/CHK/OUT/FMUL going to the interaction-unit port instead of the register file,
// the 4-cycle push-to-writeback latency of an isolated micro-instruction, speculative
// entries held until released, squashed entries never executed, and a fault injection
// adding its offset to the next register write.
module tb_rrns_subcore;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  localparam int CH = 1;
  localparam int unsigned MOD = MODS[CH];
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, release_spec = 0, squash_spec = 0, inj_valid = 0;
  uop_t push_uop = '0;
  logic mib_full, mab_rd_en, rf_we, riu_valid, busy;
  aid_t mab_rd_id;
  logic [31:0] mab_rd_addr;
  reg_idx_t rf_wa, riu_dest;
  residue_t rf_wd, riu_val1, riu_val2, inj_offset = '0;
  opcode_e riu_op;

  rrns_subcore #(.CH(CH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model MAB: address per A_ID
  logic [31:0] mab [1 << AIDW];
  assign mab_rd_addr = mab[mab_rd_id];

  typedef struct {
    bit       to_rf;
    reg_idx_t dest;
    residue_t val;
    opcode_e  op;
  } exp_t;
  exp_t   expq [$];
  residue_t mem [256];
  longint cyc = 0, push_cyc = 0, wb_cyc = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic residue_t r(longint v);
    return residue_t'(smod(v + longint'(M_HALF), MOD));
  endfunction

  int inj_pending = 0;
  residue_t inj_amt;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (rf_we || riu_valid) begin
      wb_cyc <= cyc;
      if (expq.size() == 0) check(0, "unexpected writeback");
      else begin
        exp_t e;
        e = expq.pop_front();
        if (e.to_rf) begin
          residue_t want;
          want = e.val;
          if (inj_pending) begin
            want = residue_t'((32'(want) + 32'(inj_amt)) % MOD);
            inj_pending = 0;
          end
          check(rf_we && !riu_valid && rf_wa == e.dest && rf_wd == want,
                $sformatf("RF write r%0d=%0d got r%0d=%0d", e.dest, want, rf_wa, rf_wd));
        end else begin
          check(riu_valid && !rf_we && riu_op == e.op && riu_val1 == e.val, $sformatf("to interaction unit: op %s exp %s rf_we %b riu %b v %0d/%0d", riu_op.name(), e.op.name(), rf_we, riu_valid, riu_val1, e.val));
        end
      end
    end
  end

  // builds one micro-instruction and its expected effect
  task automatic make(input bit no_mem, output uop_t u, output exp_t e);
    longint a, b, v;
    int k;
    a = longint'($urandom_range(0, 60000)) - 30000;
    b = longint'($urandom_range(0, 60000)) - 30000;
    u = '0;
    u.src1 = r(a); u.src2 = r(b); u.dest = reg_idx_t'($urandom);
    u.a_id = aid_t'($urandom);
    k = $urandom_range(0, 9);
    if (no_mem && (k == 4 || k == 5)) k = 0;
    e.to_rf = 1; e.dest = u.dest;
    case (k)
      0: begin u.op = OP_ADD; e.val = r(a + b); end
      1: begin u.op = OP_SUB; e.val = r(a - b); end
      2: begin u.op = OP_MUL; e.val = r(a * b); end
      3: begin u.op = OP_LI;  e.val = r(a); end
      4: begin u.op = OP_ST;  e.to_rf = 0; end
      5: begin u.op = OP_LD;  e.val = mem[mab[u.a_id] % 256]; end
      6: begin u.op = OP_CMP; e.to_rf = 0; e.val = residue_t'(smod(longint'(u.src1) - longint'(u.src2), MOD)); end
      7: begin u.op = OP_CHK; e.to_rf = 0; e.val = u.src1; end
      8: begin u.op = OP_OUT; e.to_rf = 0; e.val = u.src1; end
      default: begin u.op = OP_FMUL; e.to_rf = 0; e.val = u.src1; end
    endcase
    e.op = u.op;
    if (u.op == OP_ST) mem[mab[u.a_id] % 256] = u.src1;
  endtask

  initial begin
    uop_t u;
    exp_t e;
    int   lat;
    for (int a = 0; a < 256; a++) mem[a] = '0;
    for (int i = 0; i < (1 << AIDW); i++) mab[i] = $urandom;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // isolated micro-instruction: latency
    make(1'b0, u, e);
    u.op = OP_LI; e.to_rf = 1; e.op = OP_LI; e.val = u.src1;
    expq.push_back(e);
    push = 1; push_uop = u; push_cyc = cyc;
    @(negedge clk);
    push = 0;
    repeat (8) @(negedge clk);
    check(wb_cyc - push_cyc == 4, $sformatf("push to writeback %0d cycles", wb_cyc - push_cyc));
    // random stream; the A_ID table changes only when the pipeline is empty
    for (int i = 0; i < 5000; i++) begin
      if ($urandom_range(0, 49) == 0) begin
        while (busy) @(negedge clk);
        for (int j = 0; j < (1 << AIDW); j++) mab[j] = $urandom_range(0, 300);
      end
      if ($urandom_range(0, 199) == 0) begin
        while (busy) @(negedge clk);
        inj_valid = 1; inj_offset = residue_t'($urandom_range(1, MOD - 1));
        inj_amt = inj_offset; inj_pending = 1;
        @(negedge clk);
        inj_valid = 0;
      end
      if ($urandom_range(0, 99) == 0) begin
        // a speculative group: held, then released or squashed
        int n;
        bit keep;
        exp_t held [$];
        while (busy) @(negedge clk);
        held.delete();
        n = $urandom_range(1, 6);
        keep = $urandom_range(0, 1);
        for (int j = 0; j < n; j++) begin
          make(1'b1, u, e);
          u.spec = 1;
          held.push_back(e);
          push = 1; push_uop = u;
          @(negedge clk);
        end
        push = 0;
        repeat (6) @(negedge clk);
        check(!dut.ex_valid && !dut.mem_valid && !dut.wb_valid, "speculative entries held");
        if (keep) begin
          foreach (held[j]) expq.push_back(held[j]);
          release_spec = 1;
        end else squash_spec = 1;
        @(negedge clk);
        release_spec = 0; squash_spec = 0;
        repeat (10) @(negedge clk);
        check(!busy, "speculative group drained or squashed");
      end
      make(1'b0, u, e);
      while (mib_full) @(negedge clk);
      if (u.op != OP_ST) expq.push_back(e);
      push = 1; push_uop = u;
      @(negedge clk);
      push = 0;
      if ($urandom_range(0, 3) == 0) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    check(expq.size() == 0, "every micro-instruction completed");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
