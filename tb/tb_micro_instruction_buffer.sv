// tb_micro_instruction_buffer: random push/pop/release/squash traffic against a queue model.
// Checks, every cycle: full (DEPTH entries), empty, head_valid (a non-speculative head) and
// the head micro-instruction. Pushes made while a predicted branch is open are speculative,
// as in the core; a release makes them ordinary entries, a squash removes them.
module tb_micro_instruction_buffer;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  localparam int DEPTH = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, release_spec = 0, squash_spec = 0;
  uop_t push_uop = '0, head_uop;
  logic full, head_valid, empty;

  micro_instruction_buffer #(.DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  uop_t q [$];
  bit   in_spec = 0;
  int   n_full = 0, n_squash = 0, n_release = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      @(negedge clk);
      // outputs against the model
      check(full == (q.size() == DEPTH), "full");
      check(empty == (q.size() == 0), "empty");
      check(head_valid == (q.size() > 0 && !q[0].spec), "head_valid");
      if (q.size() > 0) check(head_uop == q[0], "head uop");
      if (full) n_full++;
      // stimulus
      push = 0; pop = 0; release_spec = 0; squash_spec = 0;
      if (in_spec && $urandom_range(0, 9) == 0) begin
        if ($urandom_range(0, 1)) begin squash_spec = 1; n_squash++; end
        else begin release_spec = 1; n_release++; end
      end
      pop = head_valid && ($urandom_range(0, 2) == 0);
      if (!squash_spec && !full && $urandom_range(0, 1)) begin
        push = 1;
        push_uop = uop_t'({$urandom, $urandom});
        push_uop.op = opcode_e'($urandom_range(0, 14));
        push_uop.spec = in_spec && !release_spec;
      end
      if (!in_spec && $urandom_range(0, 19) == 0) in_spec = 1;
      @(posedge clk);
      // model update
      if (pop) void'(q.pop_front());
      if (squash_spec) begin
        for (int i = q.size() - 1; i >= 0; i--) if (q[i].spec) q.delete(i);
        in_spec = 0;
      end else begin
        if (release_spec) begin
          foreach (q[i]) q[i].spec = 1'b0;
          in_spec = 0;
        end
        if (push) q.push_back(push_uop);
      end
    end
    check(n_full > 0 && n_squash > 0 && n_release > 0, "full, squash and release all exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
