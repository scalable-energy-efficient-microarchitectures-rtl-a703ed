// tb_incremental_checkpoint_buffer: the two-half incremental checkpoint buffer at its
// default size (two 1 KB halves of 256 32-bit words). Random ICs of random length (short
// ones, and some longer than a half so they stream through it) are written while the reader
// takes words at random rates. A model keeps one queue per half and the switching rule, and
// a global queue holds the write order. Every cycle the test checks wr_ready, rd_valid,
// rd_data/rd_last, both halves in use and both fill levels against the model. Every word
// read must be the oldest word written that has not been read yet. Phases with a slow
// reader fill a half completely (back-pressure), and flushes empty the buffer.
module tb_incremental_checkpoint_buffer;
  localparam int unsigned W = 32, DEPTH = 256;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, flush = 0;
  logic wr_valid = 0, wr_last = 0, rd_ready = 0;
  logic [W-1:0] wr_data = '0;
  logic wr_ready, rd_valid, rd_last, wr_half, rd_half;
  logic [W-1:0] rd_data;
  logic [8:0] level [2];

  incremental_checkpoint_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [W:0] q [2][$];
  logic [W:0] order [$];
  bit mwh, mrh;
  int n_full, n_stream, n_both;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int ic_left, rd_pct, wr_pct;
    bit push, pop, exp_ready, exp_valid;
    logic [W:0] w;
    mwh = 0;
    mrh = 0;
    ic_left = 5;
    n_full = 0;
    n_stream = 0;
    n_both = 0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 200000; cyc++) begin
      @(negedge clk);
      // phases: balanced, slow reader (fills a half), fast reader
      case ((cyc / 5000) % 3)
        0: begin wr_pct = 60; rd_pct = 60; end
        1: begin wr_pct = 90; rd_pct = 10; end
        default: begin wr_pct = 30; rd_pct = 95; end
      endcase
      // outputs against the model
      exp_ready = (q[mwh].size() != DEPTH);
      exp_valid = (q[mrh].size() != 0);
      check(wr_ready == exp_ready, "wr_ready");
      check(rd_valid == exp_valid, "rd_valid");
      check(wr_half == mwh && rd_half == mrh, "half select");
      check(level[0] == 9'(q[0].size()) && level[1] == 9'(q[1].size()), "level");
      if (exp_valid) begin
        check({rd_last, rd_data} == q[mrh][0], "rd word");
        check({rd_last, rd_data} == order[0], "write order");
      end
      if (!exp_ready) n_full++;
      // new inputs
      flush    = ($urandom_range(0, 19999) == 0);
      wr_valid = ($urandom_range(0, 99) < wr_pct);
      rd_ready = ($urandom_range(0, 99) < rd_pct);
      wr_data  = $urandom;
      wr_last  = (ic_left == 1);
      push = wr_valid && exp_ready && !flush;
      pop  = rd_valid && rd_ready && !flush;
      if (push && pop) n_both++;
      // model update for the coming edge
      if (flush) begin
        q[0].delete();
        q[1].delete();
        order.delete();
        mwh = 0;
        mrh = 0;
      end else begin
        if (pop) begin
          w = q[mrh].pop_front();
          void'(order.pop_front());
          if (w[W]) mrh = ~mrh;
        end
        if (push) begin
          q[mwh].push_back({wr_last, wr_data});
          order.push_back({wr_last, wr_data});
          if (wr_last) mwh = ~mwh;
          ic_left--;
          if (ic_left == 0) begin
            // mostly short ICs, some longer than a half
            if ($urandom_range(0, 9) == 0) begin
              ic_left = $urandom_range(DEPTH + 1, 3 * DEPTH);
              n_stream++;
            end else begin
              ic_left = $urandom_range(1, 60);
            end
          end
        end
      end
    end
    check(n_full > 0, "a half was filled");
    check(n_stream > 0, "an IC streamed through a half");
    check(n_both > 0, "read and write in the same cycle");
    $display("full cycles %0d, long ICs %0d, read+write cycles %0d", n_full, n_stream, n_both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
