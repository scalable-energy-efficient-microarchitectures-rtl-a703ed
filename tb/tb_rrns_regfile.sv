// tb_rrns_regfile: random slice writes (one residue per subcore, different registers) and
// full-width writes, checked through both read ports against a model. Writes take effect
// at the clock edge; reads are combinational. Reset value of every register is the code
// of 0 (M/2 in every channel).
module tb_rrns_regfile;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, full_we = 0;
  reg_idx_t ra1 = '0, ra2 = '0, full_wa = '0;
  rrns_t rd1, rd2, full_wd = '0;
  logic [NR-1:0] slice_we = '0;
  reg_idx_t [NR-1:0] slice_wa = '0;
  residue_t [NR-1:0] slice_wd = '0;

  rrns_regfile dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  rrns_t m [NREGS];

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int r = 0; r < NREGS; r++) m[r] = to_rrns(0);
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 10000; cyc++) begin
      @(negedge clk);
      ra1 = reg_idx_t'($urandom); ra2 = reg_idx_t'($urandom);
      #1;
      check(rd1 == m[ra1] && rd2 == m[ra2], "read ports");
      full_we = $urandom_range(0, 3) == 0;
      full_wa = reg_idx_t'($urandom);
      full_wd = to_rrns(longint'($urandom) - 64'd2147483648 / 2);
      for (int k = 0; k < NR; k++) begin
        slice_we[k] = $urandom_range(0, 1);
        slice_wa[k] = reg_idx_t'($urandom);
        if (full_we && slice_wa[k] == full_wa) slice_we[k] = 0;
        slice_wd[k] = residue_t'($urandom_range(0, MODS[k] - 1));
      end
      @(posedge clk);
      if (full_we) m[full_wa] = full_wd;
      for (int k = 0; k < NR; k++) if (slice_we[k]) m[slice_wa[k]][k] = slice_wd[k];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
