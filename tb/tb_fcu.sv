// tb_fcu: floor(X*Y/M) for random unsigned operands X, Y in [0, M) given as residues,
// checked against 64-bit arithmetic, with the 2N+1-cycle latency; a corrupted operand
// residue must raise 'bad'.
module tb_fcu;
  import rrns_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  rrns_t x = '0, y = '0, z;
  logic ready, done, bad;

  fcu dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      longint unsigned a, b, p;
      int lat, c;
      bit corrupt;
      a = (i == 0) ? M_RANGE - 1 : 64'({$urandom, $urandom}) % M_RANGE;
      b = (i == 0) ? M_RANGE - 1 : 64'({$urandom, $urandom}) % M_RANGE;
      p = (a * b) / M_RANGE;
      x = to_rrns_u(a);
      y = to_rrns_u(b);
      corrupt = (i % 4 == 3);
      if (corrupt) begin
        c = $urandom_range(NR - 1);
        y[c] = residue_t'((32'(y[c]) + 1) % MODS[c]);
      end
      check(ready, "ready when idle");
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      check(lat == 2 * N + 1, $sformatf("latency %0d", lat));
      check(bad == corrupt, "bad flag");
      if (!corrupt) check(z == to_rrns_u(p), $sformatf("%0d*%0d/M", a, b));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
