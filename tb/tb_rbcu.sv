// tb_rbcu: conversion of random signed values (and the extremes of the legitimate range)
// from RRNS to binary, checked for value, unsigned code, consistency flag and the 2N-cycle
// latency; a single corrupted residue must clear 'consistent'. The combinational
// binary-to-RRNS path is checked against the package encoder.
module tb_rbcu;
  import rrns_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  rrns_t x = '0, to_rrns_out;
  logic ready, done, consistent;
  longint unsigned bin_u;
  longint bin_s, from_bin = 0;

  rbcu dut (.*);
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

  function automatic longint rnd_val(int i);
    longint h = longint'(M_HALF);
    if (i == 0) return -h;
    if (i == 1) return h - 1;
    return longint'({$urandom, $urandom}) % h;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      longint v;
      int lat, c;
      bit bad;
      v = rnd_val(i);
      bad = (i % 3 == 2);
      x = to_rrns(v);
      if (bad) begin
        c = $urandom_range(NR - 1);
        x[c] = residue_t'((32'(x[c]) + $urandom_range(1, MODS[c] - 1)) % MODS[c]);
      end
      check(ready, "ready when idle");
      start = 1;
      @(negedge clk);
      start = 0;
      lat = 1;
      while (!done && lat < 50) begin @(negedge clk); lat++; end
      check(lat == 2 * N, $sformatf("latency %0d", lat));
      check(consistent == !bad, "consistency flag");
      if (!bad) begin
        check(bin_s == v, $sformatf("value %0d got %0d", v, bin_s));
        check(bin_u == 64'(v + longint'(M_HALF)), "unsigned code");
      end
      from_bin = v;
      #1;
      check(to_rrns_out == to_rrns(v), "binary to RRNS");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
