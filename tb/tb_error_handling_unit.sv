// tb_error_handling_unit: end-to-end RRNS checks.
//  * consistent random values: CHK_OK after 8 cycles;
//  * one residue (any channel) hit by a random error, correction on: CHK_CORRECTED after
//    10 cycles with the original value restored;
//  * two residues hit, correction off: CHK_ERROR (2-error detection);
//  * sum of two positives beyond M/2 (residues added with the ALU's correction factor):
//    CHK_OVERFLOW; sum of two negatives beyond -M/2: CHK_UNDERFLOW;
//  * comparison: uncorrected difference X - Y gives CHK_OK when X >= Y, CHK_UNDERFLOW else.
module tb_error_handling_unit;
  import rrns_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, correct_en = 0, ready, done;
  rrns_t x, value;
  chk_status_e status;
  residue_t [N-1:0] digit;

  error_handling_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input rrns_t v, input logic ce, input chk_status_e exp_s,
                     input rrns_t exp_v, input int exp_lat, input string what);
    int cyc = 0;
    x = v; correct_en = ce; start = 1;
    do begin
      @(negedge clk);
      start = 0;
      cyc++;
    end while (!done && cyc < 100);
    checks++;
    if (status != exp_s || cyc != exp_lat || (exp_s != CHK_ERROR && value != exp_v)) begin
      failures++;
      if (failures < 10)
        $display("%s: status %s (exp %s) latency %0d (exp %0d)", what, status.name(), exp_s.name(), cyc, exp_lat);
    end
    @(negedge clk);
  endtask

  function automatic longint rnd(longint lim);
    return longint'({$urandom, $urandom} % 64'(lim));
  endfunction

  // residue-wise sum with the Excess-M/2 correction (what the ALU produces)
  function automatic rrns_t add_code(rrns_t a, rrns_t b, bit corr);
    rrns_t z;
    for (int c = 0; c < NR; c++)
      z[c] = residue_t'(smod(longint'(a[c]) + (corr ? longint'(b[c]) - longint'(M_HALF) : -longint'(b[c])), MODS[c]));
    return z;
  endfunction

  initial begin
    longint a, b;
    rrns_t v, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 300; t++) begin
      a = rnd(longint'(M_RANGE)) - longint'(M_HALF);
      v = to_rrns(a);
      run(v, t % 2, CHK_OK, v, 8, "clean");
      // single error
      e = v;
      begin
        int c;
        c = $urandom_range(NR - 1);
        e[c] = residue_t'((32'(e[c]) + 1 + $urandom_range(MODS[c] - 2)) % MODS[c]);
      end
      run(e, 1'b1, CHK_CORRECTED, v, 10, "single");
      // double error, detection only
      e = v;
      begin
        int c1 = $urandom_range(NR - 1);
        int c2 = (c1 + 1 + $urandom_range(NR - 2)) % NR;
        e[c1] = residue_t'((32'(e[c1]) + 1 + $urandom_range(MODS[c1] - 2)) % MODS[c1]);
        e[c2] = residue_t'((32'(e[c2]) + 1 + $urandom_range(MODS[c2] - 2)) % MODS[c2]);
      end
      run(e, 1'b0, CHK_ERROR, v, 8, "double");
      // overflow / underflow of an addition
      a = longint'(M_HALF) / 2 + rnd(longint'(M_HALF) / 2);
      b = longint'(M_HALF) / 2 + rnd(longint'(M_HALF) / 2);
      run(add_code(to_rrns(a), to_rrns(b), 1), t % 2, CHK_OVERFLOW, add_code(to_rrns(a), to_rrns(b), 1), 8, "overflow");
      run(add_code(to_rrns(-a), to_rrns(-b), 1), t % 2, CHK_UNDERFLOW, add_code(to_rrns(-a), to_rrns(-b), 1), 8, "underflow");
      // comparison
      a = rnd(longint'(M_RANGE)) - longint'(M_HALF);
      b = (t % 5 == 0) ? a : rnd(longint'(M_RANGE)) - longint'(M_HALF);
      run(add_code(to_rrns(a), to_rrns(b), 0), 1'b0, (a >= b) ? CHK_OK : CHK_UNDERFLOW,
          add_code(to_rrns(a), to_rrns(b), 0), 8, "compare");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
