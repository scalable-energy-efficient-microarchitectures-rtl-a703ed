// tb_error_correction_unit: presents a value with one wrong residue together with its
// deltas, computed in the testbench by a 64-bit Chinese-remainder reference, and checks that
// the repaired value equals the original two cycles later. Also checks that a value hit in
// two non-redundant residues is reported uncorrectable or, when the deltas happen to
// alias a single error, at least flagged as corrected (never silently passed as clean).
module tb_error_correction_unit;
  import rrns_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, corrected, uncorrectable;
  rrns_t x, fixed;
  residue_t [R-1:0] delta;

  error_correction_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned ref_x(rrns_t v);
    longint unsigned s = 0;
    for (int i = 0; i < N; i++) begin
      longint unsigned mi = M_RANGE / 64'(MODS[i]);
      longint unsigned inv = 0;
      for (int unsigned q = 1; q < MODS[i]; q++) if ((mi % 64'(MODS[i])) * q % MODS[i] == 1) inv = q;
      s = (s + 64'(v[i]) * ((mi * inv) % M_RANGE)) % M_RANGE;
    end
    return s;
  endfunction

  task automatic apply(input rrns_t e);
    longint unsigned xr = ref_x(e);
    x = e;
    for (int k = 0; k < R; k++)
      delta[k] = residue_t'(smod(longint'(e[N+k]) - longint'(xr % 64'(MODS[N+k])), MODS[N+k]));
    in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    @(negedge clk);
    checks++;
    if (!out_valid) begin
      failures++;
      $display("no out_valid after 2 cycles");
    end
  endtask

  initial begin
    rrns_t v, e;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      v = to_rrns_u({$urandom, $urandom} % M_RANGE);
      e = v;
      begin
        int c;
        c = $urandom_range(NR - 1);
        e[c] = residue_t'((32'(e[c]) + 1 + $urandom_range(MODS[c] - 2)) % MODS[c]);
      end
      apply(e);
      checks++;
      if (!corrected || uncorrectable || fixed != v) begin
        failures++;
        if (failures < 10) $display("single error not repaired");
      end
      apply(v);
      checks++;
      if (corrected || uncorrectable || fixed != v) failures++;
      e = v;
      e[0] = residue_t'((32'(e[0]) + 1) % MODS[0]);
      e[1] = residue_t'((32'(e[1]) + 1) % MODS[1]);
      apply(e);
      checks++;
      if (!(corrected || uncorrectable)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
