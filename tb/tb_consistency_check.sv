// tb_consistency_check: feeds consistent codes and codes with injected residue errors.
// Expected deltas come from a 64-bit reference: X' is found by Chinese-remainder search over
// the non-redundant residues and delta_k = |x_k - X'|_{m_k}. Also checks that the mixed-radix
// digits rebuild X' and that the latency is 2N cycles.
module tb_consistency_check;
  import rrns_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, ready, done;
  rrns_t x, x_q;
  residue_t [R-1:0] delta;
  residue_t [N-1:0] digit;

  consistency_check dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference X' from the non-redundant residues (CRT)
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

  initial begin
    longint unsigned xr, rebuilt;
    int cyc;
    repeat (3) @(negedge clk);
    rst_n <= 1;
    @(negedge clk);
    for (int t = 0; t < 400; t++) begin
      x = to_rrns_u({$urandom, $urandom} % M_RANGE);
      if (t % 2 == 1) begin
        int c;
        c = $urandom_range(NR - 1);
        x[c] = residue_t'((32'(x[c]) + 1 + $urandom_range(MODS[c] - 2)) % MODS[c]);
      end
      xr = ref_x(x);
      start = 1;
      cyc = 0;
      do begin
        @(negedge clk);
        start = 0;
        cyc++;
      end while (!done && cyc < 100);
      checks++;
      if (cyc != 2 * N) begin
        failures++;
        $display("latency %0d", cyc);
      end
      for (int k = 0; k < R; k++) begin
        checks++;
        if (32'(delta[k]) != smod(longint'(x[N+k]) - longint'(xr % 64'(MODS[N+k])), MODS[N+k])) begin
          failures++;
          $display("t=%0d delta[%0d]=%0d", t, k, delta[k]);
        end
      end
      rebuilt = 0;
      for (int j = N - 1; j >= 0; j--) rebuilt = rebuilt * MODS[j] + digit[j];
      checks++;
      if (rebuilt != xr) begin
        failures++;
        $display("digits rebuild %0d exp %0d", rebuilt, xr);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
