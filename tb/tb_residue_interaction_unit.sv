// tb_residue_interaction_unit: residues of each operation arrive from the NR subcores at
// random, different cycles. Checked per operation:
//   CMP  : cmp_lt against the signed comparison, done 9 cycles after the last residue;
//   CHK  : clean value -> no event, 9 cycles; one corrupted residue with correction on ->
//          corr_event and the repaired value written back, 11 cycles; with correction off
//          -> err_detect; an out-of-range value -> ovf_detect;
//   OUT  : out_value equals the signed value;
//   FMUL : the written-back value is floor(X*Y/M) of the unsigned codes.
module tb_residue_interaction_unit;
  import rrns_pkg::*;
  import rrns_isa_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, correct_en = 1;
  logic [NR-1:0] in_valid = '0;
  opcode_e [NR-1:0] in_op;
  reg_idx_t [NR-1:0] in_dest = '0;
  residue_t [NR-1:0] in_val1 = '0, in_val2 = '0;
  logic done, cmp_lt, cmp_err, rf_we, err_detect, corr_event, ovf_detect, out_valid;
  opcode_e done_op;
  reg_idx_t rf_wa;
  rrns_t rf_wd;
  longint out_value;

  residue_interaction_unit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // events seen during one operation
  int  n_we, n_err, n_corr, n_ovf, n_out;
  rrns_t  last_wd;
  reg_idx_t last_wa;
  longint last_out;
  longint cyc = 0, last_in_cyc = 0, done_cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (|in_valid) last_in_cyc <= cyc;
    if (done) done_cyc <= cyc;
    if (rf_we) begin n_we++; last_wd <= rf_wd; last_wa <= rf_wa; end
    if (err_detect) n_err++;
    if (corr_event) n_corr++;
    if (ovf_detect) n_ovf++;
    if (out_valid) begin n_out++; last_out <= out_value; end
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // send the residues a[k], b[k] with random per-subcore delays; returns the clock edges
  // from the one that accepts the last residue to the one that raises done
  task automatic send(input opcode_e op, input reg_idx_t dest, input rrns_t a, input rrns_t b,
                      output int lat, output bit lt);
    int dly [NR];
    int t, last;
    last = 0;
    for (int k = 0; k < NR; k++) begin
      dly[k] = $urandom_range(0, 6);
      if (dly[k] > last) last = dly[k];
    end
    n_we = 0; n_err = 0; n_corr = 0; n_ovf = 0; n_out = 0;
    for (t = 0; t <= last; t++) begin
      for (int k = 0; k < NR; k++) begin
        in_valid[k] = (dly[k] == t);
        in_op[k] = op; in_dest[k] = dest; in_val1[k] = a[k]; in_val2[k] = b[k];
      end
      @(negedge clk);
    end
    in_valid = '0;
    for (int w = 0; w < 60 && !done; w++) @(negedge clk);
    check(done, "done");
    check(done_op == op, "done_op");
    @(posedge clk);
    #1;
    lat = int'(done_cyc - last_in_cyc) - 1;
    lt = cmp_lt;
    @(negedge clk);
  endtask

  function automatic longint rnd(longint lim);
    return longint'({$urandom, $urandom}) % lim;
  endfunction

  function automatic rrns_t corrupt(rrns_t v);
    int c;
    c = $urandom_range(NR - 1);
    v[c] = residue_t'((32'(v[c]) + $urandom_range(1, MODS[c] - 1)) % MODS[c]);
    return v;
  endfunction

  initial begin
    longint h = longint'(M_HALF);
    int lat;
    bit lt;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 300; i++) begin
      longint a, b;
      rrns_t ca, cb, d;
      reg_idx_t dst;
      a = rnd(h / 2); b = rnd(h / 2);
      ca = to_rrns(a); cb = to_rrns(b);
      dst = reg_idx_t'($urandom);
      // CMP: the subcores send the uncorrected difference
      for (int k = 0; k < NR; k++) d[k] = residue_t'((32'(ca[k]) + MODS[k] - 32'(cb[k])) % MODS[k]);
      correct_en = 1;
      send(OP_CMP, dst, d, '0, lat, lt);
      check(lt == (a < b), $sformatf("CMP %0d < %0d", a, b));
      check(lat == 2 * N + 1, $sformatf("CMP latency %0d", lat));
      // clean CHK
      send(OP_CHK, dst, ca, '0, lat, lt);
      check(lat == 2 * N + 1, $sformatf("CHK latency %0d", lat));
      check(n_we == 0 && n_err == 0 && n_corr == 0 && n_ovf == 0, "clean CHK has no event");
      // corrected CHK
      send(OP_CHK, dst, corrupt(ca), '0, lat, lt);
      check(lat == 2 * N + 3, $sformatf("corrected CHK latency %0d", lat));
      check(n_corr == 1 && n_we == 1 && last_wd == ca && last_wa == dst, "correction written back");
      // detection only
      correct_en = 0;
      send(OP_CHK, dst, corrupt(ca), '0, lat, lt);
      check(n_err == 1 && n_we == 0, "detection only");
      correct_en = 1;
      // overflow: a + b beyond the legitimate range
      send(OP_CHK, dst, to_rrns(h + longint'(i) * 1000), '0, lat, lt);
      check(n_ovf == 1 && n_err == 0, $sformatf("overflow ovf=%0d err=%0d corr=%0d a=%0d", n_ovf, n_err, n_corr, i));
      // OUT (with a corrupted residue, repaired first)
      send(OP_OUT, dst, (i % 2) ? corrupt(ca) : ca, '0, lat, lt);
      check(n_out == 1 && last_out == a, $sformatf("OUT %0d got %0d", a, last_out));
      // FMUL on the unsigned codes
      send(OP_FMUL, dst, ca, cb, lat, lt);
      check(n_we == 1 && last_wa == dst &&
            last_wd == to_rrns_u((64'(a + h) * 64'(b + h)) / M_RANGE), "FMUL");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
