// tb_index_sum_mul: checks the index-sum multiplier of every modulus of the base set against
// direct multiplication |x*y|_m, exhaustively over one operand's zero, one and m-1 and over
// random pairs.
module tb_index_sum_mul;
  import rrns_pkg::*;
  int checks = 0, failures = 0;
  residue_t xs [NR], ys [NR], ps [NR];

  for (genvar c = 0; c < NR; c++) begin : g_c
    index_sum_mul #(.MOD(MODS[c])) dut (.x(xs[c]), .y(ys[c]), .p(ps[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      for (int c = 0; c < NR; c++) begin
        xs[c] = residue_t'($urandom_range(MODS[c] - 1));
        ys[c] = residue_t'($urandom_range(MODS[c] - 1));
        if (t < 3 * int'(MODS[c]) && t % 3 == 0) ys[c] = '0;
        if (t % 7 == 1) ys[c] = residue_t'(MODS[c] - 1);
        if (t % 11 == 2) xs[c] = residue_t'(1);
      end
      #1;
      for (int c = 0; c < NR; c++) begin
        checks++;
        if (32'(ps[c]) != (32'(xs[c]) * 32'(ys[c])) % MODS[c]) begin
          failures++;
          if (failures < 10) $display("mod %0d: %0d*%0d gave %0d", MODS[c], xs[c], ys[c], ps[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
