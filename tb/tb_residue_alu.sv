// tb_residue_alu: drives the residue ALU of every channel with Excess-M/2 coded random
// signed operands and compares each result residue with the code of the exact signed result
// computed in 64-bit arithmetic (add, subtract, multiply with in-range products) and with
// |x - y| for the uncorrected comparison difference.
module tb_residue_alu;
  import rrns_pkg::*;
  int checks = 0, failures = 0;
  alu_op_e op;
  rrns_t x, y, z;

  for (genvar c = 0; c < NR; c++) begin : g_c
    residue_alu #(.MOD(MODS[c])) dut (.op(op), .x(x[c]), .y(y[c]), .z(z[c]));
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rnd(longint lim);
    longint v = longint'({$urandom, $urandom}) % lim;
    return v;
  endfunction

  initial begin
    longint a, b, r;
    rrns_t exp_z;
    for (int t = 0; t < 3000; t++) begin
      op = alu_op_e'(t % 4);
      if (op == ALU_MUL) begin
        a = rnd(30000); b = rnd(30000);
      end else begin
        a = rnd(longint'(M_HALF) / 2); b = rnd(longint'(M_HALF) / 2);
      end
      x = to_rrns(a);
      y = to_rrns(b);
      #1;
      unique case (op)
        ALU_ADD: exp_z = to_rrns(a + b);
        ALU_SUB: exp_z = to_rrns(a - b);
        ALU_MUL: exp_z = to_rrns(a * b);
        default: exp_z = to_rrns_u(64'(a - b + (a < b ? longint'(M_RANGE) : 0)));
      endcase
      if (op == ALU_CMP) begin
        for (int c = 0; c < NR; c++) exp_z[c] = residue_t'(smod(a - b, MODS[c]));
      end
      r = a;
      for (int c = 0; c < NR; c++) begin
        checks++;
        if (z[c] != exp_z[c]) begin
          failures++;
          if (failures < 10) $display("op %s a=%0d b=%0d ch %0d: got %0d exp %0d", op.name(), a, b, c, z[c], exp_z[c]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
