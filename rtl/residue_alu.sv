// residue_alu: the arithmetic unit of one RRNS subcore (one residue channel).
//
// Operands are residues of Excess-M/2 coded numbers (x + M/2). Adding, subtracting or
// multiplying two such codes leaves the M/2 offset wrong, so every result is adjusted by a
// correction factor that depends only on the modulus, never on the operands' signs:
//   ADD: |x + y - H|_m                    H = |M/2|_m
//   SUB: |x - y + H|_m
//   MUL: |x * y - LUT(x + y)|_m           LUT(s) = |(M/2)^2 + (s - M - 1) * M/2|_m
//   CMP: |x - y|_m                         (no correction, as a comparison requires)
// For an odd non-redundant modulus H is 0 and every correction vanishes; for the even
// non-redundant modulus and for the redundant moduli they are the constants derived in the
// source design. The multiply correction is a table of 2m-1 entries indexed by the
// unreduced sum x + y (511 entries for an 8-bit channel, as in the source design); here it
// is computed at elaboration. The product itself comes from the index-sum multiplier.
//
// Interface: op, x, y in; z out. Combinational; the subcore registers the result.
module residue_alu
  import rrns_pkg::*;
#(
  parameter int unsigned MOD = 139
) (
  input  alu_op_e  op,
  input  residue_t x,
  input  residue_t y,
  output residue_t z
);

  localparam int unsigned H  = smod(longint'(M_HALF), MOD);
  localparam int unsigned MM = smod(longint'(M_RANGE), MOD);
  localparam int unsigned LUTN = 2 * MOD - 1;

  typedef residue_t [LUTN-1:0] lut_t;

  function automatic lut_t make_lut();
    lut_t t;
    for (int unsigned s = 0; s < LUTN; s++)
      t[s] = residue_t'((H * H + smod(longint'(s) - longint'(MM) - 1, MOD) * H) % MOD);
    return t;
  endfunction

  localparam lut_t MUL_CF = make_lut();

  residue_t prod;
  index_sum_mul #(.MOD(MOD)) u_mul (.x(x), .y(y), .p(prod));

  // |a + b|_m and |a - b|_m for a, b in [0, m)
  function automatic residue_t add_m(residue_t a, residue_t b);
    logic [RW:0] s = {1'b0, a} + {1'b0, b};
    if (s >= (RW+1)'(MOD)) s = s - (RW+1)'(MOD);
    return s[RW-1:0];
  endfunction

  function automatic residue_t sub_m(residue_t a, residue_t b);
    logic [RW:0] s = {1'b0, a} - {1'b0, b};
    if (a < b) s = s + (RW+1)'(MOD);
    return s[RW-1:0];
  endfunction

  logic [RW:0] sum_raw;
  assign sum_raw = {1'b0, x} + {1'b0, y};

  always_comb begin
    unique case (op)
      ALU_ADD: z = sub_m(add_m(x, y), residue_t'(H));
      ALU_SUB: z = add_m(sub_m(x, y), residue_t'(H));
      ALU_MUL: z = sub_m(prod, MUL_CF[sum_raw]);
      ALU_CMP: z = sub_m(x, y);
      default: z = '0;
    endcase
  end

endmodule
