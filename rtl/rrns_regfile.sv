// rrns_regfile: the register file of the thread-level core, every register held as NR
// residues (one slice per subcore), as in the source design.
//
// The decode stage reads two whole registers (all residues) to fill the SRC1_Val/SRC2_Val
// fields of the micro-instructions. Each subcore writes only its own residue slice in its
// WB stage, at its own pace, so there is one write port per slice. The residue interaction
// unit has a further full-width port, used to write back a corrected value or a
// fractional product; it wins over a slice write to the same register in the same cycle
// (the decode stage never lets both be outstanding). Registers reset to the code of zero.
//
// Timing: reads are combinational, writes take effect at the clock edge.
module rrns_regfile
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst_n,
  input  reg_idx_t              ra1,
  input  reg_idx_t              ra2,
  output rrns_t                 rd1,
  output rrns_t                 rd2,
  input  logic     [NR-1:0]     slice_we,
  input  reg_idx_t [NR-1:0]     slice_wa,
  input  residue_t [NR-1:0]     slice_wd,
  input  logic                  full_we,
  input  reg_idx_t              full_wa,
  input  rrns_t                 full_wd
);

  localparam rrns_t ZERO = to_rrns(0);

  rrns_t regs [NREGS];

  assign rd1 = regs[ra1];
  assign rd2 = regs[ra2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= ZERO;
    end else begin
      for (int c = 0; c < NR; c++)
        if (slice_we[c]) regs[slice_wa[c]][c] <= slice_wd[c];
      if (full_we) regs[full_wa] <= full_wd;
    end
  end

endmodule
