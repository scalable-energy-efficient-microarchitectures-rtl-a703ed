// branch_predictor: bimodal predictor used by the branch-predictor combination.
//
// In the thread-level core a comparison needs all residues and so a trip through the
// residue interaction unit. When the instruction behind a comparison is the branch that
// consumes it, the core does not stall: it predicts the branch with this table, runs on
// speculatively and checks the prediction when the comparison result returns. The source
// design uses "the branch predictor" without describing it; this one is a table of
// 2-bit saturating counters indexed by the low PC bits, reset to weakly not-taken.
//
// Interface: pc -> taken (combinational). update/upd_pc/upd_taken train at the clock edge.
module branch_predictor
  import rrns_isa_pkg::*;
#(
  parameter int ENTRIES = 16
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic [PCW-1:0] pc,
  output logic           taken,
  input  logic           update,
  input  logic [PCW-1:0] upd_pc,
  input  logic           upd_taken
);

  localparam int IW = $clog2(ENTRIES);
  logic [1:0] ctr [ENTRIES];

  assign taken = ctr[pc[IW-1:0]][1];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) ctr[i] <= 2'b01;
    end else if (update) begin
      if (upd_taken && ctr[upd_pc[IW-1:0]] != 2'b11)
        ctr[upd_pc[IW-1:0]] <= ctr[upd_pc[IW-1:0]] + 2'b01;
      else if (!upd_taken && ctr[upd_pc[IW-1:0]] != 2'b00)
        ctr[upd_pc[IW-1:0]] <= ctr[upd_pc[IW-1:0]] - 2'b01;
    end
  end

endmodule
