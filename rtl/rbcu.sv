// rbcu: RRNS-Binary Conversion Unit.
//
// To binary: a mixed-radix conversion of the non-redundant residues (the same base
// extension the consistency check performs, reused here) gives digits a_j, and the binary
// value is sum(a_j * m_1...m_j), an unsigned number in [0, M). Removing the Excess-M/2
// offset gives the signed value. The redundant deltas come for free and are reported as
// 'consistent'. From binary: each residue is the binary value plus M/2 reduced modulo the
// channel's modulus (combinational). The source design names the unit and says it serves
// operations RRNS cannot do directly (division, shifts); the method is this design's choice.
//
// Timing: to-binary start/x accepted when ready; done is high 2N cycles later (8 for the
// (4,2) configuration) with bin_u, bin_s and consistent. from_bin -> to_rrns is combinational.
module rbcu
  import rrns_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            start,
  input  rrns_t           x,
  output logic            ready,
  output logic            done,
  output longint unsigned bin_u,
  output longint          bin_s,
  output logic            consistent,
  input  longint          from_bin,
  output rrns_t           to_rrns_out
);

  residue_t [R-1:0] delta;
  residue_t [N-1:0] digit;
  rrns_t            x_q;

  consistency_check u_cc (
    .clk, .rst_n, .start, .x, .ready, .done, .delta, .digit, .x_q
  );

  always_comb begin
    bin_u = '0;
    for (int j = N - 1; j >= 0; j--) bin_u = bin_u * 64'(MODS[j]) + 64'(digit[j]);
    bin_s = longint'(bin_u) - longint'(M_HALF);
  end

  assign consistent  = (delta == '0);
  assign to_rrns_out = to_rrns(from_bin);

endmodule
