// eih_controller: Error Interval Heuristics, the adaptive checkpoint-interval controller.
//
// The controller decides when to take a complete checkpoint (CC, ending a long interval LI)
// and incremental checkpoints (IC, every short interval SI inside an LI). Errors are
// assumed rarer early in an error interval (EI, the time between two detected errors), so
// it starts with one long LI of EI/2 and no IC, and after every error-free CC halves LI
// and doubles the number of ICs (0 -> 1 -> 2 -> 4 ...), until LI reaches LI_MIN and SI
// reaches SI_MIN; then the intervals stay fixed. When an error is detected, the cycles
// since the previous error (including checkpoint overheads) become the new EI and the
// sequence restarts from LI = EI/2 with no IC. With the defaults (EI 200k, LI_MIN 30k,
// SI_MIN 10k) the sequence is LI 100k/no IC, 50k/1 IC (SI 25k), 30k/2 ICs (SI 10k),
// 30k/2 ICs ..., the example of the source design. The clamping rule for the IC count
// (as many as keep SI >= SI_MIN) is this design's reading of that example.
//
// Interface: 'hold' freezes the interval counters while a checkpoint is being created or
// verified (the error-interval counter keeps running); 'error' reports a detected error.
// cc_req / ic_req pulse for one cycle when a checkpoint is due. li, si, n_ic and ei show
// the current settings.
module eih_controller #(
  parameter int unsigned EI_INIT = 200000,
  parameter int unsigned LI_MIN  = 30000,
  parameter int unsigned SI_MIN  = 10000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic        error,
  output logic        cc_req,
  output logic        ic_req,
  output logic [31:0] li,
  output logic [31:0] si,
  output logic [31:0] n_ic,
  output logic [31:0] ei
);

  logic [31:0] li_cnt, si_cnt, ei_cnt;

  // settings of the next LI after an error-free CC
  logic [31:0] li_next, n_next, n_max, si_next;
  always_comb begin
    li_next = (li / 2 < LI_MIN) ? LI_MIN : li / 2;
    n_max   = (li_next / SI_MIN > 0) ? li_next / SI_MIN - 1 : 0;
    n_next  = (n_ic == 0) ? 1 : n_ic * 2;
    if (n_next > n_max) n_next = n_max;
    si_next = li_next / (n_next + 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ei     <= EI_INIT;
      li     <= EI_INIT / 2;
      si     <= EI_INIT / 2;
      n_ic   <= 0;
      li_cnt <= 0;
      si_cnt <= 0;
      ei_cnt <= 0;
      cc_req <= 1'b0;
      ic_req <= 1'b0;
    end else begin
      cc_req <= 1'b0;
      ic_req <= 1'b0;
      ei_cnt <= ei_cnt + 1;
      if (error) begin
        ei     <= ei_cnt + 1;
        li     <= (ei_cnt + 1) / 2;
        si     <= (ei_cnt + 1) / 2;
        n_ic   <= 0;
        li_cnt <= 0;
        si_cnt <= 0;
        ei_cnt <= 0;
      end else if (!hold) begin
        if (li_cnt + 1 >= li) begin
          cc_req <= 1'b1;
          li_cnt <= 0;
          si_cnt <= 0;
          li     <= li_next;
          n_ic   <= n_next;
          si     <= si_next;
        end else begin
          li_cnt <= li_cnt + 1;
          if (si_cnt + 1 >= si) begin
            ic_req <= 1'b1;
            si_cnt <= 0;
          end else begin
            si_cnt <= si_cnt + 1;
          end
        end
      end
    end
  end

endmodule
