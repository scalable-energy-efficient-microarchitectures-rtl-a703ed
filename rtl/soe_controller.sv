// soe_controller: Stochastic Overhead Estimation, a second adaptive checkpoint-interval
// controller (an alternative to eih_controller).
//
// The short interval SI is fixed; the long interval LI (between complete checkpoints, CC)
// is re-chosen after every committed CC by estimating, for the last error interval, the
// total checkpoint overhead with LI kept, doubled or halved, and taking the cheapest:
//   keep   : Inv_Exe   + Sum_CCs       + Sum_ICs
//   double : Inv_Exe_D + Sum_CCs / 2   + Sum_ICs
//   halve  : Inv_Exe_H + Sum_CCs * 2   + Sum_ICs
// with n = LI/SI short intervals per LI, f = 1 - E(X)/LI and
//   Inv_Exe   = (floor(f*n)     + 1) / n     * ave_LI
//   Inv_Exe_D = (floor(f*2n)    + 1) / (2n)  * 2*ave_LI
//   Inv_Exe_H = (floor(f*n/2)   + 1) / (n/2) * ave_LI/2
// Sum_CCs / Sum_ICs are the cycles spent creating and verifying CCs / ICs and ave_LI the
// mean LI, all over the interval between the last two detected errors (before the first
// error: since reset). These formulas and the keep/double/halve rule follow the source
// design. E(X), the expected cycle of the first error within an LI, depends on the
// per-cycle error probability; the source design gives it in closed form but calls the
// exact value intractable at run time, so here it is an input, ex_frac = E(X)/LI as a
// 16-bit fraction, set by software. LI is kept between LI_MIN and LI_MAX (own bounds).
//
// Interface: the controller times the intervals itself and pulses cc_req at the end of
// each LI and ic_req at every SI inside it ('hold' freezes the counters while a checkpoint
// is being made). cc_done/ic_done report a finished checkpoint with its cost in cycles;
// 'error' reports a detected error. The decision is taken in the two cycles after a
// cc_done: 'decided' pulses with 'choice' (0 keep, 1 double, 2 halve) and the new 'li'.
module soe_controller #(
  parameter int unsigned SI      = 5000,
  parameter int unsigned LI_INIT = 100000,
  parameter int unsigned LI_MIN  = 5000,
  parameter int unsigned LI_MAX  = 1280000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        hold,
  input  logic        error,
  input  logic        cc_done,
  input  logic [31:0] cc_cost,
  input  logic        ic_done,
  input  logic [31:0] ic_cost,
  input  logic [15:0] ex_frac,
  output logic        cc_req,
  output logic        ic_req,
  output logic [31:0] li,
  output logic        decided,
  output logic [1:0]  choice
);

  typedef logic [63:0] u64_t;

  // ---------------- interval timing ----------------
  logic [31:0] li_cnt, si_cnt;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      li_cnt <= '0;
      si_cnt <= '0;
      cc_req <= 1'b0;
      ic_req <= 1'b0;
    end else begin
      cc_req <= 1'b0;
      ic_req <= 1'b0;
      if (error) begin
        li_cnt <= '0;
        si_cnt <= '0;
      end else if (!hold) begin
        if (li_cnt + 1 >= li) begin
          cc_req <= 1'b1;
          li_cnt <= '0;
          si_cnt <= '0;
        end else begin
          li_cnt <= li_cnt + 1;
          if (si_cnt + 1 >= SI) begin
            ic_req <= 1'b1;
            si_cnt <= '0;
          end else begin
            si_cnt <= si_cnt + 1;
          end
        end
      end
    end
  end

  // ---------------- history between errors ----------------
  // running sums since the last error, and the sums of the last complete error interval
  u64_t run_cc, run_ic, run_li;
  logic [31:0] run_n;
  u64_t win_cc, win_ic, win_li;
  logic [31:0] win_n;
  logic        have_win;

  // ---------------- estimate (two stages) ----------------
  u64_t s_cc, s_ic, ave_li;
  logic [31:0] n, f_n, f_2n, f_hn;
  logic        s1;
  u64_t inv_k, inv_d, inv_h, o_keep, o_dbl, o_hlv;

  always_comb begin
    // window: the last complete error interval, or the history so far
    s_cc   = have_win ? win_cc : run_cc;
    s_ic   = have_win ? win_ic : run_ic;
    ave_li = have_win ? (win_li / u64_t'(win_n)) : (run_li / ((run_n == 0) ? u64_t'(1) : u64_t'(run_n)));
    // stage-2 estimates from the registered floor terms
    inv_k  = (u64_t'(f_n) + 1) * ave_li / u64_t'(n);
    inv_d  = (u64_t'(f_2n) + 1) * 2 * ave_li / (2 * u64_t'(n));
    // (n/2) and ave_LI/2 cancel: Inv_Exe_H = (floor(f*n/2)+1) * ave_LI / n
    inv_h  = (u64_t'(f_hn) + 1) * ave_li / u64_t'(n);
    o_keep = inv_k + s_cc + s_ic;
    o_dbl  = inv_d + s_cc / 2 + s_ic;
    o_hlv  = inv_h + s_cc * 2 + s_ic;
  end

  logic [31:0] n_now;
  logic [16:0] f_q;                       // 1 - E(X)/LI, Q16
  assign n_now = (li / SI == 0) ? 32'd1 : li / SI;
  assign f_q   = 17'h10000 - 17'(ex_frac);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      li       <= LI_INIT;
      run_cc   <= '0;
      run_ic   <= '0;
      run_li   <= '0;
      run_n    <= '0;
      win_cc   <= '0;
      win_ic   <= '0;
      win_li   <= '0;
      win_n    <= '0;
      have_win <= 1'b0;
      s1       <= 1'b0;
      n        <= 32'd1;
      f_n      <= '0;
      f_2n     <= '0;
      f_hn     <= '0;
      decided  <= 1'b0;
      choice   <= 2'd0;
    end else begin
      decided <= 1'b0;
      s1      <= 1'b0;
      if (ic_done) run_ic <= run_ic + u64_t'(ic_cost);
      if (error) begin
        win_cc   <= run_cc;
        win_ic   <= run_ic + (ic_done ? u64_t'(ic_cost) : '0);
        win_li   <= run_li;
        win_n    <= run_n;
        have_win <= (run_n != 0);
        run_cc   <= '0;
        run_ic   <= '0;
        run_li   <= '0;
        run_n    <= '0;
      end else if (cc_done) begin
        run_cc <= run_cc + u64_t'(cc_cost);
        run_li <= run_li + u64_t'(li);
        run_n  <= run_n + 1;
        // stage 1: the floor terms of the three invalid-execution estimates
        s1   <= 1'b1;
        n    <= n_now;
        f_n  <= 32'((u64_t'(f_q) * u64_t'(n_now)) >> 16);
        f_2n <= 32'((u64_t'(f_q) * u64_t'(n_now) * 2) >> 16);
        f_hn <= 32'((u64_t'(f_q) * u64_t'(n_now)) >> 17);
      end
      // stage 2: pick the cheapest; ties keep LI, then prefer doubling
      if (s1) begin
        decided <= 1'b1;
        if (o_keep <= o_dbl && o_keep <= o_hlv) begin
          choice <= 2'd0;
        end else if (o_dbl <= o_hlv) begin
          choice <= 2'd1;
          li     <= (li * 2 > LI_MAX) ? LI_MAX : li * 2;
        end else begin
          choice <= 2'd2;
          li     <= (li / 2 < LI_MIN) ? LI_MIN : li / 2;
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) li >= LI_MIN && li <= LI_MAX);

endmodule
