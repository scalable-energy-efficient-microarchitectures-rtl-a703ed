// error_handling_unit: RRNS check of one value: detection, optional single-error
// correction, and overflow/underflow (comparison) classification.
//
// The consistency check (2N cycles) yields the redundant deltas. Then:
//   * all zero                       -> CHK_OK
//   * deltas = |M|_{m_k} for every k -> CHK_OVERFLOW  (the value left the range upwards)
//   * deltas = |-M|_{m_k}            -> CHK_UNDERFLOW (left it downwards; after a
//                                        comparison subtraction X - Y this means X < Y)
//   * otherwise, correct_en = 0      -> CHK_ERROR (detection only: restart is needed)
//   * otherwise, correct_en = 1      -> the error correction unit runs for 2 more cycles and
//                                       gives CHK_CORRECTED with the repaired value, or
//                                       CHK_ERROR when no single-residue error fits.
// So a check takes 8 cycles when nothing needs correcting and 10 when it does, the
// latencies of the source design. Deltas are taken as stored minus regenerated residue,
// the convention of the source design's correction table; with it an overflow gives the
// pattern |M| and an underflow |-M|. Neither pattern is an entry of the correction table,
// which is what lets one check tell errors and overflows apart. With correct_en = 1 the
// unit works as 1EC(r-2)ED, with correct_en = 0 as 0ECrED.
//
// Interface: start/x/correct_en accepted when ready; done pulses with status and value
// (the corrected value when status is CHK_CORRECTED, else the input). done is
// combinational: it is high in the 8th (or 10th) cycle after the start edge.
module error_handling_unit
  import rrns_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  rrns_t        x,
  input  logic         correct_en,
  output logic         ready,
  output logic         done,
  output chk_status_e  status,
  output rrns_t        value,
  output residue_t [N-1:0] digit
);

  function automatic residue_t [R-1:0] range_pattern(bit neg);
    residue_t [R-1:0] p;
    for (int k = 0; k < R; k++)
      p[k] = residue_t'(smod(neg ? -longint'(M_RANGE) : longint'(M_RANGE), MODS[N + k]));
    return p;
  endfunction

  localparam residue_t [R-1:0] OVF_PAT = range_pattern(1'b0);
  localparam residue_t [R-1:0] UNF_PAT = range_pattern(1'b1);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_CORRECT} state_e;
  state_e state;

  logic             cc_ready, cc_done;
  residue_t [R-1:0] cc_delta;
  rrns_t            cc_x;
  logic             ec_valid, ec_corr, ec_unc;
  rrns_t            ec_fixed;
  logic             corr_q;

  consistency_check u_cc (
    .clk, .rst_n,
    .start (start && state == S_IDLE),
    .x,
    .ready (cc_ready),
    .done  (cc_done),
    .delta (cc_delta),
    .digit,
    .x_q   (cc_x)
  );

  logic ec_start;
  assign ec_start = cc_done && corr_q && (cc_delta != '0) &&
                    (cc_delta != OVF_PAT) && (cc_delta != UNF_PAT);

  error_correction_unit u_ec (
    .clk, .rst_n,
    .in_valid      (ec_start),
    .x             (cc_x),
    .delta         (cc_delta),
    .out_valid     (ec_valid),
    .fixed         (ec_fixed),
    .corrected     (ec_corr),
    .uncorrectable (ec_unc)
  );

  assign ready = (state == S_IDLE) && cc_ready;

  // the result is presented combinationally in the cycle the check or correction ends
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      corr_q <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start && cc_ready) begin
          corr_q <= correct_en;
          state  <= S_CHECK;
        end
        S_CHECK:   if (cc_done) state <= ec_start ? S_CORRECT : S_IDLE;
        S_CORRECT: if (ec_valid) state <= S_IDLE;
        default:   state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    done   = 1'b0;
    status = CHK_OK;
    value  = cc_x;
    if (state == S_CHECK && cc_done && !ec_start) begin
      done = 1'b1;
      if (cc_delta == '0)           status = CHK_OK;
      else if (cc_delta == OVF_PAT) status = CHK_OVERFLOW;
      else if (cc_delta == UNF_PAT) status = CHK_UNDERFLOW;
      else                          status = CHK_ERROR;
    end else if (state == S_CORRECT && ec_valid) begin
      done   = 1'b1;
      value  = ec_fixed;
      status = (ec_corr && !ec_unc) ? CHK_CORRECTED : CHK_ERROR;
    end
  end

endmodule
