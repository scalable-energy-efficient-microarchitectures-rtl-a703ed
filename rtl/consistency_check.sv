// consistency_check: base extension by mixed-radix conversion, giving the delta of every
// redundant residue.
//
// The non-redundant residues fix a unique X' in [0, M). The check regenerates the redundant
// residues of X' and compares them with the stored ones: delta_k = |x_k - X'|_{m_k}. All
// deltas zero means the value is consistent. The regeneration is a mixed-radix conversion
// run across all N+R channels at once: at step j the digit a_j = t_j is taken, subtracted
// from every later channel, and the later channels are scaled by |m_j^-1|. After the last
// subtraction a redundant channel holds |(x_k - X') / (m_1...m_{N-1})|, so the last step
// multiplies by |m_1...m_{N-1}|_{m_k} instead of an inverse and leaves exactly the delta.
// Each step takes a subtract cycle and a multiply cycle, so the check takes 2N cycles:
// 8 for the (4,2) configuration, the detection latency of the source design. The digits
// digit a_j is first reduced modulo m_k before it is subtracted from channel k. The digits
// a_j are also output: X' = a_0 + a_1 m_1 + a_2 m_1 m_2 + ... (used by the binary converter).
//
// Interface: start/x accepted when ready at the end of cycle 0; done is high for one cycle,
// cycle 2N, with delta, digit and the original residues x_q (the last scaling is
// combinational so the deltas appear in that cycle). Reset is active low and synchronous.
module consistency_check
  import rrns_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  rrns_t                x,
  output logic                 ready,
  output logic                 done,
  output residue_t [R-1:0]     delta,
  output residue_t [N-1:0]     digit,
  output rrns_t                x_q
);

  localparam int STEPS = 2 * N;

  // scale constant applied to channel k after step j
  function automatic int unsigned scale_const(int j, int k);
    if (j < N - 1) return modinv(MODS[j] % MODS[k], MODS[k]);
    return 32'(radix_weight(N - 1) % 64'(MODS[k]));
  endfunction

  rrns_t                 t;
  logic [3:0]            step;     // 0 = idle; 1..STEPS busy
  logic                  busy;

  assign busy  = (step != '0);
  assign ready = !busy;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      step  <= '0;
      t     <= '0;
      digit <= '0;
      x_q   <= '0;
    end else begin
      if (!busy) begin
        if (start) begin
          t    <= x;
          x_q  <= x;
          step <= 4'd1;
        end
      end else begin
        // j = (step-1)/2; odd step = subtract, even step = scale
        for (int j = 0; j < N; j++) begin
          if (int'(step) == 2 * j + 1) begin
            digit[j] <= t[j];
            for (int k = j + 1; k < NR; k++) begin
              t[k] <= residue_t'((32'(t[k]) + MODS[k] - (32'(t[j]) % MODS[k])) % MODS[k]);
            end
          end else if (int'(step) == 2 * j + 2 && j < N - 1) begin
            for (int k = j + 1; k < NR; k++)
              t[k] <= residue_t'((32'(t[k]) * scale_const(j, k)) % MODS[k]);
          end
        end
        if (int'(step) == STEPS) begin
          step <= '0;
        end else begin
          step <= step + 4'd1;
        end
      end
    end
  end

  // the last scale is combinational, so the result is presented in the 2N-th cycle
  assign done = (int'(step) == STEPS);
  for (genvar k = 0; k < R; k++) begin : g_delta
    assign delta[k] = residue_t'((32'(t[N + k]) * scale_const(N - 1, N + k)) % MODS[N + k]);
  end

endmodule
