// error_correction_unit: single-residue error correction from the redundant deltas.
//
// When exactly one redundant delta is non-zero, that redundant residue is wrong and is
// replaced by its regenerated value x_k - delta_k. When several deltas are non-zero, one
// non-redundant residue i is assumed wrong by an amount e; then X' = X + |e*B_i|_M - k*M
// with k in {0, 1} and B_i the CRT basis of channel i, so the deltas equal
// |k*M - |e*B_i|_M|_{m_j}. The correction table holds these cases, as in the source design
// (at most 2 * sum(m_i - 1) entries): it is split into one ROM per (i, k), each indexed by
// the first redundant delta and holding e and the deltas expected in the other redundant
// channels. A hit whose other deltas match gives the residue index and the offset -e that
// repairs it. The ROMs are computed at elaboration from the base set.
//
// Timing: two cycles, as in the source design. Cycle 1 reads the ROMs and matches; cycle 2
// applies the offset. in_valid -> out_valid two cycles later, fully pipelined.
// Outputs: fixed (corrected residues), corrected (a repair was made), uncorrectable (no
// single-residue error explains the deltas). All deltas zero passes x through unchanged.
module error_correction_unit
  import rrns_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  rrns_t             x,
  input  residue_t [R-1:0]  delta,
  output logic              out_valid,
  output rrns_t             fixed,
  output logic              corrected,
  output logic              uncorrectable
);

  localparam int unsigned D0 = MODS[N];            // size of every ROM
  localparam int EW = RW * R;                      // entry: {delta[R-1..1], e}

  typedef logic [EW-1:0]     entry_t;
  typedef entry_t [D0-1:0]   rom_t;

  function automatic longint unsigned crt_basis(int i);
    longint unsigned mi = M_RANGE / 64'(MODS[i]);
    return (mi * modinv(32'(mi % 64'(MODS[i])), MODS[i])) % M_RANGE;
  endfunction

  function automatic rom_t make_rom(int i, int k);
    rom_t t = '0;
    longint unsigned b = crt_basis(i);
    for (int unsigned e = 1; e < MODS[i]; e++) begin
      longint unsigned w = (64'(e) * b) % M_RANGE;
      entry_t en = '0;
      int unsigned d0 = smod(longint'(k) * longint'(M_RANGE) - longint'(w), MODS[N]);
      en[RW-1:0] = residue_t'(e);
      for (int j = 1; j < R; j++)
        en[j*RW +: RW] = residue_t'(smod(longint'(k) * longint'(M_RANGE) - longint'(w), MODS[N+j]));
      t[d0] = en;
    end
    return t;
  endfunction

  // ---------------- stage 1: classify and look up ----------------
  logic [R-1:0]  nz;
  logic [$clog2(R+1)-1:0] nz_cnt;
  always_comb begin
    nz_cnt = '0;
    for (int j = 0; j < R; j++) begin
      nz[j]  = (delta[j] != '0);
      nz_cnt = nz_cnt + nz[j];
    end
  end

  logic [N-1:0][1:0] hit;
  residue_t [N-1:0][1:0] hit_e;

  for (genvar i = 0; i < N; i++) begin : g_i
    for (genvar k = 0; k < 2; k++) begin : g_k
      localparam rom_t ROM = make_rom(i, k);
      entry_t en;
      logic   match;
      always_comb begin
        en    = (delta[0] < residue_t'(D0)) ? ROM[delta[0]] : '0;
        match = (en[RW-1:0] != '0);
        for (int j = 1; j < R; j++)
          if (en[j*RW +: RW] != delta[j]) match = 1'b0;
      end
      assign hit[i][k]   = match;
      assign hit_e[i][k] = en[RW-1:0];
    end
  end

  // stage-1 registers
  logic                        s1_valid, s1_red, s1_nonred, s1_zero;
  rrns_t                       s1_x;
  residue_t [R-1:0]            s1_delta;
  logic [$clog2(NR)-1:0]       s1_idx;
  residue_t                    s1_e;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_red   <= 1'b0;
      s1_nonred <= 1'b0;
      s1_zero  <= 1'b0;
      s1_x     <= '0;
      s1_delta <= '0;
      s1_idx   <= '0;
      s1_e     <= '0;
    end else begin
      s1_valid  <= in_valid;
      s1_x      <= x;
      s1_delta  <= delta;
      s1_zero   <= (nz_cnt == 0);
      s1_red    <= (nz_cnt == 1);
      s1_nonred <= 1'b0;
      s1_idx    <= '0;
      s1_e      <= '0;
      if (nz_cnt == 1) begin
        for (int j = 0; j < R; j++) if (nz[j]) s1_idx <= ($clog2(NR))'(N + j);
      end else if (nz_cnt > 1) begin
        for (int i = N - 1; i >= 0; i--)
          for (int k = 1; k >= 0; k--)
            if (hit[i][k]) begin
              s1_nonred <= 1'b1;
              s1_idx    <= ($clog2(NR))'(i);
              s1_e      <= hit_e[i][k];
            end
      end
    end
  end

  // ---------------- stage 2: apply ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      fixed         <= '0;
      corrected     <= 1'b0;
      uncorrectable <= 1'b0;
    end else begin
      out_valid     <= s1_valid;
      fixed         <= s1_x;
      corrected     <= s1_red | s1_nonred;
      uncorrectable <= !(s1_zero | s1_red | s1_nonred);
      for (int c = 0; c < NR; c++) begin
        if (s1_red && int'(s1_idx) == c)       // regenerated redundant residue
          fixed[c] <= residue_t'((32'(s1_x[c]) + MODS[c] - 32'(s1_delta[c-N >= 0 ? c-N : 0])) % MODS[c]);
        if (s1_nonred && int'(s1_idx) == c)    // remove the error e
          fixed[c] <= residue_t'((32'(s1_x[c]) + MODS[c] - 32'(s1_e)) % MODS[c]);
      end
    end
  end

endmodule
