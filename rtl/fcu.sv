// fcu: Fractional Computing Unit, computing floor(X*Y/M) for X, Y in [0, M).
//
// Read as fractions X/M and Y/M, this is their product in the same fixed-point scale: the
// operation the 2-RRNS-concat fixed-point multiply needs for its fraction-by-fraction term.
// The source design uses a fractional multiplication algorithm from the literature without
// describing it; this unit does the simplest thing that gives the same result: both operands
// are converted to binary (two conversion units in parallel), multiplied, divided by the
// constant M and converted back. An 'overflow' flag is raised when either input fails its
// consistency check (the product is then not trustworthy).
//
// Timing: start accepted when ready; done is high in cycle 2N+1 after the start edge,
// with z (residues of the unsigned result) and bad.
module fcu
  import rrns_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  rrns_t x,
  input  rrns_t y,
  output logic  ready,
  output logic  done,
  output rrns_t z,
  output logic  bad
);

  logic            rx_ready, ry_ready, rx_done, ry_done, cx, cy;
  longint unsigned xu, yu;
  longint          xs_unused, ys_unused;
  rrns_t           tx_unused, ty_unused;

  rbcu u_cx (.clk, .rst_n, .start, .x, .ready(rx_ready), .done(rx_done), .bin_u(xu),
             .bin_s(xs_unused), .consistent(cx), .from_bin('0), .to_rrns_out(tx_unused));
  rbcu u_cy (.clk, .rst_n, .start, .x(y), .ready(ry_ready), .done(ry_done), .bin_u(yu),
             .bin_s(ys_unused), .consistent(cy), .from_bin('0), .to_rrns_out(ty_unused));

  logic busy_q;
  assign ready = rx_ready && ry_ready && !busy_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      done   <= 1'b0;
      z      <= '0;
      bad    <= 1'b0;
      busy_q <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && ready) busy_q <= 1'b1;
      if (rx_done && ry_done) begin
        z      <= to_rrns_u((xu * yu) / M_RANGE);
        bad    <= !(cx && cy);
        done   <= 1'b1;
        busy_q <= 1'b0;
      end
    end
  end

endmodule
