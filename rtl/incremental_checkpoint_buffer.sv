// incremental_checkpoint_buffer: the ICB, a streaming buffer for incremental checkpoints
// (ICs) between the core and the reserved Incremental Checkpoint Segment (ICS) of memory.
//
// During normal execution the IC records are written into it and drained to the ICS.
// During rollback the ICs are streamed back from the ICS, oldest first. While the entries of
// IC i are read out to restore the machine state, IC i+1 is streamed in and verified. For
// that the buffer is split into two halves, each a FIFO of BYTES bytes, with separate read and
// write ports. The writer fills one half until it writes the last word of an IC, then
// switches to the other half. The reader empties one half until it reads the last word of an
// IC, then switches too. Because ICs alternate between the halves and each half keeps its
// order, words leave in the order they came in. An IC larger than one half just streams
// through that half. The split into two 1 KB FIFOs with separate ports follows the source
// design. The word width, the per-word 'last' flag, the ready/valid handshake and
// first-word fall-through reads are this design's choices. The storage is a plain array.
//
// Interface: wr_valid/wr_ready/wr_data/wr_last is the write port, and
// rd_valid/rd_ready/rd_data/rd_last the read port. A transfer happens when both valid and
// ready are high at a rising edge. 'flush' empties both halves, for example when a committed
// CC invalidates the ICs. wr_half/rd_half tell which half each port is using, and level the
// fill of each half.
// Timing: a word written at one edge can be read from the next cycle on.
module incremental_checkpoint_buffer #(
  parameter int unsigned W     = 32,
  parameter int unsigned BYTES = 1024,
  localparam int unsigned DEPTH = BYTES * 8 / W,
  localparam int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          flush,
  input  logic          wr_valid,
  output logic          wr_ready,
  input  logic [W-1:0]  wr_data,
  input  logic          wr_last,
  output logic          rd_valid,
  input  logic          rd_ready,
  output logic [W-1:0]  rd_data,
  output logic          rd_last,
  output logic          wr_half,
  output logic          rd_half,
  output logic [AW:0]   level [2]
);

  logic [W:0]  mem [2][DEPTH];            // {last, data}
  logic [AW-1:0] wp [2], rp [2];
  logic [AW:0]   cnt [2];
  logic          push, pop;

  assign wr_ready = (cnt[wr_half] != (AW+1)'(DEPTH));
  assign rd_valid = (cnt[rd_half] != '0);
  assign {rd_last, rd_data} = mem[rd_half][rp[rd_half]];
  assign push = wr_valid && wr_ready && !flush;
  assign pop  = rd_valid && rd_ready && !flush;
  assign level = cnt;

  always_ff @(posedge clk) begin
    if (push) mem[wr_half][wp[wr_half]] <= {wr_last, wr_data};
  end

  always_ff @(posedge clk) begin
    if (!rst_n || flush) begin
      wr_half <= 1'b0;
      rd_half <= 1'b0;
      for (int h = 0; h < 2; h++) begin
        wp[h]  <= '0;
        rp[h]  <= '0;
        cnt[h] <= '0;
      end
    end else begin
      for (int h = 0; h < 2; h++) begin
        logic ph, qh;
        ph = push && (wr_half == 1'(h));
        qh = pop  && (rd_half == 1'(h));
        if (ph) wp[h] <= (wp[h] == AW'(DEPTH - 1)) ? '0 : wp[h] + 1'b1;
        if (qh) rp[h] <= (rp[h] == AW'(DEPTH - 1)) ? '0 : rp[h] + 1'b1;
        cnt[h] <= cnt[h] + (AW+1)'(ph) - (AW+1)'(qh);
      end
      if (push && wr_last) wr_half <= ~wr_half;
      if (pop && rd_last)  rd_half <= ~rd_half;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) cnt[0] <= (AW+1)'(DEPTH) && cnt[1] <= (AW+1)'(DEPTH));

endmodule
