// micro_instruction_buffer: the IBUF stage of one subcore, a circular buffer of
// micro-instructions.
//
// As in the source design, entries are tracked by two pointers, beg_ptr (oldest entry) and
// end_ptr (youngest entry), and a valid bit per slot, so nothing moves on insert or issue.
// An insert checks slot end_ptr+1: if its valid bit is clear the entry is written there and
// end_ptr advances; if it is set the subcore has no free slot and 'full' tells the decode
// stage to stall. The head entry is offered to the subcore when valid and not speculative.
// Entries written while a predicted branch is unresolved carry a spec bit: 'release' clears
// all spec bits (prediction right), 'squash' drops the spec entries, which are always the
// youngest, and moves end_ptr back (prediction wrong). DEPTH defaults to 8 (the source
// design gives 5-10; a power of two keeps the pointers simple).
//
// Timing: push and pop take effect at the clock edge; full is registered state.
module micro_instruction_buffer
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
#(
  parameter int DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  uop_t  push_uop,
  output logic  full,
  output logic  head_valid,     // head entry valid and not speculative
  output uop_t  head_uop,
  input  logic  pop,
  input  logic  release_spec,
  input  logic  squash_spec,
  output logic  empty
);

  localparam int PW = $clog2(DEPTH);
  typedef logic [PW-1:0] ptr_t;

  uop_t             mem [DEPTH];
  logic [DEPTH-1:0] valid;
  ptr_t             beg_ptr, end_ptr;

  assign full       = valid[end_ptr + ptr_t'(1)];
  assign empty      = !valid[beg_ptr];
  assign head_uop   = mem[beg_ptr];
  assign head_valid = valid[beg_ptr] && !mem[beg_ptr].spec;

  ptr_t n_spec;
  always_comb begin
    n_spec = '0;
    for (int i = 0; i < DEPTH; i++) if (valid[i] && mem[i].spec) n_spec = n_spec + ptr_t'(1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid   <= '0;
      beg_ptr <= '0;
      end_ptr <= ptr_t'(DEPTH - 1);
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (pop && head_valid) begin
        valid[beg_ptr] <= 1'b0;
        beg_ptr        <= beg_ptr + ptr_t'(1);
      end
      if (squash_spec) begin
        for (int i = 0; i < DEPTH; i++) if (mem[i].spec) valid[i] <= 1'b0;
        end_ptr <= end_ptr - n_spec;
      end else begin
        if (release_spec)
          for (int i = 0; i < DEPTH; i++) mem[i].spec <= 1'b0;
        if (push && !full) begin
          mem[end_ptr + ptr_t'(1)]   <= push_uop;
          valid[end_ptr + ptr_t'(1)] <= 1'b1;
          end_ptr                    <= end_ptr + ptr_t'(1);
        end
      end
    end
  end

  // a speculative head is never popped, so a squash never races with a pop of the same slot
  assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_valid);

endmodule
