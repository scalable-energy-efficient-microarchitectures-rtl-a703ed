// checkpoint_buffer: the Complete Checkpoints Buffer (CCB) with its overflow buffer (CCB-O).
//
// While a long interval (LI) runs, main memory still holds the state of the last complete
// checkpoint (CC). Dirty lines the data cache evicts during the LI are kept here, as
// (line address, data) pairs, instead of being written to memory. The CCB is
// set-associative, WAYS ways of CCB_BYTES in all. A line whose CCB set is full goes to the
// smaller CCB-O, and if that set is full as well the 'ovf' output pulses: the LI has to end
// early and move on to verification. An eviction of a line already held for this LI
// overwrites it. Like a store buffer, the unit answers lookups from the cache on a miss,
// giving the newest copy.
// At commit, every held line becomes 'committed' and is offered, one per cycle, on the
// drain port for write-back to memory while execution goes on. New evictions are stored
// next to committed copies and never overwrite them. Such a committed copy is marked
// superseded, and is dropped at the next commit if it has not been drained by then. On
// rollback the lines of the failed LI are dropped. Committed lines stay until drained. The buffer also keeps the register file
// and PC copied at CC creation, for rollback.
// The sizes (8-way 32 KB CCB, 8-way 1 KB CCB-O), the address/value records, the overflow
// rule, lookups on a miss and draining behind execution follow the source design. The
// 64-byte line, the placement (lowest free way, no replacement), the committed/uncommitted
// split and the port protocol are this design's choices.
//
// Interface: ev_valid/ev_addr/ev_data present an eviction, accepted at the next edge, with
// ovf pulsing the cycle after it if the line could not be stored. lk_addr -> lk_hit/lk_data
// is combinational. commit and rollback are one-cycle pulses, not given in the same cycle
// as an eviction. dr_valid/dr_addr/dr_data/dr_ready is the drain handshake. save captures
// save_pc/save_rf into ck_pc/ck_rf. Addresses are line addresses.
module checkpoint_buffer #(
  parameter int unsigned LINE_BYTES = 64,
  parameter int unsigned CCB_BYTES  = 32768,
  parameter int unsigned CCBO_BYTES = 1024,
  parameter int unsigned WAYS       = 8,
  parameter int unsigned LAW        = 26,        // line-address width
  parameter int unsigned RFW        = 32 * 32,   // flattened register file copy
  localparam int unsigned D     = LINE_BYTES * 8,
  localparam int unsigned SETS  = CCB_BYTES / LINE_BYTES / WAYS,
  localparam int unsigned OSETS = CCBO_BYTES / LINE_BYTES / WAYS,
  localparam int unsigned NC    = SETS * WAYS,
  localparam int unsigned NE    = (SETS + OSETS) * WAYS,
  localparam int unsigned IW    = $clog2(NE)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            ev_valid,
  input  logic [LAW-1:0]  ev_addr,
  input  logic [D-1:0]    ev_data,
  output logic            ovf,
  input  logic [LAW-1:0]  lk_addr,
  output logic            lk_hit,
  output logic [D-1:0]    lk_data,
  input  logic            commit,
  input  logic            rollback,
  output logic            dr_valid,
  output logic [LAW-1:0]  dr_addr,
  output logic [D-1:0]    dr_data,
  input  logic            dr_ready,
  input  logic            save,
  input  logic [31:0]     save_pc,
  input  logic [RFW-1:0]  save_rf,
  output logic [31:0]     ck_pc,
  output logic [RFW-1:0]  ck_rf
);

  // entries 0..NC-1 are the CCB (set s at s*WAYS..), NC..NE-1 the CCB-O
  logic [LAW-1:0] tag  [NE];
  logic [D-1:0]   data [NE];
  logic [NE-1:0]  val, com, sup;
  typedef logic [IW-1:0] idx_t;

  function automatic int unsigned c_base(input logic [LAW-1:0] a);
    return (int'(a) % SETS) * WAYS;
  endfunction
  function automatic int unsigned o_base(input logic [LAW-1:0] a);
    return NC + (int'(a) % OSETS) * WAYS;
  endfunction

  // ---------------- placement of an eviction ----------------
  logic        ins_ok, old_hit;
  idx_t        ins_idx, old_idx;
  always_comb begin
    int unsigned cb, ob;
    logic found_hit, found_free;
    cb = c_base(ev_addr);
    ob = o_base(ev_addr);
    found_hit  = 1'b0;
    found_free = 1'b0;
    ins_idx    = '0;
    // a committed copy of this line, still waiting to be drained
    old_hit = 1'b0;
    old_idx = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (val[cb+w] && com[cb+w] && tag[cb+w] == ev_addr) begin
        old_hit = 1'b1;
        old_idx = idx_t'(cb + w);
      end
      if (val[ob+w] && com[ob+w] && tag[ob+w] == ev_addr) begin
        old_hit = 1'b1;
        old_idx = idx_t'(ob + w);
      end
    end
    // an uncommitted copy of this line: overwrite it
    for (int w = 0; w < WAYS; w++) begin
      if (!found_hit && val[cb+w] && !com[cb+w] && tag[cb+w] == ev_addr) begin
        found_hit = 1'b1;
        ins_idx   = idx_t'(cb + w);
      end
      if (!found_hit && val[ob+w] && !com[ob+w] && tag[ob+w] == ev_addr) begin
        found_hit = 1'b1;
        ins_idx   = idx_t'(ob + w);
      end
    end
    // otherwise the lowest free way of the CCB set, then of the CCB-O set
    for (int w = 0; w < WAYS; w++) begin
      if (!found_hit && !found_free && !val[cb+w]) begin
        found_free = 1'b1;
        ins_idx    = idx_t'(cb + w);
      end
    end
    for (int w = 0; w < WAYS; w++) begin
      if (!found_hit && !found_free && !val[ob+w]) begin
        found_free = 1'b1;
        ins_idx    = idx_t'(ob + w);
      end
    end
    ins_ok = found_hit || found_free;
  end

  // ---------------- lookup: the uncommitted copy is newer than a committed one ----------------
  // tags are matched first, then the data array is read once
  idx_t lk_idx;
  always_comb begin
    int unsigned cb, ob;
    idx_t iu, ic;
    logic hu, hc;
    cb = c_base(lk_addr);
    ob = o_base(lk_addr);
    hu = 1'b0;
    hc = 1'b0;
    iu = '0;
    ic = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (val[cb+w] && tag[cb+w] == lk_addr) begin
        if (com[cb+w]) begin hc = 1'b1; ic = idx_t'(cb + w); end
        else           begin hu = 1'b1; iu = idx_t'(cb + w); end
      end
      if (val[ob+w] && tag[ob+w] == lk_addr) begin
        if (com[ob+w]) begin hc = 1'b1; ic = idx_t'(ob + w); end
        else           begin hu = 1'b1; iu = idx_t'(ob + w); end
      end
    end
    lk_hit = hu || hc;
    lk_idx = hu ? iu : ic;
  end
  assign lk_data = data[lk_idx];

  // ---------------- drain: the lowest committed entry ----------------
  idx_t dr_idx;
  always_comb begin
    dr_valid = 1'b0;
    dr_idx   = '0;
    for (int i = NE - 1; i >= 0; i--) begin
      if (val[i] && com[i]) begin
        dr_valid = 1'b1;
        dr_idx   = idx_t'(i);
      end
    end
  end
  assign dr_addr = tag[dr_idx];
  assign dr_data = data[dr_idx];

  always_ff @(posedge clk) begin
    if (ev_valid && ins_ok && !commit && !rollback) begin
      tag[ins_idx]  <= ev_addr;
      data[ins_idx] <= ev_data;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      val <= '0;
      com <= '0;
      sup <= '0;
      ovf <= 1'b0;
    end else begin
      ovf <= ev_valid && !ins_ok && !commit && !rollback;
      if (commit) begin
        val <= val & ~(com & sup);
        com <= val & ~(com & sup);
        sup <= '0;
      end else if (rollback) begin
        val <= val & com;
        sup <= '0;
      end else if (ev_valid && ins_ok) begin
        val[ins_idx] <= 1'b1;
        com[ins_idx] <= 1'b0;
        if (old_hit) sup[old_idx] <= 1'b1;
      end
      if (dr_valid && dr_ready) begin
        val[dr_idx] <= 1'b0;
        com[dr_idx] <= 1'b0;
        sup[dr_idx] <= 1'b0;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ck_pc <= '0;
      ck_rf <= '0;
    end else if (save) begin
      ck_pc <= save_pc;
      ck_rf <= save_rf;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) ev_valid |-> !(commit || rollback));

endmodule
