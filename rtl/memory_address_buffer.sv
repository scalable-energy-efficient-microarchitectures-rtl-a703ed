// memory_address_buffer: shared table of complete memory addresses for the subcores.
//
// A subcore only holds one residue of each value, so it cannot form a memory address on
// its own. When the decode stage meets a load or store it allocates an entry holding the
// complete address, with a counter of the threads that still need it (Remaining #, set to
// the number of subcores) and a valid bit, and passes the entry's address ID (A_ID) to
// every subcore inside the micro-instruction. Each subcore reads its entry in its MEM stage,
// which decrements the counter; at zero the entry is freed. Field widths follow the source
// design: A_ID 2 bits (so 4 entries), Addr 32 bits, Remaining # 3 bits. An entry is
// allocated per instruction, even when two instructions use the same address. When no
// entry is free, alloc_ok is low and decode stalls. Entries allocated under an unresolved
// predicted branch are marked speculative: 'squash_spec' frees them, 'release_spec' keeps them.
//
// Interface: alloc (with alloc_addr, alloc_spec) returns alloc_id combinationally and takes
// effect at the edge. NRD read ports: rd_en/rd_id -> rd_addr combinationally; several
// ports may read the same entry in one cycle.
module memory_address_buffer
  import rrns_pkg::*;
  import rrns_isa_pkg::*;
#(
  parameter int NRD = NR
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   alloc,
  input  logic [31:0]            alloc_addr,
  input  logic                   alloc_spec,
  output logic                   alloc_ok,
  output aid_t                   alloc_id,
  input  logic [NRD-1:0]         rd_en,
  input  aid_t [NRD-1:0]         rd_id,
  output logic [NRD-1:0][31:0]   rd_addr,
  input  logic                   release_spec,
  input  logic                   squash_spec,
  output logic [3:0]             n_valid
);

  localparam int ENTRIES = 1 << AIDW;

  typedef struct packed {
    logic [31:0] addr;
    logic [2:0]  remaining;
    logic        valid;
    logic        spec;
  } entry_t;

  entry_t tab [ENTRIES];

  always_comb begin
    alloc_ok = 1'b0;
    alloc_id = '0;
    for (int e = ENTRIES - 1; e >= 0; e--)
      if (!tab[e].valid) begin
        alloc_ok = 1'b1;
        alloc_id = aid_t'(e);
      end
    n_valid = '0;
    for (int e = 0; e < ENTRIES; e++) n_valid = n_valid + 4'(tab[e].valid);
    for (int p = 0; p < NRD; p++) rd_addr[p] = tab[rd_id[p]].addr;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) tab[e] <= '0;
    end else begin
      for (int e = 0; e < ENTRIES; e++) begin
        automatic logic [2:0] uses = '0;
        for (int p = 0; p < NRD; p++) if (rd_en[p] && int'(rd_id[p]) == e) uses = uses + 3'd1;
        if (tab[e].valid) begin
          if (squash_spec && tab[e].spec) begin
            tab[e].valid <= 1'b0;
          end else begin
            if (release_spec) tab[e].spec <= 1'b0;
            tab[e].remaining <= tab[e].remaining - uses;
            if (tab[e].remaining == uses) tab[e].valid <= 1'b0;
          end
        end
      end
      if (alloc && alloc_ok) begin
        tab[alloc_id].addr      <= alloc_addr;
        tab[alloc_id].remaining <= 3'(NRD);
        tab[alloc_id].valid     <= 1'b1;
        tab[alloc_id].spec      <= alloc_spec;
      end
    end
  end

  // a subcore only reads an entry that is still live
  for (genvar p = 0; p < NRD; p++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) rd_en[p] |-> tab[rd_id[p]].valid);
  end

endmodule
