// reuse_table: the RENO_CSE/RA memoization table for loads.
//
// Common subexpression elimination and register allocation by physical register sharing need
// to know that a load's value already sits in some physical register. This table remembers, for
// a load address expressed as rename-time names, [base physical register, offset], where the
// value lives as a map entry [preg, disp]:
//   - a load that misses records [base, offset] -> [its own destination register, 0];
//   - a store records [base, offset] -> [its data register, its data displacement], so a later
//     load from the same stack slot is short-circuited to the stored register (store-load pair);
//   - a load that hits is eliminated and its destination is mapped to the recorded entry.
// Because constant folding leaves addresses as [preg, disp], the offset of a key is the base's
// displacement plus the load's literal, so address arithmetic folded away still matches.
//
// Organisation: ENTRIES direct-mapped entries, index = offset[IDX_W+2:3] xor base (quadword
// slots); each entry holds the full key as a tag. Lookup is combinational; insert is written at
// the clock edge. Two invalidations keep hits correct without re-executing loads:
//   - freeing a physical register (inv_en) clears every entry that names it as base or value,
//     since the register will be reused for another value;
//   - a store clears every other entry, since the store may alias any of them.
// The entry count follows the evaluated configuration; the indexing, the tag, and both
// invalidation rules are this design's choices (the evaluated design verifies loads instead).
module reuse_table
  import reno_pkg::*;
#(
  parameter int unsigned ENTRIES = REUSE_ENTRIES
) (
  input  logic               clk,
  input  logic               rst_n,
  // lookup (RENAME1)
  input  logic [PREG_W-1:0]  lk_base,
  input  logic [OFS_W-1:0]   lk_ofs,
  output logic               lk_hit,
  output map_entry_t         lk_value,
  output logic               lk_from_store,
  // insert
  input  logic               ins_en,
  input  logic               ins_store,
  input  logic [PREG_W-1:0]  ins_base,
  input  logic [OFS_W-1:0]   ins_ofs,
  input  map_entry_t         ins_value,
  // invalidate a freed physical register
  input  logic               inv_en,
  input  logic [PREG_W-1:0]  inv_preg
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);

  typedef struct packed {
    logic               valid;
    logic               from_store;
    logic [PREG_W-1:0]  base;
    logic [OFS_W-1:0]   ofs;
    map_entry_t         value;
  } entry_t;

  entry_t tab_q [ENTRIES];

  function automatic logic [IDX_W-1:0] index_of(input logic [PREG_W-1:0] base,
                                                 input logic [OFS_W-1:0]  ofs);
    logic [OFS_W+IDX_W-1:0] wide;
    wide = (OFS_W+IDX_W)'(ofs);
    return wide[IDX_W+2:3] ^ IDX_W'(base);
  endfunction

  logic [IDX_W-1:0] lk_idx, ins_idx;
  assign lk_idx  = index_of(lk_base, lk_ofs);
  assign ins_idx = index_of(ins_base, ins_ofs);

  always_comb begin
    entry_t e;
    e             = tab_q[lk_idx];
    lk_hit        = e.valid && e.base == lk_base && e.ofs == lk_ofs;
    lk_value      = e.value;
    lk_from_store = e.from_store;
  end

  wire ins_ok = ins_en && !(inv_en && (ins_base == inv_preg || ins_value.preg == inv_preg));

  entry_t ins_entry;
  assign ins_entry = '{valid: 1'b1, from_store: ins_store, base: ins_base, ofs: ins_ofs,
                       value: ins_value};

  // One register per entry with its own update decode.
  for (genvar i = 0; i < ENTRIES; i++) begin : g_ent
    entry_t q;
    wire hit_inv = inv_en && (q.base == inv_preg || q.value.preg == inv_preg);
    wire here    = ins_en && ins_idx == IDX_W'(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q <= '0;
      end else if (here) begin
        if (ins_ok) q <= ins_entry;
        else        q.valid <= 1'b0;
      end else if (hit_inv || (ins_en && ins_store)) begin
        q.valid <= 1'b0;
      end
    end
    assign tab_q[i] = q;
  end

endmodule
