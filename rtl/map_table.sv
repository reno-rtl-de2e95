// map_table: the RENO extended register map table, LREG := [PREG, DISP].
//
// A conventional map table gives, for each logical register, the physical register that holds
// its newest value. RENO widens each entry with a displacement: the logical register's value is
// the physical register's value plus DISP. The renamer reads the entries of an instruction's
// sources (preg.read and disp.read in RENAME1) and writes the destination's entry
// (preg.write and disp.write in RENAME2); both halves of an entry are read and written together.
//
// Interface: NUM_RD combinational read ports (rd_lreg -> rd_entry) and one synchronous write port
// (wr_en, wr_lreg, wr_entry). A read of the register being written in the same cycle returns the
// old entry; the renamer forwards RENAME2's write itself.
// Reset: logical register i maps to [physical register i, 0], the state after the machine's
// architectural registers have been given the first NUM_LREGS physical registers.
// The reset mapping and the port count are this design's choices.
module map_table
  import reno_pkg::*;
#(
  parameter int unsigned NUM_RD = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [NUM_RD-1:0][LREG_W-1:0] rd_lreg,
  output map_entry_t [NUM_RD-1:0]  rd_entry,
  input  logic                     wr_en,
  input  logic [LREG_W-1:0]        wr_lreg,
  input  map_entry_t               wr_entry
);

  map_entry_t table_q [NUM_LREGS];

  // One register per logical register with its own write decode.
  for (genvar i = 0; i < NUM_LREGS; i++) begin : g_ent
    map_entry_t q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q.preg <= PREG_W'(i);
        q.disp <= '0;
      end else if (wr_en && wr_lreg == LREG_W'(i)) begin
        q <= wr_entry;
      end
    end
    assign table_q[i] = q;
  end

  always_comb begin
    for (int r = 0; r < NUM_RD; r++) rd_entry[r] = table_q[rd_lreg[r]];
  end

endmodule
