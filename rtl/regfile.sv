// regfile: physical register file with write-to-read bypass.
//
// Holds the value of every physical register. Reads are combinational; a read of a register
// that a write port is writing in the same cycle returns the data being written, so a consumer
// can read a result in the cycle it is produced. Writes take effect at the clock edge; with
// several write ports the highest-numbered port wins if two write the same register (the core
// never does that). RENO needs nothing more of it: the displacement of a folded operand travels
// beside the register number and is added in the functional unit, not here.
// Reset clears every register, giving the architectural registers the value 0.
// Port counts are parameters; the register file and its bypass are named in the document, the
// rest is this design's choice.
module regfile
  import reno_pkg::*;
#(
  parameter int unsigned NREGS = NUM_PREGS,
  parameter int unsigned WIDTH = DATA_W,
  parameter int unsigned NRD   = 3,
  parameter int unsigned NWR   = 2
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NRD-1:0][$clog2(NREGS)-1:0]  rd_addr,
  output logic [NRD-1:0][WIDTH-1:0]          rd_data,
  input  logic [NWR-1:0]                     wr_en,
  input  logic [NWR-1:0][$clog2(NREGS)-1:0]  wr_addr,
  input  logic [NWR-1:0][WIDTH-1:0]          wr_data
);

  logic [WIDTH-1:0] regs_q [NREGS];

  // One flip-flop row per register, each with its own write decode.
  for (genvar i = 0; i < NREGS; i++) begin : g_reg
    logic [WIDTH-1:0] q;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q <= '0;
      end else begin
        for (int w = 0; w < NWR; w++)
          if (wr_en[w] && wr_addr[w] == ($clog2(NREGS))'(i)) q <= wr_data[w];
      end
    end
    assign regs_q[i] = q;
  end

  always_comb begin
    for (int r = 0; r < NRD; r++) begin
      rd_data[r] = regs_q[rd_addr[r]];
      for (int w = 0; w < NWR; w++)
        if (wr_en[w] && wr_addr[w] == rd_addr[r]) rd_data[r] = wr_data[w];
    end
  end

endmodule
