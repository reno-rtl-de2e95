// reno_core: a scalar core built around the RENO renamer.
//
// Decoded instructions enter the two-stage RENO renamer, which removes moves (ME), folds
// register-immediate additions into the map table (CF) and removes loads whose value is already
// in a register (CSE for load-load, RA for store-load pairs). Renamed instructions are issued in
// program order from DISPATCH:
//   - an eliminated instruction issues without waiting for its sources and uses no unit;
//   - ALU operations go to the fused addi-X ALU (1 extra cycle when a displacement is fused);
//   - loads and stores go to the carry-save AGEN (no extra cycle) and then to data memory.
// An instruction issues when its physical sources are ready (scoreboard, with bypass from the
// register-file write ports) and its unit can take it. At issue it reads the register file,
// marks its new destination not ready, and releases its destination's previous mapping: with
// in-order issue every older reader has already read it.
//
// Timing: rename 2 cycles; ALU result written 1 cycle after issue (2 with a displacement);
// a load's address leaves 1 cycle after issue and its data is written the cycle after that.
// Data memory (not part of this design) is reached through mem_*: a request in cycle t (store
// written at the edge, load read at the edge) and, for a load, mem_rdata valid in cycle t+1.
// dbg_lreg/dbg_value read a logical register's value ([preg] + disp) for checking.
// perf counts the events that the evaluation measures (eliminations by kind) and the stalls.
//
// The renamer, the fused units and the register file follow the document. The evaluated core
// was 4-wide and out of order with a 128-entry ROB; that core is not described and is not
// built: the in-order issue stage, the scoreboard and the memory port are this design's
// minimal stand-in so the optimized instruction stream can be executed end to end.
module reno_core
  import reno_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // decoded instruction stream
  input  logic               in_valid,
  output logic               in_ready,
  input  dec_insn_t          in_insn,
  // data memory
  output logic               mem_req_valid,
  output logic               mem_req_store,
  output logic [DATA_W-1:0]  mem_req_addr,
  output logic [DATA_W-1:0]  mem_req_wdata,
  input  logic [DATA_W-1:0]  mem_rdata,
  // state and statistics
  output logic               busy,
  input  logic [LREG_W-1:0]  dbg_lreg,
  output logic [DATA_W-1:0]  dbg_value,
  output perf_t              perf
);

  // ---------------- rename ----------------
  logic       ren_valid, ren_ready, ren_empty;
  ren_insn_t  ren;
  logic       rel_en;
  logic [PREG_W-1:0] rel_preg;
  map_entry_t dbg_entry;
  logic [$clog2(NUM_PREGS+1)-1:0] num_free;

  reno_renamer u_ren (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (in_valid),
    .in_ready     (in_ready),
    .in_insn      (in_insn),
    .out_valid    (ren_valid),
    .out_ready    (ren_ready),
    .out_insn     (ren),
    .release_en   (rel_en),
    .release_preg (rel_preg),
    .dbg_lreg     (dbg_lreg),
    .dbg_entry    (dbg_entry),
    .num_free     (num_free),
    .empty        (ren_empty)
  );

  // ---------------- register file and scoreboard ----------------
  logic [2:0][PREG_W-1:0] rf_rd_addr;
  logic [2:0][DATA_W-1:0] rf_rd_data;
  logic [1:0]             rf_wr_en;
  logic [1:0][PREG_W-1:0] rf_wr_addr;
  logic [1:0][DATA_W-1:0] rf_wr_data;

  regfile #(.NREGS(NUM_PREGS), .WIDTH(DATA_W), .NRD(3), .NWR(2)) u_rf (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_addr (rf_rd_addr),
    .rd_data (rf_rd_data),
    .wr_en   (rf_wr_en),
    .wr_addr (rf_wr_addr),
    .wr_data (rf_wr_data)
  );

  assign rf_rd_addr[0] = ren.src1.preg;
  assign rf_rd_addr[1] = ren.src2.preg;
  assign rf_rd_addr[2] = dbg_entry.preg;
  assign dbg_value     = rf_rd_data[2] + sext16(dbg_entry.disp);

  logic [NUM_PREGS-1:0] ready_q;

  function automatic logic src_ready(input logic [PREG_W-1:0] p, input logic [NUM_PREGS-1:0] rdy,
                                     input logic [1:0] wen,
                                     input logic [1:0][PREG_W-1:0] wad);
    return rdy[p] || (wen[0] && wad[0] == p) || (wen[1] && wad[1] == p);
  endfunction

  // ---------------- issue ----------------
  logic alu_ready;
  wire is_mem   = (ren.op == OP_LOAD) || (ren.op == OP_STORE);
  wire is_nop   = (ren.op == OP_NOP);
  wire srcs_rdy = (!ren.src1_v || src_ready(ren.src1.preg, ready_q, rf_wr_en, rf_wr_addr)) &&
                  (!ren.src2_v || src_ready(ren.src2.preg, ready_q, rf_wr_en, rf_wr_addr));
  wire needs_exec = !ren.eliminate && !is_nop;
  wire unit_rdy   = is_mem || alu_ready;

  wire issue      = ren_valid && (!needs_exec || (srcs_rdy && unit_rdy));
  assign ren_ready = issue;

  wire issue_alu = issue && needs_exec && !is_mem;
  wire issue_mem = issue && needs_exec && is_mem;

  assign rel_en   = issue && ren.dst_v;
  assign rel_preg = ren.old_preg;

  logic [DATA_W-1:0] op_b;
  logic [DISP_W-1:0] op_b_disp;
  always_comb begin
    if (ren.use_imm) begin
      op_b      = sext16(ren.imm);
      op_b_disp = '0;
    end else begin
      op_b      = rf_rd_data[1];
      op_b_disp = ren.src2.disp;
    end
  end

  logic              alu_out_valid, alu_out_fused;
  logic [PREG_W-1:0] alu_out_tag;
  logic [DATA_W-1:0] alu_out_value;

  fused_alu #(.TAG_W(PREG_W)) u_alu (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (issue_alu),
    .in_ready  (alu_ready),
    .in_op     (ren.op),
    .in_a      (rf_rd_data[0]),
    .in_a_disp (ren.src1.disp),
    .in_b      (op_b),
    .in_b_disp (op_b_disp),
    .in_tag    (ren.dst_preg),
    .out_valid (alu_out_valid),
    .out_tag   (alu_out_tag),
    .out_value (alu_out_value),
    .out_fused (alu_out_fused)
  );

  logic              agen_valid, agen_store;
  logic [DATA_W-1:0] agen_addr, agen_data;
  logic [PREG_W-1:0] agen_tag;

  fused_agen #(.TAG_W(PREG_W)) u_agen (
    .clk          (clk),
    .rst_n        (rst_n),
    .in_valid     (issue_mem),
    .in_store     (ren.op == OP_STORE),
    .in_base      (rf_rd_data[0]),
    .in_imm       (sext16(ren.imm)),
    .in_disp      (ren.src1.disp),
    .in_data      (rf_rd_data[1]),
    .in_data_disp (ren.src2.disp),
    .in_tag       (ren.dst_preg),
    .out_valid    (agen_valid),
    .out_store    (agen_store),
    .out_addr     (agen_addr),
    .out_data     (agen_data),
    .out_tag      (agen_tag)
  );

  assign mem_req_valid = agen_valid;
  assign mem_req_store = agen_store;
  assign mem_req_addr  = agen_addr;
  assign mem_req_wdata = agen_data;

  logic              ld_wb_q;
  logic [PREG_W-1:0] ld_tag_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ld_wb_q  <= 1'b0;
      ld_tag_q <= '0;
    end else begin
      ld_wb_q  <= agen_valid && !agen_store;
      ld_tag_q <= agen_tag;
    end
  end

  // ---------------- write back ----------------
  assign rf_wr_en[0]   = alu_out_valid;
  assign rf_wr_addr[0] = alu_out_tag;
  assign rf_wr_data[0] = alu_out_value;
  assign rf_wr_en[1]   = ld_wb_q;
  assign rf_wr_addr[1] = ld_tag_q;
  assign rf_wr_data[1] = mem_rdata;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ready_q <= '1;
    end else begin
      for (int w = 0; w < 2; w++)
        if (rf_wr_en[w]) ready_q[rf_wr_addr[w]] <= 1'b1;
      if (issue && needs_exec && ren.dst_v) ready_q[ren.dst_preg] <= 1'b0;
    end
  end

  // in flight: rename pipeline, execute, memory
  logic [3:0] inflight;
  assign inflight = {ren_valid, !alu_ready || alu_out_valid, agen_valid, ld_wb_q};
  assign busy = (inflight != '0) || !ren_empty;

  // ---------------- statistics ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else begin
      if (issue) begin
        perf.renamed <= perf.renamed + 1'b1;
        unique case (ren.opt)
          OPT_ME:  perf.me  <= perf.me  + 1'b1;
          OPT_CF:  perf.cf  <= perf.cf  + 1'b1;
          OPT_CSE: perf.cse <= perf.cse + 1'b1;
          OPT_RA:  perf.ra  <= perf.ra  + 1'b1;
          default: ;
        endcase
        if (ren.op == OP_ADD && ren.use_imm && ren.dst_v && !ren.eliminate)
          perf.cf_overflow <= perf.cf_overflow + 1'b1;
      end
      if (issue_mem && ren.src1.disp != '0) perf.agen_fused <= perf.agen_fused + 1'b1;
      if (alu_out_valid && alu_out_fused)   perf.alu_fused  <= perf.alu_fused + 1'b1;
      if (ren_valid && !issue)              perf.issue_stall <= perf.issue_stall + 1'b1;
      if (ren_valid && !issue && needs_exec && srcs_rdy && !unit_rdy)
        perf.alu_port_stall <= perf.alu_port_stall + 1'b1;
      if (in_valid && !in_ready)            perf.rename_stall <= perf.rename_stall + 1'b1;
      if (num_free == '0)                   perf.freelist_empty <= perf.freelist_empty + 1'b1;
    end
  end

endmodule
