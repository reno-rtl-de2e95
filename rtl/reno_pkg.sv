// reno_pkg: types and constants shared by the RENO rename-based optimizer.
//
// RENO extends a conventional R10K-style map table so that every logical register maps to a
// pair [physical register, displacement]: the value of the logical register is the value held
// in the physical register plus a small constant. Register-immediate additions are then folded
// into the map table at rename time instead of being executed, and moves (add of zero) and
// redundant loads are removed by pointing the destination at an existing physical register.
//
// The 16-bit displacement and the 256-entry load reuse table follow the evaluated
// configuration. The 64-bit datapath and 32 logical registers follow the Alpha ISA that the
// evaluation used. The number of physical registers (32 architectural plus 128, one per ROB
// entry of the evaluated core) and the micro-op encoding below are this design's own choices.
package reno_pkg;

  localparam int unsigned DATA_W     = 64;   // Alpha integer datapath
  localparam int unsigned NUM_LREGS  = 32;   // Alpha integer logical registers
  localparam int unsigned LREG_W     = $clog2(NUM_LREGS);
  localparam int unsigned NUM_PREGS  = 160;  // 32 architectural + 128 in flight
  localparam int unsigned PREG_W     = $clog2(NUM_PREGS);
  localparam int unsigned DISP_W     = 16;   // folded displacement width
  localparam int unsigned IMM_W      = 16;   // instruction literal width (Alpha memory format)
  localparam int unsigned OFS_W      = DISP_W + 1; // displacement + literal, used as a load key
  localparam int unsigned REUSE_ENTRIES = 256;
  localparam int unsigned REFCNT_W   = 8;    // sharers of one physical register

  // Operation of a decoded micro-op.
  typedef enum logic [3:0] {
    OP_ADD   = 4'd0,
    OP_SUB   = 4'd1,
    OP_AND   = 4'd2,
    OP_OR    = 4'd3,
    OP_XOR   = 4'd4,
    OP_SLL   = 4'd5,
    OP_SRL   = 4'd6,
    OP_SRA   = 4'd7,
    OP_CMPEQ = 4'd8,
    OP_CMPLT = 4'd9,
    OP_CMPULT= 4'd10,
    OP_LOAD  = 4'd11,
    OP_STORE = 4'd12,
    OP_NOP   = 4'd15
  } op_e;

  // A decoded instruction as it leaves DECODE.
  // ALU ops:  dst = src1 op (use_imm ? imm : src2)
  // OP_LOAD:  dst = mem[src1 + imm]
  // OP_STORE: mem[src1 + imm] = src2
  typedef struct packed {
    op_e                op;
    logic               use_imm;
    logic [IMM_W-1:0]   imm;
    logic               src1_v;
    logic [LREG_W-1:0]  src1;
    logic               src2_v;
    logic [LREG_W-1:0]  src2;
    logic               dst_v;
    logic [LREG_W-1:0]  dst;
  } dec_insn_t;

  // One map-table entry: LREG := [PREG, DISP].
  typedef struct packed {
    logic [PREG_W-1:0]  preg;
    logic [DISP_W-1:0]  disp;
  } map_entry_t;

  // Which optimization removed an instruction.
  typedef enum logic [2:0] {
    OPT_NONE = 3'd0,
    OPT_ME   = 3'd1,   // move elimination: addi _, 0 -> _
    OPT_CF   = 3'd2,   // constant folding: addi _, imm -> _
    OPT_CSE  = 3'd3,   // load whose value an earlier load already holds
    OPT_RA   = 3'd4    // load whose value an earlier store to the same slot holds
  } opt_e;

  // An instruction as it leaves RENAME2 for DISPATCH.
  typedef struct packed {
    op_e                op;
    logic               use_imm;
    logic [IMM_W-1:0]   imm;
    logic               src1_v;
    map_entry_t         src1;       // physical source and the displacement fused into it
    logic               src2_v;
    map_entry_t         src2;
    logic               dst_v;
    logic [PREG_W-1:0]  dst_preg;   // new physical register, or the shared one if eliminated
    logic [PREG_W-1:0]  old_preg;   // previous mapping of the destination, released later
    logic               eliminate;  // no execution needed
    opt_e               opt;
  } ren_insn_t;

  // Event counters of the core.
  typedef struct packed {
    logic [31:0] renamed;         // instructions through rename and issue
    logic [31:0] me;              // removed by move elimination
    logic [31:0] cf;              // removed by constant folding
    logic [31:0] cse;             // loads removed, value of an earlier load
    logic [31:0] ra;              // loads removed, value of an earlier store
    logic [31:0] cf_overflow;     // add-immediates executed: displacement would not fit
    logic [31:0] alu_fused;       // ALU results that needed the displacement pre-add
    logic [31:0] agen_fused;      // memory operations whose base carried a displacement
    logic [31:0] issue_stall;     // cycles DISPATCH held an instruction
    logic [31:0] alu_port_stall;  // of which: ALU busy finishing a displaced operation
    logic [31:0] rename_stall;    // cycles DECODE was held
    logic [31:0] freelist_empty;  // cycles with no free physical register
  } perf_t;

  // Sign-extend a displacement or literal to the datapath width.
  function automatic logic [DATA_W-1:0] sext16(input logic [15:0] v);
    return {{(DATA_W-16){v[15]}}, v};
  endfunction

endpackage
