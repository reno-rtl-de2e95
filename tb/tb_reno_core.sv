// tb_reno_core: end-to-end test of the RENO core at its default sizes.
//
// A random program is streamed into the core. Its mix is chosen to make every mechanism occur:
// moves (add-immediate 0), chains of small add-immediates that fold, large ones that overflow
// the 16-bit displacement and must execute, ALU operations on folded operands, loads and stores
// on a few base registers and offsets so that loads repeat (CSE) and follow stores (RA).
// A sequential reference model executes each instruction as the core accepts it. Checked:
//   - every store the core makes: address slot and data, in order, against the reference;
//   - after the core drains, all 32 logical registers and the whole data memory;
//   - that each mechanism happened at least once (eliminations of every kind, displacement
//     overflow, fused ALU and AGEN operations, issue, ALU-port and rename stalls);
//   - that eliminated instructions are a nonzero fraction of the program.
// Data memory is a 64-quadword model indexed by address bits [8:3], with one cycle of load
// latency, as the core's memory port expects.
module tb_reno_core;
  import reno_pkg::*;

  localparam int NINSN = 6000;
  localparam int MEMW  = 64;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready;
  dec_insn_t         in_insn;
  logic              mem_req_valid, mem_req_store;
  logic [DATA_W-1:0] mem_req_addr, mem_req_wdata, mem_rdata;
  logic              busy;
  logic [LREG_W-1:0] dbg_lreg;
  logic [DATA_W-1:0] dbg_value;
  perf_t             perf;

  reno_core dut (.*);

  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- data memory model ----------------
  logic [DATA_W-1:0] mem [MEMW];
  logic [DATA_W-1:0] rdata_q;
  assign mem_rdata = rdata_q;

  // ---------------- reference model ----------------
  logic [DATA_W-1:0] gold_reg [NUM_LREGS];
  logic [DATA_W-1:0] gold_mem [MEMW];
  logic [5:0]        st_q_idx  [$];
  logic [DATA_W-1:0] st_q_data [$];

  function automatic logic [DATA_W-1:0] sx(input logic [15:0] v);
    return {{48{v[15]}}, v};
  endfunction

  function automatic logic [DATA_W-1:0] ref_alu(input op_e op, input logic [DATA_W-1:0] a,
                                                input logic [DATA_W-1:0] b);
    logic [DATA_W-1:0] r;
    case (op)
      OP_ADD:    r = a + b;
      OP_SUB:    r = a - b;
      OP_AND:    r = a & b;
      OP_OR:     r = a | b;
      OP_XOR:    r = a ^ b;
      OP_SLL:    r = a << b[5:0];
      OP_SRL:    r = a >> b[5:0];
      OP_SRA:    r = $signed(a) >>> b[5:0];
      OP_CMPEQ:  r = (a == b) ? 64'd1 : 64'd0;
      OP_CMPLT:  r = ($signed(a) < $signed(b)) ? 64'd1 : 64'd0;
      OP_CMPULT: r = (a < b) ? 64'd1 : 64'd0;
      default:   r = '0;
    endcase
    return r;
  endfunction

  task automatic ref_exec(input dec_insn_t i);
    logic [DATA_W-1:0] a, b, addr;
    a = gold_reg[i.src1];
    b = i.use_imm ? sx(i.imm) : gold_reg[i.src2];
    case (i.op)
      OP_NOP: ;
      OP_LOAD: begin
        addr = a + sx(i.imm);
        gold_reg[i.dst] = gold_mem[addr[8:3]];
      end
      OP_STORE: begin
        addr = a + sx(i.imm);
        gold_mem[addr[8:3]] = gold_reg[i.src2];
        st_q_idx.push_back(addr[8:3]);
        st_q_data.push_back(gold_reg[i.src2]);
      end
      default: gold_reg[i.dst] = ref_alu(i.op, a, b);
    endcase
  endtask

  // ---------------- program generator ----------------
  function automatic logic [4:0] rreg();
    return 5'($urandom_range(0, 31));
  endfunction

  function automatic dec_insn_t gen();
    dec_insn_t i;
    int k;
    i = '0;
    i.op = OP_NOP;
    k = $urandom_range(0, 99);
    if (k < 8) begin                         // move
      i.op = OP_ADD; i.use_imm = 1; i.imm = '0;
      i.src1_v = 1; i.src1 = rreg(); i.dst_v = 1; i.dst = rreg();
    end else if (k < 28) begin               // small add-immediate, often on a base register
      i.op = OP_ADD; i.use_imm = 1; i.imm = 16'($signed($urandom_range(0, 64)) - 32);
      i.src1_v = 1; i.dst_v = 1;
      i.src1 = ($urandom_range(0, 1) != 0) ? 5'($urandom_range(1, 4)) : rreg();
      i.dst  = ($urandom_range(0, 2) == 0) ? 5'($urandom_range(1, 4)) : rreg();
    end else if (k < 33) begin               // large add-immediate
      i.op = OP_ADD; i.use_imm = 1;
      i.imm = ($urandom_range(0, 1) != 0) ? 16'h7000 + 16'($urandom_range(0, 4095))
                                          : 16'h9000 - 16'($urandom_range(0, 4095));
      i.src1_v = 1; i.src1 = rreg(); i.dst_v = 1; i.dst = rreg();
    end else if (k < 58) begin               // ALU operation
      i.op = op_e'($urandom_range(0, 10));
      i.use_imm = ($urandom_range(0, 2) == 0);
      i.imm = 16'($urandom());
      i.src1_v = 1; i.src1 = rreg();
      i.src2_v = !i.use_imm; i.src2 = rreg();
      i.dst_v = 1; i.dst = ($urandom_range(0, 3) == 0) ? 5'($urandom_range(1, 4)) : rreg();
      if (i.op == OP_ADD && i.use_imm) i.use_imm = 0;  // keep add-immediates to the cases above
      i.src2_v = !i.use_imm;
    end else if (k < 80) begin               // load
      i.op = OP_LOAD; i.imm = 16'(8 * $urandom_range(0, 3));
      i.src1_v = 1; i.src1 = 5'($urandom_range(1, 4));
      i.dst_v = 1; i.dst = 5'($urandom_range(5, 31));
    end else if (k < 95) begin               // store
      i.op = OP_STORE; i.imm = 16'(8 * $urandom_range(0, 3));
      i.src1_v = 1; i.src1 = 5'($urandom_range(1, 4));
      i.src2_v = 1; i.src2 = rreg();
    end
    return i;
  endfunction

  // ---------------- stimulus ----------------
  int sent = 0;
  int stores_seen = 0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (mem_req_valid) begin
        if (mem_req_store) begin
          mem[mem_req_addr[8:3]] <= mem_req_wdata;
          if (st_q_idx.size() == 0) check(0, "store with no reference store");
          else begin
            check(st_q_idx[0] == mem_req_addr[8:3] && st_q_data[0] == mem_req_wdata,
                  $sformatf("store %0d: slot %0d data %h, expected slot %0d data %h", stores_seen,
                            mem_req_addr[8:3], mem_req_wdata, st_q_idx[0], st_q_data[0]));
            void'(st_q_idx.pop_front());
            void'(st_q_data.pop_front());
          end
          stores_seen++;
        end else begin
          rdata_q <= mem[mem_req_addr[8:3]];
        end
      end
      if (in_valid && in_ready) begin
        ref_exec(in_insn);
        sent++;
      end
    end
  end

  // in_valid is dropped now and then so the rename pipeline also sees bubbles
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_valid <= 1'b0;
      in_insn  <= '0;
    end else if (!in_valid || in_ready) begin
      if (sent + (in_valid ? 1 : 0) < NINSN && $urandom_range(0, 9) != 0) begin
        in_valid <= 1'b1;
        in_insn  <= gen();
      end else begin
        in_valid <= 1'b0;
      end
    end
  end

  initial begin
    for (int i = 0; i < MEMW; i++) begin
      mem[i]      = 64'(i) * 64'h0101_0101_0101_0101;
      gold_mem[i] = mem[i];
    end
    for (int i = 0; i < NUM_LREGS; i++) gold_reg[i] = '0;
    rdata_q  = '0;
    dbg_lreg = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (sent == NINSN);
    repeat (5) @(posedge clk);
    while (busy) @(posedge clk);
    repeat (3) @(posedge clk);
    for (int r = 0; r < NUM_LREGS; r++) begin
      dbg_lreg = 5'(r);
      #1;
      check(dbg_value == gold_reg[r], $sformatf("r%0d = %h, expected %h", r, dbg_value,
                                                gold_reg[r]));
    end
    for (int m = 0; m < MEMW; m++)
      check(mem[m] == gold_mem[m], $sformatf("mem[%0d] = %h, expected %h", m, mem[m],
                                             gold_mem[m]));
    check(st_q_idx.size() == 0, "reference stores the core never made");
    check(perf.renamed == 32'(NINSN), $sformatf("renamed %0d of %0d", perf.renamed, NINSN));
    $display("events: renamed=%0d ME=%0d CF=%0d CSE=%0d RA=%0d cf_overflow=%0d alu_fused=%0d",
             perf.renamed, perf.me, perf.cf, perf.cse, perf.ra, perf.cf_overflow,
             perf.alu_fused);
    $display("        agen_fused=%0d issue_stall=%0d alu_port_stall=%0d rename_stall=%0d",
             perf.agen_fused, perf.issue_stall, perf.alu_port_stall, perf.rename_stall);
    check(perf.me > 0, "no move elimination");
    check(perf.cf > 0, "no constant folding");
    check(perf.cse > 0, "no load-load elimination");
    check(perf.ra > 0, "no store-load elimination");
    check(perf.cf_overflow > 0, "no displacement overflow");
    check(perf.alu_fused > 0, "no fused ALU operation");
    check(perf.agen_fused > 0, "no fused address generation");
    check(perf.issue_stall > 0, "no issue stall");
    check(perf.alu_port_stall > 0, "no ALU port stall");
    check(perf.rename_stall > 0, "no rename stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog after %0d instructions", sent);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
