// tb_reno_renamer: directed checks of the RENO renamer.
// Instructions are sent one at a time or back to back; each renamed output is compared with the
// mapping worked out by hand from the RENO rules:
//   - the constant-folding chain "op1 -> r1; addi r1,4 -> r2; addi r2,16 -> r3; op2 r3" gives
//     r1 := [p,0], r2 := [p,4], r3 := [p,20] and op2 reads [p,20], with both addi eliminated;
//   - a move (addi 0) shares the register and displacement; an add-immediate whose accumulated
//     displacement no longer fits 16 bits executes and gets a new register;
//   - a load after a folded address to the same slot is eliminated (CSE), a load from a slot a
//     store just wrote gets the stored register (RA), and a store clears older load entries;
//   - latency from acceptance to out_valid is 2 cycles, and a held output stays stable;
//   - with the free list empty, allocating instructions stall but eliminated ones still pass,
//     and one release lets the stalled instruction continue.
module tb_reno_renamer;
  import reno_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, out_valid, out_ready, release_en, empty;
  dec_insn_t         in_insn;
  ren_insn_t         out_insn;
  logic [PREG_W-1:0] release_preg;
  logic [LREG_W-1:0] dbg_lreg;
  map_entry_t        dbg_entry;
  logic [$clog2(NUM_PREGS+1)-1:0] num_free;

  reno_renamer dut (.*);

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic dec_insn_t alu(input int s1, input int s2, input int d);
    dec_insn_t i = '0;
    i.op = OP_SUB; i.src1_v = 1; i.src1 = 5'(s1); i.src2_v = 1; i.src2 = 5'(s2);
    i.dst_v = 1; i.dst = 5'(d);
    return i;
  endfunction
  function automatic dec_insn_t addi(input int s, input int imm, input int d);
    dec_insn_t i = '0;
    i.op = OP_ADD; i.use_imm = 1; i.imm = 16'(imm); i.src1_v = 1; i.src1 = 5'(s);
    i.dst_v = 1; i.dst = 5'(d);
    return i;
  endfunction
  function automatic dec_insn_t ld(input int b, input int imm, input int d);
    dec_insn_t i = '0;
    i.op = OP_LOAD; i.imm = 16'(imm); i.src1_v = 1; i.src1 = 5'(b); i.dst_v = 1; i.dst = 5'(d);
    return i;
  endfunction
  function automatic dec_insn_t st(input int b, input int imm, input int s);
    dec_insn_t i = '0;
    i.op = OP_STORE; i.imm = 16'(imm); i.src1_v = 1; i.src1 = 5'(b); i.src2_v = 1;
    i.src2 = 5'(s);
    return i;
  endfunction

  // Send one instruction and return its renamed form; checks the 2-cycle latency.
  task automatic send(input dec_insn_t i, output ren_insn_t o);
    longint t0;
    @(negedge clk);
    in_valid = 1; in_insn = i;
    while (!in_ready) @(negedge clk);
    t0 = cyc;
    @(negedge clk);
    in_valid = 0;
    while (!out_valid) @(negedge clk);
    check(cyc - t0 == 2, $sformatf("rename latency %0d cycles", cyc - t0));
    o = out_insn;
  endtask

  map_entry_t e;
  ren_insn_t o, o2;
  int p, pl, held;

  initial begin
    in_valid = 0; in_insn = '0; out_ready = 1; release_en = 0; release_preg = '0; dbg_lreg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;

    // constant-folding chain (op1 writes r1 to a fresh register p)
    send(alu(5, 6, 1), o);
    p = o.dst_preg;
    check(!o.eliminate && p == NUM_LREGS, "op1 gets the first free register");
    check(o.src1 == '{preg: 5, disp: 0} && o.src2 == '{preg: 6, disp: 0}, "op1 sources");
    send(addi(1, 4, 2), o);
    check(o.eliminate && o.opt == OPT_CF && o.dst_preg == p, "addi r1,4 -> r2 folded");
    check(o.old_preg == 2, "old mapping of r2");
    send(addi(2, 16, 3), o);
    check(o.eliminate && o.opt == OPT_CF && o.dst_preg == p, "addi r2,16 -> r3 folded");
    send(alu(7, 3, 8), o);
    check(o.src2 == '{preg: 8'(p), disp: 16'd20}, $sformatf("op2 reads r3 as [%0d,%0d]",
          o.src2.preg, o.src2.disp));
    check(!o.eliminate, "op2 executes");
    @(negedge clk); dbg_lreg = 3; #1;
    check(dbg_entry == '{preg: 8'(p), disp: 16'd20}, "map entry of r3 is [p,20]");

    // move elimination
    send(addi(3, 0, 9), o);
    check(o.eliminate && o.opt == OPT_ME && o.dst_preg == p, "move r3 -> r9 eliminated");
    @(negedge clk); dbg_lreg = 9; #1;
    check(dbg_entry == '{preg: 8'(p), disp: 16'd20}, "r9 := [p,20]");

    // displacement overflow: 20 + 0x7ff0 does not fit in 16 signed bits
    send(addi(3, 16'h7ff0, 10), o);
    check(!o.eliminate && o.dst_preg != p && o.src1 == '{preg: 8'(p), disp: 16'd20},
          "overflowing addi executes with its source displacement");
    @(negedge clk); dbg_lreg = 10; #1;
    check(dbg_entry.disp == 0 && dbg_entry.preg == o.dst_preg, "r10 := [new,0]");

    // CSE: r1+8 and r2+4 are the same address [p,8]
    send(ld(1, 8, 11), o);
    pl = o.dst_preg;
    check(!o.eliminate, "first load executes");
    send(ld(2, 4, 12), o);
    check(o.eliminate && o.opt == OPT_CSE && o.dst_preg == pl, "second load shares the first");

    // RA: store r9 to [r1+16] = [p,16]; load [r3-4] = [p,16] gets r9's mapping [p,20]
    send(st(1, 16, 9), o);
    check(!o.eliminate && !o.dst_v && o.src2 == '{preg: 8'(p), disp: 16'd20}, "store");
    send(ld(3, -4, 13), o);
    check(o.eliminate && o.opt == OPT_RA && o.dst_preg == p, "load after store short-circuited");
    @(negedge clk); dbg_lreg = 13; #1;
    check(dbg_entry == '{preg: 8'(p), disp: 16'd20}, "r13 := [p,20]");
    send(ld(1, 8, 14), o);
    check(!o.eliminate, "store cleared the older load entry");

    // back to back with forwarding, output held for a few cycles
    @(negedge clk);
    out_ready = 0;
    in_valid = 1; in_insn = alu(1, 2, 15);
    @(negedge clk);
    in_insn = addi(15, 3, 16);
    @(negedge clk);
    in_valid = 0;
    o = out_insn;
    held = 0;
    repeat (3) begin
      @(negedge clk);
      check(out_valid && out_insn == o, "held output stable");
      held++;
    end
    out_ready = 1;
    @(negedge clk);
    check(out_valid && out_insn.eliminate && out_insn.dst_preg == o.dst_preg,
          "addi right behind its producer folds onto the forwarded mapping");
    @(negedge clk);

    // exhaust the free list: allocate until in_ready drops
    held = 0;
    while (num_free != 0) begin
      send(alu(1, 2, 20), o);
      held++;
    end
    @(negedge clk);
    in_valid = 1; in_insn = alu(1, 2, 21);
    repeat (4) @(negedge clk);
    check(!in_ready || out_valid == 0, "allocating instruction stalls on an empty free list");
    check(dut.r1_valid_q && !out_valid, "stalled in RENAME1");
    // release the old r20 mapping: the stalled instruction proceeds
    release_en = 1; release_preg = o.old_preg;
    @(negedge clk);
    release_en = 0;
    in_valid = 0;
    repeat (3) @(negedge clk);
    check(num_free == 0, "released register was taken");
    // an eliminated instruction needs no register
    send(addi(21, 5, 22), o2);
    check(o2.eliminate, "folding proceeds with an empty free list");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
