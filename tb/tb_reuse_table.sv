// tb_reuse_table: checks the load reuse table against a reference model.
// The model keeps the same direct-mapped organisation (index = offset bits [10:3] xor base) and
// applies the rules independently: a load insert records its key, a store insert records its
// key and clears every other entry, freeing a register clears entries naming it as base or value
// (and blocks an insert naming it in the same cycle). Keys come from a small pool so lookups hit
// often; lookups are compared for hit, value and the store flag each cycle.
module tb_reuse_table;
  import reno_pkg::*;

  localparam int ENT = 256;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [PREG_W-1:0] lk_base, ins_base, inv_preg;
  logic [OFS_W-1:0]  lk_ofs, ins_ofs;
  logic              lk_hit, lk_from_store, ins_en, ins_store, inv_en;
  map_entry_t        lk_value, ins_value;

  reuse_table #(.ENTRIES(ENT)) dut (.*);

  typedef struct {
    bit valid;
    bit st;
    int base;
    int ofs;
    int vp;
    int vd;
  } ment_t;
  ment_t model [ENT];

  int checks = 0, failures = 0, hits = 0, store_hits = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int idx(input int base, input int ofs);
    return ((ofs >> 3) & 8'hff) ^ (base & 8'hff);
  endfunction

  function automatic int rofs();
    int o = 8 * $urandom_range(0, 5) - 16;
    return o & ((1 << OFS_W) - 1);
  endfunction

  initial begin
    ins_en = 0; inv_en = 0; ins_store = 0; lk_base = '0; lk_ofs = '0;
    ins_base = '0; ins_ofs = '0; ins_value = '0; inv_preg = '0;
    for (int i = 0; i < ENT; i++) model[i].valid = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      int li, ii, ib, io, vp, vd, ip;
      bit exp_hit;
      @(negedge clk);
      lk_base = PREG_W'($urandom_range(0, 7));
      lk_ofs  = OFS_W'(rofs());
      ins_en    = ($urandom_range(0, 2) == 0);
      ins_store = ($urandom_range(0, 4) == 0);
      ib = $urandom_range(0, 7); io = rofs();
      vp = $urandom_range(8, 15); vd = $urandom_range(0, 3);
      ins_base  = PREG_W'(ib);
      ins_ofs   = OFS_W'(io);
      ins_value = '{preg: PREG_W'(vp), disp: DISP_W'(vd)};
      inv_en   = ($urandom_range(0, 7) == 0);
      ip       = $urandom_range(0, 15);
      inv_preg = PREG_W'(ip);
      #1;
      li = idx(int'(lk_base), int'(lk_ofs));
      exp_hit = model[li].valid && model[li].base == int'(lk_base) && model[li].ofs == int'(lk_ofs);
      check(lk_hit == exp_hit, $sformatf("hit %0d expected %0d", lk_hit, exp_hit));
      if (exp_hit) begin
        hits++;
        if (model[li].st) store_hits++;
        check(lk_value.preg == PREG_W'(model[li].vp) && lk_value.disp == DISP_W'(model[li].vd),
              "hit value");
        check(lk_from_store == model[li].st, "store flag");
      end
      @(posedge clk);
      ii = idx(ib, io);
      for (int i = 0; i < ENT; i++) begin
        if (inv_en && (model[i].base == ip || model[i].vp == ip)) model[i].valid = 0;
        if (ins_en && ins_store && i != ii) model[i].valid = 0;
      end
      if (ins_en) begin
        if (inv_en && (ib == ip || vp == ip)) model[ii].valid = 0;
        else model[ii] = '{valid: 1, st: ins_store, base: ib, ofs: io, vp: vp, vd: vd};
      end
    end
    $display("hits %0d, of which from stores %0d", hits, store_hits);
    check(hits > 100 && store_hits > 10, "enough hits");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
