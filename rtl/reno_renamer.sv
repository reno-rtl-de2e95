// reno_renamer: scalar RENO renamer, RENAME1 and RENAME2 of the rename pipeline.
//
// RENAME1 reads the extended map table for both sources and for the destination's previous
// mapping, and decides "optimize?":
//   ME   add-immediate of zero        -> destination := source's [preg, disp]
//   CF   add-immediate of imm         -> destination := [source preg, source disp + imm], when
//                                        the accumulated displacement still fits DISP_W bits
//   CSE  load hitting a load's entry  -> destination := recorded [preg, disp]
//   RA   load hitting a store's entry -> destination := the stored register's [preg, disp]
// An optimized instruction short-circuits the map table: its destination is pointed at an
// existing physical register (a free-list share), and it is marked eliminate so that it skips
// the execution core. Any other instruction with a destination takes a register from the free
// list and maps its destination to [new preg, 0]. The displacement accumulation adder sums the
// source displacement and the literal; loads use the same sum as their reuse-table key offset.
// RENAME2 writes the destination's map entry (preg.write, disp.write) and hands the renamed
// instruction, with the displacements of its sources, to DISPATCH. A RENAME1 read of the
// register that RENAME2 is writing is forwarded from RENAME2.
//
// Interface: valid/ready on both sides (in_* from DECODE, out_* to DISPATCH). RENAME1 stalls
// when the instruction needs a new register and none is free, or when RENAME2 cannot leave.
// release_* return the previous mapping of a destination once no older instruction reads it.
// dbg_lreg/dbg_entry read the current map entry of a logical register.
// Latency: two cycles from acceptance to out_valid, one instruction per cycle.
//
// The pipeline split, the map-table fields and the three short-circuit sources follow the
// document's rename figures. The scalar width follows its worked example; the superscalar
// renamer is not built. Reference counting, the reuse-table key and the reset state are this
// design's choices.
module reno_renamer
  import reno_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // from DECODE
  input  logic               in_valid,
  output logic               in_ready,
  input  dec_insn_t          in_insn,
  // to DISPATCH
  output logic               out_valid,
  input  logic               out_ready,
  output ren_insn_t          out_insn,
  // release of an overwritten mapping
  input  logic               release_en,
  input  logic [PREG_W-1:0]  release_preg,
  // architectural state read-out
  input  logic [LREG_W-1:0]  dbg_lreg,
  output map_entry_t         dbg_entry,
  output logic [$clog2(NUM_PREGS+1)-1:0] num_free,
  output logic               empty          // nothing in RENAME1 or RENAME2
);

  // ---------------- RENAME1 ----------------
  logic      r1_valid_q;
  dec_insn_t r1_q;

  // RENAME2 state, declared here for forwarding
  logic        r2_valid_q;
  ren_insn_t   r2_q;
  logic [LREG_W-1:0] r2_dst_lreg_q;
  map_entry_t  r2_new_entry_q;

  logic [3:0][LREG_W-1:0] mt_rd_lreg;
  map_entry_t [3:0]       mt_rd_entry;

  assign mt_rd_lreg[0] = r1_q.src1;
  assign mt_rd_lreg[1] = r1_q.src2;
  assign mt_rd_lreg[2] = r1_q.dst;
  assign mt_rd_lreg[3] = dbg_lreg;
  assign dbg_entry     = mt_rd_entry[3];

  wire r2_writes = r2_valid_q && r2_q.dst_v;

  map_entry_t s1, s2, old_dst;
  always_comb begin
    s1      = (r2_writes && r2_dst_lreg_q == r1_q.src1) ? r2_new_entry_q : mt_rd_entry[0];
    s2      = (r2_writes && r2_dst_lreg_q == r1_q.src2) ? r2_new_entry_q : mt_rd_entry[1];
    old_dst = (r2_writes && r2_dst_lreg_q == r1_q.dst)  ? r2_new_entry_q : mt_rd_entry[2];
  end

  // Displacement accumulation: source displacement + literal, one bit wider.
  logic [OFS_W-1:0] acc_sum;
  assign acc_sum = OFS_W'($signed(s1.disp)) + OFS_W'($signed(r1_q.imm));
  wire acc_fits = (acc_sum[OFS_W-1] == acc_sum[OFS_W-2]);

  wire is_addi  = r1_q.op == OP_ADD && r1_q.use_imm && r1_q.src1_v && r1_q.dst_v;
  wire is_load  = r1_q.op == OP_LOAD && r1_q.src1_v && r1_q.dst_v;
  wire is_store = r1_q.op == OP_STORE && r1_q.src1_v && r1_q.src2_v;

  // reuse table
  logic       rt_hit, rt_from_store;
  map_entry_t rt_value;

  // free list
  logic              fl_alloc_ok;
  logic [PREG_W-1:0] fl_alloc_preg;
  logic              fl_freed_en;
  logic [PREG_W-1:0] fl_freed_preg;

  // optimize? and the short-circuit mux (ME/CF, CSE/RA, free list)
  opt_e       opt;
  map_entry_t new_entry;
  logic       need_alloc;
  always_comb begin
    opt        = OPT_NONE;
    new_entry  = '{preg: fl_alloc_preg, disp: '0};
    need_alloc = r1_q.dst_v;
    if (is_addi && acc_fits) begin
      opt        = (r1_q.imm == '0) ? OPT_ME : OPT_CF;
      new_entry  = '{preg: s1.preg, disp: acc_sum[DISP_W-1:0]};
      need_alloc = 1'b0;
    end else if (is_load && rt_hit) begin
      opt        = rt_from_store ? OPT_RA : OPT_CSE;
      new_entry  = rt_value;
      need_alloc = 1'b0;
    end
  end

  wire r2_free    = !r2_valid_q || out_ready;
  wire r1_adv     = r1_valid_q && r2_free && (!need_alloc || fl_alloc_ok);

  assign in_ready = !r1_valid_q || r1_adv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1_valid_q <= 1'b0;
      r1_q       <= '0;
    end else if (in_ready) begin
      r1_valid_q <= in_valid;
      if (in_valid) r1_q <= in_insn;
    end
  end

  map_table #(.NUM_RD(4)) u_map (
    .clk      (clk),
    .rst_n    (rst_n),
    .rd_lreg  (mt_rd_lreg),
    .rd_entry (mt_rd_entry),
    .wr_en    (r2_writes),
    .wr_lreg  (r2_dst_lreg_q),
    .wr_entry (r2_new_entry_q)
  );

  free_list u_free (
    .clk          (clk),
    .rst_n        (rst_n),
    .alloc_req    (r1_adv && need_alloc),
    .alloc_ok     (fl_alloc_ok),
    .alloc_preg   (fl_alloc_preg),
    .share_en     (r1_adv && opt != OPT_NONE),
    .share_preg   (new_entry.preg),
    .release_en   (release_en),
    .release_preg (release_preg),
    .freed_en     (fl_freed_en),
    .freed_preg   (fl_freed_preg),
    .num_free     (num_free)
  );

  // Loads that miss record their own result; stores record their data operand.
  logic       rt_ins_en;
  map_entry_t rt_ins_value;
  always_comb begin
    rt_ins_en    = r1_adv && ((is_load && !rt_hit) || is_store);
    rt_ins_value = is_store ? s2 : '{preg: fl_alloc_preg, disp: '0};
  end

  reuse_table u_reuse (
    .clk           (clk),
    .rst_n         (rst_n),
    .lk_base       (s1.preg),
    .lk_ofs        (acc_sum),
    .lk_hit        (rt_hit),
    .lk_value      (rt_value),
    .lk_from_store (rt_from_store),
    .ins_en        (rt_ins_en),
    .ins_store     (is_store),
    .ins_base      (s1.preg),
    .ins_ofs       (acc_sum),
    .ins_value     (rt_ins_value),
    .inv_en        (fl_freed_en),
    .inv_preg      (fl_freed_preg)
  );

  // ---------------- RENAME2 ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r2_valid_q     <= 1'b0;
      r2_q           <= '0;
      r2_dst_lreg_q  <= '0;
      r2_new_entry_q <= '0;
    end else if (r2_free) begin
      r2_valid_q <= r1_adv;
      if (r1_adv) begin
        r2_q.op        <= r1_q.op;
        r2_q.use_imm   <= r1_q.use_imm;
        r2_q.imm       <= r1_q.imm;
        r2_q.src1_v    <= r1_q.src1_v;
        r2_q.src1      <= s1;
        r2_q.src2_v    <= r1_q.src2_v;
        r2_q.src2      <= s2;
        r2_q.dst_v     <= r1_q.dst_v;
        r2_q.dst_preg  <= new_entry.preg;
        r2_q.old_preg  <= old_dst.preg;
        r2_q.eliminate <= (opt != OPT_NONE);
        r2_q.opt       <= opt;
        r2_dst_lreg_q  <= r1_q.dst;
        r2_new_entry_q <= new_entry;
      end
    end
  end

  assign out_valid = r2_valid_q;
  assign empty     = !r1_valid_q && !r2_valid_q;
  assign out_insn  = r2_q;

  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_insn));

endmodule
