// free_list: physical register free list with reference counts for register sharing.
//
// In a conventional renamer a physical register has exactly one mapping and goes back to the
// free list when the instruction that overwrote that mapping retires. RENO lets several logical
// registers (and several in-flight mappings) share one physical register: a move, a folded
// add-immediate or an eliminated load points its destination at an existing register. A register
// may therefore only be freed when the last mapping to it is released, so this free list keeps
// a count of mappings per physical register; a register is free when its count is zero.
//
// Interface, one event of each kind per cycle:
//   alloc_req        take the free register shown on alloc_preg (valid when alloc_ok); count := 1
//   share_en/_preg   one more mapping points at share_preg;                           count += 1
//   release_en/_preg a mapping to release_preg was overwritten and is no longer read; count -= 1
//   freed_en/_preg   release_preg's count reached zero this cycle (it is free from next cycle)
// Share and release of the same register in one cycle cancel. The lowest-numbered free register
// is offered. num_free counts free registers.
// Reset: the first NUM_LREGS registers hold the architectural state (count 1), the rest are free.
// The document names the free list and requires sharing; counting references is this design's
// way of making sharing safe, and the priority pick is its simplest allocation policy.
module free_list
  import reno_pkg::*;
#(
  parameter int unsigned NPREGS = NUM_PREGS,
  parameter int unsigned NINIT  = NUM_LREGS
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      alloc_req,
  output logic                      alloc_ok,
  output logic [$clog2(NPREGS)-1:0] alloc_preg,
  input  logic                      share_en,
  input  logic [$clog2(NPREGS)-1:0] share_preg,
  input  logic                      release_en,
  input  logic [$clog2(NPREGS)-1:0] release_preg,
  output logic                      freed_en,
  output logic [$clog2(NPREGS)-1:0] freed_preg,
  output logic [$clog2(NPREGS+1)-1:0] num_free
);

  localparam int unsigned PW = $clog2(NPREGS);

  logic [REFCNT_W-1:0] cnt_q [NPREGS];

  // Lowest-numbered free register.
  always_comb begin
    alloc_ok   = 1'b0;
    alloc_preg = '0;
    for (int i = NPREGS - 1; i >= 0; i--) begin
      if (cnt_q[i] == '0) begin
        alloc_ok   = 1'b1;
        alloc_preg = PW'(i);
      end
    end
  end

  always_comb begin
    num_free = '0;
    for (int i = 0; i < NPREGS; i++) if (cnt_q[i] == '0) num_free = num_free + 1'b1;
  end

  wire same_reg = share_en && release_en && (share_preg == release_preg);

  assign freed_en   = release_en && !same_reg && (cnt_q[release_preg] == REFCNT_W'(1));
  assign freed_preg = release_preg;

  // One counter per physical register with its own update decode.
  for (genvar i = 0; i < NPREGS; i++) begin : g_cnt
    logic [REFCNT_W-1:0] q;
    wire alloc_here   = alloc_req && alloc_ok && alloc_preg == PW'(i);
    wire share_here   = share_en && !same_reg && share_preg == PW'(i);
    wire release_here = release_en && !same_reg && release_preg == PW'(i);
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q <= (i < NINIT) ? REFCNT_W'(1) : '0;
      end else if (alloc_here) begin
        q <= REFCNT_W'(1);
      end else if (share_here) begin
        q <= q + 1'b1;
      end else if (release_here) begin
        q <= q - 1'b1;
      end
    end
    assign cnt_q[i] = q;
  end

  // A released register must be mapped; a shared register must be live or shared while its last
  // mapping is released in the same cycle.
  a_release_live: assert property (@(posedge clk) disable iff (!rst_n)
    release_en |-> cnt_q[release_preg] != '0);
  a_share_live: assert property (@(posedge clk) disable iff (!rst_n)
    share_en |-> cnt_q[share_preg] != '0);
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    share_en && !same_reg |-> cnt_q[share_preg] != '1);

endmodule
