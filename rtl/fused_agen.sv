// fused_agen: RENO_CF address generation with a carry-save adder in front.
//
// Address calculation is the most common and most timing-critical place where a folded
// displacement meets a consumer: a load or store computes base + literal, and with constant
// folding the base arrives as [preg, disp], so the address is base + literal + disp. A 3:2
// carry-save stage reduces the three addends to two before the one carry-propagate adder the
// unit already has, so the fused "addi-addi" costs no extra cycle: the address is registered
// one cycle after the operands are presented, whether or not disp is zero.
//
// A store's data operand may also carry a displacement; it is added in parallel by a separate
// adder so that the stored value is the logical register's value.
// Interface: in_valid with base, imm (DATA_W, already sign-extended), disp (DISP_W signed),
// data, data_disp and a destination tag; out_* are the registered address, store data and tag.
// The carry-save fusion and its zero penalty follow the document; the store-data adder and the
// interface are this design's choices.
module fused_agen
  import reno_pkg::*;
#(
  parameter int unsigned TAG_W = PREG_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic               in_store,
  input  logic [DATA_W-1:0]  in_base,
  input  logic [DATA_W-1:0]  in_imm,
  input  logic [DISP_W-1:0]  in_disp,
  input  logic [DATA_W-1:0]  in_data,
  input  logic [DISP_W-1:0]  in_data_disp,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic               out_store,
  output logic [DATA_W-1:0]  out_addr,
  output logic [DATA_W-1:0]  out_data,
  output logic [TAG_W-1:0]   out_tag
);

  logic [DATA_W-1:0] x, y, z, sum_v, carry_v;

  // 3:2 carry-save reduction of base + imm + disp
  always_comb begin
    x       = in_base;
    y       = in_imm;
    z       = sext16(in_disp);
    sum_v   = x ^ y ^ z;
    carry_v = ((x & y) | (x & z) | (y & z)) << 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_store <= 1'b0;
      out_addr  <= '0;
      out_data  <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_store <= in_store;
        out_addr  <= sum_v + carry_v;
        out_data  <= in_data + sext16(in_data_disp);
        out_tag   <= in_tag;
      end
    end
  end

endmodule
