// fused_alu: RENO_CF "addi-X" ALU, an ALU with a displacement adder in front of each input.
//
// Constant folding leaves a consumer's source as [preg, disp]: the operand value is the
// register's value plus disp. Every operation therefore takes an additional immediate input.
// This unit adds each operand's displacement in a pre-add stage and feeds the sums to an
// ordinary ALU. The pre-add costs one cycle, so:
//   both displacements zero -> result registered after 1 cycle (out_valid the next cycle)
//   any displacement nonzero -> pre-add stage, then the ALU: result after 2 cycles
// Both kinds share one result register, so an undisplaced operation cannot be accepted in the
// cycle after a displaced one (the two would finish together): in_ready is low exactly then.
//
// Operands: a, a_disp (first input) and b, b_disp (second input); the caller places an
// instruction literal in b with b_disp = 0. Displacements are DISP_W-bit signed.
// Operations: add, sub, and, or, xor, shifts by b[5:0], signed/unsigned compares giving 0/1.
// The 1-cycle penalty and the two adders in front of the ALU follow the document; the
// variable-latency scheme, the operation set and which bus feeds which adder are this design's
// choices.
module fused_alu
  import reno_pkg::*;
#(
  parameter int unsigned TAG_W = PREG_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  output logic               in_ready,
  input  op_e                in_op,
  input  logic [DATA_W-1:0]  in_a,
  input  logic [DISP_W-1:0]  in_a_disp,
  input  logic [DATA_W-1:0]  in_b,
  input  logic [DISP_W-1:0]  in_b_disp,
  input  logic [TAG_W-1:0]   in_tag,
  output logic               out_valid,
  output logic [TAG_W-1:0]   out_tag,
  output logic [DATA_W-1:0]  out_value,
  output logic               out_fused      // result needed the pre-add stage
);

  function automatic logic [DATA_W-1:0] alu(input op_e op, input logic [DATA_W-1:0] a,
                                            input logic [DATA_W-1:0] b);
    unique case (op)
      OP_ADD:    return a + b;
      OP_SUB:    return a - b;
      OP_AND:    return a & b;
      OP_OR:     return a | b;
      OP_XOR:    return a ^ b;
      OP_SLL:    return a << b[5:0];
      OP_SRL:    return a >> b[5:0];
      OP_SRA:    return DATA_W'($signed(a) >>> b[5:0]);
      OP_CMPEQ:  return DATA_W'(a == b);
      OP_CMPLT:  return DATA_W'($signed(a) < $signed(b));
      OP_CMPULT: return DATA_W'(a < b);
      default:   return '0;
    endcase
  endfunction

  wire has_disp = (in_a_disp != '0) || (in_b_disp != '0);

  // pre-add stage
  logic              s1_valid_q;
  op_e               s1_op_q;
  logic [DATA_W-1:0] s1_a_q, s1_b_q;
  logic [TAG_W-1:0]  s1_tag_q;

  assign in_ready = !s1_valid_q || has_disp;
  wire accept = in_valid && in_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid_q <= 1'b0;
      s1_op_q    <= OP_NOP;
      s1_a_q     <= '0;
      s1_b_q     <= '0;
      s1_tag_q   <= '0;
    end else begin
      s1_valid_q <= accept && has_disp;
      if (accept && has_disp) begin
        s1_op_q  <= in_op;
        s1_a_q   <= in_a + sext16(in_a_disp);
        s1_b_q   <= in_b + sext16(in_b_disp);
        s1_tag_q <= in_tag;
      end
    end
  end

  // ALU stage and result register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_tag   <= '0;
      out_value <= '0;
      out_fused <= 1'b0;
    end else begin
      out_valid <= s1_valid_q || (accept && !has_disp);
      out_fused <= s1_valid_q;
      if (s1_valid_q) begin
        out_tag   <= s1_tag_q;
        out_value <= alu(s1_op_q, s1_a_q, s1_b_q);
      end else if (accept) begin
        out_tag   <= in_tag;
        out_value <= alu(in_op, in_a, in_b);
      end
    end
  end

  a_no_collision: assert property (@(posedge clk) disable iff (!rst_n)
    !(s1_valid_q && accept && !has_disp));

endmodule
