// tb_fused_alu: checks the fused addi-X ALU.
// Random operations with random operands; about half carry a displacement on one or both
// inputs. Each result is compared with (a + disp_a) op (b + disp_b) computed in the testbench,
// and its arrival is checked: 1 cycle after acceptance without a displacement, 2 with one.
// Issue is attempted every cycle, so the unit's refusal of an undisplaced operation right after
// a displaced one is exercised; the testbench counts those refusals and requires some.
module tb_fused_alu;
  import reno_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_ready, out_valid, out_fused;
  op_e               in_op;
  logic [DATA_W-1:0] in_a, in_b, out_value;
  logic [DISP_W-1:0] in_a_disp, in_b_disp;
  logic [7:0]        in_tag, out_tag;

  fused_alu #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0, refused = 0, fused = 0;
  longint cyc = 0;

  typedef struct { longint due; logic [7:0] tag; logic [DATA_W-1:0] val; bit f; } exp_t;
  exp_t expq [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [DATA_W-1:0] model(input op_e op, input logic [DATA_W-1:0] a,
                                              input logic [DATA_W-1:0] b);
    case (op)
      OP_ADD:    return a + b;
      OP_SUB:    return a - b;
      OP_AND:    return a & b;
      OP_OR:     return a | b;
      OP_XOR:    return a ^ b;
      OP_SLL:    return a << (b % 64);
      OP_SRL:    return a >> (b % 64);
      OP_SRA:    return $signed(a) >>> (b % 64);
      OP_CMPEQ:  return (a == b) ? 1 : 0;
      OP_CMPLT:  return ($signed(a) < $signed(b)) ? 1 : 0;
      OP_CMPULT: return (a < b) ? 1 : 0;
      default:   return 0;
    endcase
  endfunction

  function automatic logic [DATA_W-1:0] sx(input logic [15:0] v);
    return {{48{v[15]}}, v};
  endfunction

  logic [7:0] tag_n = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      cyc <= cyc + 1;
      if (out_valid) begin
        if (expq.size() == 0) check(0, "unexpected result");
        else begin
          exp_t e;
          e = expq.pop_front();
          check(out_tag == e.tag && out_value == e.val,
                $sformatf("tag %0d value %h expected tag %0d %h", out_tag, out_value, e.tag, e.val));
          check(cyc == e.due, $sformatf("result at %0d expected %0d", cyc, e.due));
          check(out_fused == e.f, "fused flag");
        end
      end
      if (in_valid && in_ready) begin
        bit d;
        exp_t e;
        d = (in_a_disp != 0) || (in_b_disp != 0);
        e.due = cyc + (d ? 2 : 1);
        e.tag = in_tag;
        e.val = model(in_op, in_a + sx(in_a_disp), in_b + sx(in_b_disp));
        e.f   = d;
        if (d) fused++;
        expq.push_back(e);
        // keep the queue ordered by due cycle
        expq.sort() with (item.due);
      end else if (in_valid) refused++;
    end
  end

  initial begin
    in_valid = 0; in_op = OP_ADD; in_a = '0; in_b = '0; in_a_disp = '0; in_b_disp = '0;
    in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom_range(0, 5) != 0);
        in_op = op_e'($urandom_range(0, 10));
        in_a  = {$urandom(), $urandom()};
        in_b  = ($urandom_range(0, 1) != 0) ? {$urandom(), $urandom()} : 64'($urandom_range(0, 70));
        in_a_disp = ($urandom_range(0, 2) == 0) ? 16'($urandom()) : '0;
        in_b_disp = ($urandom_range(0, 3) == 0) ? 16'($urandom()) : '0;
        in_tag = tag_n++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (4) @(negedge clk);
    check(expq.size() == 0, "all results delivered");
    $display("fused %0d, refused issue slots %0d", fused, refused);
    check(fused > 100 && refused > 10, "both latencies and the port conflict exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
