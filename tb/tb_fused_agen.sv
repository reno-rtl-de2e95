// tb_fused_agen: checks the carry-save fused address generator.
// Random base, sign-extended literal and displacement (including carries across all 64 bits and
// negative values) are presented on random cycles; the registered address must equal
// base + literal + displacement, and the store data value + data displacement, exactly one cycle
// later whether or not the displacement is zero (no fusion penalty).
module tb_fused_agen;
  import reno_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic              in_valid, in_store, out_valid, out_store;
  logic [DATA_W-1:0] in_base, in_imm, in_data, out_addr, out_data;
  logic [DISP_W-1:0] in_disp, in_data_disp;
  logic [7:0]        in_tag, out_tag;

  fused_agen #(.TAG_W(8)) dut (.*);

  int checks = 0, failures = 0, with_disp = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic logic [DATA_W-1:0] sx(input logic [15:0] v);
    return {{48{v[15]}}, v};
  endfunction

  logic [DATA_W-1:0] e_addr, e_data;
  logic [7:0] e_tag;
  logic e_valid, e_store;

  initial begin
    in_valid = 0; in_store = 0; in_base = '0; in_imm = '0; in_data = '0; in_disp = '0;
    in_data_disp = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      in_store = $urandom_range(0, 1);
      in_base  = ($urandom_range(0, 3) == 0) ? 64'hFFFF_FFFF_FFFF_FFF0 + 64'($urandom_range(0, 15))
                                              : {$urandom(), $urandom()};
      in_imm   = sx(16'($urandom()));
      in_disp  = ($urandom_range(0, 1) != 0) ? 16'($urandom()) : '0;
      in_data  = {$urandom(), $urandom()};
      in_data_disp = ($urandom_range(0, 2) == 0) ? 16'($urandom()) : '0;
      in_tag   = 8'($urandom());
      e_valid = in_valid;
      e_store = in_store;
      e_addr  = in_base + in_imm + sx(in_disp);
      e_data  = in_data + sx(in_data_disp);
      e_tag   = in_tag;
      if (in_valid && in_disp != 0) with_disp++;
      @(negedge clk);
      check(out_valid == e_valid, "valid one cycle later");
      if (e_valid) begin
        check(out_addr == e_addr, $sformatf("addr %h expected %h", out_addr, e_addr));
        check(out_store == e_store && out_tag == e_tag, "store flag and tag");
        check(out_data == e_data, "store data");
      end
      in_valid = 0;
    end
    check(with_disp > 100, "displaced addresses exercised");
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
