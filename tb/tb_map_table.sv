// tb_map_table: checks the extended map table against a shadow array.
// After reset every logical register i must map to [i, 0]. Then random writes of [preg, disp]
// are applied while all four read ports read random registers; each read is compared with the
// shadow copy, which is updated at the clock edge as the table should be (a read in the cycle of
// a write to the same register still returns the old entry).
module tb_map_table;
  import reno_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [3:0][LREG_W-1:0] rd_lreg;
  map_entry_t [3:0]       rd_entry;
  logic                   wr_en;
  logic [LREG_W-1:0]      wr_lreg;
  map_entry_t             wr_entry;

  map_table #(.NUM_RD(4)) dut (.*);

  int checks = 0, failures = 0;
  map_entry_t shadow [NUM_LREGS];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    wr_en = 0; wr_lreg = '0; wr_entry = '0; rd_lreg = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < NUM_LREGS; i++) shadow[i] = '{preg: PREG_W'(i), disp: '0};
    // reset state
    for (int i = 0; i < NUM_LREGS; i++) begin
      rd_lreg[0] = LREG_W'(i);
      #1;
      check(rd_entry[0] == shadow[i], $sformatf("reset map of r%0d", i));
    end
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      wr_en    = ($urandom_range(0, 3) != 0);
      wr_lreg  = LREG_W'($urandom_range(0, NUM_LREGS - 1));
      wr_entry = '{preg: PREG_W'($urandom_range(0, NUM_PREGS - 1)), disp: DISP_W'($urandom())};
      for (int r = 0; r < 4; r++) rd_lreg[r] = LREG_W'($urandom_range(0, NUM_LREGS - 1));
      #1;
      for (int r = 0; r < 4; r++)
        check(rd_entry[r] == shadow[rd_lreg[r]],
              $sformatf("port %0d r%0d: %h expected %h", r, rd_lreg[r], rd_entry[r],
                        shadow[rd_lreg[r]]));
      @(posedge clk);
      if (wr_en) shadow[wr_lreg] = wr_entry;
    end
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
