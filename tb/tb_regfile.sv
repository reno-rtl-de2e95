// tb_regfile: checks the physical register file and its bypass against a shadow array.
// After reset all registers read 0. Then each cycle both write ports write random registers
// (never the same one) while three read ports read random registers, often one being written:
// such a read must return the data being written, any other read the shadow copy.
module tb_regfile;
  import reno_pkg::*;

  localparam int N = 40;
  localparam int AW = $clog2(N);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [2:0][AW-1:0]     rd_addr;
  logic [2:0][DATA_W-1:0] rd_data;
  logic [1:0]             wr_en;
  logic [1:0][AW-1:0]     wr_addr;
  logic [1:0][DATA_W-1:0] wr_data;

  regfile #(.NREGS(N), .WIDTH(DATA_W), .NRD(3), .NWR(2)) dut (.*);

  int checks = 0, failures = 0, bypassed = 0;
  logic [DATA_W-1:0] shadow [N];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    rd_addr = '0; wr_en = '0; wr_addr = '0; wr_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < N; i++) shadow[i] = '0;
    for (int n = 0; n < 4000; n++) begin
      logic [DATA_W-1:0] e;
      @(negedge clk);
      for (int w = 0; w < 2; w++) begin
        wr_en[w]   = $urandom_range(0, 1);
        wr_addr[w] = AW'($urandom_range(0, N - 1));
        wr_data[w] = {$urandom(), $urandom()};
      end
      if (wr_addr[1] == wr_addr[0]) wr_en[1] = 0;
      for (int r = 0; r < 3; r++)
        rd_addr[r] = ($urandom_range(0, 2) == 0) ? wr_addr[r % 2] : AW'($urandom_range(0, N - 1));
      #1;
      for (int r = 0; r < 3; r++) begin
        e = shadow[rd_addr[r]];
        for (int w = 0; w < 2; w++)
          if (wr_en[w] && wr_addr[w] == rd_addr[r]) begin
            e = wr_data[w];
            bypassed++;
          end
        check(rd_data[r] == e, $sformatf("read %0d of p%0d", r, rd_addr[r]));
      end
      @(posedge clk);
      for (int w = 0; w < 2; w++) if (wr_en[w]) shadow[wr_addr[w]] = wr_data[w];
    end
    check(bypassed > 100, "bypass exercised");
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
