// tb_free_list: checks the reference-counted free list against a model of the counts.
// Random legal traffic: allocations, shares of live registers, releases of live registers, with
// share and release of the same register in one cycle now and then. Every cycle the offered
// register (lowest free), alloc_ok, freed_en and num_free are compared with the model. A phase
// that only allocates drives the list empty and checks that alloc_ok drops and nothing is handed
// out twice; a phase that releases everything checks that all registers come back.
module tb_free_list;
  import reno_pkg::*;

  localparam int NP = 40;
  localparam int NI = 8;
  localparam int PW = $clog2(NP);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic alloc_req, alloc_ok, share_en, release_en, freed_en;
  logic [PW-1:0] alloc_preg, share_preg, release_preg, freed_preg;
  logic [$clog2(NP+1)-1:0] num_free;

  free_list #(.NPREGS(NP), .NINIT(NI)) dut (.*);

  int checks = 0, failures = 0;
  int cnt [NP];
  int empties = 0, frees = 0, cancels = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  function automatic int pick_live();
    int tries = 0, p;
    do begin
      p = $urandom_range(0, NP - 1);
      tries++;
    end while (cnt[p] == 0 && tries < 200);
    return (cnt[p] == 0) ? -1 : p;
  endfunction

  task automatic step(input int mode);   // 0 random, 1 allocate only, 2 release only
    int lo, nf, ps, pr;
    bit exp_freed;
    @(negedge clk);
    alloc_req = (mode == 1) || (mode == 0 && $urandom_range(0, 2) == 0);
    ps = pick_live();
    pr = pick_live();
    share_en   = (mode == 0) && ps >= 0 && $urandom_range(0, 2) == 0;
    release_en = (mode != 1) && pr >= 0 && (mode == 2 || $urandom_range(0, 1) == 0);
    if (share_en && release_en && $urandom_range(0, 3) == 0) ps = pr;
    share_preg   = PW'(ps < 0 ? 0 : ps);
    release_preg = PW'(pr < 0 ? 0 : pr);
    #1;
    lo = -1; nf = 0;
    for (int i = NP - 1; i >= 0; i--) if (cnt[i] == 0) begin lo = i; nf++; end
    check(alloc_ok == (lo >= 0), "alloc_ok");
    if (lo >= 0) check(alloc_preg == PW'(lo), $sformatf("offered %0d expected %0d", alloc_preg, lo));
    check(num_free == nf, $sformatf("num_free %0d expected %0d", num_free, nf));
    exp_freed = release_en && !(share_en && share_preg == release_preg) && cnt[pr] == 1;
    check(freed_en == exp_freed, "freed_en");
    if (exp_freed) check(freed_preg == PW'(pr), "freed_preg");
    @(posedge clk);
    if (alloc_req && lo >= 0) cnt[lo] = 1;
    if (alloc_req && lo < 0) empties++;
    if (share_en && release_en && share_preg == release_preg) cancels++;
    else begin
      if (share_en) cnt[ps]++;
      if (release_en) cnt[pr]--;
    end
    if (exp_freed) frees++;
  endtask

  initial begin
    alloc_req = 0; share_en = 0; release_en = 0; share_preg = '0; release_preg = '0;
    for (int i = 0; i < NP; i++) cnt[i] = (i < NI) ? 1 : 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) step(0);
    for (int n = 0; n < 2 * NP; n++) step(1);
    check(alloc_ok == 0, "list should be empty");
    for (int n = 0; n < 400; n++) step(2);
    for (int n = 0; n < 2000; n++) step(0);
    $display("allocation on empty list: %0d, frees: %0d, share/release cancels: %0d", empties,
             frees, cancels);
    check(empties > 0 && frees > 0 && cancels > 0, "all cases exercised");
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
