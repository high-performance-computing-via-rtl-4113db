// tb_bitonic_sorter: sorts N = 256 random keys (many duplicates) with
// BLOCK = 32 and checks
//  * the result is in ascending order,
//  * it is a permutation of the input (every original index once, with its
//    original key),
//  * the kernel launch counts match the host loop: 1 sort-local launch,
//    sum over sizes of (log2 size - log2 BLOCK) merge-local launches and
//    log2(N/BLOCK) merge-global launches,
//  * the whole sort finishes within a cycle budget derived from the launch
//    costs. A second sort of already sorted data must also work.
module tb_bitonic_sorter;
  import join_pkg::*;

  localparam int N = 256, BLOCK = 32, LN = 8, LB = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, we;
  logic [7:0] wa, ra;
  rec_t wd, rd;
  logic [15:0] nsl, nml, nmg;

  bitonic_sorter #(.N(N), .BLOCK(BLOCK)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .ext_wr_en(we), .ext_wr_addr(wa), .ext_wr_data(wd),
    .ext_rd_addr(ra), .ext_rd_data(rd),
    .n_sort_local(nsl), .n_merge_local(nml), .n_merge_global(nmg));

  int checks = 0, failures = 0;
  key_t keys [N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sort_and_check(int round);
    int cyc, budget, exp_ml, exp_mg;
    rec_t got [N];
    bit seen [N];
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    exp_ml = 0;
    for (int s = LB + 1; s <= LN; s++) exp_ml += s - LB;
    exp_mg = LN - LB;
    check(nsl == 16'(round), $sformatf("sort-local launches %0d", nsl));
    check(nml == 16'(round * exp_ml), $sformatf("merge-local launches %0d", nml));
    check(nmg == 16'(round * exp_mg), $sformatf("merge-global launches %0d", nmg));
    budget = (N / BLOCK) * (BLOCK + 4 + LB * (LB + 1) / 2)
           + exp_ml * (N / 2 + 6) + exp_mg * (N / BLOCK) * (BLOCK + 4 + LB) + 50;
    check(cyc <= budget, $sformatf("sort cycles %0d budget %0d", cyc, budget));
    for (int a = 0; a < N; a++) begin
      @(negedge clk); ra = 8'(a);
      @(posedge clk); #1 got[a] = rd;
      seen[a] = 0;
    end
    for (int a = 0; a < N; a++) begin
      if (a > 0) check(got[a-1].key <= got[a].key, $sformatf("order at %0d", a));
      check(int'(got[a].idx) < N && !seen[got[a].idx] && keys[got[a].idx] == got[a].key,
            $sformatf("permutation at %0d", a));
      if (int'(got[a].idx) < N) seen[got[a].idx] = 1;
    end
  endtask

  initial begin
    start = 0; we = 0; wa = 0; wd = '0; ra = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < N; a++) begin
      keys[a] = key_t'($urandom_range(0, 99)) - 50;
      @(negedge clk); we = 1; wa = 8'(a); wd = '{key: keys[a], idx: idx_t'(a)};
    end
    @(negedge clk); we = 0;
    sort_and_check(1);
    // sort again: already sorted input, indices now follow the sorted order
    for (int a = 0; a < N; a++) begin
      @(negedge clk); ra = 8'(a);
      @(posedge clk); #1;
      keys[a] = rd.key;
      @(negedge clk); we = 1; wa = 8'(a); wd = '{key: keys[a], idx: idx_t'(a)};
      @(negedge clk); we = 0;
    end
    sort_and_check(2);
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
