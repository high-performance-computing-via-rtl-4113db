// tb_merge_join: joins two sorted tables of 64 records whose keys are drawn
// from a small range, so most keys repeat on both sides. The testbench holds
// both tables in synchronous-read memories, drives out_ready randomly to
// force stalls, and checks that
//  * every emitted pair has equal keys and the right value,
//  * no pair is emitted twice,
//  * the number of pairs equals the brute-force count over all (a, b),
//  * the run finishes within 2*(NA + NB + matches) + stalls + slack cycles.
module tb_merge_join;
  import join_pkg::*;

  localparam int NA = 64, NB = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, out_valid, out_ready;
  logic [5:0] a_addr, b_addr;
  rec_t a_data, b_data;
  idx_t oa, ob;
  key_t ov;
  logic [31:0] n_matches, n_stalls;

  rec_t a_tab [NA];
  rec_t b_tab [NB];
  key_t a_orig [NA];
  key_t b_orig [NB];

  always_ff @(posedge clk) begin
    a_data <= a_tab[a_addr];
    b_data <= b_tab[b_addr];
  end

  merge_join #(.NA(NA), .NB(NB)) dut (
    .clk, .rst_n, .start, .busy, .done,
    .a_addr, .a_data, .b_addr, .b_data,
    .out_valid, .out_ready, .out_a_idx(oa), .out_b_idx(ob), .out_value(ov),
    .n_matches, .n_stalls);

  int checks = 0, failures = 0;
  int emitted = 0;
  bit seen [NA][NB];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // sort a table of records by key (insertion sort), keeping original indices
  task automatic sort_tab(ref rec_t t [64]);
    rec_t x;
    int k;
    for (int m = 1; m < 64; m++) begin
      x = t[m];
      k = m - 1;
      while (k >= 0 && t[k].key > x.key) begin t[k+1] = t[k]; k--; end
      t[k+1] = x;
    end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      emitted++;
      check(a_orig[oa] == b_orig[ob] && ov == a_orig[oa],
            $sformatf("pair a%0d b%0d keys %0d/%0d value %0d", oa, ob, a_orig[oa], b_orig[ob], ov));
      check(!seen[oa][ob], $sformatf("duplicate pair a%0d b%0d", oa, ob));
      seen[oa][ob] = 1;
    end
  end

  initial begin : main
    int expected, cyc;
    start = 0; out_ready = 1;
    for (int a = 0; a < NA; a++) begin
      a_orig[a] = key_t'($urandom_range(0, 24));
      a_tab[a]  = '{key: a_orig[a], idx: idx_t'(a)};
    end
    for (int b = 0; b < NB; b++) begin
      b_orig[b] = key_t'($urandom_range(4, 30));
      b_tab[b]  = '{key: b_orig[b], idx: idx_t'(b)};
    end
    sort_tab(a_tab);
    sort_tab(b_tab);
    expected = 0;
    for (int a = 0; a < NA; a++)
      for (int b = 0; b < NB; b++) begin
        seen[a][b] = 0;
        if (a_orig[a] == b_orig[b]) expected++;
      end
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
      cyc++;
    end
    check(emitted == expected, $sformatf("matches %0d expected %0d", emitted, expected));
    check(n_matches == 32'(expected), $sformatf("match counter %0d", n_matches));
    check(n_stalls > 0, "no stall exercised");
    check(cyc <= 2 * (NA + NB + expected) + int'(n_stalls) + 8, $sformatf("cycles %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
