// tb_join_accel: sort-merge join of two 128-row tables (BLOCK = 16, so all
// three bitonic kernels run) with keys from a small range, so keys repeat on
// both sides. The joined stream must contain exactly the pairs (a, b) with
// equal keys in the original tables, each once, with the key as value; the
// kernel launch counters must match the host loop, and out_ready is toggled
// randomly to exercise stalls.
module tb_join_accel;
  import join_pkg::*;

  localparam int N = 128, BLOCK = 16, LN = 7, LB = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_en, ld_tbl, start, busy, done, out_valid, out_ready;
  logic [6:0] ld_addr;
  key_t ld_key, out_value;
  idx_t out_a_idx, out_b_idx;
  logic [15:0] n_sort_local, n_merge_local, n_merge_global;
  logic [31:0] n_matches, n_stalls;

  join_accel #(.N(N), .BLOCK(BLOCK)) dut (.*);

  int checks = 0, failures = 0, emitted = 0;
  key_t A [N];
  key_t B [N];
  bit seen [N][N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      emitted++;
      check(A[out_a_idx] == B[out_b_idx] && out_value == A[out_a_idx],
            $sformatf("pair a%0d b%0d", out_a_idx, out_b_idx));
      check(!seen[out_a_idx][out_b_idx], "duplicate pair");
      seen[out_a_idx][out_b_idx] = 1;
    end
  end

  initial begin : main
    int expected, exp_ml;
    ld_en = 0; ld_tbl = 0; ld_addr = 0; ld_key = 0; start = 0; out_ready = 1;
    for (int a = 0; a < N; a++) begin
      A[a] = key_t'($urandom_range(0, 200)) - 100;
      B[a] = key_t'($urandom_range(0, 150)) - 50;
    end
    expected = 0;
    for (int a = 0; a < N; a++) for (int b = 0; b < N; b++) begin
      seen[a][b] = 0;
      if (A[a] == B[b]) expected++;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 2; t++)
      for (int a = 0; a < N; a++) begin
        @(negedge clk);
        ld_en = 1; ld_tbl = t[0]; ld_addr = 7'(a); ld_key = t == 0 ? A[a] : B[a];
      end
    @(negedge clk); ld_en = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    while (!done) begin
      out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    exp_ml = 0;
    for (int s = LB + 1; s <= LN; s++) exp_ml += s - LB;
    check(emitted == expected, $sformatf("pairs %0d expected %0d", emitted, expected));
    check(expected > N / 2, "too few matches for a meaningful test");
    check(n_sort_local == 1 && n_merge_local == 16'(exp_ml) && n_merge_global == 16'(LN - LB),
          $sformatf("launches %0d/%0d/%0d", n_sort_local, n_merge_local, n_merge_global));
    check(n_stalls > 0, "no stall exercised");
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
