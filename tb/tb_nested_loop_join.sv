// tb_nested_loop_join: nested-loop join of A (a_len = 60 keys, so the last
// 8-key row is only half valid) with 12 B keys, LANES = 8. out_ready is
// driven randomly to exercise stalls. Every output beat is compared lane by
// lane with the expected slot (i*NA + j), indices, value or -99 hole, and the
// number of beats and matches is checked. With out_ready always high the
// unit must deliver one beat per cycle after accepting a B key.
module tb_nested_loop_join;
  import join_pkg::*;

  localparam int NA = 64, LANES = 8, ALEN = 60, M = 12, ROWS = (ALEN + LANES - 1) / LANES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_wr_en, start, b_valid, b_ready, b_last, out_valid, out_ready, done;
  logic [2:0] a_wr_row;
  key_t a_wr_data [LANES];
  logic [6:0] a_len;
  key_t b_key;
  logic [31:0] out_slot, n_matches, n_stalls;
  logic [LANES-1:0] out_lane_valid;
  key_t out_a [LANES];
  key_t out_b [LANES];
  key_t out_val [LANES];

  nested_loop_join #(.NA(NA), .LANES(LANES)) dut (.*);

  int checks = 0, failures = 0;
  key_t A [NA];
  key_t B [M];
  int beats = 0, n_hit = 0, exp_matches = 0;
  int beat_cycles = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int i, j0;
      i  = beats / ROWS;
      j0 = (beats % ROWS) * LANES;
      check(out_slot == 32'(i * NA + j0), $sformatf("beat %0d slot %0d", beats, out_slot));
      for (int l = 0; l < LANES; l++) begin
        int j;
        bit v, hit;
        j = j0 + l;
        v = j < ALEN;
        hit = v && A[j] == B[i];
        if (hit) n_hit++;
        check(out_lane_valid[l] == v &&
              out_a[l] == (hit ? key_t'(j) : HOLE) &&
              out_b[l] == (hit ? key_t'(i) : HOLE) &&
              out_val[l] == (hit ? A[j] : HOLE),
              $sformatf("beat %0d lane %0d", beats, l));
      end
      beats++;
    end
  end

  task automatic run(bit random_ready, output int cycles);
    int k;
    beats = 0; n_hit = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    k = 0; cycles = 0;
    while (!done) begin
      out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;
      b_valid = (k < M);
      b_key   = B[k < M ? k : 0];
      b_last  = (k == M - 1);
      @(posedge clk);
      if (b_valid && b_ready) k++;
      @(negedge clk);
      cycles++;
    end
    b_valid = 0;
  endtask

  initial begin : main
    int cyc;
    a_wr_en = 0; start = 0; b_valid = 0; b_last = 0; b_key = 0; out_ready = 1;
    a_wr_row = 0; a_len = 7'(ALEN);
    for (int l = 0; l < LANES; l++) a_wr_data[l] = 0;
    for (int j = 0; j < NA; j++) A[j] = key_t'($urandom_range(0, 15));
    for (int i = 0; i < M; i++) B[i] = key_t'($urandom_range(0, 15));
    for (int i = 0; i < M; i++) for (int j = 0; j < ALEN; j++) if (A[j] == B[i]) exp_matches++;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < NA / LANES; r++) begin
      @(negedge clk);
      a_wr_en = 1; a_wr_row = 3'(r);
      for (int l = 0; l < LANES; l++) a_wr_data[l] = A[r * LANES + l];
    end
    @(negedge clk); a_wr_en = 0;
    run(1, cyc);
    check(beats == M * ROWS, $sformatf("beats %0d", beats));
    check(n_hit == exp_matches && n_matches == 32'(exp_matches), $sformatf("n_hit %0d/%0d", n_hit, n_matches));
    check(n_stalls > 0, "no stall exercised");
    run(0, cyc);
    check(beats == M * ROWS, $sformatf("beats %0d (full rate)", beats));
    check(cyc <= M * (ROWS + 1) + 3, $sformatf("full-rate cycles %0d", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
