// tb_nlj_workload: the nested-loop join workload of the evaluation at its
// full size: two tables of 8192 keys, unit at its default parameters
// (NA = 8192, LANES = 16). All 8192 B keys are streamed; the unit produces
// 8192 x 8192 output slots as 4,194,304 beats of 16 lanes. Every beat is
// checked lane by lane against the join rule (match: j, i, A[j]; otherwise
// -99 three times) and its slot number; the match count is compared with a
// count made here; out_ready is held high except for short random pauses,
// and the total cycle count must stay within one beat per cycle plus one
// cycle per B key and the pauses.
module tb_nlj_workload;
  import join_pkg::*;

  localparam int NA = 8192, LANES = 16, M = 8192, ROWS = NA / LANES;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic a_wr_en, start, b_valid, b_ready, b_last, out_valid, out_ready, done;
  logic [8:0] a_wr_row;
  key_t a_wr_data [LANES];
  logic [13:0] a_len;
  key_t b_key;
  logic [31:0] out_slot, n_matches, n_stalls;
  logic [LANES-1:0] out_lane_valid;
  key_t out_a [LANES];
  key_t out_b [LANES];
  key_t out_val [LANES];

  nested_loop_join dut (.*);

  int checks = 0, failures = 0;
  key_t A [NA];
  key_t B [M];
  int cnt_a [int];
  longint beats = 0, n_hit = 0, exp_matches = 0, pauses = 0;
  int bad_beats = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // One check per beat (all lanes and the slot), so the count stays readable.
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      int i, j0;
      bit ok;
      i  = int'(beats / ROWS);
      j0 = int'(beats % ROWS) * LANES;
      ok = (out_slot == 32'(i * NA + j0)) && (out_lane_valid == '1);
      for (int l = 0; l < LANES; l++) begin
        bit hit;
        hit = A[j0 + l] == B[i];
        if (hit) n_hit++;
        ok &= out_a[l] == (hit ? key_t'(j0 + l) : HOLE) &&
              out_b[l] == (hit ? key_t'(i) : HOLE) &&
              out_val[l] == (hit ? A[j0 + l] : HOLE);
      end
      checks++;
      if (!ok) begin
        failures++;
        if (bad_beats++ < 10) $display("FAIL: beat %0d slot %0d", beats, out_slot);
      end
      beats++;
    end
  end

  initial begin : main
    int k, cycles;
    a_wr_en = 0; start = 0; b_valid = 0; b_last = 0; b_key = 0; out_ready = 1;
    a_wr_row = 0; a_len = 14'(NA);
    for (int l = 0; l < LANES; l++) a_wr_data[l] = 0;
    for (int j = 0; j < NA; j++) begin
      A[j] = key_t'($urandom_range(0, 4095));
      cnt_a[A[j]] = cnt_a.exists(A[j]) ? cnt_a[A[j]] + 1 : 1;
    end
    for (int i = 0; i < M; i++) begin
      B[i] = key_t'($urandom_range(0, 4095));
      if (cnt_a.exists(B[i])) exp_matches += cnt_a[B[i]];
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      a_wr_en = 1; a_wr_row = 9'(r);
      for (int l = 0; l < LANES; l++) a_wr_data[l] = A[r * LANES + l];
    end
    @(negedge clk); a_wr_en = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    k = 0; cycles = 0;
    while (!done) begin
      out_ready = ($urandom_range(0, 999) != 0);
      if (!out_ready) pauses++;
      b_valid = (k < M);
      b_key   = B[k < M ? k : 0];
      b_last  = (k == M - 1);
      @(posedge clk);
      if (b_valid && b_ready) k++;
      @(negedge clk);
      cycles++;
    end
    check(beats == longint'(M) * ROWS, $sformatf("beats %0d", beats));
    check(n_hit == exp_matches && n_matches == 32'(exp_matches),
          $sformatf("matches %0d/%0d expected %0d", n_hit, n_matches, exp_matches));
    check(longint'(n_stalls) <= pauses, "stall count");
    check(longint'(cycles) <= longint'(M) * (ROWS + 1) + pauses + 4,
          $sformatf("cycles %0d for %0d beats", cycles, beats));
    $display("%0d beats, %0d matches, %0d cycles (%0.2f ms at 200 MHz)",
             beats, n_hit, cycles, real'(cycles) * 5.0e-6);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
