// tb_hpc_full: end-to-end test of hpc_top with every parameter at its default (2048-point FFT,
// 8192-row tables, 512-entry local sort blocks, 16 lanes). The three
// accelerators run at the same time:
//  * radar: two ADC frames (up-ramp, down-ramp), each a beat tone at a
//    known fractional bin; checks both peaks, the interpolation and the
//    range/velocity result against the FMCW formulas;
//  * sort-merge join: loads two tables with repeating keys, sorts both and
//    merge-joins them under random output back-pressure; checks every pair,
//    the pair count and the number of launches of each bitonic kernel;
//  * nested-loop join: an A table whose length leaves the last row partly
//    filled, a stream of B keys, random back-pressure; checks every lane of
//    every output beat (match or -99 hole) and the match count.
// Each mechanism is counted (peaks, ramp pairs, non-zero interpolation,
// kernel launches of the three kinds, join stalls, runs of equal keys,
// nested-loop stalls, holes, matches, partial rows); one that never happens
// counts as a failure.
module tb_hpc_full;
  import join_pkg::*;

  localparam int RN = 2048, DECIM = 8, FRAC = 8, JN = 8192, BL = 512, LN = 16;
  localparam int LOGJ = $clog2(JN), LOGB = $clog2(BL), ROWS_MAX = JN / LN;
  localparam int ALEN = JN - LN / 2, M = 6, ROWS = (ALEN + LN - 1) / LN;
  localparam real C = 299792458.0, FC = 77.0e9, RAMP = 1.0e9;
  localparam real HZ = 40.0e6 / 8.0 / real'(RN), PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, peak_valid, rv_valid;
  logic signed [15:0] adc_data;
  logic [$clog2(RN)-1:0] peak_bin;
  logic signed [$clog2(RN)+FRAC:0] peak_pos;
  logic signed [31:0] range_cm, vel_cms;

  logic sm_ld_en, sm_ld_tbl, sm_start, sm_busy, sm_done, sm_out_valid, sm_out_ready;
  logic [LOGJ-1:0] sm_ld_addr;
  key_t sm_ld_key, sm_out_value;
  idx_t sm_out_a_idx, sm_out_b_idx;
  logic [15:0] sm_n_sort_local, sm_n_merge_local, sm_n_merge_global;
  logic [31:0] sm_n_matches, sm_n_stalls;

  logic nl_a_wr_en, nl_start, nl_b_valid, nl_b_ready, nl_b_last, nl_out_valid, nl_out_ready, nl_done;
  logic [$clog2(ROWS_MAX)-1:0] nl_a_wr_row;
  key_t nl_a_wr_data [LN];
  logic [LOGJ:0] nl_a_len;
  key_t nl_b_key;
  logic [31:0] nl_out_slot, nl_n_matches, nl_n_stalls;
  logic [LN-1:0] nl_out_lane_valid;
  key_t nl_out_a [LN];
  key_t nl_out_b [LN];
  key_t nl_out_val [LN];

  hpc_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // mechanism counters
  int c_peak = 0, c_rv = 0, c_frac = 0, c_sm_stall = 0, c_run = 0;
  int c_nl_stall = 0, c_hole = 0, c_nl_match = 0, c_partial = 0;

  // ---------------- radar ----------------
  real tone [2];
  real got [2];

  always @(posedge clk) if (rst_n && peak_valid) begin
    real p, err;
    p = real'(peak_pos) / 256.0;
    err = p - tone[c_peak];
    check(err < 0.3 && err > -0.3, $sformatf("radar frame %0d pos %0.3f tone %0.2f", c_peak, p, tone[c_peak]));
    if (peak_pos[FRAC-1:0] != 0) c_frac++;
    got[c_peak] = p;
    c_peak++;
  end

  always @(posedge clk) if (rst_n && rv_valid) begin
    real er, ev;
    er = C / (4.0 * RAMP) * (got[0] - got[1]) * HZ * 100.0;
    ev = C / (4.0 * FC) * (got[0] + got[1]) * HZ * 100.0;
    check(c_peak == 2, "range/velocity before the down-ramp peak");
    check(real'(range_cm) - er < 1.0 && er - real'(range_cm) < 1.0, $sformatf("range %0d exp %0.1f", range_cm, er));
    check(real'(vel_cms) - ev < 1.0 && ev - real'(vel_cms) < 1.0, $sformatf("velocity %0d exp %0.1f", vel_cms, ev));
    c_rv++;
  end

  task automatic radar_run();
    tone[0] = real'(RN) * 0.19 + 0.25;
    tone[1] = real'(RN) * 0.086 + 0.5;
    for (int f = 0; f < 2; f++)
      for (int n = 0; n < RN * DECIM; n++) begin
        @(negedge clk);
        adc_valid = 1;
        adc_data  = 16'($rtoi(12000.0 * $cos(2.0 * PI * tone[f] * real'(n) / real'(RN * DECIM))));
      end
    @(negedge clk); adc_valid = 0;
    while (c_rv == 0) @(negedge clk);
  endtask

  // ---------------- sort-merge join ----------------
  key_t SA [JN];
  key_t SB [JN];
  bit   sm_seen [longint];
  int   sm_emitted = 0, last_a = -1;

  always @(posedge clk) if (rst_n && sm_out_valid) begin
    if (!sm_out_ready) c_sm_stall++;
    else begin
      longint id;
      id = longint'(sm_out_a_idx) * JN + longint'(sm_out_b_idx);
      check(SA[sm_out_a_idx] == SB[sm_out_b_idx] && sm_out_value == SA[sm_out_a_idx],
            $sformatf("join pair a%0d b%0d", sm_out_a_idx, sm_out_b_idx));
      check(!sm_seen.exists(id), "join pair repeated");
      sm_seen[id] = 1;
      if (int'(sm_out_a_idx) == last_a) c_run++;
      last_a = int'(sm_out_a_idx);
      sm_emitted++;
    end
  end

  task automatic sm_run();
    int cnt_a [key_t];
    int cnt_b [key_t];
    int expected, exp_ml;
    for (int i = 0; i < JN; i++) begin
      SA[i] = key_t'($urandom_range(0, JN / 2)) - key_t'(JN / 4);
      SB[i] = key_t'($urandom_range(0, JN / 2)) - key_t'(JN / 8);
      cnt_a[SA[i]] = cnt_a.exists(SA[i]) ? cnt_a[SA[i]] + 1 : 1;
      cnt_b[SB[i]] = cnt_b.exists(SB[i]) ? cnt_b[SB[i]] + 1 : 1;
    end
    expected = 0;
    foreach (cnt_a[k]) if (cnt_b.exists(k)) expected += cnt_a[k] * cnt_b[k];
    for (int t = 0; t < 2; t++)
      for (int i = 0; i < JN; i++) begin
        @(negedge clk);
        sm_ld_en = 1; sm_ld_tbl = t[0]; sm_ld_addr = LOGJ'(i); sm_ld_key = t == 0 ? SA[i] : SB[i];
      end
    @(negedge clk); sm_ld_en = 0;
    @(negedge clk); sm_start = 1;
    @(negedge clk); sm_start = 0;
    while (!sm_done) begin
      sm_out_ready = ($urandom_range(0, 3) != 0);
      @(negedge clk);
    end
    exp_ml = 0;
    for (int s = LOGB + 1; s <= LOGJ; s++) exp_ml += s - LOGB;
    check(sm_emitted == expected && sm_n_matches == 32'(expected),
          $sformatf("join pairs %0d expected %0d", sm_emitted, expected));
    check(sm_n_sort_local == 1 && sm_n_merge_local == 16'(exp_ml) && sm_n_merge_global == 16'(LOGJ - LOGB),
          $sformatf("kernel launches %0d/%0d/%0d", sm_n_sort_local, sm_n_merge_local, sm_n_merge_global));
    check(sm_n_stalls == 32'(c_sm_stall), $sformatf("join stall count %0d/%0d", sm_n_stalls, c_sm_stall));
  endtask

  // ---------------- nested-loop join ----------------
  key_t NA_ [JN];
  key_t NB_ [M];
  int   nl_beats = 0;

  always @(posedge clk) if (rst_n && nl_out_valid) begin
    if (!nl_out_ready) c_nl_stall++;
    else begin
      int i, j0;
      i  = nl_beats / ROWS;
      j0 = (nl_beats % ROWS) * LN;
      check(nl_out_slot == 32'(i * JN + j0), $sformatf("nl beat %0d slot %0d", nl_beats, nl_out_slot));
      if (j0 + LN > ALEN) c_partial++;
      for (int l = 0; l < LN; l++) begin
        int j;
        bit v, hit;
        j = j0 + l;
        v = j < ALEN;
        hit = v && NA_[j] == NB_[i];
        if (hit) c_nl_match++;
        else if (v) c_hole++;
        check(nl_out_lane_valid[l] == v &&
              nl_out_a[l] == (hit ? key_t'(j) : HOLE) &&
              nl_out_b[l] == (hit ? key_t'(i) : HOLE) &&
              nl_out_val[l] == (hit ? NA_[j] : HOLE),
              $sformatf("nl beat %0d lane %0d", nl_beats, l));
      end
      nl_beats++;
    end
  end

  task automatic nl_run();
    int k, expected;
    expected = 0;
    for (int j = 0; j < JN; j++) NA_[j] = key_t'($urandom_range(0, 31));
    for (int i = 0; i < M; i++) NB_[i] = key_t'($urandom_range(0, 31));
    for (int i = 0; i < M; i++) for (int j = 0; j < ALEN; j++) if (NA_[j] == NB_[i]) expected++;
    nl_a_len = (LOGJ + 1)'(ALEN);
    for (int r = 0; r < ROWS_MAX; r++) begin
      @(negedge clk);
      nl_a_wr_en = 1; nl_a_wr_row = r;
      for (int l = 0; l < LN; l++) nl_a_wr_data[l] = NA_[r * LN + l];
    end
    @(negedge clk); nl_a_wr_en = 0;
    @(negedge clk); nl_start = 1;
    @(negedge clk); nl_start = 0;
    k = 0;
    while (!nl_done) begin
      nl_out_ready = ($urandom_range(0, 2) != 0);
      nl_b_valid = (k < M);
      nl_b_key   = NB_[k < M ? k : 0];
      nl_b_last  = (k == M - 1);
      @(posedge clk);
      if (nl_b_valid && nl_b_ready) k++;
      @(negedge clk);
    end
    nl_b_valid = 0;
    check(nl_beats == M * ROWS, $sformatf("nl beats %0d", nl_beats));
    check(c_nl_match == expected && nl_n_matches == 32'(expected),
          $sformatf("nl matches %0d/%0d exp %0d", c_nl_match, nl_n_matches, expected));
    check(nl_n_stalls == 32'(c_nl_stall), "nl stall count");
  endtask

  task automatic mech(int n, string name);
    $display("  %-28s %0d", name, n);
    check(n > 0, $sformatf("mechanism never exercised: %s", name));
  endtask

  initial begin : main
    adc_valid = 0; adc_data = 0;
    sm_ld_en = 0; sm_ld_tbl = 0; sm_ld_addr = 0; sm_ld_key = 0; sm_start = 0; sm_out_ready = 1;
    nl_a_wr_en = 0; nl_a_wr_row = 0; nl_a_len = 0; nl_start = 0; nl_b_valid = 0; nl_b_key = 0;
    nl_b_last = 0; nl_out_ready = 1;
    for (int l = 0; l < LN; l++) nl_a_wr_data[l] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      radar_run();
      sm_run();
      nl_run();
    join
    $display("mechanisms exercised:");
    mech(c_peak, "radar peaks");
    mech(c_rv, "up/down ramp pairs");
    mech(c_frac, "interpolated peaks");
    mech(int'(sm_n_sort_local), "sort-local launches");
    mech(int'(sm_n_merge_local), "merge-local launches");
    mech(int'(sm_n_merge_global), "merge-global launches");
    mech(c_sm_stall, "sort-merge output stalls");
    mech(c_run, "equal-key runs");
    mech(c_nl_stall, "nested-loop output stalls");
    mech(c_hole, "nested-loop holes");
    mech(c_nl_match, "nested-loop matches");
    mech(c_partial, "partial A rows");
    $display("finished after %0d cycles", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
