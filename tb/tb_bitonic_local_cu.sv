// tb_bitonic_local_cu: checks the block-local bitonic compute unit on a small
// buffer (N = 64, BLOCK = 16).
//  1. sort-local launch on random keys: every block must come out sorted,
//     ascending for even blocks and descending for odd ones, and hold the same
//     records; the unit must report LB*(LB+1)/2 steps per block.
//  2. merge launch (size = BLOCK, strides BLOCK/2..1) on blocks that each hold
//     a bitonic sequence: every block must again come out sorted in its
//     direction, after LB steps per block.
// Launch times are checked against 2*(BLOCK/2) + steps + small overhead.
module tb_bitonic_local_cu;
  import join_pkg::*;

  localparam int N = 64, BLOCK = 16, LB = 4, NBLK = N / BLOCK;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, merge_mode, busy, done, wr_en;
  logic [6:0] size_log, stride_log;
  logic [5:0] rd0, rd1, wa0, wa1, h_addr;
  rec_t d0, d1, wd0, wd1, h_data;
  logic h_we;
  logic [31:0] steps;

  global_buf #(.DEPTH(N)) u_mem (
    .clk, .rd_addr0(busy ? rd0 : h_addr), .rd_addr1(rd1), .rd_data0(d0), .rd_data1(d1),
    .wr_en0(busy ? wr_en : h_we), .wr_addr0(busy ? wa0 : h_addr), .wr_data0(busy ? wd0 : h_data),
    .wr_en1(busy && wr_en), .wr_addr1(wa1), .wr_data1(wd1));

  bitonic_local_cu #(.N(N), .BLOCK(BLOCK)) dut (
    .clk, .rst_n, .start, .merge_mode, .size_log, .stride_log, .busy, .done,
    .rd_addr0(rd0), .rd_addr1(rd1), .rd_data0(d0), .rd_data1(d1),
    .wr_en, .wr_addr0(wa0), .wr_addr1(wa1), .wr_data0(wd0), .wr_data1(wd1),
    .step_count(steps));

  int checks = 0, failures = 0;
  key_t ref_keys [N];
  rec_t got [N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic host_write(int a, rec_t r);
    @(negedge clk); h_we = 1; h_addr = 6'(a); h_data = r;
    @(negedge clk); h_we = 0;
  endtask

  task automatic read_all();
    for (int a = 0; a < N; a++) begin
      @(negedge clk); h_addr = 6'(a);
      @(posedge clk); #1 got[a] = d0;
    end
  endtask

  task automatic launch(bit mode, int sl, int st, output int cycles);
    @(negedge clk); start = 1; merge_mode = mode; size_log = 7'(sl); stride_log = 7'(st);
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
  endtask

  task automatic check_blocks(string tag);
    int mult_ok;
    for (int b = 0; b < NBLK; b++) begin
      bit ok = 1;
      for (int e = 1; e < BLOCK; e++) begin
        int p = b * BLOCK + e;
        if (b % 2 == 0 && got[p-1].key > got[p].key) ok = 0;
        if (b % 2 == 1 && got[p-1].key < got[p].key) ok = 0;
      end
      check(ok, $sformatf("%s block %0d order", tag, b));
      // every record stays in its block and keeps its key
      mult_ok = 1;
      for (int e = 0; e < BLOCK; e++) begin
        int p = b * BLOCK + e;
        if (int'(got[p].idx) / BLOCK != b) mult_ok = 0;
        else if (got[p].key != ref_keys[got[p].idx]) mult_ok = 0;
      end
      check(mult_ok, $sformatf("%s block %0d contents", tag, b));
      if (!mult_ok) for (int e = 0; e < BLOCK; e++) $display("  %0d: key %0d idx %0d ref %0d", e, got[b*BLOCK+e].key, got[b*BLOCK+e].idx, ref_keys[got[b*BLOCK+e].idx]);
    end
  endtask

  initial begin : main
    int cyc;
    logic [31:0] s0;
    start = 0; merge_mode = 0; size_log = 0; stride_log = 0; h_we = 0; h_addr = 0; h_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // 1. sort local
    for (int a = 0; a < N; a++) begin
      ref_keys[a] = key_t'($urandom_range(0, 40)) - 20;
      host_write(a, '{key: ref_keys[a], idx: idx_t'(a)});
    end
    s0 = steps;
    launch(0, 0, 0, cyc);
    check(steps - s0 == 32'(NBLK * LB * (LB + 1) / 2), $sformatf("sort steps %0d", steps - s0));
    check(cyc <= NBLK * (BLOCK + 2 + LB * (LB + 1) / 2) + 4, $sformatf("sort cycles %0d", cyc));
    read_all();
    check_blocks("sort");
    // 2. merge: bitonic sequence in each block
    for (int b = 0; b < NBLK; b++)
      for (int e = 0; e < BLOCK; e++) begin
        int a;
        a = b * BLOCK + e;
        ref_keys[a] = (e < BLOCK / 2) ? key_t'(3 * e + b) : key_t'(3 * (BLOCK - e) + 1 - b);
        host_write(a, '{key: ref_keys[a], idx: idx_t'(a)});
      end
    s0 = steps;
    launch(1, LB, LB - 1, cyc);
    check(steps - s0 == 32'(NBLK * LB), $sformatf("merge steps %0d", steps - s0));
    check(cyc <= NBLK * (BLOCK + 2 + LB) + 4, $sformatf("merge cycles %0d", cyc));
    read_all();
    check_blocks("merge");
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
