// tb_bitonic_pair_cu: checks one long-stride merge step of the pair compute
// unit on N = 64 records. The expected array is computed in the testbench by
// applying the compare-exchange rule (pair i, i+stride; ascending when bit
// size_log of i is 0) to a copy of the data. Two launches with different
// size/stride are checked element by element, and each launch must take at
// most N/2 + 3 cycles.
module tb_bitonic_pair_cu;
  import join_pkg::*;

  localparam int N = 64;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, busy, done, wr_en, h_we;
  logic [6:0] size_log, stride_log;
  logic [5:0] rd0, rd1, wa0, wa1, h_addr;
  rec_t d0, d1, wd0, wd1, h_data;
  logic [31:0] pairs;

  global_buf #(.DEPTH(N)) u_mem (
    .clk, .rd_addr0(busy ? rd0 : h_addr), .rd_addr1(rd1), .rd_data0(d0), .rd_data1(d1),
    .wr_en0(busy ? wr_en : h_we), .wr_addr0(busy ? wa0 : h_addr), .wr_data0(busy ? wd0 : h_data),
    .wr_en1(busy && wr_en), .wr_addr1(wa1), .wr_data1(wd1));

  bitonic_pair_cu #(.N(N)) dut (
    .clk, .rst_n, .start, .size_log, .stride_log, .busy, .done,
    .rd_addr0(rd0), .rd_addr1(rd1), .rd_data0(d0), .rd_data1(d1),
    .wr_en, .wr_addr0(wa0), .wr_addr1(wa1), .wr_data0(wd0), .wr_data1(wd1),
    .pair_count(pairs));

  int checks = 0, failures = 0;
  rec_t model [N];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run_case(int sl, int st);
    int cyc;
    rec_t t;
    rec_t got;
    for (int a = 0; a < N; a++) begin
      model[a] = '{key: key_t'($urandom_range(0, 1000)) - 500, idx: idx_t'(a)};
      @(negedge clk); h_we = 1; h_addr = 6'(a); h_data = model[a];
    end
    @(negedge clk); h_we = 0;
    // reference step
    for (int i = 0; i < N; i++) begin
      int l = i + (1 << st);
      if (((i >> st) & 1) == 0 && l < N) begin
        bit asc = ((i >> sl) & 1) == 0;
        if (asc ? (model[i].key > model[l].key) : (model[i].key < model[l].key)) begin
          t = model[i]; model[i] = model[l]; model[l] = t;
        end
      end
    end
    @(negedge clk); start = 1; size_log = 7'(sl); stride_log = 7'(st);
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done) begin @(negedge clk); cyc++; end
    check(cyc <= N / 2 + 3, $sformatf("cycles %0d", cyc));
    for (int a = 0; a < N; a++) begin
      @(negedge clk); h_addr = 6'(a);
      @(posedge clk); #1 got = d0;
      check(got == model[a], $sformatf("s%0d/%0d addr %0d got %0d exp %0d", sl, st, a, got.key, model[a].key));
    end
  endtask

  initial begin
    start = 0; size_log = 0; stride_log = 0; h_we = 0; h_addr = 0; h_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_case(6, 5);
    run_case(5, 3);
    check(pairs == 32'(N), $sformatf("pair count %0d", pairs));
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
