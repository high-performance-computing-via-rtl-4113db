// bitonic_pair_cu: bitonic-sort compute unit for the long strides, the
// "merge local" kernel. For one (size, stride) pair whose stride spans more
// than a block, each work-item reads one pair of records straight from the
// global buffer, compare-exchanges it and writes it back.
//
// Pair p (p = 0..N/2-1) is made of positions i = 2p - (p mod stride) and
// i + stride; the pair is put in ascending order when bit size_log of i is 0
// and in descending order otherwise. The unit is pipelined at one pair per
// cycle: the read for pair p is issued in cycle p and its write-back happens
// in cycle p+1. Pairs of one step are disjoint, so there is no hazard.
//
// Interface: start (with size_log, stride_log) -> busy -> done (one cycle).
// Memory: two synchronous read ports and two write ports (see global_buf).
// Timing: N/2 + 2 cycles from start to done.
//
// From the document: one pair per work-item read from and written back to
// global memory. This design's choice: one pair per cycle.
module bitonic_pair_cu
  import join_pkg::*;
#(
  parameter int unsigned N = 8192
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [$clog2(N):0]   size_log,
  input  logic [$clog2(N):0]   stride_log,
  output logic                 busy,
  output logic                 done,
  output logic [$clog2(N)-1:0] rd_addr0,
  output logic [$clog2(N)-1:0] rd_addr1,
  input  rec_t                 rd_data0,
  input  rec_t                 rd_data1,
  output logic                 wr_en,
  output logic [$clog2(N)-1:0] wr_addr0,
  output logic [$clog2(N)-1:0] wr_addr1,
  output rec_t                 wr_data0,
  output rec_t                 wr_data1,
  output logic [31:0]          pair_count   // compare-exchanges done
);

  localparam int unsigned AW = $clog2(N);

  logic          run;
  logic [AW-1:0] p;            // pair being read
  logic [AW:0]   kk, jj;
  logic          wb;           // write-back stage valid
  logic [AW-1:0] wb_i, wb_l;

  logic [AW-1:0] lo_mask, i_addr, l_addr;
  always_comb begin
    lo_mask = AW'((1 << jj) - 1);
    i_addr  = AW'(((p & ~lo_mask) << 1) | (p & lo_mask));
    l_addr  = i_addr | AW'(1 << jj);
    rd_addr0 = i_addr;
    rd_addr1 = l_addr;
  end

  logic asc, swap;
  always_comb begin
    asc      = (((32'(wb_i) >> kk) & 1) == 0);
    swap     = need_swap(rd_data0, rd_data1, asc);
    wr_en    = wb;
    wr_addr0 = wb_i;
    wr_addr1 = wb_l;
    wr_data0 = swap ? rd_data1 : rd_data0;
    wr_data1 = swap ? rd_data0 : rd_data1;
  end

  assign busy = run || wb;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run        <= 1'b0;
      p          <= '0;
      kk         <= '0;
      jj         <= '0;
      wb         <= 1'b0;
      wb_i       <= '0;
      wb_l       <= '0;
      done       <= 1'b0;
      pair_count <= '0;
    end else begin
      done <= 1'b0;
      wb   <= run;
      wb_i <= i_addr;
      wb_l <= l_addr;
      if (wb) pair_count <= pair_count + 1;
      if (wb && !run) done <= 1'b1;
      if (!run && !wb && start) begin
        run <= 1'b1;
        p   <= '0;
        kk  <= size_log;
        jj  <= stride_log;
      end else if (run) begin
        p <= p + 1'b1;
        if (p == AW'(N / 2 - 1)) run <= 1'b0;
      end
    end
  end

endmodule
