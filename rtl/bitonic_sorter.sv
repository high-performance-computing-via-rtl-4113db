// bitonic_sorter: sorts N records by key (ascending) in an on-chip global
// buffer with the three bitonic-sort kernels, sequenced in hardware the way
// a host program launches them:
//   1. sort local   (bitonic_local_cu, merge_mode 0): every BLOCK-record
//                   block is sorted, alternating direction, forming bitonic
//                   runs of length 2*BLOCK;
//   2. for size = 2*BLOCK .. N (doubling), for stride = size/2 downwards:
//        stride >= BLOCK: merge local  (bitonic_pair_cu), one stride per
//                         launch over global memory;
//        stride <  BLOCK: merge global (bitonic_local_cu, merge_mode 1),
//                         which finishes all remaining strides of this size
//                         inside each block, then the next size begins.
// The total depth is log2(N)*(log2(N)+1)/2 compare-exchange steps.
//
// Interface: while idle, the host side loads records through ext_wr_* and
// reads them through ext_rd_addr/ext_rd_data (one-cycle read latency). start
// begins a sort; busy is high until done pulses. Launch counters report how
// many times each kernel ran.
// Timing (defaults N = 8192, BLOCK = 512): sort local about
// 16*(2*256+46) cycles, each merge-local launch N/2 + 2 cycles, each
// merge-global launch about 16*(2*256+1+strides) cycles.
//
// From the document: the three kernels and the host loop that chooses between
// them by comparing the stride with the work-group's span. This design's
// choices: the loop runs in hardware; merge global is launched once per size
// (it loops over the remaining strides itself); work-group span BLOCK = 512
// records (256 work-items).
module bitonic_sorter
  import join_pkg::*;
#(
  parameter int unsigned N     = 8192,
  parameter int unsigned BLOCK = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  input  logic                 ext_wr_en,
  input  logic [$clog2(N)-1:0] ext_wr_addr,
  input  rec_t                 ext_wr_data,
  input  logic [$clog2(N)-1:0] ext_rd_addr,
  output rec_t                 ext_rd_data,
  output logic [15:0]          n_sort_local,
  output logic [15:0]          n_merge_local,
  output logic [15:0]          n_merge_global
);

  localparam int unsigned AW = $clog2(N);
  localparam int unsigned LB = $clog2(BLOCK);

  typedef enum logic [2:0] {C_IDLE, C_SORTL, C_DECIDE, C_PAIR, C_BLOCK, C_DONE} cstate_t;
  cstate_t cs;

  logic [AW:0] size_log, stride_log;

  // Compute-unit control.
  logic lc_start, lc_mode, lc_busy, lc_done;
  logic pc_start, pc_busy, pc_done;

  // Memory ports.
  logic [AW-1:0] m_rd0, m_rd1, m_wa0, m_wa1;
  rec_t          m_rdata0, m_rdata1, m_wd0, m_wd1;
  logic          m_we0, m_we1;

  logic [AW-1:0] lc_rd0, lc_rd1, lc_wa0, lc_wa1, pc_rd0, pc_rd1, pc_wa0, pc_wa1;
  rec_t          lc_wd0, lc_wd1, pc_wd0, pc_wd1;
  logic          lc_we, pc_we;
  logic [31:0]   lc_steps, pc_pairs;

  global_buf #(.DEPTH(N)) u_buf (
    .clk,
    .rd_addr0(m_rd0), .rd_addr1(m_rd1),
    .rd_data0(m_rdata0), .rd_data1(m_rdata1),
    .wr_en0(m_we0), .wr_addr0(m_wa0), .wr_data0(m_wd0),
    .wr_en1(m_we1), .wr_addr1(m_wa1), .wr_data1(m_wd1)
  );

  bitonic_local_cu #(.N(N), .BLOCK(BLOCK)) u_local (
    .clk, .rst_n,
    .start(lc_start), .merge_mode(lc_mode),
    .size_log(size_log), .stride_log(stride_log),
    .busy(lc_busy), .done(lc_done),
    .rd_addr0(lc_rd0), .rd_addr1(lc_rd1),
    .rd_data0(m_rdata0), .rd_data1(m_rdata1),
    .wr_en(lc_we), .wr_addr0(lc_wa0), .wr_addr1(lc_wa1),
    .wr_data0(lc_wd0), .wr_data1(lc_wd1),
    .step_count(lc_steps)
  );

  bitonic_pair_cu #(.N(N)) u_pair (
    .clk, .rst_n,
    .start(pc_start),
    .size_log(size_log), .stride_log(stride_log),
    .busy(pc_busy), .done(pc_done),
    .rd_addr0(pc_rd0), .rd_addr1(pc_rd1),
    .rd_data0(m_rdata0), .rd_data1(m_rdata1),
    .wr_en(pc_we), .wr_addr0(pc_wa0), .wr_addr1(pc_wa1),
    .wr_data0(pc_wd0), .wr_data1(pc_wd1),
    .pair_count(pc_pairs)
  );

  // Port arbitration: the active kernel owns the buffer, the host side
  // otherwise.
  always_comb begin
    if (pc_busy) begin
      m_rd0 = pc_rd0; m_rd1 = pc_rd1;
      m_we0 = pc_we;  m_we1 = pc_we;
      m_wa0 = pc_wa0; m_wa1 = pc_wa1;
      m_wd0 = pc_wd0; m_wd1 = pc_wd1;
    end else if (lc_busy) begin
      m_rd0 = lc_rd0; m_rd1 = lc_rd1;
      m_we0 = lc_we;  m_we1 = lc_we;
      m_wa0 = lc_wa0; m_wa1 = lc_wa1;
      m_wd0 = lc_wd0; m_wd1 = lc_wd1;
    end else begin
      m_rd0 = ext_rd_addr; m_rd1 = '0;
      m_we0 = ext_wr_en && !busy; m_we1 = 1'b0;
      m_wa0 = ext_wr_addr; m_wa1 = '0;
      m_wd0 = ext_wr_data; m_wd1 = '0;
    end
  end

  assign ext_rd_data = m_rdata0;
  assign busy = (cs != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs             <= C_IDLE;
      size_log       <= '0;
      stride_log     <= '0;
      lc_start       <= 1'b0;
      lc_mode        <= 1'b0;
      pc_start       <= 1'b0;
      done           <= 1'b0;
      n_sort_local   <= '0;
      n_merge_local  <= '0;
      n_merge_global <= '0;
    end else begin
      lc_start <= 1'b0;
      pc_start <= 1'b0;
      done     <= 1'b0;
      unique case (cs)
        C_IDLE: begin
          if (start) begin
            lc_start     <= 1'b1;
            lc_mode      <= 1'b0;
            size_log     <= (AW+1)'(LB);
            stride_log   <= '0;
            n_sort_local <= n_sort_local + 1'b1;
            cs           <= C_SORTL;
          end
        end
        C_SORTL: begin
          if (lc_done) begin
            size_log   <= (AW+1)'(LB + 1);
            stride_log <= (AW+1)'(LB);
            cs         <= C_DECIDE;
          end
        end
        C_DECIDE: begin
          if (size_log > (AW+1)'(AW)) begin
            cs <= C_DONE;
          end else if (stride_log >= (AW+1)'(LB)) begin
            pc_start      <= 1'b1;
            n_merge_local <= n_merge_local + 1'b1;
            cs            <= C_PAIR;
          end else begin
            lc_start       <= 1'b1;
            lc_mode        <= 1'b1;
            n_merge_global <= n_merge_global + 1'b1;
            cs             <= C_BLOCK;
          end
        end
        C_PAIR: begin
          if (pc_done) begin
            stride_log <= stride_log - 1'b1;
            cs         <= C_DECIDE;
          end
        end
        C_BLOCK: begin
          if (lc_done) begin
            size_log   <= size_log + 1'b1;
            stride_log <= size_log;      // new size's first stride = size/2
            cs         <= C_DECIDE;
          end
        end
        C_DONE: begin
          done <= 1'b1;
          cs   <= C_IDLE;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  // Only one compute unit may own the buffer at a time.
  a_one_owner: assert property (@(posedge clk) disable iff (!rst_n) !(pc_busy && lc_busy));

endmodule
