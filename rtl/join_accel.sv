// join_accel: sort-merge database join. Two tables of N integer keys are
// sorted by two bitonic sorters working in parallel, then merge_join walks the
// two sorted tables once and streams out every matching pair.
//
// Records are tagged with their load address as they are loaded, so each
// output names the matching rows in the original, unsorted tables.
//
// Interface:
//   ld_en/ld_tbl/ld_addr/ld_key   load key ld_key at row ld_addr of table A
//                                 (ld_tbl = 0) or B (ld_tbl = 1), while idle;
//   start                         sort both tables, then join them;
//   out_valid/out_ready/out_*     the joined stream (see merge_join);
//   done                          one cycle after the join has finished;
//   phase counters                kernel launches per sorter, matches, stalls.
// Timing: the sort phase takes as long as one bitonic_sorter run (both run
// concurrently); the join phase at most 2*(2N + matches) cycles.
//
// From the document: sort both relations with the bitonic network, then join
// the sorted relations in one linear loop. This design's choices: two
// sorters instead of one reused twice, and the on-chip tables.
module join_accel
  import join_pkg::*;
#(
  parameter int unsigned N     = 8192,
  parameter int unsigned BLOCK = 512
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ld_en,
  input  logic                 ld_tbl,
  input  logic [$clog2(N)-1:0] ld_addr,
  input  key_t                 ld_key,
  input  logic                 start,
  output logic                 busy,
  output logic                 done,
  output logic                 out_valid,
  input  logic                 out_ready,
  output idx_t                 out_a_idx,
  output idx_t                 out_b_idx,
  output key_t                 out_value,
  output logic [15:0]          n_sort_local,
  output logic [15:0]          n_merge_local,
  output logic [15:0]          n_merge_global,
  output logic [31:0]          n_matches,
  output logic [31:0]          n_stalls
);

  localparam int unsigned AW = $clog2(N);

  typedef enum logic [1:0] {A_IDLE, A_SORT, A_JOIN} astate_t;
  astate_t st;

  logic sa_done, sb_done, sa_busy, sb_busy, got_a, got_b;
  logic mj_start, mj_busy, mj_done;
  logic [AW-1:0] mj_a_addr, mj_b_addr;
  rec_t          ra, rb;
  logic [15:0]   b_sl, b_ml, b_mg;

  rec_t ld_rec;
  assign ld_rec = '{key: ld_key, idx: idx_t'(ld_addr)};

  bitonic_sorter #(.N(N), .BLOCK(BLOCK)) u_sort_a (
    .clk, .rst_n,
    .start(start && st == A_IDLE), .busy(sa_busy), .done(sa_done),
    .ext_wr_en(ld_en && !ld_tbl && st == A_IDLE), .ext_wr_addr(ld_addr), .ext_wr_data(ld_rec),
    .ext_rd_addr(mj_a_addr), .ext_rd_data(ra),
    .n_sort_local(n_sort_local), .n_merge_local(n_merge_local), .n_merge_global(n_merge_global)
  );

  bitonic_sorter #(.N(N), .BLOCK(BLOCK)) u_sort_b (
    .clk, .rst_n,
    .start(start && st == A_IDLE), .busy(sb_busy), .done(sb_done),
    .ext_wr_en(ld_en && ld_tbl && st == A_IDLE), .ext_wr_addr(ld_addr), .ext_wr_data(ld_rec),
    .ext_rd_addr(mj_b_addr), .ext_rd_data(rb),
    .n_sort_local(b_sl), .n_merge_local(b_ml), .n_merge_global(b_mg)
  );

  merge_join #(.NA(N), .NB(N)) u_join (
    .clk, .rst_n,
    .start(mj_start), .busy(mj_busy), .done(mj_done),
    .a_addr(mj_a_addr), .a_data(ra),
    .b_addr(mj_b_addr), .b_data(rb),
    .out_valid, .out_ready, .out_a_idx, .out_b_idx, .out_value,
    .n_matches, .n_stalls
  );

  assign busy = (st != A_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st       <= A_IDLE;
      got_a    <= 1'b0;
      got_b    <= 1'b0;
      mj_start <= 1'b0;
      done     <= 1'b0;
    end else begin
      mj_start <= 1'b0;
      done     <= 1'b0;
      unique case (st)
        A_IDLE: if (start) begin
          got_a <= 1'b0;
          got_b <= 1'b0;
          st    <= A_SORT;
        end
        A_SORT: begin
          if (sa_done) got_a <= 1'b1;
          if (sb_done) got_b <= 1'b1;
          if ((got_a || sa_done) && (got_b || sb_done)) begin
            mj_start <= 1'b1;
            st       <= A_JOIN;
          end
        end
        A_JOIN: if (mj_done) begin
          done <= 1'b1;
          st   <= A_IDLE;
        end
        default: st <= A_IDLE;
      endcase
    end
  end

  // Both sorters see the same sizes and start together, so they run in step.
  a_sorters_in_step: assert property (@(posedge clk) disable iff (!rst_n) sa_busy == sb_busy);

endmodule
