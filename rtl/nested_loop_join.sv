// nested_loop_join: compute unit for the direct O(N*M) join. For every key
// B[i] of the second table it compares the key with every key A[j] of the
// first table and writes one output slot per (i, j): the indices j and i and
// the value A[j] on a match, or -99 in all three fields ("hole") otherwise.
// Output slot numbers are i*NA + j, as in the document's algorithm.
//
// The inner loop is unrolled LANES times: table A sits in a local memory
// partitioned so that one row holds LANES consecutive keys (a 512-bit word
// with the defaults), so LANES comparisons happen per cycle and one output
// beat carries LANES slots.
//
// Interface:
//   a_wr_en/a_wr_row/a_wr_data   load A, one row (LANES keys) per cycle;
//   a_len                        number of valid A keys (1..NA);
//   start                        clears the B counter; the unit then accepts
//                                B keys on b_valid/b_ready/b_key, b_last
//                                marking the final one;
//   out_valid/out_ready          one beat: out_slot (slot of lane 0),
//                                out_lane_valid, out_a, out_b, out_val;
//   done                         one cycle after the beat of the last row of
//                                the last B key has been accepted.
// Timing: ceil(a_len/LANES) beats per B key when out_ready stays high; each
// B key costs one extra cycle to accept.
//
// From the document: the nested loop, the output layout and -99 holes, the
// independence of all comparisons, the 512-bit (16 x int) data path. This
// design's choices: LANES = 16, register-based local A memory, the handshake.
module nested_loop_join
  import join_pkg::*;
#(
  parameter int unsigned NA    = 8192,
  parameter int unsigned LANES = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          a_wr_en,
  input  logic [$clog2(NA/LANES)-1:0]   a_wr_row,
  input  key_t                          a_wr_data [LANES],
  input  logic [$clog2(NA):0]           a_len,
  input  logic                          start,
  input  logic                          b_valid,
  output logic                          b_ready,
  input  key_t                          b_key,
  input  logic                          b_last,
  output logic                          out_valid,
  input  logic                          out_ready,
  output logic [31:0]                   out_slot,
  output logic [LANES-1:0]              out_lane_valid,
  output key_t                          out_a [LANES],
  output key_t                          out_b [LANES],
  output key_t                          out_val [LANES],
  output logic                          done,
  output logic [31:0]                   n_matches,
  output logic [31:0]                   n_stalls
);

  localparam int unsigned ROWS = NA / LANES;
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1;
  localparam int unsigned LW   = $clog2(LANES);

  key_t a_mem [ROWS][LANES];

  always_ff @(posedge clk) begin
    if (a_wr_en) a_mem[a_wr_row] <= a_wr_data;
  end

  typedef enum logic [1:0] {N_IDLE, N_WAITB, N_SCAN, N_DONE} nstate_t;
  nstate_t st;

  key_t         bk;         // current B key
  logic [31:0]  bi;         // current B index i
  logic         blast;
  logic [RW:0]  row;
  logic [RW:0]  nrows;

  assign nrows   = (RW+1)'((a_len + (($clog2(NA)+1)'(LANES - 1))) >> LW);
  assign b_ready = (st == N_WAITB);

  wire advance = (st == N_SCAN) && (!out_valid || out_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= N_IDLE;
      bk             <= '0;
      bi             <= '0;
      blast          <= 1'b0;
      row            <= '0;
      out_valid      <= 1'b0;
      out_slot       <= '0;
      out_lane_valid <= '0;
      done           <= 1'b0;
      n_matches      <= '0;
      n_stalls       <= '0;
      for (int l = 0; l < int'(LANES); l++) begin
        out_a[l]   <= HOLE;
        out_b[l]   <= HOLE;
        out_val[l] <= HOLE;
      end
    end else begin
      done <= 1'b0;
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (out_valid && !out_ready) n_stalls <= n_stalls + 1;
      unique case (st)
        N_IDLE: if (start) begin
          bi <= '0;
          st <= N_WAITB;
        end
        N_WAITB: if (b_valid) begin
          bk    <= b_key;
          blast <= b_last;
          row   <= '0;
          st    <= N_SCAN;
        end
        N_SCAN: if (advance) begin
          out_valid <= 1'b1;
          out_slot  <= bi * 32'(NA) + (32'(row) << LW);
          for (int l = 0; l < int'(LANES); l++) begin
            logic [31:0] jj;
            logic        lv, hit;
            jj  = (32'(row) << LW) + 32'(l);
            lv  = jj < 32'(a_len);
            hit = lv && (a_mem[row[RW-1:0]][l] == bk);
            out_lane_valid[l] <= lv;
            out_a[l]   <= hit ? key_t'(jj) : HOLE;
            out_b[l]   <= hit ? key_t'(bi) : HOLE;
            out_val[l] <= hit ? a_mem[row[RW-1:0]][l] : HOLE;
          end
          n_matches <= n_matches + 32'($countones(match_vec(row)));
          if (row + 1'b1 == nrows) begin
            bi <= bi + 1;
            st <= blast ? N_DONE : N_WAITB;
          end else begin
            row <= row + 1'b1;
          end
        end
        N_DONE: if (!out_valid || out_ready) begin
          done <= 1'b1;
          st   <= N_IDLE;
        end
        default: st <= N_IDLE;
      endcase
    end
  end

  function automatic logic [LANES-1:0] match_vec(logic [RW:0] r);
    logic [LANES-1:0] m;
    for (int l = 0; l < int'(LANES); l++)
      m[l] = (((32'(r) << LW) + 32'(l)) < 32'(a_len)) && (a_mem[r[RW-1:0]][l] == bk);
    return m;
  endfunction

endmodule
