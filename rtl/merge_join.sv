// merge_join: join of two relations that are already sorted by key, in one
// linear pass. Every pair (a, b) with equal keys produces one output record
// {a's original index, b's original index, key}.
//
// Two cursors i (into A) and j (into B) walk forward: when A[i] > B[j] j
// advances, when A[i] < B[j] i advances. On equal keys the match is emitted
// and a run cursor t = j+1, j+2, ... scans forward through B while B[t]
// still equals A[i], emitting each further match; then i advances while j
// stays, so a following A record with the same key meets the same run of B
// records again. Hence duplicates on both sides give all their pairs.
//
// Interface: start (one cycle) -> busy -> done (one cycle). A and B are read
// through synchronous read ports (address out, record back next cycle).
// Output stream out_valid/out_ready with out_a_idx, out_b_idx, out_value;
// when out_ready is low the unit holds the current match (a stall).
// Timing: two cycles per cursor move or emitted match (address, compare),
// plus stall cycles: at most 2*(NA + NB + matches) + 2 cycles.
//
// From the document: the join loop for sorted relations with the inner loop
// over successive equal B records. This design's choices: the bound check on
// the run cursor, the output handshake, two-cycle iteration.
module merge_join
  import join_pkg::*;
#(
  parameter int unsigned NA = 8192,
  parameter int unsigned NB = 8192
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  output logic                  busy,
  output logic                  done,
  output logic [$clog2(NA)-1:0] a_addr,
  input  rec_t                  a_data,
  output logic [$clog2(NB)-1:0] b_addr,
  input  rec_t                  b_data,
  output logic                  out_valid,
  input  logic                  out_ready,
  output idx_t                  out_a_idx,
  output idx_t                  out_b_idx,
  output key_t                  out_value,
  output logic [31:0]           n_matches,
  output logic [31:0]           n_stalls
);

  localparam int unsigned AWA = $clog2(NA);
  localparam int unsigned AWB = $clog2(NB);

  typedef enum logic [2:0] {J_IDLE, J_RD, J_CMP, J_RUN_RD, J_RUN_CMP, J_DONE} jstate_t;
  jstate_t st;

  logic [AWA:0] i;
  logic [AWB:0] j, t;
  rec_t         a_q;

  assign a_addr = AWA'(i);
  assign b_addr = (st == J_RUN_RD || st == J_RUN_CMP) ? AWB'(t) : AWB'(j);
  assign busy   = (st != J_IDLE);

  // Match presented to the output in the compare states.
  logic emit;
  always_comb begin
    emit      = 1'b0;
    out_a_idx = a_data.idx;
    out_b_idx = b_data.idx;
    out_value = a_data.key;
    if (st == J_CMP && a_data.key == b_data.key) emit = 1'b1;
    if (st == J_RUN_CMP && b_data.key == a_q.key) begin
      emit      = 1'b1;
      out_a_idx = a_q.idx;
      out_value = a_q.key;
    end
  end
  assign out_valid = emit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= J_IDLE;
      i         <= '0;
      j         <= '0;
      t         <= '0;
      a_q       <= '0;
      done      <= 1'b0;
      n_matches <= '0;
      n_stalls  <= '0;
    end else begin
      done <= 1'b0;
      if (emit && out_ready) n_matches <= n_matches + 1;
      if (emit && !out_ready) n_stalls <= n_stalls + 1;
      unique case (st)
        J_IDLE: if (start) begin
          i  <= '0;
          j  <= '0;
          st <= J_RD;
        end
        J_RD: st <= J_CMP;
        J_CMP: begin
          if (a_data.key > b_data.key) begin
            j  <= j + 1'b1;
            st <= (j + 1'b1 == (AWB+1)'(NB)) ? J_DONE : J_RD;
          end else if (a_data.key < b_data.key) begin
            i  <= i + 1'b1;
            st <= (i + 1'b1 == (AWA+1)'(NA)) ? J_DONE : J_RD;
          end else if (out_ready) begin
            a_q <= a_data;
            t   <= j + 1'b1;
            if (j + 1'b1 == (AWB+1)'(NB)) begin
              i  <= i + 1'b1;
              st <= (i + 1'b1 == (AWA+1)'(NA)) ? J_DONE : J_RD;
            end else begin
              st <= J_RUN_RD;
            end
          end
        end
        J_RUN_RD: st <= J_RUN_CMP;
        J_RUN_CMP: begin
          if (b_data.key == a_q.key) begin
            if (out_ready) begin
              t <= t + 1'b1;
              if (t + 1'b1 == (AWB+1)'(NB)) begin
                i  <= i + 1'b1;
                st <= (i + 1'b1 == (AWA+1)'(NA)) ? J_DONE : J_RD;
              end else begin
                st <= J_RUN_RD;
              end
            end
          end else begin
            i  <= i + 1'b1;
            st <= (i + 1'b1 == (AWA+1)'(NA)) ? J_DONE : J_RD;
          end
        end
        J_DONE: begin
          done <= 1'b1;
          st   <= J_IDLE;
        end
        default: st <= J_IDLE;
      endcase
    end
  end

endmodule
