// bitonic_local_cu: bitonic-sort compute unit that works on one block of
// BLOCK records at a time in local registers. It implements the two kernels
// whose work-group copies a block from global to local memory:
//   merge_mode = 0  "sort local": every block is sorted completely (all
//                   sizes 2..BLOCK), so neighbouring blocks form bitonic runs;
//   merge_mode = 1  "merge global": for the given size 2**size_log, the
//                   strides 2**stride_log down to 1 are applied inside each
//                   block (the strides that no longer cross a block).
// The direction of every compare-exchange follows the global record index i:
// ascending when bit size_log of i is 0, which is what makes the final
// sequence ascending.
//
// Per block: LOAD reads two records per cycle into the local register file
// (BLOCK/2 cycles + 1), each STEP applies one stride to the whole block with
// BLOCK/2 parallel comparators (one cycle per step), WRITE stores two records
// per cycle back (BLOCK/2 cycles). The unit walks through all N/BLOCK blocks
// per launch, i.e. one launch is one kernel call over all work-groups.
//
// Interface: start (one cycle, with merge_mode/size_log/stride_log) -> busy
// -> done (one cycle). Memory: two synchronous read ports and two write ports
// (see global_buf). The one-work-item-per-pair mapping gives a work-group
// of BLOCK/2 work-items.
//
// From the document: the kernels' division of work, local copy, parallel
// comparators on a partitioned local memory, the stride loop and the
// position formula pos = 2*id - (id & (stride-1)). This design's choices:
// sequential processing of the work-groups, 2 records per memory cycle,
// one stride per cycle.
module bitonic_local_cu
  import join_pkg::*;
#(
  parameter int unsigned N     = 8192,
  parameter int unsigned BLOCK = 512
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     merge_mode,
  input  logic [$clog2(N):0]       size_log,
  input  logic [$clog2(N):0]       stride_log,
  output logic                     busy,
  output logic                     done,
  // global buffer access
  output logic [$clog2(N)-1:0]     rd_addr0,
  output logic [$clog2(N)-1:0]     rd_addr1,
  input  rec_t                     rd_data0,
  input  rec_t                     rd_data1,
  output logic                     wr_en,
  output logic [$clog2(N)-1:0]     wr_addr0,
  output logic [$clog2(N)-1:0]     wr_addr1,
  output rec_t                     wr_data0,
  output rec_t                     wr_data1,
  output logic [31:0]              step_count   // compare-exchange steps done
);

  localparam int unsigned AW    = $clog2(N);
  localparam int unsigned LB    = $clog2(BLOCK);
  localparam int unsigned HB    = BLOCK / 2;
  localparam int unsigned NBLK  = N / BLOCK;
  localparam int unsigned CW    = (HB > 1) ? $clog2(HB) + 1 : 2;
  localparam int unsigned BKW   = (NBLK > 1) ? $clog2(NBLK) : 1;

  typedef enum logic [2:0] {S_IDLE, S_LOAD, S_STEP, S_WRITE, S_DONE} state_t;
  state_t state;

  rec_t loc [BLOCK];
  rec_t nxt [BLOCK];

  logic [BKW-1:0]   blk;
  logic [CW-1:0]    cnt;
  logic             rd_pend;
  logic [CW-1:0]    rd_slot;
  logic             mode_q;
  logic [AW:0]      kk, jj;           // current size and stride exponents
  logic [AW:0]      jj_first;         // first stride of a merge launch

  wire [AW-1:0] base = AW'(blk) << LB;

  // One compare-exchange step over the whole block. Comparator p serves, at
  // stride 2**s, the positions i_s(p) = 2p - (p mod 2**s) and i_s(p) + 2**s.
  // Its operands are picked by a LB-way multiplexer on the current stride,
  // and every element takes its new value from the comparator it belonged to
  // (as the lower or the upper position of the pair).
  rec_t cmp_lo [HB];
  rec_t cmp_hi [HB];

  function automatic int unsigned pos_lo(int unsigned p, int unsigned s);
    return ((p >> s) << (s + 1)) | (p & ((1 << s) - 1));
  endfunction

  for (genvar gp = 0; gp < int'(HB); gp++) begin : g_cmp
    rec_t a, b;
    logic asc;
    always_comb begin
      a   = loc[pos_lo(gp, 0)];
      b   = loc[pos_lo(gp, 0) + 1];
      asc = 1'b1;
      for (int s = 0; s < int'(LB); s++) begin
        if (jj == (AW+1)'(s)) begin
          a   = loc[pos_lo(gp, s)];
          b   = loc[pos_lo(gp, s) + (1 << s)];
          asc = ((((32'(base) | pos_lo(gp, s)) >> kk) & 1) == 0);
        end
      end
      if (need_swap(a, b, asc)) begin
        cmp_lo[gp] = b;
        cmp_hi[gp] = a;
      end else begin
        cmp_lo[gp] = a;
        cmp_hi[gp] = b;
      end
    end
  end

  for (genvar ge = 0; ge < int'(BLOCK); ge++) begin : g_elem
    always_comb begin
      nxt[ge] = cmp_lo[0];
      for (int s = 0; s < int'(LB); s++) begin
        if (jj == (AW+1)'(s)) begin
          // pair index of element ge at stride 2**s: drop bit s
          nxt[ge] = (((ge >> s) & 1) != 0) ? cmp_hi[((ge >> (s + 1)) << s) | (ge & ((1 << s) - 1))]
                                    : cmp_lo[((ge >> (s + 1)) << s) | (ge & ((1 << s) - 1))];
        end
      end
    end
  end

  always_comb begin
    rd_addr0 = base | AW'({cnt[CW-2:0], 1'b0});
    rd_addr1 = base | AW'({cnt[CW-2:0], 1'b1});
    wr_en    = (state == S_WRITE);
    wr_addr0 = rd_addr0;
    wr_addr1 = rd_addr1;
    wr_data0 = loc[{cnt[CW-2:0], 1'b0}];
    wr_data1 = loc[{cnt[CW-2:0], 1'b1}];
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      blk        <= '0;
      cnt        <= '0;
      rd_pend    <= 1'b0;
      rd_slot    <= '0;
      mode_q     <= 1'b0;
      kk         <= '0;
      jj         <= '0;
      jj_first   <= '0;
      done       <= 1'b0;
      step_count <= '0;
    end else begin
      done <= 1'b0;
      // capture read data one cycle after the address
      rd_pend <= 1'b0;
      if (rd_pend) begin
        loc[{rd_slot[CW-2:0], 1'b0}] <= rd_data0;
        loc[{rd_slot[CW-2:0], 1'b1}] <= rd_data1;
      end
      unique case (state)
        S_IDLE: begin
          if (start) begin
            mode_q   <= merge_mode;
            jj_first <= stride_log;
            blk      <= '0;
            cnt      <= '0;
            state    <= S_LOAD;
          end
        end
        S_LOAD: begin
          if (cnt == CW'(HB)) begin
            // last read data is captured this cycle; set up the first step
            cnt <= '0;
            if (mode_q) begin
              kk <= size_log;
              jj <= jj_first;
            end else begin
              kk <= (AW+1)'(1);
              jj <= '0;
            end
            state <= S_STEP;
          end else begin
            rd_pend <= 1'b1;
            rd_slot <= cnt;
            cnt     <= cnt + 1'b1;
          end
        end
        S_STEP: begin
          for (int e = 0; e < int'(BLOCK); e++) loc[e] <= nxt[e];
          step_count <= step_count + 1;
          if (jj != '0) begin
            jj <= jj - 1'b1;
          end else if (!mode_q && kk != (AW+1)'(LB)) begin
            kk <= kk + 1'b1;
            jj <= kk;            // next size starts with stride size/2
          end else begin
            state <= S_WRITE;
          end
        end
        S_WRITE: begin
          if (cnt == CW'(HB - 1)) begin
            cnt <= '0;
            if (blk == BKW'(NBLK - 1)) begin
              state <= S_DONE;
            end else begin
              blk   <= blk + 1'b1;
              state <= S_LOAD;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A merge launch must only use strides that stay inside one block.
  a_stride_in_block: assert property (@(posedge clk) disable iff (!rst_n)
    (start && merge_mode) |-> (stride_log < (AW+1)'(LB)));

endmodule
