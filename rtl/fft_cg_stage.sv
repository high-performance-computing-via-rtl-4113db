// fft_cg_stage: one stage of the constant-geometry radix-2 FFT used by
// fft_stream.
//
// Every stage of a constant-geometry FFT has the same interconnect: the
// butterfly with index i takes elements i and i+N/2 of the stage input and
// produces elements 2i and 2i+1 of the stage output,
//     y[2i]   =  x[i] + x[i+N/2]
//     y[2i+1] = (x[i] - x[i+N/2]) * W_N^e,   e = (i >> STAGE) << STAGE.
// After log2(N) such stages the spectrum appears in bit-reversed order.
//
// Storage: two frame buffers (ping-pong), each split into a lower and an
// upper half so both butterfly operands are read in the same cycle from two
// single-port memories. A frame is written in arrival order into one buffer;
// when its last sample arrives the buffers swap and the full one is read out
// at one output sample per cycle while the next frame is being written.
// Output k (k = 0..N-1) is butterfly k/2, upper (sum) or lower (difference)
// result depending on k[0].
//
// Interface: in_valid/in_re/in_im stream, no back-pressure; samples may arrive
// at most one per cycle and a frame must not finish arriving before the
// previous one has been read out (N cycles), which an assertion checks.
// Timing: the first output of a frame leaves 2 cycles after its last input
// is written; the frame then streams out in N consecutive cycles.
//
// From the document: the constant-geometry signal-flow graph, chosen because
// the interconnect is identical in all stages. This design's choices: the
// buffering scheme, a fixed data width (the caller sizes DW for the worst-
// case growth so no scaling is applied), Q2.14 twiddles with round-half-up.
module fft_cg_stage
  import radar_pkg::*;
#(
  parameter int unsigned N     = 2048,
  parameter int unsigned DW    = 29,
  parameter int unsigned STAGE = 0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] in_re,
  input  logic signed [DW-1:0] in_im,
  output logic                 out_valid,
  output logic signed [DW-1:0] out_re,
  output logic signed [DW-1:0] out_im
);

  localparam int unsigned H  = N / 2;
  localparam int unsigned AW = $clog2(H);
  localparam int unsigned CW = $clog2(N);
  localparam int unsigned MW = DW + 1 + TW_W;

  typedef logic signed [TW_W-1:0] tw_t;
  typedef tw_t tw_arr_t [H];

  function automatic tw_arr_t gen_re();
    tw_arr_t t;
    for (int i = 0; i < int'(H); i++) t[i] = tw_re((i >> STAGE) << STAGE, N);
    return t;
  endfunction

  function automatic tw_arr_t gen_im();
    tw_arr_t t;
    for (int i = 0; i < int'(H); i++) t[i] = tw_im((i >> STAGE) << STAGE, N);
    return t;
  endfunction

  localparam tw_arr_t W_RE = gen_re();
  localparam tw_arr_t W_IM = gen_im();

  // Two frame buffers, each as a lower and an upper half, complex words.
  logic [2*DW-1:0] mem_lo0 [H];
  logic [2*DW-1:0] mem_hi0 [H];
  logic [2*DW-1:0] mem_lo1 [H];
  logic [2*DW-1:0] mem_hi1 [H];

  logic [CW-1:0] wcnt;      // write position within the frame
  logic          wbank;     // buffer being written
  logic          rbank;     // buffer being read
  logic          rd_act;    // read-out in progress
  logic [CW-1:0] rcnt;      // output index k

  wire  [AW-1:0] waddr = wcnt[AW-1:0];
  wire           whalf = wcnt[CW-1];
  wire           frame_done = in_valid && (wcnt == CW'(N - 1));

  // Write side.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      unique case ({wbank, whalf})
        2'b00: mem_lo0[waddr] <= {in_re, in_im};
        2'b01: mem_hi0[waddr] <= {in_re, in_im};
        2'b10: mem_lo1[waddr] <= {in_re, in_im};
        2'b11: mem_hi1[waddr] <= {in_re, in_im};
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wcnt   <= '0;
      wbank  <= 1'b0;
      rbank  <= 1'b0;
      rd_act <= 1'b0;
      rcnt   <= '0;
    end else begin
      if (in_valid) wcnt <= wcnt + 1'b1;
      if (rd_act) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == CW'(N - 1)) rd_act <= 1'b0;
      end
      if (frame_done) begin
        wbank  <= ~wbank;
        rbank  <= wbank;
        rd_act <= 1'b1;
        rcnt   <= '0;
      end
    end
  end

  // Read side, pipeline stage 1: fetch both butterfly operands.
  wire [AW-1:0] raddr = rcnt[CW-1:1];
  logic [2*DW-1:0] op_a, op_b;
  logic            p1_valid, p1_odd;
  logic [AW-1:0]   p1_i;

  always_ff @(posedge clk) begin
    op_a <= rbank ? mem_lo1[raddr] : mem_lo0[raddr];
    op_b <= rbank ? mem_hi1[raddr] : mem_hi0[raddr];
    p1_odd <= rcnt[0];
    p1_i   <= raddr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p1_valid <= 1'b0;
    else        p1_valid <= rd_act;
  end

  // Pipeline stage 2: butterfly and twiddle multiplication.
  logic signed [DW-1:0] a_re, a_im, b_re, b_im;
  logic signed [DW:0]   d_re, d_im;
  logic signed [MW-1:0] m_re, m_im;
  tw_t                  w_re, w_im;

  always_comb begin
    a_re = op_a[2*DW-1:DW];
    a_im = op_a[DW-1:0];
    b_re = op_b[2*DW-1:DW];
    b_im = op_b[DW-1:0];
    d_re = (DW+1)'(a_re) - (DW+1)'(b_re);
    d_im = (DW+1)'(a_im) - (DW+1)'(b_im);
    w_re = W_RE[p1_i];
    w_im = W_IM[p1_i];
    m_re = (MW'(d_re) * MW'(w_re) - MW'(d_im) * MW'(w_im) + MW'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
    m_im = (MW'(d_re) * MW'(w_im) + MW'(d_im) * MW'(w_re) + MW'(1 << (TW_FRAC - 1))) >>> TW_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= p1_valid;
      if (p1_valid) begin
        if (!p1_odd) begin
          out_re <= a_re + b_re;
          out_im <= a_im + b_im;
        end else begin
          out_re <= DW'(m_re);
          out_im <= DW'(m_im);
        end
      end
    end
  end

  // A new frame may only complete once the previous one has been read out.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    frame_done |-> (!rd_act || rcnt == CW'(N - 1)));

endmodule
