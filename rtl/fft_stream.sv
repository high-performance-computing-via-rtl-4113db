// fft_stream: N-point streaming radix-2 FFT for the radar receiver, built as a
// fully pipelined chain of log2(N) identical constant-geometry stages
// (fft_cg_stage), one stage per column of the signal-flow graph.
//
// Because every stage has the same butterfly interconnect (inputs i and
// i+N/2, outputs 2i and 2i+1), each stage is the same module with only its
// twiddle table differing. The spectrum leaves the last stage in bit-reversed
// order; this block tags every output sample with its natural bin number
// (out_bin) and marks the last sample of a frame (out_last), so the consumer
// can place bins without a reorder buffer.
//
// Interface: in_valid/in_re/in_im, one complex sample per cycle at most, no
// back-pressure. Output is a burst of N samples per frame, one per cycle.
// Timing: each stage adds its read-out pipeline (2 cycles) after the frame
// has been completely written, then streams the frame in N cycles, so the
// last bin of a frame leaves about LOG2N*(N+2) cycles after the last input
// sample. Throughput is one frame per N cycles, which leaves ample margin
// for the radar's 5 MS/s input on a 100 MHz clock.
//
// From the document: 2048 points, radix 2, the constant-geometry flow graph,
// fully pipelined stages (the two buffers per stage match its count of memory
// blocks for the FFT). This design's choices: data width grows to
// DW = IN_W + LOG2N + 2 bits at the input and stays there, so no stage scales.
module fft_stream
  import radar_pkg::*;
#(
  parameter int unsigned N    = 2048,
  parameter int unsigned IN_W = 16,
  parameter int unsigned DW   = IN_W + $clog2(N) + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  output logic                    out_valid,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic [$clog2(N)-1:0]    out_bin,
  output logic                    out_last
);

  localparam int unsigned LOG2N = $clog2(N);

  logic                 v  [LOG2N+1];
  logic signed [DW-1:0] re [LOG2N+1];
  logic signed [DW-1:0] im [LOG2N+1];

  assign v[0]  = in_valid;
  assign re[0] = DW'(in_re);
  assign im[0] = DW'(in_im);

  for (genvar s = 0; s < LOG2N; s++) begin : g_stage
    fft_cg_stage #(.N(N), .DW(DW), .STAGE(s)) u_stage (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (v[s]),
      .in_re    (re[s]),
      .in_im    (im[s]),
      .out_valid(v[s+1]),
      .out_re   (re[s+1]),
      .out_im   (im[s+1])
    );
  end

  // Position of the current output sample within its frame.
  logic [LOG2N-1:0] opos;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          opos <= '0;
    else if (v[LOG2N])   opos <= opos + 1'b1;
  end

  assign out_valid = v[LOG2N];
  assign out_re    = re[LOG2N];
  assign out_im    = im[LOG2N];
  assign out_bin   = LOG2N'(bit_rev(32'(opos), LOG2N));
  assign out_last  = v[LOG2N] && (opos == '1);

endmodule
