// fmcw_radar_dsp: digital signal-processing unit of an FMCW automotive radar.
// It takes the ADC's real beat-signal samples and reports the range and
// relative velocity of the strongest target once per up-ramp/down-ramp pair.
//
// Chain (in processing order):
//   fir_decim      low-pass filter, decimate 40 MS/s -> 5 MS/s (factor 8)
//   fft_stream     2048-point pipelined constant-geometry FFT
//   peak_interp    strongest bin + parabolic refinement
//   range_velocity range and velocity from the up- and down-ramp peaks
// The FIR output enters the FFT as the real part of a complex sample
// (imaginary part zero). Frames are formed by counting FFT input samples:
// every N filtered samples make one frame; frames alternate up-ramp and
// down-ramp starting after reset.
//
// Interface: adc_valid/adc_data is the ADC stream (no back-pressure; at most
// one sample per cycle). Results: rv_valid with range_cm and vel_cms, plus
// per-frame peak information (peak_valid, peak_bin, peak_pos).
// Timing: a frame needs DECIM*N ADC samples; results leave about
// LOG2N*(N+2) + FRAC + 10 cycles after the frame's last ADC sample.
//
// From the document: the block order and its four sub-algorithms, the
// decimation factor, FFT size and radar constants. This design's choices:
// the fixed-point widths, frame alignment from reset, alternating ramps.
module fmcw_radar_dsp #(
  parameter int unsigned N     = 2048,
  parameter int unsigned DECIM = 8,
  parameter int unsigned TAPS  = 32,
  parameter int unsigned ADC_W = 16,
  parameter int unsigned FRAC  = 8
) (
  input  logic                           clk,
  input  logic                           rst_n,
  input  logic                           adc_valid,
  input  logic signed [ADC_W-1:0]        adc_data,
  output logic                           peak_valid,
  output logic [$clog2(N)-1:0]           peak_bin,
  output logic signed [$clog2(N)+FRAC:0] peak_pos,
  output logic                           rv_valid,
  output logic signed [31:0]             range_cm,
  output logic signed [31:0]             vel_cms
);

  localparam int unsigned DW = ADC_W + $clog2(N) + 2;

  logic                   fir_valid;
  logic signed [ADC_W-1:0] fir_data;

  fir_decim #(.TAPS(TAPS), .DECIM(DECIM), .IN_W(ADC_W), .OUT_W(ADC_W)) u_fir (
    .clk, .rst_n,
    .in_valid (adc_valid),
    .in_data  (adc_data),
    .out_valid(fir_valid),
    .out_data (fir_data)
  );

  logic                   fft_valid, fft_last;
  logic signed [DW-1:0]   fft_re, fft_im;
  logic [$clog2(N)-1:0]   fft_bin;

  fft_stream #(.N(N), .IN_W(ADC_W), .DW(DW)) u_fft (
    .clk, .rst_n,
    .in_valid (fir_valid),
    .in_re    (fir_data),
    .in_im    ('0),
    .out_valid(fft_valid),
    .out_re   (fft_re),
    .out_im   (fft_im),
    .out_bin  (fft_bin),
    .out_last (fft_last)
  );

  logic signed [FRAC:0] peak_frac;
  logic [DW:0]          peak_mag;

  peak_interp #(.N(N), .DW(DW), .FRAC(FRAC)) u_peak (
    .clk, .rst_n,
    .in_valid (fft_valid),
    .in_re    (fft_re),
    .in_im    (fft_im),
    .in_bin   (fft_bin),
    .in_last  (fft_last),
    .out_valid(peak_valid),
    .peak_bin (peak_bin),
    .peak_frac(peak_frac),
    .peak_pos (peak_pos),
    .peak_mag (peak_mag)
  );

  logic ramp_down;

  range_velocity #(.N(N), .DECIM(DECIM), .FRAC(FRAC)) u_rv (
    .clk, .rst_n,
    .pos_valid(peak_valid),
    .pos      (peak_pos),
    .out_valid(rv_valid),
    .range_cm (range_cm),
    .vel_cms  (vel_cms),
    .ramp_down(ramp_down)
  );

endmodule
