// fir_decim: low-pass FIR filter with decimation, the first block of the FMCW
// radar signal-processing unit (the "LPF"/"FIR" block in front of the FFT).
//
// Every accepted input sample is pushed into a TAPS-long delay line. On every
// DECIM-th sample the filter evaluates the full dot product of the delay line
// with the taps and emits one output sample, so the output rate is the input
// rate divided by DECIM (40 MS/s in, 5 MS/s out with the defaults). Only the
// outputs that survive decimation are computed.
//
// Interface: in_valid/in_data is a sample stream with no back-pressure. One
// cycle after the DECIM-th sample is accepted the delay line holds the new
// window; the next cycle out_valid pulses with the rounded, saturated result.
// Latency: 2 cycles from the DECIM-th input sample to out_valid.
//
// From the document: decimation by 8 and its purpose (lower the rate, improve
// effective bits). This design's choices: 32 taps, a Hamming-windowed sinc
// with cut-off at the new Nyquist frequency, Q1.15 taps computed at
// elaboration, round-half-up and saturation on the output, direct form
// (the document does not describe the filter's structure).
module fir_decim
  import radar_pkg::*;
#(
  parameter int unsigned TAPS  = 32,
  parameter int unsigned DECIM = 8,
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_data,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_data
);

  localparam int unsigned ACC_W = IN_W + 16 + $clog2(TAPS) + 1;
  localparam int unsigned PH_W  = (DECIM > 1) ? $clog2(DECIM) : 1;

  typedef logic signed [15:0] tap_t;
  typedef tap_t tap_arr_t [TAPS];

  function automatic tap_arr_t gen_taps();
    tap_arr_t t;
    for (int k = 0; k < TAPS; k++) t[k] = fir_tap(k, TAPS, DECIM);
    return t;
  endfunction

  localparam tap_arr_t COEF = gen_taps();

  logic signed [IN_W-1:0] dline [TAPS];
  logic [PH_W-1:0]        phase;
  logic                   fire;
  logic signed [ACC_W-1:0] acc;

  // Delay line and decimation phase.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) dline[k] <= '0;
      phase <= '0;
      fire  <= 1'b0;
    end else begin
      fire <= 1'b0;
      if (in_valid) begin
        dline[0] <= in_data;
        for (int k = 1; k < TAPS; k++) dline[k] <= dline[k-1];
        if (phase == PH_W'(DECIM - 1)) begin
          phase <= '0;
          fire  <= 1'b1;
        end else begin
          phase <= phase + 1'b1;
        end
      end
    end
  end

  // Dot product of the current window with the taps.
  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += ACC_W'(dline[k]) * ACC_W'(COEF[k]);
  end

  localparam logic signed [ACC_W-1:0] MAXV = ACC_W'((1 <<< (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] MINV = -ACC_W'(1 <<< (OUT_W - 1));

  logic signed [ACC_W-1:0] rounded;
  assign rounded = (acc + ACC_W'(1 << 14)) >>> 15;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= fire;
      if (fire) begin
        if (rounded > MAXV)      out_data <= OUT_W'(MAXV);
        else if (rounded < MINV) out_data <= OUT_W'(MINV);
        else                     out_data <= OUT_W'(rounded);
      end
    end
  end

endmodule
