// range_velocity: last stage of the FMCW radar. It turns the interpolated
// beat-frequency peaks of an up-ramp frame (f1) and the following down-ramp
// frame (f2) into the target's range and radial velocity:
//     range    = c / (4 * ramp_rate) * (f1 - f2)
//     velocity = c / (4 * f_carrier) * (f1 + f2)
//
// Frequencies arrive as FFT bin positions with FRAC fractional bits; one bin
// is FS_OUT/N Hz with FS_OUT = 40 MS/s / DECIM. Both formulas therefore reduce
// to a constant times a bin difference or sum. The constants are computed at
// elaboration as Q16 values in centimetres (per second) per bin, and a
// single 64-bit multiply-and-shift per output produces the result.
//
// Interface: pos_valid/pos delivers one peak per frame. Frames alternate
// up-ramp, down-ramp, starting with up-ramp after reset. After each down-ramp
// peak, out_valid pulses for one cycle with range_cm (centimetres) and
// vel_cms (centimetres per second), both signed.
// Timing: out_valid one cycle after the down-ramp pos_valid.
//
// From the document: both formulas and the constants (77 GHz carrier,
// 1 GHz/s ramp rate, 2048-point FFT, 40 MS/s decimated by 8). This design's
// choices: alternating up/down frames, output units, Q16 constants.
module range_velocity
  import radar_pkg::*;
#(
  parameter int unsigned N     = 2048,
  parameter int unsigned DECIM = 8,
  parameter int unsigned FRAC  = 8
) (
  input  logic                             clk,
  input  logic                             rst_n,
  input  logic                             pos_valid,
  input  logic signed [$clog2(N)+FRAC:0]   pos,
  output logic                             out_valid,
  output logic signed [31:0]               range_cm,
  output logic signed [31:0]               vel_cms,
  output logic                             ramp_down   // next peak is a down-ramp
);

  localparam int unsigned PW = $clog2(N) + FRAC + 1;
  localparam real HZ_PER_BIN = FS_ADC / real'(DECIM) / real'(N);
  localparam real KR = C_LIGHT / (4.0 * RAMP_RATE) * HZ_PER_BIN * 100.0;  // cm per bin
  localparam real KV = C_LIGHT / (4.0 * F_CARRIER) * HZ_PER_BIN * 100.0;  // cm/s per bin
  localparam longint KR_Q = longint'(KR * 65536.0 + 0.5);
  localparam longint KV_Q = longint'(KV * 65536.0 + 0.5);

  logic signed [PW-1:0] f1;
  logic signed [PW:0]   diff, sum;
  logic signed [63:0]   r_full, v_full;

  always_comb begin
    diff   = (PW+1)'(f1) - (PW+1)'(pos);
    sum    = (PW+1)'(f1) + (PW+1)'(pos);
    r_full = (64'(KR_Q) * 64'(diff)) >>> (16 + FRAC);
    v_full = (64'(KV_Q) * 64'(sum))  >>> (16 + FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      f1        <= '0;
      ramp_down <= 1'b0;
      out_valid <= 1'b0;
      range_cm  <= '0;
      vel_cms   <= '0;
    end else begin
      out_valid <= 1'b0;
      if (pos_valid) begin
        ramp_down <= ~ramp_down;
        if (!ramp_down) begin
          f1 <= pos;
        end else begin
          out_valid <= 1'b1;
          range_cm  <= 32'(r_full);
          vel_cms   <= 32'(v_full);
        end
      end
    end
  end

endmodule
