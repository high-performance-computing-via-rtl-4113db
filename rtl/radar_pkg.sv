// radar_pkg: constants and elaboration-time table generators shared by the
// FMCW radar signal-processing chain (FIR decimator, streaming FFT, peak
// interpolation, range/velocity estimation).
//
// The physical constants (77 GHz carrier, 1 GHz/s ramp rate, 2048-point FFT,
// 40 MS/s input decimated by 8) follow the document. The fixed-point formats
// (16-bit samples, Q2.14 twiddles, Q1.15 filter taps, 8 fractional bits for
// interpolated bin positions) are this design's own choices.
package radar_pkg;

  // Physical constants of the modelled radar.
  localparam real C_LIGHT   = 299792458.0;  // m/s
  localparam real F_CARRIER = 77.0e9;       // Hz
  localparam real RAMP_RATE = 1.0e9;        // Hz per second
  localparam real FS_ADC    = 40.0e6;       // input sample rate, samples/s

  localparam real PI = 3.14159265358979323846;

  // Twiddle factors are Q2.14: 1.0 is 2**14, so +1 and -1 are exact.
  localparam int unsigned TW_W    = 16;
  localparam int unsigned TW_FRAC = 14;

  // cos(2*pi*e/n) and -sin(2*pi*e/n) in Q2.14 (the forward-FFT twiddle
  // W_n^e = exp(-j*2*pi*e/n)).
  function automatic logic signed [TW_W-1:0] tw_re(int e, int n);
    real v;
    v = $cos(2.0 * PI * real'(e) / real'(n)) * real'(1 << TW_FRAC);
    return TW_W'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  function automatic logic signed [TW_W-1:0] tw_im(int e, int n);
    real v;
    v = -$sin(2.0 * PI * real'(e) / real'(n)) * real'(1 << TW_FRAC);
    return TW_W'($rtoi(v + ((v >= 0.0) ? 0.5 : -0.5)));
  endfunction

  // Hamming-windowed sinc low-pass tap k of a taps-long filter with cut-off
  // at fs/(2*decim), scaled to Q1.15 so that the taps sum to about 1.0.
  function automatic logic signed [15:0] fir_tap(int k, int taps, int decim);
    real m, x, h, w, sum, hk;
    sum = 0.0;
    hk  = 0.0;
    for (int t = 0; t < taps; t++) begin
      m = real'(t) - real'(taps - 1) / 2.0;
      x = m / real'(decim);
      h = (m == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(t) / real'(taps - 1));
      sum += h * w;
      if (t == k) hk = h * w;
    end
    return 16'($rtoi(hk / sum * 32768.0 + 0.5));
  endfunction

  // Reverse the low `bits` bits of v.
  function automatic int unsigned bit_rev(int unsigned v, int unsigned bits);
    int unsigned r;
    r = 0;
    for (int unsigned b = 0; b < bits; b++) r |= ((v >> b) & 1) << (bits - 1 - b);
    return r;
  endfunction

endpackage
