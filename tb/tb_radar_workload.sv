// tb_radar_workload: the radar unit at its default sizes (2048-point FFT,
// decimation 8 from 40 MS/s) on the three evaluation targets: range 30 m
// with relative velocity -50, 0 and +100 km/h. For each target an up-ramp
// and a down-ramp frame are generated with beat frequencies
//     f_up = f_D + f_R,  f_down = f_D - f_R,
//     f_R = 2 R ramp / c,  f_D = 2 v f_carrier / c,
// as real ADC samples (so only |f| is observable). Checks:
//  * every peak lies within 0.6 bin of |f| when |f| is at least 1.5 bins
//    (bins 0 and 1 are below the detector's search range),
//  * range and velocity equal the FMCW formulas applied to the reported
//    peak positions (1 cm, 1 cm/s),
//  * one result per frame pair.
// The estimated range and velocity are printed next to the true values;
// with 2441 Hz bins a 30 m target moves the peaks by only 0.16 bin, so the
// range estimate is coarse.
module tb_radar_workload;

  localparam int N = 2048, DECIM = 8, FRAC = 8;
  localparam real C = 299792458.0, FC = 77.0e9, RAMP = 1.0e9;
  localparam real HZ = 40.0e6 / 8.0 / 2048.0, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, peak_valid, rv_valid;
  logic signed [15:0] adc_data;
  logic [10:0] peak_bin;
  logic signed [11+FRAC:0] peak_pos;
  logic signed [31:0] range_cm, vel_cms;

  fmcw_radar_dsp dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real vel_kmh [3] = '{-50.0, 0.0, 100.0};
  real freq [6];
  real got [6];
  int  n_peaks = 0, n_rv = 0;

  initial begin : drive
    adc_valid = 0; adc_data = 0;
    for (int t = 0; t < 3; t++) begin
      real fr, fd;
      fr = 2.0 * 30.0 * RAMP / C;
      fd = 2.0 * (vel_kmh[t] / 3.6) * FC / C;
      freq[2*t]   = fd + fr;
      freq[2*t+1] = fd - fr;
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++)
      for (int n = 0; n < N * DECIM; n++) begin
        @(negedge clk);
        adc_valid = 1;
        adc_data  = 16'($rtoi(12000.0 * $cos(2.0 * PI * freq[f] * real'(n) / 40.0e6)));
      end
    @(negedge clk); adc_valid = 0;
  end

  always @(posedge clk) if (rst_n && peak_valid) begin
    real p, b;
    p = real'(peak_pos) / 256.0;
    b = (freq[n_peaks] < 0.0 ? -freq[n_peaks] : freq[n_peaks]) / HZ;
    if (b >= 1.5)
      check(p - b < 0.6 && b - p < 0.6, $sformatf("frame %0d peak %0.3f expected %0.3f", n_peaks, p, b));
    got[n_peaks] = p;
    n_peaks++;
  end

  always @(posedge clk) if (rst_n && rv_valid) begin
    real er, ev;
    int f;
    f = 2 * n_rv;
    er = C / (4.0 * RAMP) * (got[f] - got[f+1]) * HZ * 100.0;
    ev = C / (4.0 * FC) * (got[f] + got[f+1]) * HZ * 100.0;
    check(n_peaks == f + 2, "one result per frame pair");
    check(real'(range_cm) - er < 1.0 && er - real'(range_cm) < 1.0, $sformatf("range %0d exp %0.1f", range_cm, er));
    check(real'(vel_cms) - ev < 1.0 && ev - real'(vel_cms) < 1.0, $sformatf("velocity %0d exp %0.1f", vel_cms, ev));
    $display("target R = 30 m, V = %0.0f km/h: peaks %0.3f / %0.3f bins, estimate R = %0.2f m, V = %0.1f km/h",
             vel_kmh[n_rv], got[f], got[f+1], real'(range_cm) / 100.0, real'(vel_cms) * 0.036);
    n_rv++;
  end

  initial begin : main
    wait (n_rv == 3);
    repeat (5) @(negedge clk);
    check(n_peaks == 6, "six frame peaks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
