// tb_fmcw_radar_dsp: drives the radar chain (64-point FFT, decimation 8)
// with ADC frames that each hold one beat tone at a known, possibly
// fractional, FFT bin. For every frame it checks the detected bin and the
// interpolated position against the tone frequency, and the result latency
// after the frame's last ADC sample. After every down-ramp frame it checks
// range and velocity against the FMCW formulas evaluated here, in real
// arithmetic, from the reported peak positions (within 1 cm, 1 cm/s), and
// coarsely from the true tone frequencies.
module tb_fmcw_radar_dsp;

  localparam int N = 64, DECIM = 8, FRAC = 8;
  localparam real C = 299792458.0, FC = 77.0e9, RAMP = 1.0e9;
  localparam real HZ = 40.0e6 / 8.0 / 64.0, PI = 3.14159265358979;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic adc_valid, peak_valid, rv_valid;
  logic signed [15:0] adc_data;
  logic [5:0] peak_bin;
  logic signed [6+FRAC:0] peak_pos;
  logic signed [31:0] range_cm, vel_cms;

  fmcw_radar_dsp #(.N(N), .DECIM(DECIM)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  real tone [4] = '{12.25, 5.5, 20.0, 20.0};
  real got [4];
  int  n_peaks = 0, n_rv = 0, t_last [4];

  // Drive four frames back to back, one ADC sample per cycle.
  initial begin : drive
    adc_valid = 0; adc_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 4; f++)
      for (int n = 0; n < N * DECIM; n++) begin
        @(negedge clk);
        adc_valid = 1;
        adc_data  = 16'($rtoi(12000.0 * $cos(2.0 * PI * tone[f] * real'(n) / real'(N * DECIM))));
        if (n == N * DECIM - 1) t_last[f] = cycle;
      end
    @(negedge clk); adc_valid = 0;
  end

  always @(posedge clk) if (rst_n && peak_valid) begin
    real p, err;
    p = real'(peak_pos) / 256.0;
    err = p - tone[n_peaks];
    check(err < 0.3 && err > -0.3, $sformatf("frame %0d pos %0.3f tone %0.2f", n_peaks, p, tone[n_peaks]));
    check(int'(peak_bin) == $rtoi(p + 0.5) || int'(peak_bin) == $rtoi(p),
          $sformatf("frame %0d bin %0d pos %0.3f", n_peaks, peak_bin, p));
    check(cycle - t_last[n_peaks] <= 6 * (N + 2) + FRAC + 20,
          $sformatf("frame %0d latency %0d", n_peaks, cycle - t_last[n_peaks]));
    got[n_peaks] = p;
    n_peaks++;
  end

  always @(posedge clk) if (rst_n && rv_valid) begin
    real er, ev, tr, tv;
    int f;
    f = 2 * n_rv;
    er = C / (4.0 * RAMP) * (got[f] - got[f+1]) * HZ * 100.0;
    ev = C / (4.0 * FC) * (got[f] + got[f+1]) * HZ * 100.0;
    tr = C / (4.0 * RAMP) * (tone[f] - tone[f+1]) * HZ * 100.0;
    tv = C / (4.0 * FC) * (tone[f] + tone[f+1]) * HZ * 100.0;
    check(n_peaks == f + 2, "rv before down-ramp peak");
    check(real'(range_cm) - er < 1.0 && er - real'(range_cm) < 1.0, $sformatf("range %0d exp %0.1f", range_cm, er));
    check(real'(vel_cms) - ev < 1.0 && ev - real'(vel_cms) < 1.0, $sformatf("vel %0d exp %0.1f", vel_cms, ev));
    // 0.6 bin total tolerance on the true tone frequencies
    check(real'(range_cm) - tr < 0.6 * C / 4.0e9 * HZ * 100.0 && tr - real'(range_cm) < 0.6 * C / 4.0e9 * HZ * 100.0,
          $sformatf("range %0d true %0.1f", range_cm, tr));
    check(real'(vel_cms) - tv < 0.6 * C / (4.0 * FC) * HZ * 100.0 && tv - real'(vel_cms) < 0.6 * C / (4.0 * FC) * HZ * 100.0,
          $sformatf("vel %0d true %0.1f", vel_cms, tv));
    n_rv++;
  end

  initial begin : main
    wait (n_rv == 2);
    repeat (5) @(negedge clk);
    check(n_peaks == 4, "four frame peaks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
