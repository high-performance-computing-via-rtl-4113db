// tb_fir_decim: checks the decimating low-pass filter (32 taps, factor 8).
//  * Random samples: each output must equal the rounded, saturated dot product
//    of the last 32 inputs with the taps, computed here in real arithmetic
//    from the windowed-sinc formula, and appear exactly 2 cycles after every
//    8th input.
//  * DC: a constant input must come out with unity gain (within 0.1 %, the tap rounding).
//  * Stop band: a full-scale tone at 0.4 of the input rate (above the output
//    Nyquist frequency) must be attenuated by more than 30 dB.
module tb_fir_decim;

  localparam int TAPS = 32, DECIM = 8;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid;
  logic signed [15:0] in_data, out_data;

  fir_decim #(.TAPS(TAPS), .DECIM(DECIM)) dut (.*);

  int checks = 0, failures = 0;
  real coef [TAPS];
  int hist [$];
  int n_in = 0, n_out = 0, last_fire = -100, cycle = 0;
  int expect_q [$];
  int mode = 0;           // 0 random (exact check), 1 dc, 2 tone
  int peak_out = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      n_out++;
      check(cycle - last_fire == 2, $sformatf("latency %0d", cycle - last_fire));
      if (mode == 0 && expect_q.size() > 0) begin
        int e;
        e = expect_q.pop_front();
        check(int'(out_data) == e, $sformatf("out %0d expected %0d", out_data, e));
      end
      if (mode == 2 && n_out > 8) peak_out = (out_data > peak_out) ? int'(out_data) : peak_out;
      if (mode == 1 && n_out > 8) check(out_data >= 9990 && out_data <= 10010, $sformatf("dc %0d", out_data));
    end
  end

  task automatic push(int v);
    @(negedge clk);
    in_valid = 1; in_data = 16'(v);
    hist.push_front(v);
    n_in++;
    if (n_in % DECIM == 0) begin
      real acc;
      int r;
      acc = 0.0;
      for (int k = 0; k < TAPS; k++) acc += coef[k] * ((k < hist.size()) ? real'(hist[k]) : 0.0);
      r = $rtoi($floor(acc / 32768.0 + 0.5));
      if (r > 32767) r = 32767;
      if (r < -32768) r = -32768;
      expect_q.push_back(r);
      last_fire = cycle + 1;
    end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin : main
    real sum, m, x, h, w;
    sum = 0.0;
    for (int t = 0; t < TAPS; t++) begin
      m = real'(t) - real'(TAPS - 1) / 2.0;
      x = m / real'(DECIM);
      h = (m == 0.0) ? 1.0 : $sin(PI * x) / (PI * x);
      w = 0.54 - 0.46 * $cos(2.0 * PI * real'(t) / real'(TAPS - 1));
      coef[t] = h * w;
      sum += coef[t];
    end
    // integer taps as the design stores them (Q1.15, round half up)
    for (int t = 0; t < TAPS; t++) coef[t] = real'($rtoi(coef[t] / sum * 32768.0 + 0.5));
    in_valid = 0; in_data = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 400; s++) push($urandom_range(0, 40000) - 20000);
    repeat (4) @(negedge clk);
    check(n_out == 400 / DECIM, $sformatf("outputs %0d", n_out));
    mode = 1; n_out = 0;
    for (int s = 0; s < 160; s++) push(10000);
    repeat (4) @(negedge clk);
    mode = 2; n_out = 0;
    for (int s = 0; s < 400; s++) push($rtoi(30000.0 * $cos(2.0 * PI * 0.4 * s)));
    repeat (4) @(negedge clk);
    check(peak_out < 950, $sformatf("stop band peak %0d", peak_out));
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
