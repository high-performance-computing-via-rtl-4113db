// tb_peak_interp: feeds synthetic 64-bin spectra in bit-reversed bin order,
// as the FFT delivers them, and checks the detected peak bin, the
// interpolated fraction (exactly: the testbench evaluates
// (alpha-gamma)/(2*(alpha-2*beta+gamma)) with the same magnitude rule and
// truncation toward zero at 8 fractional bits), the combined position, and
// that the result appears within FRAC+6 cycles of the frame's last bin.
// Spectra: parabolic peaks left and right of a bin centre, a complex-valued
// peak, a spectrum with a larger mirror image above N/2 that must be
// ignored, and a flat-topped peak.
module tb_peak_interp;

  localparam int N = 64, DW = 24, FRAC = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_last, out_valid;
  logic signed [DW-1:0] in_re, in_im;
  logic [5:0] in_bin, peak_bin;
  logic signed [FRAC:0] peak_frac;
  logic signed [6+FRAC:0] peak_pos;
  logic [DW:0] peak_mag;

  peak_interp #(.N(N), .DW(DW), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  always @(posedge clk) cycle++;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic int mag(int re, int im);
    int a, b;
    a = re < 0 ? -re : re;
    b = im < 0 ? -im : im;
    return (a > b) ? a + b / 2 : b + a / 2;
  endfunction

  function automatic int brev6(int v);
    int r = 0;
    for (int b = 0; b < 6; b++) r |= ((v >> b) & 1) << (5 - b);
    return r;
  endfunction

  task automatic run_frame(int re [N], int im [N], string tag);
    int best, bb, al, be, ga, num, den, q, expf, t0;
    best = -1; bb = 1;
    for (int k = 1; k <= N / 2 - 2; k++)
      if (mag(re[k], im[k]) > best) begin best = mag(re[k], im[k]); bb = k; end
    al = mag(re[bb-1], im[bb-1]); be = best; ga = mag(re[bb+1], im[bb+1]);
    num = al - ga;
    den = 2 * (al - 2 * be + ga);
    if (den == 0) expf = 0;
    else begin
      q = ((num < 0 ? -num : num) * (1 << FRAC)) / (den < 0 ? -den : den);
      expf = ((num < 0) != (den < 0)) ? -q : q;
    end
    for (int n = 0; n < N; n++) begin
      int k;
      k = brev6(n);
      @(negedge clk);
      in_valid = 1; in_bin = 6'(k); in_re = DW'(re[k]); in_im = DW'(im[k]); in_last = (n == N - 1);
    end
    t0 = cycle + 1;
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!out_valid) @(negedge clk);
    check(cycle - t0 <= FRAC + 6, $sformatf("%s latency %0d", tag, cycle - t0));
    check(int'(peak_bin) == bb, $sformatf("%s bin %0d exp %0d", tag, peak_bin, bb));
    check(int'(peak_frac) == expf, $sformatf("%s frac %0d exp %0d", tag, peak_frac, expf));
    check(int'(peak_pos) == bb * (1 << FRAC) + expf, $sformatf("%s pos %0d", tag, peak_pos));
    check(int'(peak_mag) == best, $sformatf("%s mag %0d exp %0d", tag, peak_mag, best));
  endtask

  task automatic parabola(real p, real amp, bit cplx, ref int re [N], ref int im [N]);
    for (int k = 0; k < N; k++) begin
      real d, v;
      d = real'(k) - p;
      v = (d < 3.0 && d > -3.0) ? amp * (1.0 - 0.1 * d * d) : 0.0;
      re[k] = $rtoi(v) + int'($urandom_range(0, 20)) - 10;
      im[k] = cplx ? $rtoi(0.6 * v) : 0;
    end
  endtask

  initial begin : main
    int re [N];
    int im [N];
    in_valid = 0; in_last = 0; in_bin = 0; in_re = 0; in_im = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    parabola(10.3, 100000.0, 0, re, im);  run_frame(re, im, "p10.3");
    parabola(20.7, 200000.0, 0, re, im);  run_frame(re, im, "p20.7");
    parabola(7.45, 150000.0, 1, re, im);  run_frame(re, im, "cplx");
    parabola(12.0, 50000.0, 0, re, im);
    re[50] = 900000;                       run_frame(re, im, "mirror");
    for (int k = 0; k < N; k++) begin re[k] = 0; im[k] = 0; end
    re[14] = 5000; re[15] = 5000; re[16] = 5000;
    run_frame(re, im, "flat");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
