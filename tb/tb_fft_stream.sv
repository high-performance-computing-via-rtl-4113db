// tb_fft_stream: 64-point streaming FFT (6 constant-geometry stages).
// Three frames are streamed back to back at one sample per cycle: random
// small values, full-scale random values (worst-case growth) and a single
// complex tone. Every output bin is compared with a DFT computed here in
// real arithmetic (tolerance from the Q2.14 twiddle rounding), each frame must
// deliver each bin number exactly once with out_last on its final sample, and
// the last bin must leave within LOG2N*(N+2)+4 cycles of the frame's last
// input sample.
module tb_fft_stream;

  localparam int N = 64, LOG2N = 6, IN_W = 16, DW = IN_W + LOG2N + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, out_valid, out_last;
  logic signed [IN_W-1:0] in_re, in_im;
  logic signed [DW-1:0] out_re, out_im;
  logic [LOG2N-1:0] out_bin;

  fft_stream #(.N(N), .IN_W(IN_W)) dut (.*);

  int checks = 0, failures = 0;
  real xr [3][N];
  real xi [3][N];
  real Xr [3][N];
  real Xi [3][N];
  real maxmag [3];
  int frame_out = 0, bins_seen = 0, cycle = 0;
  int last_in_cycle [3];
  bit seen [N];

  function automatic real rabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real er, ei, tol;
      int f;
      f = frame_out;
      er = real'(out_re) - Xr[f][out_bin];
      ei = real'(out_im) - Xi[f][out_bin];
      tol = 4.0 + LOG2N + maxmag[f] * LOG2N / 8192.0;
      check(er < tol && er > -tol && ei < tol && ei > -tol,
            $sformatf("frame %0d bin %0d got %0d,%0d exp %0.1f,%0.1f", f, out_bin, out_re, out_im, Xr[f][out_bin], Xi[f][out_bin]));
      check(!seen[out_bin], $sformatf("bin %0d repeated", out_bin));
      seen[out_bin] = 1;
      bins_seen++;
      check(out_last == (bins_seen == N), "out_last position");
      if (out_last) begin
        check(bins_seen == N, "bins per frame");
        check(cycle - last_in_cycle[f] <= LOG2N * (N + 2) + 4,
              $sformatf("latency %0d", cycle - last_in_cycle[f]));
        for (int k = 0; k < N; k++) seen[k] = 0;
        bins_seen = 0;
        frame_out++;
      end
    end
  end

  initial begin : main
    for (int k = 0; k < N; k++) seen[k] = 0;
    for (int n = 0; n < N; n++) begin
      xr[0][n] = int'($urandom_range(0, 4000)) - 2000;
      xi[0][n] = int'($urandom_range(0, 4000)) - 2000;
      xr[1][n] = ($urandom_range(0, 1) != 0) ? 32767 : -32768;
      xi[1][n] = ($urandom_range(0, 1) != 0) ? 32767 : -32768;
      xr[2][n] = $rtoi(20000.0 * $cos(2.0 * PI * 5.0 * n / N));
      xi[2][n] = $rtoi(20000.0 * $sin(2.0 * PI * 5.0 * n / N));
    end
    for (int f = 0; f < 3; f++) begin
      maxmag[f] = 0.0;
      for (int k = 0; k < N; k++) begin
        Xr[f][k] = 0.0; Xi[f][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          real c, s;
          c = $cos(2.0 * PI * k * n / N);
          s = -$sin(2.0 * PI * k * n / N);
          Xr[f][k] += xr[f][n] * c - xi[f][n] * s;
          Xi[f][k] += xr[f][n] * s + xi[f][n] * c;
        end
        if (rabs(Xr[f][k]) > maxmag[f]) maxmag[f] = rabs(Xr[f][k]);
        if (rabs(Xi[f][k]) > maxmag[f]) maxmag[f] = rabs(Xi[f][k]);
      end
    end
    in_valid = 0; in_re = 0; in_im = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < N; n++) begin
        @(negedge clk);
        in_valid = 1; in_re = IN_W'($rtoi(xr[f][n])); in_im = IN_W'($rtoi(xi[f][n]));
        if (n == N - 1) last_in_cycle[f] = cycle + 1;
      end
    @(negedge clk); in_valid = 0;
    while (frame_out < 3) @(negedge clk);
    check(frame_out == 3, "frames");
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
