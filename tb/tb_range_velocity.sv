// tb_range_velocity: feeds pairs of up-ramp / down-ramp peak positions and
// compares range and velocity with the FMCW formulas evaluated here in real
// arithmetic (c/(4*ramp)*(f1-f2) and c/(4*fc)*(f1+f2), one bin being
// 40 MHz/8/2048 Hz), within 1 cm and 1 cm/s. Outputs must come only after the
// down-ramp peak, one cycle later.
module tb_range_velocity;

  localparam int N = 2048, DECIM = 8, FRAC = 8;
  localparam real C = 299792458.0, FC = 77.0e9, RAMP = 1.0e9, HZ = 40.0e6 / 8.0 / 2048.0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic pos_valid, out_valid, ramp_down;
  logic signed [11+FRAC:0] pos;
  logic signed [31:0] range_cm, vel_cms;

  range_velocity #(.N(N), .DECIM(DECIM), .FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic pair(int p1, int p2);
    real f1, f2, er, ev;
    f1 = real'(p1) / 256.0 * HZ;
    f2 = real'(p2) / 256.0 * HZ;
    er = C / (4.0 * RAMP) * (f1 - f2) * 100.0;
    ev = C / (4.0 * FC) * (f1 + f2) * 100.0;
    @(negedge clk); pos_valid = 1; pos = 20'(p1);
    @(negedge clk); pos_valid = 0;
    check(!out_valid, "output after up-ramp");
    @(negedge clk); pos_valid = 1; pos = 20'(p2);
    @(negedge clk); pos_valid = 0;
    check(out_valid, "no output after down-ramp");
    check(real'(range_cm) - er < 1.0 && er - real'(range_cm) < 1.0,
          $sformatf("range %0d exp %0.2f", range_cm, er));
    check(real'(vel_cms) - ev < 1.0 && ev - real'(vel_cms) < 1.0,
          $sformatf("vel %0d exp %0.2f", vel_cms, ev));
  endtask

  initial begin : main
    pos_valid = 0; pos = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    pair(10 * 256 + 77, 3 * 256 + 12);
    pair(5 * 256, 9 * 256 + 200);
    pair(1000 * 256 + 3, 999 * 256 + 250);
    for (int t = 0; t < 20; t++) pair($urandom_range(256, 1023 * 256), $urandom_range(256, 1023 * 256));
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
