// peak_interp: detection stage of the radar. It finds the strongest bin of
// each FFT frame and refines its position by fitting a parabola through the
// peak bin and its two neighbours.
//
// Operation per frame:
//  1. COLLECT: every incoming bin's magnitude is written to a magnitude memory
//     at its natural bin address, and a running maximum is kept over bins
//     MIN_BIN .. N/2-2 (the positive-frequency half of a real signal's
//     spectrum, leaving room for both neighbours).
//  2. FETCH: after the frame's last bin, the neighbours alpha = |X[p-1]| and
//     gamma = |X[p+1]| are read back (beta = |X[p]| is the maximum itself).
//  3. DIVIDE: the fractional offset
//         delta = (alpha - gamma) / (2 * (alpha - 2*beta + gamma))
//     is computed by a restoring divider, one quotient bit per cycle, giving
//     FRAC fractional bits. |delta| <= 1/2 because beta is the maximum.
//  4. The result pos = p + delta (signed, FRAC fractional bits) is presented
//     with out_valid for one cycle.
//
// Interface: in_valid/in_re/in_im/in_bin/in_last as produced by fft_stream
// (bins in any order, one frame at a time). Outputs peak_bin, peak_frac,
// peak_pos, peak_mag with a one-cycle out_valid.
// Timing: out_valid follows the frame's last bin by FRAC + 4 cycles; a new
// frame may start arriving as soon as out_valid has been seen.
//
// From the document: peak detection followed by interpolation to refine the
// maximum frequency, with the parabola through alpha, beta, gamma. This
// design's choices: magnitude approximated as max(|re|,|im|) + min(|re|,|im|)/2,
// search range, ties resolved to the lowest bin, 8 fractional bits.
module peak_interp #(
  parameter int unsigned N       = 2048,
  parameter int unsigned DW      = 29,
  parameter int unsigned FRAC    = 8,
  parameter int unsigned MIN_BIN = 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic signed [DW-1:0]        in_re,
  input  logic signed [DW-1:0]        in_im,
  input  logic [$clog2(N)-1:0]        in_bin,
  input  logic                        in_last,
  output logic                        out_valid,
  output logic [$clog2(N)-1:0]        peak_bin,
  output logic signed [FRAC:0]        peak_frac,
  output logic signed [$clog2(N)+FRAC:0] peak_pos,
  output logic [DW:0]                 peak_mag
);

  localparam int unsigned BW = $clog2(N);
  localparam int unsigned MAGW = DW + 1;
  localparam int unsigned DIVW = MAGW + 4;

  typedef enum logic [2:0] {S_COLLECT, S_FETCH, S_WAIT, S_SETUP, S_DIV, S_DONE} state_t;
  state_t state;

  // Magnitude approximation of the incoming bin.
  logic [DW-1:0] abs_re, abs_im, mx, mn;
  logic [MAGW-1:0] mag_in;
  always_comb begin
    abs_re = in_re[DW-1] ? DW'(-in_re) : DW'(in_re);
    abs_im = in_im[DW-1] ? DW'(-in_im) : DW'(in_im);
    mx = (abs_re > abs_im) ? abs_re : abs_im;
    mn = (abs_re > abs_im) ? abs_im : abs_re;
    mag_in = MAGW'(mx) + MAGW'(mn >> 1);
  end

  logic [MAGW-1:0] mag_mem [N/2];
  logic [MAGW-1:0] rd_data;
  logic [BW-2:0]   rd_addr;

  wire in_half = (in_bin < BW'(N / 2));
  always_ff @(posedge clk) begin
    if (state == S_COLLECT && in_valid && in_half) mag_mem[in_bin[BW-2:0]] <= mag_in;
    rd_data <= mag_mem[rd_addr];
  end

  logic [MAGW-1:0] best_mag, alpha, gamma_m;
  logic [BW-1:0]   best_bin;
  logic            best_any;
  logic            fetch_hi;

  wire in_range = (in_bin >= BW'(MIN_BIN)) && (in_bin <= BW'(N / 2 - 2));

  // Divider state: remainder, divisor, quotient.
  logic [DIVW-1:0] rem, dvs;
  logic [FRAC-1:0] quo;
  logic            neg;
  logic [$clog2(FRAC+1)-1:0] dcnt;

  logic signed [DIVW-1:0] num_s, den_s;
  always_comb begin
    num_s = DIVW'(alpha) - DIVW'(gamma_m);
    den_s = DIVW'(alpha) + DIVW'(gamma_m) - (DIVW'(best_mag) << 1);
  end

  always_comb begin
    rd_addr = fetch_hi ? (best_bin[BW-2:0] + 1'b1) : (best_bin[BW-2:0] - 1'b1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_COLLECT;
      best_mag  <= '0;
      best_bin  <= BW'(MIN_BIN);
      best_any  <= 1'b0;
      fetch_hi  <= 1'b0;
      alpha     <= '0;
      gamma_m   <= '0;
      rem       <= '0;
      dvs       <= '0;
      quo       <= '0;
      neg       <= 1'b0;
      dcnt      <= '0;
      out_valid <= 1'b0;
      peak_bin  <= '0;
      peak_frac <= '0;
      peak_pos  <= '0;
      peak_mag  <= '0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_COLLECT: begin
          if (in_valid) begin
            if (in_range && (!best_any || mag_in > best_mag ||
                             (mag_in == best_mag && in_bin < best_bin))) begin
              best_mag <= mag_in;
              best_bin <= in_bin;
              best_any <= 1'b1;
            end
            if (in_last) begin
              state    <= S_FETCH;
              fetch_hi <= 1'b0;
            end
          end
        end
        S_FETCH: begin            // address of p-1 is presented
          fetch_hi <= 1'b1;       // next: address of p+1
          state    <= S_WAIT;
        end
        S_WAIT: begin             // rd_data = |X[p-1]|
          alpha <= rd_data;
          state <= S_SETUP;
        end
        S_SETUP: begin            // rd_data = |X[p+1]|
          gamma_m <= rd_data;
          state   <= S_DIV;
          dcnt    <= '0;
          quo     <= '0;
        end
        S_DIV: begin
          if (dcnt == '0) begin
            // delta = num / den; den <= 0 at a maximum, so the sign of delta
            // is the opposite of the sign of num.
            rem <= num_s[DIVW-1] ? DIVW'(-num_s) : DIVW'(num_s);
            dvs <= (den_s[DIVW-1] ? DIVW'(-den_s) : DIVW'(den_s));
            neg <= ~num_s[DIVW-1] & (num_s != '0);
            dcnt <= dcnt + 1'b1;
          end else if (dvs == '0) begin
            quo   <= '0;       // flat top: no refinement possible
            state <= S_DONE;
          end else begin
            // quotient bit of (|num| * 2^FRAC) / (2 * |den|)
            if ((rem << 1) >= (dvs << 1)) begin
              rem <= (rem << 1) - (dvs << 1);
              quo <= {quo[FRAC-2:0], 1'b1};
            end else begin
              rem <= rem << 1;
              quo <= {quo[FRAC-2:0], 1'b0};
            end
            if (dcnt == ($clog2(FRAC+1))'(FRAC)) state <= S_DONE;
            dcnt <= dcnt + 1'b1;
          end
        end
        S_DONE: begin
          out_valid <= 1'b1;
          peak_bin  <= best_bin;
          peak_mag  <= best_mag;
          peak_frac <= neg ? -$signed({1'b0, quo}) : $signed({1'b0, quo});
          peak_pos  <= $signed({1'b0, best_bin, {FRAC{1'b0}}}) +
                       (neg ? -($clog2(N)+FRAC+1)'($signed({1'b0, quo}))
                            :  ($clog2(N)+FRAC+1)'($signed({1'b0, quo})));
          best_any  <= 1'b0;
          best_mag  <= '0;
          state     <= S_COLLECT;
        end
        default: state <= S_COLLECT;
      endcase
    end
  end

endmodule
