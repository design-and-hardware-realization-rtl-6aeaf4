// tb_fir_decimator: self-checking test of the decimating FIR filter.
//
// The coefficients are recomputed here from their design formula (64-tap
// Hamming-windowed sinc, cut-off 0.5/DECIM, unit DC gain in Q1.15) so that
// the tabled values are checked too. Random complex samples are fed with
// random gaps; every DECIM-th input must produce exactly the rounded,
// saturated dot product of the last 64 inputs with the coefficients,
// 8 clocks after the input that completed the block. A constant input must
// come through at unit gain and a tone at 0.4 cycles/sample must be
// suppressed.
module tb_fir_decimator;
  import score_pkg::*;

  localparam int unsigned DECIM = 32;
  localparam int unsigned NT = 64;
  localparam int unsigned NIN = DECIM * 40;
  localparam real PI = 3.141592653589793;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid;
  cplx_t in;
  logic  out_valid;
  cplx_t out;

  fir_decimator #(.DECIM(DECIM)) dut (.*);

  int checks = 0, failures = 0;
  int h [NT];
  int xr [NIN];
  int xi [NIN];
  longint t_in [NIN];
  longint cycle = 0;
  int n_out = 0;
  int phase2 = 0;   // 0: random test, 1: DC test, 2: tone test
  real tone_peak = 0.0;
  int dc_seen = 0;
  int tone_seen = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int rnd_sat(input longint v);
    longint r;
    r = (v + 64'sd16384) >>> 15;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      if (phase2 == 0) begin
        longint sr, si;
        int m;
        m = n_out * DECIM + DECIM - 1;
        sr = 0; si = 0;
        for (int i = 0; i < NT; i++) begin
          if (m - i >= 0) begin
            sr += longint'(h[i]) * xr[m-i];
            si += longint'(h[i]) * xi[m-i];
          end
        end
        checks++;
        if (int'(out.re) != rnd_sat(sr) || int'(out.im) != rnd_sat(si)) begin
          failures++;
          $display("output %0d: got (%0d,%0d) expected (%0d,%0d)", n_out, out.re, out.im, rnd_sat(sr), rnd_sat(si));
        end
        checks++;
        if (cycle - t_in[m] != 64'd9) begin
          failures++;
          $display("latency %0d, expected 9", cycle - t_in[m]);
        end
        n_out++;
      end else if (phase2 == 1) begin
        dc_seen++;
        if (dc_seen > 3) begin
          checks++;
          if (out.re != 16'sd20000 || out.im != -16'sd10000) begin
            failures++;
            $display("DC gain: got (%0d,%0d) expected (20000,-10000)", out.re, out.im);
          end
        end
      end else begin
        real m;
        tone_seen++;
        m = (tone_seen <= 3) ? 0.0 : $sqrt(real'(out.re) * real'(out.re) + real'(out.im) * real'(out.im));
        if (m > tone_peak) tone_peak = m;
      end
    end
  end

  initial begin
    real s [NT];
    real tot;
    int  hs;
    int  n;
    tot = 0.0;
    for (int i = 0; i < NT; i++) begin
      real m, fc;
      fc = 0.5 / DECIM;
      m = real'(i) - (NT - 1) / 2.0;
      s[i] = $sin(2.0 * PI * fc * m) / (PI * m) * (0.54 - 0.46 * $cos(2.0 * PI * i / (NT - 1)));
      tot += s[i];
    end
    hs = 0;
    for (int i = 0; i < NT; i++) begin
      h[i] = $rtoi(32768.0 * s[i] / tot + ((s[i] >= 0.0) ? 0.5 : -0.5));
      hs += h[i];
    end
    h[NT/2 - 1] += (32768 - hs) / 2;
    h[NT/2]     += (32768 - hs) / 2;

    in_valid = 0; in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < NIN) begin
      @(negedge clk);
      if (($urandom % 5) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in.re = sample_t'($urandom);
        in.im = sample_t'($urandom);
        xr[n] = int'(in.re);
        xi[n] = int'(in.im);
        t_in[n] = cycle;
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (n_out != NIN / DECIM) begin
      failures++;
      $display("got %0d outputs, expected %0d", n_out, NIN / DECIM);
    end

    // DC: constant input passes at unit gain.
    phase2 = 1;
    for (int m = 0; m < DECIM * 8; m++) begin
      @(negedge clk);
      in_valid = 1;
      in.re = 16'sd20000;
      in.im = -16'sd10000;
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);

    // Tone far outside the pass band is suppressed by more than 40 dB.
    phase2 = 2;
    for (int m = 0; m < DECIM * 8; m++) begin
      @(negedge clk);
      in_valid = 1;
      in.re = sample_t'($rtoi(30000.0 * $cos(2.0 * PI * 0.4 * m)));
      in.im = sample_t'($rtoi(30000.0 * $sin(2.0 * PI * 0.4 * m)));
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (tone_peak > 300.0) begin
      failures++;
      $display("stop-band tone came through at %f", tone_peak);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
