// tb_weight_update_engine: self-checking test of the LMS adaptive core.
//
// The testbench plays both the beamformer and the correlation unit: for
// each of 150 samples it presents a random tap vector X(n), pulses x_valid,
// returns a random output y(n) 6 clocks later and a random reference u(n)
// STAGES+3 clocks after x_valid. It checks:
//  - err = u(n) - y(n) exactly;
//  - every weight moves by exactly round(err*conj(X_i) / 2^(10+mu_shift)),
//    saturated to 24 bits, and not at all while adapt_en is low
//    (samples 100..109);
//  - upd comes STAGES+5 clocks after x_valid;
//  - the monitor gives K*|y| and arg(y) within CORDIC accuracy;
//  - a sample sent while the loop is still busy raises overrun.
// A last phase drives a coherent case, u(n) = 0.5*X_0(n), and checks that
// the error power falls by more than 20 dB as w_0 converges to 0.5. A
// floating-point LMS with the same step (2^-mu_shift) runs alongside; the
// mean squared difference between the outputs formed with the hardware
// weights and with the floating-point weights (full scale = 1) must stay
// below 3.8e-4, and the number of updates until the error power has
// dropped by 20 dB (16-sample average) is reported and must be at most 100.
module tb_weight_update_engine;
  import score_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned STAGES = 16;
  localparam int unsigned N = 150;
  localparam real K = 1.6467602581;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        adapt_en;
  logic [4:0]  mu_shift;
  logic        x_valid;
  cplx_t       taps [NW];
  logic        y_valid;
  cplx_t       y;
  logic        ref_valid;
  cplx_t       ref_in;
  cplx_w_t     w [NW];
  logic        upd;
  cplx_t       err;
  logic        mon_valid;
  logic [17:0] y_mag;
  phase_t      y_phase;
  logic        busy;
  logic        overrun;

  weight_update_engine #(.NW(NW), .STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic longint sat24(input longint v);
    if (v > 8388607) return 8388607;
    if (v < -8388608) return -8388608;
    return v;
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  longint  t_x;
  int      cur_n;
  int      ey_re, ey_im;
  real     mon_mag, mon_ang;
  int      n_upd = 0, n_overrun = 0, n_frozen = 0, n_mon = 0;
  cplx_w_t w_before [NW];
  real     ep_first = 0.0, ep_last = 0.0;
  real     fw_re [NW], fw_im [NW];      // floating-point reference weights
  real     ep_hist [400];
  real     mse_acc = 0.0;
  int      n_conv = -1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && overrun) n_overrun++;

  always @(posedge clk) begin
    if (rst_n && mon_valid && cur_n >= 0) begin
      real d;
      checks++;
      d = TWO_PI * real'(int'(y_phase)) / 4294967296.0 - mon_ang;
      if (d > TWO_PI / 2.0)  d = d - TWO_PI;
      if (d < -TWO_PI / 2.0) d = d + TWO_PI;
      if (rabs(real'(y_mag) - mon_mag) > 8.0 || (mon_mag > 2000.0 && rabs(d) > 0.01)) begin
        failures++;
        $display("monitor: got mag %0d phase %0d, expected %f %f", y_mag, y_phase, mon_mag, mon_ang);
      end
      n_mon++;
    end
  end

  // upd and the new weights appear together: compare with the weights seen
  // at the previous update.
  always @(posedge clk) begin
    if (rst_n && upd) begin
      int sh;
      sample_t gre, gim;
      gre = err.re;
      gim = err.im;
      if (cur_n >= 0) begin
        checks++;
        if (cycle - t_x != longint'(STAGES) + 5) begin
          failures++;
          $display("upd latency %0d, expected %0d", cycle - t_x, STAGES + 5);
        end
        checks++;
        if (int'(gre) != ey_re || int'(gim) != ey_im) begin
          failures++;
          $display("sample %0d: err (%0d,%0d) expected (%0d,%0d)", cur_n, gre, gim, ey_re, ey_im);
        end
      end
      sh = 10 + int'(mu_shift);
      for (int i = 0; i < NW; i++) begin
        longint gr, gi;
        gr = longint'(gre) * taps[i].re + longint'(gim) * taps[i].im;
        gi = longint'(gim) * taps[i].re - longint'(gre) * taps[i].im;
        gr = adapt_en ? sat24(longint'(w_before[i].re) + ((gr + (64'sd1 <<< (sh - 1))) >>> sh)) : longint'(w_before[i].re);
        gi = adapt_en ? sat24(longint'(w_before[i].im) + ((gi + (64'sd1 <<< (sh - 1))) >>> sh)) : longint'(w_before[i].im);
        checks++;
        if (longint'(w[i].re) != gr || longint'(w[i].im) != gi) begin
          failures++;
          $display("weight %0d after sample %0d: got (%0d,%0d) expected (%0d,%0d)", i, cur_n,
                   w[i].re, w[i].im, gr, gi);
        end
        w_before[i] = w[i];
      end
      if (!adapt_en) n_frozen++;
      n_upd++;
    end
  end

  // One sample: taps, then y after 6 clocks, then u at STAGES+3 clocks.
  task automatic one_sample(input cplx_t yv, input cplx_t uv);
    @(negedge clk);
    x_valid = 1;
    t_x = cycle;
    @(negedge clk);
    x_valid = 0;
    repeat (5) @(negedge clk);
    y = yv;
    y_valid = 1;
    mon_mag = K * $sqrt(real'(yv.re) ** 2 + real'(yv.im) ** 2);
    mon_ang = $atan2(real'(yv.im), real'(yv.re));
    @(negedge clk);
    y_valid = 0;
    repeat (STAGES + 3 - 7) @(negedge clk);
    ref_in = uv;
    ref_valid = 1;
    ey_re = int'(uv.re) - int'(yv.re);
    ey_im = int'(uv.im) - int'(yv.im);
    @(negedge clk);
    ref_valid = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    cplx_t yv, uv;
    adapt_en = 1;
    mu_shift = 5'd4;
    x_valid = 0; y_valid = 0; y = '0; ref_valid = 0; ref_in = '0;
    cur_n = -1;
    for (int i = 0; i < NW; i++) taps[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < NW; i++) w_before[i] = w[i];
    checks++;
    if (w[0].re != 24'sd1048576 || w[0].im != 0 || w[1].re != 0) begin
      failures++;
      $display("reset weights wrong");
    end
    for (int n = 0; n < N; n++) begin
      adapt_en = !(n >= 100 && n < 110);
      for (int i = 0; i < NW; i++) begin
        taps[i].re = sample_t'($signed(15'($urandom)));
        taps[i].im = sample_t'($signed(15'($urandom)));
      end
      cur_n = n;
      yv.re = sample_t'($signed(15'($urandom)));
      yv.im = sample_t'($signed(15'($urandom)));
      uv.re = sample_t'($signed(15'($urandom)));
      uv.im = sample_t'($signed(15'($urandom)));
      one_sample(yv, uv);
    end
    checks++;
    if (n_upd != N || n_frozen != 10 || n_overrun != 0 || n_mon != N) begin
      failures++;
      $display("updates %0d frozen %0d overruns %0d monitor %0d", n_upd, n_frozen, n_overrun, n_mon);
    end

    // Two samples too close together: the second one is an overrun.
    cur_n = -1;
    @(negedge clk);
    x_valid = 1;
    repeat (4) @(negedge clk);
    x_valid = 0;
    repeat (40) @(negedge clk);
    checks++;
    if (n_overrun == 0) begin
      failures++;
      $display("overrun never raised");
    end

    // Coherent case: the reference is half of the newest input, so the
    // weights should converge to w_0 = 0.5, the rest 0. The testbench forms
    // y from the current weights as the beamformer would.
    mu_shift = 5'd2;
    for (int i = 0; i < NW; i++) begin
      fw_re[i] = real'(w[i].re) / 1048576.0;
      fw_im[i] = real'(w[i].im) / 1048576.0;
    end
    for (int n = 0; n < 400; n++) begin
      longint sr, si;
      for (int i = NW - 1; i > 0; i--) taps[i] = taps[i-1];
      taps[0].re = sample_t'($signed(15'($urandom)));
      taps[0].im = sample_t'($signed(15'($urandom)));
      sr = 0; si = 0;
      for (int i = 0; i < NW; i++) begin
        sr += longint'(taps[i].re) * w[i].re - longint'(taps[i].im) * w[i].im;
        si += longint'(taps[i].re) * w[i].im + longint'(taps[i].im) * w[i].re;
      end
      yv.re = sample_t'((sr + (64'sd1 <<< 19)) >>> 20);
      yv.im = sample_t'((si + (64'sd1 <<< 19)) >>> 20);
      uv.re = sample_t'(taps[0].re >>> 1);
      uv.im = sample_t'(taps[0].im >>> 1);
      // floating-point LMS on the same data, scaled so full scale = 1
      begin
        real fy_re, fy_im, fe_re, fe_im, xr, xi, mu;
        fy_re = 0.0; fy_im = 0.0;
        for (int i = 0; i < NW; i++) begin
          xr = real'(taps[i].re) / 32768.0;
          xi = real'(taps[i].im) / 32768.0;
          fy_re += fw_re[i] * xr - fw_im[i] * xi;
          fy_im += fw_re[i] * xi + fw_im[i] * xr;
        end
        mse_acc += (real'(yv.re) / 32768.0 - fy_re) ** 2 + (real'(yv.im) / 32768.0 - fy_im) ** 2;
        fe_re = real'(uv.re) / 32768.0 - fy_re;
        fe_im = real'(uv.im) / 32768.0 - fy_im;
        mu = 1.0 / real'(1 << mu_shift);
        for (int i = 0; i < NW; i++) begin
          xr = real'(taps[i].re) / 32768.0;
          xi = real'(taps[i].im) / 32768.0;
          fw_re[i] += mu * (fe_re * xr + fe_im * xi);
          fw_im[i] += mu * (fe_im * xr - fe_re * xi);
        end
      end
      one_sample(yv, uv);
      ep_hist[n] = real'(ey_re) ** 2 + real'(ey_im) ** 2;
      if (n < 20)   ep_first += real'(ey_re) ** 2 + real'(ey_im) ** 2;
      if (n >= 380) ep_last  += real'(ey_re) ** 2 + real'(ey_im) ** 2;
    end
    checks++;
    if (ep_last * 100.0 > ep_first) begin
      failures++;
      $display("error power fell only from %f to %f", ep_first, ep_last);
    end
    for (int n = 0; n + 16 <= 400 && n_conv < 0; n++) begin
      real a;
      a = 0.0;
      for (int k = 0; k < 16; k++) a += ep_hist[n + k];
      if (a / 16.0 * 100.0 < ep_first / 20.0) n_conv = n;
    end
    $display("coherent LMS: 20 dB error drop after %0d updates, output MSE against floating point %e",
             n_conv, mse_acc / 400.0);
    checks++;
    if (n_conv < 0 || n_conv > 100) begin
      failures++;
      $display("error power took %0d updates to drop by 20 dB", n_conv);
    end
    checks++;
    if (mse_acc / 400.0 >= 3.8e-4) begin
      failures++;
      $display("fixed-point output deviates from the floating-point LMS: MSE %e", mse_acc / 400.0);
    end
    checks++;
    if (rabs(real'(w[0].re) - 524288.0) > 5000.0) begin
      failures++;
      $display("w_0 converged to %0d, expected about 524288", w[0].re);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
