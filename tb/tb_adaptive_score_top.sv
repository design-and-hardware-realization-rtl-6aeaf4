// tb_adaptive_score_top: end-to-end test of the adaptive SCORE receiver at
// its default parameters (DECIM 32, 1024-sample windows, 4 lags, 8 taps).
//
// Scenario (frequencies in cycles per decimated sample, NCO at 0.25 of the
// IF rate): the signal of interest is a pair of tones at +0.06 and -0.06, so
// it has a cyclic feature at alpha = 0.12; an interferer is a single tone at
// +0.15, which has none. Phases:
//   1. noise only, 2 windows            -> no detection
//   2. SOI + interferer + noise, LMS on -> detection in every window,
//      adaptation error falls, the interferer is suppressed in the output
//      by more than 12 dB while the SOI tone keeps most of its level
//   3. adapt_en low for 200 samples     -> weights frozen (then on again,
//      SOI still present; phases 2 and 3 fill windows 2-6)
//   4. noise only again, 3 windows      -> no detection
// The adaptation error cannot vanish: the reference also carries parts
// with no counterpart in the input (the other tone shifted by alpha, the
// shifted noise and interferer), so only a drop is required.
// IF samples come every clock except for random idle gaps.
// Checked all along: every soi sample equals the beamformer sum of the
// decimated stream with the weights in force (64-bit integer model); every
// window's correlation sums against a model built from the same decimated
// stream with the configured lags and cyclic frequency; every LMS error
// against u(n) - y(n) with u(n) rebuilt from the configured reference lag
// and cyclic frequency (within CORDIC accuracy); the decimation ratio, the fixed 34-clock delay from the block-completing IF
// sample to the soi sample, and that no overrun occurs. Each mechanism
// (decimation, window end, detection on/off, weight update, frozen update,
// input gap) is counted and must have happened.
module tb_adaptive_score_top;
  import score_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned NLAG = 4;
  localparam int unsigned DECIM = 32;
  localparam int unsigned WIN = 1024;
  localparam real TWO_PI = 6.283185307179586;
  localparam real K = 1.6467602581;       // CORDIC gain

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phase_t           ddc_fcw, alpha_fcw;
  logic [5:0]       corr_lag [NLAG];
  logic [5:0]       ref_lag;
  logic [4:0]       mu_shift;
  logic             adapt_en;
  logic [ACC_W+1:0] det_threshold;
  logic             if_valid;
  sample_t          if_data;
  logic             bb_valid;
  cplx_t            bb;
  logic             soi_valid;
  cplx_t            soi;
  logic             soi_mon_valid;
  logic [17:0]      soi_mon_mag;
  phase_t           soi_mon_phase;
  cplx_w_t          weights [NW];
  logic             w_upd;
  cplx_t            w_err;
  logic             adapt_busy;
  logic             overrun;
  logic             corr_valid;
  cplx_acc_t        corr [NLAG];
  logic             score_valid;
  logic [1:0]       score_idx;
  logic [ACC_W+1:0] score_mag;
  phase_t           score_phase;
  logic             det_valid;
  logic             det_flag;

  adaptive_score_top dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // ---------------- mechanism counters ----------------
  int n_if = 0, n_gap = 0, n_bb = 0, n_soi = 0, n_win = 0;
  int n_det1 = 0, n_det0 = 0, n_upd = 0, n_frozen = 0, n_overrun = 0;
  int phase_id = 0;
  int det_by_phase [5][2];
  // Windows 0-1 noise only, 2-6 SOI present, 7-9 noise only.
  function automatic int win_phase(input int w);
    return (w < 2) ? 1 : (w < 7) ? 2 : 4;
  endfunction

  // ---------------- beamformer model ----------------
  cplx_t   bb_log [$];     // every decimated sample, index = sample number
  cplx_t   y_log [$];      // expected beamformer output per sample
  cplx_t   hist [$];
  cplx_t   exp_q [$];
  longint  blk_t [$];

  always @(posedge clk) begin
    if (rst_n && bb_valid) begin
      longint sr, si;
      cplx_t  e;
      hist.push_front(bb);
      if (hist.size() > NW) void'(hist.pop_back());
      sr = 0; si = 0;
      for (int i = 0; i < hist.size(); i++) begin
        sr += longint'(hist[i].re) * weights[i].re - longint'(hist[i].im) * weights[i].im;
        si += longint'(hist[i].re) * weights[i].im + longint'(hist[i].im) * weights[i].re;
      end
      sr = (sr + (64'sd1 <<< 19)) >>> 20;
      si = (si + (64'sd1 <<< 19)) >>> 20;
      e.re = sample_t'((sr > 32767) ? 32767 : (sr < -32768) ? -32768 : sr);
      e.im = sample_t'((si > 32767) ? 32767 : (si < -32768) ? -32768 : si);
      exp_q.push_back(e);
      bb_log.push_back(bb);
      y_log.push_back(e);
      n_bb++;
    end
  end

  // Interferer and error measurements over the extracted signal.
  real intf_re, intf_im, soi_re, soi_im, errp;
  int  meas_n;
  real intf_early, intf_late, soi_early, soi_late, err_early, err_late;

  always @(posedge clk) begin
    if (rst_n && soi_valid) begin
      cplx_t e;
      longint t0;
      real th;
      e  = exp_q.pop_front();
      t0 = blk_t.pop_front();
      checks++;
      if (soi != e) begin
        failures++;
        if (failures < 10) $display("soi %0d: got (%0d,%0d) expected (%0d,%0d)", n_soi, soi.re, soi.im, e.re, e.im);
      end
      checks++;
      if (cycle - t0 != 64'd34) begin
        failures++;
        if (failures < 10) $display("soi latency %0d, expected 34", cycle - t0);
      end
      th = TWO_PI * 0.15 * real'(n_soi);
      intf_re += real'(soi.re) * $cos(th) + real'(soi.im) * $sin(th);
      intf_im += real'(soi.im) * $cos(th) - real'(soi.re) * $sin(th);
      th = TWO_PI * 0.06 * real'(n_soi);
      soi_re  += real'(soi.re) * $cos(th) + real'(soi.im) * $sin(th);
      soi_im  += real'(soi.im) * $cos(th) - real'(soi.re) * $sin(th);
      meas_n++;
      n_soi++;
    end
    if (rst_n && w_upd) begin
      check_error(n_upd);
      n_upd++;
      if (!adapt_en) n_frozen++;
      errp += real'(w_err.re) ** 2 + real'(w_err.im) ** 2;
    end
    if (rst_n && overrun) n_overrun++;
    if (rst_n && corr_valid) begin
      check_window(n_win);
      n_win++;
    end
    if (rst_n && det_valid) begin
      det_by_phase[win_phase(n_det1 + n_det0)][det_flag]++;
      if (det_flag) n_det1++; else n_det0++;
    end
  end

  // Correlation model: R_k = sum over the window of x(n) conj(x(n-lag_k))
  // (rounded to Q2.15 as in the hardware) rotated by -2*pi*alpha*n, times
  // the CORDIC gain; alpha and the lags come from the top's ports.
  task automatic check_window(input int w);
    for (int k = 0; k < NLAG; k++) begin
      real mr, mi, tol;
      mr = 0.0; mi = 0.0;
      for (int n = w * WIN; n < (w + 1) * WIN; n++) begin
        longint br, bi, pr, pi;
        real th;
        int d;
        d  = n - int'(corr_lag[k]);
        br = (d >= 0) ? longint'(bb_log[d].re) : 0;
        bi = (d >= 0) ? longint'(bb_log[d].im) : 0;
        pr = (longint'(bb_log[n].re) * br + longint'(bb_log[n].im) * bi + 16384) >>> 15;
        pi = (longint'(bb_log[n].im) * br - longint'(bb_log[n].re) * bi + 16384) >>> 15;
        th = TWO_PI * real'(32'(longint'(n) * alpha_fcw)) / 4294967296.0;
        mr += K * (real'(pr) * $cos(th) + real'(pi) * $sin(th));
        mi += K * (real'(pi) * $cos(th) - real'(pr) * $sin(th));
      end
      tol = 2.0 * WIN + 1.0e-4 * $sqrt(mr ** 2 + mi ** 2);
      checks++;
      if (rabs(real'(corr[k].re) - mr) > tol || rabs(real'(corr[k].im) - mi) > tol) begin
        failures++;
        if (failures < 10) $display("window %0d lag %0d: got (%0d,%0d) expected (%f,%f)", w, k,
                                    corr[k].re, corr[k].im, mr, mi);
      end
    end
  endtask

  // LMS error model: e(n) = u(n) - y(n), u(n) = x(n-ref_lag)*exp(+j*2*pi*alpha*n)
  // saturated to Q1.15; the CORDIC in the reference path allows a few LSB.
  task automatic check_error(input int n);
    real th, ur, ui, er, ei;
    int d;
    th = TWO_PI * real'(32'(longint'(n) * alpha_fcw)) / 4294967296.0;
    d  = n - int'(ref_lag);
    ur = (d >= 0) ? real'(bb_log[d].re) * $cos(th) - real'(bb_log[d].im) * $sin(th) : 0.0;
    ui = (d >= 0) ? real'(bb_log[d].re) * $sin(th) + real'(bb_log[d].im) * $cos(th) : 0.0;
    ur = (ur > 32767.0) ? 32767.0 : (ur < -32768.0) ? -32768.0 : ur;
    ui = (ui > 32767.0) ? 32767.0 : (ui < -32768.0) ? -32768.0 : ui;
    er = ur - real'(y_log[n].re);
    ei = ui - real'(y_log[n].im);
    er = (er > 32767.0) ? 32767.0 : (er < -32768.0) ? -32768.0 : er;
    ei = (ei > 32767.0) ? 32767.0 : (ei < -32768.0) ? -32768.0 : ei;
    checks++;
    if (rabs(real'(w_err.re) - er) > 8.0 || rabs(real'(w_err.im) - ei) > 8.0) begin
      failures++;
      if (failures < 10) $display("error %0d: got (%0d,%0d) expected (%f,%f)", n, w_err.re, w_err.im, er, ei);
    end
  endtask

  // Frozen weights: record them when adaptation stops and compare at the end
  // of the frozen stretch.
  cplx_w_t w_frozen [NW];

  initial begin
    #200ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- stimulus ----------------
  longint nif = 0;   // IF sample index (time base of the signals)

  task automatic run(input int nsamp, input bit soi_on, input bit intf_on);
    for (int i = 0; i < nsamp; i++) begin
      real v, t;
      @(negedge clk);
      if (($urandom % 97) == 0) begin
        if_valid = 0;
        n_gap++;
        @(negedge clk);
      end
      t = real'(nif);
      v = 3000.0 * (real'($urandom % 20001) / 10000.0 - 1.0);
      if (soi_on) begin
        v += 6000.0 * $cos(TWO_PI * (0.25 + 0.06 / DECIM) * t);
        v += 6000.0 * $cos(TWO_PI * (0.25 - 0.06 / DECIM) * t + 1.0);
      end
      if (intf_on) v += 8000.0 * $cos(TWO_PI * (0.25 + 0.15 / DECIM) * t + 0.3);
      if_valid = 1;
      if_data  = sample_t'($rtoi(v));
      if ((nif % longint'(DECIM)) == longint'(DECIM) - 1) blk_t.push_back(cycle);
      nif++;
      n_if++;
    end
    @(negedge clk) if_valid = 0;
  endtask

  task automatic start_meas();
    intf_re = 0.0; intf_im = 0.0; soi_re = 0.0; soi_im = 0.0; errp = 0.0; meas_n = 0;
  endtask

  initial begin
    ddc_fcw   = 32'h4000_0000;                                  // 0.25
    alpha_fcw = phase_t'($rtoi(0.12 * 4294967296.0));           // 0.12 per decimated sample
    corr_lag[0] = 0; corr_lag[1] = 1; corr_lag[2] = 2; corr_lag[3] = 4;
    ref_lag   = 6'd1;
    mu_shift  = 5'd3;
    adapt_en  = 1;
    det_threshold = 34'd200000;
    if_valid  = 0;
    if_data   = 0;
    for (int p = 0; p < 5; p++) begin
      det_by_phase[p][0] = 0;
      det_by_phase[p][1] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. noise only
    phase_id = 1;
    run(2 * WIN * DECIM, 0, 0);
    // 2. SOI + interferer, adapting
    phase_id = 2;
    start_meas();
    run(300 * DECIM, 1, 1);
    intf_early = $sqrt(intf_re ** 2 + intf_im ** 2) / meas_n;
    soi_early  = $sqrt(soi_re ** 2 + soi_im ** 2) / meas_n;
    err_early  = errp / meas_n;
    run((4 * WIN - 600) * DECIM, 1, 1);
    start_meas();
    run(300 * DECIM, 1, 1);
    intf_late = $sqrt(intf_re ** 2 + intf_im ** 2) / meas_n;
    soi_late  = $sqrt(soi_re ** 2 + soi_im ** 2) / meas_n;
    err_late  = errp / meas_n;
    // 3. frozen weights
    phase_id = 3;
    repeat (40) @(negedge clk);
    adapt_en = 0;
    for (int i = 0; i < NW; i++) w_frozen[i] = weights[i];
    run(200 * DECIM, 1, 1);
    repeat (60) @(negedge clk);
    checks++;
    for (int i = 0; i < NW; i++)
      if (weights[i] != w_frozen[i]) begin
        failures++;
        $display("weight %0d changed while adaptation was off", i);
        break;
      end
    adapt_en = 1;
    run((WIN - 200) * DECIM, 1, 1);
    // 4. noise only again (first window after the switch is mixed)
    phase_id = 4;
    run(3 * WIN * DECIM, 0, 0);
    repeat (200) @(negedge clk);

    $display("interferer in output: %f -> %f; SOI tone in output: %f -> %f; error power %f -> %f",
             intf_early, intf_late, soi_early, soi_late, err_early, err_late);
    $display("windows %0d, detections on %0d off %0d; noise %0d/%0d, SOI %0d/%0d, noise %0d/%0d",
             n_win, n_det1, n_det0, det_by_phase[1][1], det_by_phase[1][0], det_by_phase[2][1],
             det_by_phase[2][0], det_by_phase[4][1], det_by_phase[4][0]);
    $display("IF samples %0d, gaps %0d, decimated %0d, soi %0d, updates %0d, frozen %0d, overruns %0d",
             n_if, n_gap, n_bb, n_soi, n_upd, n_frozen, n_overrun);

    checks++;
    if (n_bb != n_if / DECIM || n_soi != n_bb) begin
      failures++;
      $display("decimation ratio wrong");
    end
    checks++;
    if (det_by_phase[1][1] != 0 || det_by_phase[1][0] != 2) begin
      failures++;
      $display("noise-only windows detected");
    end
    checks++;
    if (det_by_phase[2][0] != 0 || det_by_phase[2][1] != 5) begin
      failures++;
      $display("SOI windows not all detected");
    end
    checks++;
    if (det_by_phase[4][1] != 0 || det_by_phase[4][0] != 3) begin
      failures++;
      $display("detection did not drop after the SOI left");
    end
    checks++;
    if (intf_late * 4.0 > intf_early) begin
      failures++;
      $display("interferer not suppressed by 12 dB");
    end
    checks++;
    if (err_late > 0.9 * err_early) begin
      failures++;
      $display("adaptation error did not fall");
    end
    checks++;
    if (soi_late < 0.25 * soi_early) begin
      failures++;
      $display("SOI lost in the output");
    end
    // Every mechanism must have happened.
    checks++;
    if (n_gap == 0 || n_bb == 0 || n_win == 0 || n_det1 == 0 || n_det0 == 0 ||
        n_upd == 0 || n_frozen == 0) begin
      failures++;
      $display("a mechanism never happened");
    end
    checks++;
    if (n_overrun != 0) begin
      failures++;
      $display("overrun in a stream with DECIM %0d", DECIM);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
