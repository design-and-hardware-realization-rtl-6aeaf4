// tb_cyclic_correlation: self-checking test of the cyclic correlation unit.
//
// Four windows of 1024 samples are streamed (with random gaps) at lags
// {0, 1, 5, 63}: two windows of random samples, one window of two complex
// tones spaced by the cyclic frequency alpha (a strong cyclic feature at
// every lag) and one more random window. For every window and lag the
// unit's R value is compared with a floating-point model (lag product
// rounded as in the hardware, rotated by exp(-j*2*pi*alpha*n), scaled by
// the CORDIC gain). The scores must equal K*|R| of the unit's own R values
// in lag order, the detection flag must match the model's verdict against
// the threshold, and the corr_valid and first-score latencies are checked.
// The reference stream u(n) = x(n-7)*exp(+j*2*pi*alpha*n) is compared with
// floating point within 8 LSB (saturated to Q1.15), STAGES+3 clocks after each sample.
module tb_cyclic_correlation;
  import score_pkg::*;

  localparam int unsigned NLAG = 4;
  localparam int unsigned DEPTH = 64;
  localparam int unsigned LOG2_WIN = 10;
  localparam int unsigned STAGES = 16;
  localparam int unsigned WIN = 1 << LOG2_WIN;
  localparam int unsigned NWIN = 4;
  localparam int unsigned NS = WIN * NWIN;
  localparam real K = 1.6467602581;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             in_valid;
  cplx_t            in;
  logic [5:0]       lag [NLAG];
  logic [5:0]       ref_lag;
  logic             ref_valid;
  cplx_t            ref_out;
  phase_t           alpha_fcw;
  logic [ACC_W+1:0] det_threshold;
  logic             corr_valid;
  cplx_acc_t        corr [NLAG];
  logic             score_valid;
  logic [1:0]       score_idx;
  logic [ACC_W+1:0] score_mag;
  phase_t           score_phase;
  logic             det_valid;
  logic             det_flag;

  cyclic_correlation #(.NLAG(NLAG), .DEPTH(DEPTH), .LOG2_WIN(LOG2_WIN), .STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  int     xr [NS];
  int     xi [NS];
  real    mr [NWIN][NLAG];
  real    mi [NWIN][NLAG];
  longint t_last [NWIN];
  longint t_in [NS];
  int     n_ref = 0;
  longint t_corr;
  cplx_acc_t got [NLAG];
  longint cycle = 0;
  int     n_win = 0, n_score = 0, n_det = 0, n_flag1 = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model of one window: rounded lag products rotated in floating point.
  task automatic model();
    for (int w = 0; w < NWIN; w++)
      for (int k = 0; k < NLAG; k++) begin
        mr[w][k] = 0.0;
        mi[w][k] = 0.0;
      end
    for (int n = 0; n < NS; n++) begin
      real th;
      th = TWO_PI * real'(32'(n * alpha_fcw)) / 4294967296.0;
      for (int k = 0; k < NLAG; k++) begin
        longint br, bi, pr, pi;
        int d;
        d = n - int'(lag[k]);
        br = (d >= 0) ? longint'(xr[d]) : 0;
        bi = (d >= 0) ? longint'(xi[d]) : 0;
        pr = (longint'(xr[n]) * br + longint'(xi[n]) * bi + 16384) >>> 15;
        pi = (longint'(xi[n]) * br - longint'(xr[n]) * bi + 16384) >>> 15;
        mr[n / WIN][k] += K * (real'(pr) * $cos(th) + real'(pi) * $sin(th));
        mi[n / WIN][k] += K * (real'(pi) * $cos(th) - real'(pr) * $sin(th));
      end
    end
  endtask

  // Reference stream: u(n) = x(n - ref_lag) * exp(+j*2*pi*alpha*n).
  always @(posedge clk) begin
    if (rst_n && ref_valid) begin
      real th, ur, ui;
      int d;
      sample_t gre, gim;
      gre = ref_out.re;
      gim = ref_out.im;
      th = TWO_PI * real'(32'(n_ref * alpha_fcw)) / 4294967296.0;
      d  = n_ref - int'(ref_lag);
      ur = (d >= 0) ? real'(xr[d]) * $cos(th) - real'(xi[d]) * $sin(th) : 0.0;
      ui = (d >= 0) ? real'(xr[d]) * $sin(th) + real'(xi[d]) * $cos(th) : 0.0;
      // The output saturates to Q1.15.
      if (ur > 32767.0)  ur = 32767.0;
      if (ur < -32768.0) ur = -32768.0;
      if (ui > 32767.0)  ui = 32767.0;
      if (ui < -32768.0) ui = -32768.0;
      checks++;
      if (rabs(real'(gre) - ur) > 8.0 || rabs(real'(gim) - ui) > 8.0) begin
        failures++;
        $display("reference %0d: got (%0d,%0d) expected (%f,%f)", n_ref, gre, gim, ur, ui);
      end
      checks++;
      if (cycle - t_in[n_ref] != longint'(STAGES) + 3) begin
        failures++;
        $display("reference latency %0d, expected %0d", cycle - t_in[n_ref], STAGES + 3);
      end
      n_ref++;
    end
  end

  always @(posedge clk) begin
    if (rst_n && corr_valid) begin
      checks++;
      if (cycle - t_last[n_win] != longint'(STAGES) + 4) begin
        failures++;
        $display("corr_valid latency %0d, expected %0d", cycle - t_last[n_win], STAGES + 4);
      end
      t_corr = cycle;
      for (int k = 0; k < NLAG; k++) begin
        real tol;
        got[k] = corr[k];
        tol = 2.0 * WIN + 1.0e-4 * $sqrt(mr[n_win][k] ** 2 + mi[n_win][k] ** 2);
        checks++;
        if (rabs(real'(corr[k].re) - mr[n_win][k]) > tol || rabs(real'(corr[k].im) - mi[n_win][k]) > tol) begin
          failures++;
          $display("window %0d lag %0d: got (%0d,%0d) expected (%f,%f)", n_win, k,
                   corr[k].re, corr[k].im, mr[n_win][k], mi[n_win][k]);
        end
      end
      n_win++;
    end
    if (rst_n && score_valid) begin
      real e;
      int k;
      k = n_score % NLAG;
      checks++;
      if (int'(score_idx) != k) begin
        failures++;
        $display("score index %0d, expected %0d", score_idx, k);
      end
      if (k == 0) begin
        checks++;
        if (cycle - t_corr != longint'(STAGES) + 2) begin
          failures++;
          $display("first score latency %0d, expected %0d", cycle - t_corr, STAGES + 2);
        end
      end
      e = K * $sqrt(real'(got[k].re) ** 2 + real'(got[k].im) ** 2);
      checks++;
      if (rabs(real'(score_mag) - e) > 16.0 + 1.0e-6 * e) begin
        failures++;
        $display("score %0d: got %0d expected %f", k, score_mag, e);
      end
      n_score++;
    end
    if (rst_n && det_valid) begin
      real mx;
      int w;
      w = n_det;
      mx = 0.0;
      for (int k = 0; k < NLAG; k++)
        if (K * $sqrt(mr[w][k] ** 2 + mi[w][k] ** 2) > mx) mx = K * $sqrt(mr[w][k] ** 2 + mi[w][k] ** 2);
      checks++;
      if (det_flag != (mx > real'(det_threshold))) begin
        failures++;
        $display("window %0d: det_flag %0d, model max score %f threshold %0d", w, det_flag, mx, det_threshold);
      end
      if (det_flag) n_flag1++;
      n_det++;
    end
  end

  initial begin
    int n;
    lag[0] = 0; lag[1] = 1; lag[2] = 5; lag[3] = 63;
    ref_lag = 6'd7;
    alpha_fcw = 32'h0A3D_70A4;               // 0.04 cycles per sample
    det_threshold = 34'd8388608;
    for (int i = 0; i < NS; i++) begin
      if (i / WIN == 2) begin
        real f1, f2;
        f1 = 0.013;
        f2 = f1 - real'(alpha_fcw) / 4294967296.0;
        xr[i] = $rtoi(12000.0 * ($cos(TWO_PI * f1 * i) + $cos(TWO_PI * f2 * i)));
        xi[i] = $rtoi(12000.0 * ($sin(TWO_PI * f1 * i) + $sin(TWO_PI * f2 * i)));
      end else begin
        xr[i] = int'($signed(16'($urandom)));
        xi[i] = int'($signed(16'($urandom)));
      end
    end
    model();

    in_valid = 0; in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < NS) begin
      @(negedge clk);
      if (($urandom % 7) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in.re = sample_t'(xr[n]);
        in.im = sample_t'(xi[n]);
        if ((n % WIN) == WIN - 1) t_last[n / WIN] = cycle;
        t_in[n] = cycle;
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (2 * STAGES + 20) @(posedge clk);
    checks++;
    if (n_ref != NS || n_win != NWIN || n_score != NWIN * NLAG || n_det != NWIN || n_flag1 != 1) begin
      failures++;
      $display("windows %0d scores %0d detections %0d flags %0d", n_win, n_score, n_det, n_flag1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
