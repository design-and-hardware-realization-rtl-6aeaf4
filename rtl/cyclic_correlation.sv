// cyclic_correlation: the cyclic correlation unit. It estimates the cyclic
// autocorrelation of the baseband stream at cyclic frequency alpha for
// NLAG lags in parallel, and its absolute value, the score used for
// detection:
//
//   R_k = sum_{n in window} x(n) * conj(x(n - lag_k)) * exp(-j*2*pi*alpha*n)
//
// with alpha = alpha_fcw / 2^32 cycles per sample and n counted from reset.
// A further branch of the same delay line produces the reference stream of
// the adaptive core, the delayed and frequency-shifted input
//
//   u(n) = x(n - ref_lag) * exp(+j*2*pi*alpha*n),
//
// which a signal with this cyclic feature is correlated with, and noise and
// interference without it are not.
//
// How it works. A delay line supplies x(n) and its NLAG delayed copies.
// Each lag branch forms the lag product, rounds it to Q2.15 (18 bits),
// rotates it by -2*pi*alpha*n in its own pipelined CORDIC, and adds it into
// an ACC_W-bit accumulator. After 2^LOG2_WIN samples the NLAG sums are
// latched, the accumulators restart, and one shared vectoring CORDIC turns
// the sums, one per clock, into magnitude and phase. The largest magnitude
// of the window is compared with det_threshold to raise det_flag.
//
// Fixed-point note: the CORDIC gain K ~= 1.6468 is not removed, so R_k and
// score_mag are K and K^2 times the ideal values (scaled by 2^15 per unit
// lag product). A threshold must be set in the same units.
//
// Interface: in_valid/in, one sample per clock at most. ref_valid/ref_out
// give u(n), Q1.15, STAGES+3 clocks after its sample. corr_valid pulses
// with the window's R values; score_valid then carries score_idx = k,
// score_mag and score_phase for k = 0..NLAG-1 on consecutive clocks; det_valid
// and det_flag follow one clock after the last score. Timing: corr_valid
// comes STAGES+4 clocks after the last sample of a window, the first score
// STAGES+2 clocks after corr_valid.
//
// From the document: the lag-and-multiply structure, delay lines, the
// CORDIC rotation at the cyclic frequency, the unit feeding the weight
// update engine, parallel lag branches and
// windowed accumulators. This design's choices: the widths, the window
// length, the number of lags, the shared vectoring CORDIC and the threshold
// test.
module cyclic_correlation
  import score_pkg::*;
#(
  parameter int unsigned NLAG     = 4,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned LOG2_WIN = 10,
  parameter int unsigned STAGES   = 16,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned IW      = $clog2(NLAG > 1 ? NLAG : 2)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  cplx_t            in,
  input  logic [AW-1:0]    lag [NLAG],
  input  logic [AW-1:0]    ref_lag,
  input  phase_t           alpha_fcw,
  input  logic [ACC_W+1:0] det_threshold,
  output logic             ref_valid,
  output cplx_t            ref_out,
  output logic             corr_valid,
  output cplx_acc_t        corr [NLAG],
  output logic             score_valid,
  output logic [IW-1:0]    score_idx,
  output logic [ACC_W+1:0] score_mag,
  output phase_t           score_phase,
  output logic             det_valid,
  output logic             det_flag
);
  localparam int unsigned PW = SAMPLE_W + 2;   // rounded lag product, Q2.15
  localparam int unsigned RW = PW + 2;         // CORDIC output width

  if ((1 << LOG2_WIN) < NLAG) begin : g_bad_param
    $error("cyclic_correlation: window shorter than NLAG");
  end

  // ---------------- delay & multiply ----------------
  // Read ports 0..NLAG-1 serve the lag branches, port NLAG the reference.
  logic          d_valid;
  logic [31:0]   d_cur;
  logic [31:0]   d_tap [NLAG+1];
  logic [AW-1:0] rd_lag [NLAG+1];
  phase_t        theta, d_theta;

  always_comb begin
    for (int k = 0; k < NLAG; k++) rd_lag[k] = lag[k];
    rd_lag[NLAG] = ref_lag;
  end

  delay_line #(.W(32), .DEPTH(DEPTH), .NREAD(NLAG+1)) u_dly (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in(in), .lag(rd_lag),
    .out_valid(d_valid), .cur(d_cur), .tap(d_tap)
  );

  phase_accumulator u_alpha (
    .clk(clk), .rst_n(rst_n), .clear(1'b0), .step(in_valid),
    .fcw(alpha_fcw), .phase(theta)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) d_theta <= '0;
    else if (in_valid) d_theta <= theta;
  end

  cplx_t a;
  assign a = cplx_t'(d_cur);

  logic                 p_valid;
  phase_t               p_phase;
  logic signed [PW-1:0] p_re [NLAG];
  logic signed [PW-1:0] p_im [NLAG];
  logic signed [PW-1:0] m_re [NLAG];
  logic signed [PW-1:0] m_im [NLAG];

  // Lag product x(n) * conj(x(n - lag_k)), Q2.30 rounded to Q2.15.
  always_comb begin
    for (int k = 0; k < NLAG; k++) begin
      cplx_t b;
      logic signed [2*SAMPLE_W:0] mr, mi;
      b  = cplx_t'(d_tap[k]);
      mr = (2*SAMPLE_W+1)'(a.re * b.re) + (2*SAMPLE_W+1)'(a.im * b.im);
      mi = (2*SAMPLE_W+1)'(a.im * b.re) - (2*SAMPLE_W+1)'(a.re * b.im);
      m_re[k] = PW'((mr + (1 <<< (SAMPLE_W - 2))) >>> (SAMPLE_W - 1));
      m_im[k] = PW'((mi + (1 <<< (SAMPLE_W - 2))) >>> (SAMPLE_W - 1));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      p_phase <= '0;
      for (int k = 0; k < NLAG; k++) begin
        p_re[k] <= '0;
        p_im[k] <= '0;
      end
    end else begin
      p_valid <= d_valid;
      p_phase <= -d_theta;
      for (int k = 0; k < NLAG; k++) begin
        p_re[k] <= m_re[k];
        p_im[k] <= m_im[k];
      end
    end
  end

  // ---------------- rotation by -2*pi*alpha*n ----------------
  logic                 r_valid [NLAG];
  logic signed [RW-1:0] r_re [NLAG];
  logic signed [RW-1:0] r_im [NLAG];

  for (genvar k = 0; k < NLAG; k++) begin : g_branch
    logic unused_tag;
    cordic_rotator #(.W(PW), .STAGES(STAGES), .TAG_W(1)) u_rot (
      .clk(clk), .rst_n(rst_n),
      .in_valid(p_valid), .in_tag(1'b0),
      .x_in(p_re[k]), .y_in(p_im[k]), .z_in(p_phase),
      .out_valid(r_valid[k]), .out_tag(unused_tag),
      .x_out(r_re[k]), .y_out(r_im[k])
    );
  end

  // ---------------- reference: x(n - ref_lag) * exp(+j*2*pi*alpha*n) ----------------
  cplx_t                    ref_in;
  logic                     u_valid;
  logic signed [SAMPLE_W+1:0] u_re, u_im;
  logic                     unused_ref_tag;

  assign ref_in = cplx_t'(d_tap[NLAG]);

  cordic_rotator #(.W(SAMPLE_W), .STAGES(STAGES), .TAG_W(1)) u_ref (
    .clk(clk), .rst_n(rst_n),
    .in_valid(d_valid), .in_tag(1'b0),
    .x_in(ref_in.re), .y_in(ref_in.im), .z_in(d_theta),
    .out_valid(u_valid), .out_tag(unused_ref_tag),
    .x_out(u_re), .y_out(u_im)
  );

  // Remove the CORDIC gain: multiply by 1/K in Q0.16.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ref_valid <= 1'b0;
      ref_out   <= '0;
    end else begin
      ref_valid  <= u_valid;
      ref_out.re <= round_sat(64'(u_re) * 64'(CORDIC_INV_GAIN_Q16), 16);
      ref_out.im <= round_sat(64'(u_im) * 64'(CORDIC_INV_GAIN_Q16), 16);
    end
  end

  // ---------------- windowed accumulation ----------------
  cplx_acc_t            acc [NLAG];
  cplx_acc_t            acc_next [NLAG];
  logic [LOG2_WIN-1:0]  win_cnt;

  always_comb begin
    for (int k = 0; k < NLAG; k++) begin
      acc_next[k].re = acc[k].re + ACC_W'(r_re[k]);
      acc_next[k].im = acc[k].im + ACC_W'(r_im[k]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win_cnt    <= '0;
      corr_valid <= 1'b0;
      for (int k = 0; k < NLAG; k++) begin
        acc[k]  <= '0;
        corr[k] <= '0;
      end
    end else begin
      corr_valid <= 1'b0;
      if (r_valid[0]) begin
        win_cnt <= win_cnt + 1'b1;
        for (int k = 0; k < NLAG; k++) begin
          if (win_cnt == '1) begin
            corr[k] <= acc_next[k];
            acc[k]  <= '0;
          end else begin
            acc[k]  <= acc_next[k];
          end
        end
        if (win_cnt == '1) corr_valid <= 1'b1;
      end
    end
  end

  // ---------------- absolute score: shared vectoring CORDIC ----------------
  cplx_acc_t     bank [NLAG];
  logic          feeding;
  logic [IW-1:0] feed_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      feeding  <= 1'b0;
      feed_idx <= '0;
      for (int k = 0; k < NLAG; k++) bank[k] <= '0;
    end else if (corr_valid) begin
      feeding  <= 1'b1;
      feed_idx <= '0;
      for (int k = 0; k < NLAG; k++) bank[k] <= corr[k];
    end else if (feeding) begin
      if (feed_idx == IW'(NLAG - 1)) feeding <= 1'b0;
      feed_idx <= feed_idx + 1'b1;
    end
  end

  cordic_vectoring #(.W(ACC_W), .STAGES(STAGES), .TAG_W(IW)) u_abs (
    .clk(clk), .rst_n(rst_n),
    .in_valid(feeding), .in_tag(feed_idx),
    .x_in(bank[feed_idx].re), .y_in(bank[feed_idx].im),
    .out_valid(score_valid), .out_tag(score_idx),
    .mag_out(score_mag), .phase_out(score_phase)
  );

  // ---------------- detection ----------------
  logic [ACC_W+1:0] max_mag, max_next;

  assign max_next = (score_idx == '0 || score_mag > max_mag) ? score_mag : max_mag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_mag   <= '0;
      det_valid <= 1'b0;
      det_flag  <= 1'b0;
    end else begin
      det_valid <= 1'b0;
      if (score_valid) begin
        max_mag <= max_next;
        if (score_idx == IW'(NLAG - 1)) begin
          det_valid <= 1'b1;
          det_flag  <= (max_next > det_threshold);
        end
      end
    end
  end
endmodule
