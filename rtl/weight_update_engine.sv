// weight_update_engine: adaptive core of the SCORE receiver (LMS).
//
// Idea. A signal of interest that is cyclostationary at cyclic frequency
// alpha and lag tau is correlated with its own copy delayed by tau and
// shifted in frequency by alpha; noise and interference without that
// feature are not. The correlation unit supplies that copy of the input,
// u(n) = x(n - tau) * exp(j*2*pi*alpha*n), as the reference. Adapting the
// weights so that the filter output y(n) = sum_i w_i X_i(n) tracks u(n) in
// the least-squares sense (least-squares SCORE with a fixed control
// vector) keeps what is coherent with the reference, the signal of
// interest, and suppresses the rest. The LMS form used here is
//
//   e(n) = u(n) - y(n)
//   w_i <- w_i + 2^-mu_shift * e(n) * conj(X_i(n))     (all i in parallel)
//
// How it works. y(n) from the beamformer is held until the reference u(n)
// for the same sample arrives; the error is then registered and, one clock
// later, all NW weights are updated at once, one complex multiplier per
// weight, with rounding and saturation to WEIGHT_W bits. A vectoring CORDIC
// also turns each y(n) into magnitude and phase for monitoring.
//
// Interface: x_valid marks a new input sample (the strobe that enters the
// beamformer); taps is the beamformer's tap register X(n), which must stay
// stable until the update; y_valid/y is the beamformer output, which must
// come before ref_valid/ref_in for the same sample. w holds the weights
// (reset: w_0 = 1, others 0, a pass-through filter); upd pulses with each
// new weight set, err is the last error, y_mag = K*|y| and y_phase =
// arg(y) (K ~= 1.6468) follow y by STAGES+1 clocks. adapt_en low freezes
// the weights. busy is high from x_valid to upd; overrun pulses if a new
// sample arrives while busy, which the stream must avoid.
//
// Timing: with the reference STAGES+3 clocks behind its sample, upd comes
// STAGES+5 clocks after x_valid (21 by default), so samples must be at
// least STAGES+6 clocks apart.
//
// From the document: an LMS weight update built from multiply-accumulate
// operations, weights updated in parallel across the vector elements, and
// a CORDIC giving magnitude and phase. The least-squares SCORE error, the
// step size as a power of two and all widths are this design's choices.
module weight_update_engine
  import score_pkg::*;
#(
  parameter int unsigned NW     = 8,
  parameter int unsigned STAGES = 16
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  adapt_en,
  input  logic [4:0]            mu_shift,
  input  logic                  x_valid,
  input  cplx_t                 taps [NW],
  input  logic                  y_valid,
  input  cplx_t                 y,
  input  logic                  ref_valid,
  input  cplx_t                 ref_in,
  output cplx_w_t               w [NW],
  output logic                  upd,
  output cplx_t                 err,
  output logic                  mon_valid,
  output logic [SAMPLE_W+1:0]   y_mag,
  output phase_t                y_phase,
  output logic                  busy,
  output logic                  overrun
);
  localparam int unsigned EW = SAMPLE_W + 1;             // error width
  localparam int unsigned MW = EW + SAMPLE_W + 1;        // update product width
  // e * conj(X) is Q2.30; the weights carry WEIGHT_FRAC fraction bits.
  localparam int unsigned BASE_SH = 2 * (SAMPLE_W - 1) - WEIGHT_FRAC;

  // ---------------- output magnitude and phase ----------------
  logic                       unused_mon_tag;
  logic signed [SAMPLE_W+1:0] mag_s;

  cordic_vectoring #(.W(SAMPLE_W), .STAGES(STAGES), .TAG_W(1)) u_mon (
    .clk(clk), .rst_n(rst_n),
    .in_valid(y_valid), .in_tag(1'b0), .x_in(y.re), .y_in(y.im),
    .out_valid(mon_valid), .out_tag(unused_mon_tag), .mag_out(mag_s), .phase_out(y_phase)
  );
  assign y_mag = mag_s;

  // ---------------- error ----------------
  cplx_t                y_hold;
  logic                 e_valid;
  logic signed [EW-1:0] e_re, e_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_hold  <= '0;
      e_valid <= 1'b0;
      e_re    <= '0;
      e_im    <= '0;
    end else begin
      if (y_valid) y_hold <= y;
      e_valid <= ref_valid;
      if (ref_valid) begin
        e_re <= EW'(ref_in.re) - EW'(y_hold.re);
        e_im <= EW'(ref_in.im) - EW'(y_hold.im);
      end
    end
  end

  assign err.re = round_sat(64'(e_re), 0);
  assign err.im = round_sat(64'(e_im), 0);

  // ---------------- LMS update, all weights in parallel ----------------
  function automatic logic signed [WEIGHT_W-1:0] sat_w(input logic signed [MW:0] v);
    if (v > (MW+1)'((1 <<< (WEIGHT_W - 1)) - 1))
      return {1'b0, {(WEIGHT_W-1){1'b1}}};
    else if (v < -(MW+1)'(1 <<< (WEIGHT_W - 1)))
      return {1'b1, {(WEIGHT_W-1){1'b0}}};
    else
      return v[WEIGHT_W-1:0];
  endfunction

  cplx_w_t w_next [NW];

  always_comb begin
    for (int i = 0; i < NW; i++) begin
      logic signed [MW-1:0] g_re, g_im;
      logic signed [MW-1:0] d_re, d_im;
      int unsigned          sh;
      g_re = MW'(e_re * taps[i].re) + MW'(e_im * taps[i].im);
      g_im = MW'(e_im * taps[i].re) - MW'(e_re * taps[i].im);
      sh   = BASE_SH + int'(mu_shift);
      d_re = (g_re + (MW'(1) <<< (sh - 1))) >>> sh;
      d_im = (g_im + (MW'(1) <<< (sh - 1))) >>> sh;
      w_next[i].re = sat_w((MW+1)'(w[i].re) + (MW+1)'(d_re));
      w_next[i].im = sat_w((MW+1)'(w[i].im) + (MW+1)'(d_im));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      upd <= 1'b0;
      for (int i = 0; i < NW; i++) begin
        w[i].re <= (i == 0) ? WEIGHT_W'(1 << WEIGHT_FRAC) : '0;
        w[i].im <= '0;
      end
    end else begin
      upd <= e_valid;
      if (e_valid && adapt_en) begin
        for (int i = 0; i < NW; i++) w[i] <= w_next[i];
      end
    end
  end

  // ---------------- loop occupancy ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      overrun <= 1'b0;
    end else begin
      overrun <= x_valid && busy;
      if (x_valid)  busy <= 1'b1;
      else if (upd) busy <= 1'b0;
    end
  end
endmodule
