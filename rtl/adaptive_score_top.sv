// adaptive_score_top: adaptive SCORE spectrum-sensing receiver.
//
// Purpose: find and extract a signal of interest (SOI) without knowing its
// waveform, only its cyclic frequency alpha, i.e. the frequency at which its
// statistics repeat (a symbol rate, a carrier offset).
//
// Real IF samples enter at up to one per clock. The chain is:
//   preprocessing        NCO/mixer down-conversion, 64-tap FIR, decimate by DECIM
//   cyclic_correlation   NLAG parallel lag branches giving |R_alpha(lag)| per
//                        window and a detection flag; one more branch makes
//                        the reference u(n) = x(n-ref_lag)*exp(j*2*pi*alpha*n)
//   beamformer           NW-tap weight application, y(n) = sum w_i x(n-i)
//   weight_update_engine LMS: w_i += 2^-mu_shift * (u(n) - y(n)) * conj(x(n-i))
// The decimated baseband stream x(n) feeds the correlation unit and the
// beamformer; the beamformer output and the reference close the loop.
//
// Interface: the configuration inputs (ddc_fcw, alpha_fcw in cycles per
// decimated sample times 2^32, corr_lag, ref_lag, mu_shift, adapt_en,
// det_threshold) are plain ports that a processor would drive from
// registers. Outputs: the decimated baseband (bb_*), the extracted signal
// (soi_*) with its magnitude K*|y| and phase (soi_mon_*, K ~= 1.6468), the
// weights and the adaptation error, the per-lag correlations and scores
// and the detection flag, adapt_busy while the loop runs, and overrun,
// which pulses if decimated samples come faster than the loop closes.
//
// Timing: one IF sample per clock without stalls. From the IF sample that
// completes a decimation block to the matching soi output takes
// (STAGES+3) + 9 + 6 = 34 clocks with the defaults. Each decimated sample
// needs STAGES+6 = 22 clocks of adaptation loop, so DECIM must be at least
// that when IF samples come every clock.
//
// The four modules and their order follow the document's architecture; the
// parameter defaults other than the 16-bit samples and 32-bit accumulators
// are this design's choices.
module adaptive_score_top
  import score_pkg::*;
#(
  parameter int unsigned DECIM    = 32,
  parameter int unsigned STAGES   = 16,
  parameter int unsigned NLAG     = 4,
  parameter int unsigned DEPTH    = 64,
  parameter int unsigned LOG2_WIN = 10,
  parameter int unsigned NW       = 8,
  localparam int unsigned AW      = $clog2(DEPTH),
  localparam int unsigned IW      = $clog2(NLAG > 1 ? NLAG : 2)
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  phase_t              ddc_fcw,
  input  phase_t              alpha_fcw,
  input  logic [AW-1:0]       corr_lag [NLAG],
  input  logic [AW-1:0]       ref_lag,
  input  logic [4:0]          mu_shift,
  input  logic                adapt_en,
  input  logic [ACC_W+1:0]    det_threshold,
  // IF input
  input  logic                if_valid,
  input  sample_t             if_data,
  // decimated baseband
  output logic                bb_valid,
  output cplx_t               bb,
  // extracted signal of interest
  output logic                soi_valid,
  output cplx_t               soi,
  output logic                soi_mon_valid,
  output logic [SAMPLE_W+1:0] soi_mon_mag,
  output phase_t              soi_mon_phase,
  // adaptation
  output cplx_w_t             weights [NW],
  output logic                w_upd,
  output cplx_t               w_err,
  output logic                adapt_busy,
  output logic                overrun,
  // cyclic correlation and detection
  output logic                corr_valid,
  output cplx_acc_t           corr [NLAG],
  output logic                score_valid,
  output logic [IW-1:0]       score_idx,
  output logic [ACC_W+1:0]    score_mag,
  output phase_t              score_phase,
  output logic                det_valid,
  output logic                det_flag
);
  if (DECIM < STAGES + 6) begin : g_bad_decim
    $error("adaptive_score_top: DECIM shorter than the adaptation loop");
  end

  cplx_t taps [NW];
  logic  ref_valid;
  cplx_t ref_u;

  preprocessing #(.STAGES(STAGES), .DECIM(DECIM)) u_pre (
    .clk(clk), .rst_n(rst_n), .ddc_fcw(ddc_fcw),
    .in_valid(if_valid), .in_data(if_data),
    .out_valid(bb_valid), .out(bb)
  );

  cyclic_correlation #(
    .NLAG(NLAG), .DEPTH(DEPTH), .LOG2_WIN(LOG2_WIN), .STAGES(STAGES)
  ) u_ccu (
    .clk(clk), .rst_n(rst_n),
    .in_valid(bb_valid), .in(bb), .lag(corr_lag), .ref_lag(ref_lag),
    .alpha_fcw(alpha_fcw), .det_threshold(det_threshold),
    .ref_valid(ref_valid), .ref_out(ref_u),
    .corr_valid(corr_valid), .corr(corr),
    .score_valid(score_valid), .score_idx(score_idx),
    .score_mag(score_mag), .score_phase(score_phase),
    .det_valid(det_valid), .det_flag(det_flag)
  );

  beamformer #(.NW(NW)) u_bf (
    .clk(clk), .rst_n(rst_n),
    .in_valid(bb_valid), .in(bb), .w(weights), .taps(taps),
    .out_valid(soi_valid), .out(soi)
  );

  weight_update_engine #(.NW(NW), .STAGES(STAGES)) u_wue (
    .clk(clk), .rst_n(rst_n), .adapt_en(adapt_en), .mu_shift(mu_shift),
    .x_valid(bb_valid), .taps(taps),
    .y_valid(soi_valid), .y(soi),
    .ref_valid(ref_valid), .ref_in(ref_u),
    .w(weights), .upd(w_upd), .err(w_err),
    .mon_valid(soi_mon_valid), .y_mag(soi_mon_mag), .y_phase(soi_mon_phase),
    .busy(adapt_busy), .overrun(overrun)
  );
endmodule
