// nco: numerically controlled oscillator producing cos and sin samples.
//
// A phase accumulator advances by fcw for each input strobe; its phase is
// turned into (cos, sin) by a pipelined CORDIC rotating the constant vector
// (AMP/K, 0), so the CORDIC gain K brings the amplitude back to AMP. With
// the default AMP the outputs are Q1.15 with peak ~0.99997.
//
// Interface: step marks a sample; out_valid comes back STAGES+1 clocks
// later with cos_out/sin_out for the phase of that sample. One sample per
// clock. The document only says that the down-converter uses NCOs built
// from phase accumulators; producing the sine/cosine by CORDIC is one of
// the two options it mentions elsewhere and is this design's choice here.
module nco
  import score_pkg::*;
#(
  parameter int unsigned STAGES = 16,
  parameter int unsigned AMP    = 32767
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    step,
  input  phase_t  fcw,
  output logic    out_valid,
  output sample_t cos_out,
  output sample_t sin_out
);
  localparam int unsigned IW = SAMPLE_W + 2;
  // AMP / K, rounded: the CORDIC gain brings it back to AMP.
  localparam logic signed [SAMPLE_W-1:0] X0 =
    SAMPLE_W'((AMP * CORDIC_INV_GAIN_Q16 + 32768) >> 16);

  phase_t               phase;
  logic signed [IW-1:0] xr, yr;
  logic                 unused_tag;

  phase_accumulator u_acc (
    .clk  (clk),
    .rst_n(rst_n),
    .clear(1'b0),
    .step (step),
    .fcw  (fcw),
    .phase(phase)
  );

  cordic_rotator #(.W(SAMPLE_W), .STAGES(STAGES), .TAG_W(1)) u_rot (
    .clk      (clk),
    .rst_n    (rst_n),
    .in_valid (step),
    .in_tag   (1'b0),
    .x_in     (X0),
    .y_in     ('0),
    .z_in     (phase),
    .out_valid(out_valid),
    .out_tag  (unused_tag),
    .x_out    (xr),
    .y_out    (yr)
  );

  assign cos_out = round_sat(64'(xr), 0);
  assign sin_out = round_sat(64'(yr), 0);
endmodule
