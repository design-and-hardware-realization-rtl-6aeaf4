// ddc: digital down-converter from real IF samples to complex baseband.
//
// Each real IF sample x[n] is multiplied by the NCO output, giving
//   bb[n] = x[n] * exp(-j*2*pi*f*n)  =  x[n]*cos - j*x[n]*sin,
// so a tone at the NCO frequency f = fcw/2^32 (cycles per sample) lands at
// DC with half its amplitude (the image at -2f is left for the decimation
// filter). The IF sample waits in a delay line as long as the NCO takes,
// then two parallel multipliers form the I and Q products, rounded back to
// Q1.15 in a second register.
//
// Interface: in_valid/in_data at up to one sample per clock; out_valid/out
// follow STAGES+3 clocks later. The NCO is built from a phase accumulator
// and a CORDIC as the document describes in general terms; widths, the
// rounding and the sign convention are this design's own.
module ddc
  import score_pkg::*;
#(
  parameter int unsigned STAGES = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  fcw,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output cplx_t   out
);
  localparam int unsigned LAT = STAGES + 1;

  logic    lo_valid;
  sample_t lo_cos, lo_sin;
  sample_t dly [LAT];

  nco #(.STAGES(STAGES)) u_nco (
    .clk      (clk),
    .rst_n    (rst_n),
    .step     (in_valid),
    .fcw      (fcw),
    .out_valid(lo_valid),
    .cos_out  (lo_cos),
    .sin_out  (lo_sin)
  );

  // Align the IF sample with its local-oscillator value.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) dly[i] <= '0;
    end else begin
      dly[0] <= in_data;
      for (int i = 1; i < LAT; i++) dly[i] <= dly[i-1];
    end
  end

  // Mixer: product register, then round to Q1.15.
  logic signed [2*SAMPLE_W-1:0] p_i, p_q;
  logic                         p_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid   <= 1'b0;
      p_i       <= '0;
      p_q       <= '0;
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      p_valid   <= lo_valid;
      p_i       <= dly[LAT-1] * lo_cos;
      p_q       <= -(dly[LAT-1] * lo_sin);
      out_valid <= p_valid;
      out.re    <= round_sat(64'(p_i), SAMPLE_W - 1);
      out.im    <= round_sat(64'(p_q), SAMPLE_W - 1);
    end
  end
endmodule
