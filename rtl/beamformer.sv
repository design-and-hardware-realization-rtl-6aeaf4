// beamformer: weight application and signal extraction.
//
// Holds the last NW baseband samples in a tap register
// X(n) = [x(n), x(n-1), ..., x(n-NW+1)] and forms the extracted signal
//   y(n) = sum_i w_i * X_i(n)
// with complex weights from the weight update engine. The NW complex
// products are computed in parallel and registered, two pipelined adder
// trees (real, imaginary) sum them, and the result is rounded from the
// weight format (WEIGHT_FRAC fraction bits) back to a saturated Q1.15
// output sample.
//
// Interface: in_valid/in, one sample per clock at most; taps exposes X(n)
// from the clock after in_valid until the next sample; out_valid/out give
// y(n) 3 + log2(NW) clocks after in_valid (6 clocks for NW = 8).
//
// The document names a beamforming/filtering block that applies the
// weights and extracts the signal of interest. Applying the weights across
// a tapped delay line of one receiver stream (a temporal filter) instead of
// across antenna elements, the tap count and all widths are this design's
// choices.
module beamformer
  import score_pkg::*;
#(
  parameter int unsigned NW = 8
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  cplx_t   in,
  input  cplx_w_t w [NW],
  output cplx_t   taps [NW],
  output logic    out_valid,
  output cplx_t   out
);
  localparam int unsigned PW = SAMPLE_W + WEIGHT_W + 1;
  localparam int unsigned SW = PW + $clog2(NW > 1 ? NW : 2);

  logic go;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NW; i++) taps[i] <= '0;
      go <= 1'b0;
    end else begin
      go <= in_valid;
      if (in_valid) begin
        taps[0] <= in;
        for (int i = 1; i < NW; i++) taps[i] <= taps[i-1];
      end
    end
  end

  logic                 p_valid;
  logic signed [PW-1:0] p_re [NW];
  logic signed [PW-1:0] p_im [NW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_valid <= 1'b0;
      for (int i = 0; i < NW; i++) begin
        p_re[i] <= '0;
        p_im[i] <= '0;
      end
    end else begin
      p_valid <= go;
      for (int i = 0; i < NW; i++) begin
        p_re[i] <= PW'(taps[i].re * w[i].re) - PW'(taps[i].im * w[i].im);
        p_im[i] <= PW'(taps[i].re * w[i].im) + PW'(taps[i].im * w[i].re);
      end
    end
  end

  logic                 s_valid, s_valid_im;
  logic signed [SW-1:0] s_re, s_im;

  adder_tree #(.N(NW), .IN_W(PW), .OUT_W(SW)) u_tree_re (
    .clk(clk), .rst_n(rst_n), .in_valid(p_valid), .in(p_re),
    .out_valid(s_valid), .sum(s_re)
  );
  adder_tree #(.N(NW), .IN_W(PW), .OUT_W(SW)) u_tree_im (
    .clk(clk), .rst_n(rst_n), .in_valid(p_valid), .in(p_im),
    .out_valid(s_valid_im), .sum(s_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= s_valid && s_valid_im;
      out.re    <= round_sat(64'(s_re), WEIGHT_FRAC);
      out.im    <= round_sat(64'(s_im), WEIGHT_FRAC);
    end
  end
endmodule
