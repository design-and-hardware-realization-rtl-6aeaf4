// fir_decimator: complex low-pass FIR filter with decimation by DECIM.
//
// Every input sample enters a NTAPS-long tap register. After each DECIM-th
// input the tap register is multiplied by the coefficients in parallel (one
// multiplier per tap and rail, registered), the products go through a
// pipelined adder tree, and the sum is rounded back to Q1.15. Only the
// samples that are kept are computed, so one input per clock is sustained.
//
// Coefficients: a 64-tap Hamming-windowed sinc with cut-off 0.5/DECIM
// cycles per sample (the decimated Nyquist frequency), normalised to unit
// DC gain in Q1.15:
//   h[n] = round(32768 * s[n] / sum(s)),
//   s[n] = sinc(2*fc*(n-31.5)) * 2*fc * (0.54 - 0.46*cos(2*pi*n/63)),
// with the two centre taps raised by one so that sum(h) = 32768. The taps
// are symmetric; only the first half is tabled.
//
// Interface: in_valid/in at up to one sample per clock; out_valid pulses
// once per DECIM input samples, 2 + log2(NTAPS) clocks after the input that
// completed the block. The document names the FIR low-pass, the decimation
// and the pipelined MAC mapping; the tap count, window, cut-off and DECIM
// default are this design's choices.
module fir_decimator
  import score_pkg::*;
#(
  parameter int unsigned DECIM = 32
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in,
  output logic  out_valid,
  output cplx_t out
);
  localparam int unsigned NTAPS = 64;
  localparam int unsigned LV    = $clog2(NTAPS);
  localparam int unsigned PW    = 2 * SAMPLE_W;   // product width
  localparam int unsigned SW    = PW + LV;        // sum width

  function automatic logic signed [SAMPLE_W-1:0] coef(input int unsigned n);
    int unsigned k;
    k = (n < NTAPS / 2) ? n : NTAPS - 1 - n;
    case (k)
      0:  return 16'sd2;    1:  return 16'sd5;    2:  return 16'sd9;    3:  return 16'sd15;
      4:  return 16'sd22;   5:  return 16'sd33;   6:  return 16'sd47;   7:  return 16'sd64;
      8:  return 16'sd86;   9:  return 16'sd113;  10: return 16'sd144;  11: return 16'sd181;
      12: return 16'sd224;  13: return 16'sd271;  14: return 16'sd324;  15: return 16'sd381;
      16: return 16'sd443;  17: return 16'sd508;  18: return 16'sd575;  19: return 16'sd644;
      20: return 16'sd714;  21: return 16'sd784;  22: return 16'sd852;  23: return 16'sd917;
      24: return 16'sd979;  25: return 16'sd1035; 26: return 16'sd1086; 27: return 16'sd1130;
      28: return 16'sd1166; 29: return 16'sd1194; 30: return 16'sd1213; 31: return 16'sd1223;
      default: return 16'sd0;
    endcase
  endfunction

  cplx_t                       taps [NTAPS];
  logic [$clog2(DECIM+1)-1:0]  phase_cnt;
  logic                        go;
  logic signed [PW-1:0]        prod_re [NTAPS];
  logic signed [PW-1:0]        prod_im [NTAPS];
  logic                        prod_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) taps[i] <= '0;
      phase_cnt <= '0;
      go        <= 1'b0;
    end else begin
      go <= 1'b0;
      if (in_valid) begin
        taps[0] <= in;
        for (int i = 1; i < NTAPS; i++) taps[i] <= taps[i-1];
        if (phase_cnt == ($bits(phase_cnt))'(DECIM - 1)) begin
          phase_cnt <= '0;
          go        <= 1'b1;
        end else begin
          phase_cnt <= phase_cnt + 1'b1;
        end
      end
    end
  end

  // Parallel multipliers, one per tap and rail.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) begin
        prod_re[i] <= '0;
        prod_im[i] <= '0;
      end
      prod_valid <= 1'b0;
    end else begin
      prod_valid <= go;
      for (int i = 0; i < NTAPS; i++) begin
        prod_re[i] <= taps[i].re * coef(i);
        prod_im[i] <= taps[i].im * coef(i);
      end
    end
  end

  logic                 sum_valid, sum_valid_im;
  logic signed [SW-1:0] sum_re, sum_im;

  adder_tree #(.N(NTAPS), .IN_W(PW), .OUT_W(SW)) u_tree_re (
    .clk(clk), .rst_n(rst_n), .in_valid(prod_valid), .in(prod_re),
    .out_valid(sum_valid), .sum(sum_re)
  );
  adder_tree #(.N(NTAPS), .IN_W(PW), .OUT_W(SW)) u_tree_im (
    .clk(clk), .rst_n(rst_n), .in_valid(prod_valid), .in(prod_im),
    .out_valid(sum_valid_im), .sum(sum_im)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out       <= '0;
    end else begin
      out_valid <= sum_valid && sum_valid_im;
      out.re    <= round_sat(64'(sum_re), SAMPLE_W - 1);
      out.im    <= round_sat(64'(sum_im), SAMPLE_W - 1);
    end
  end
endmodule
