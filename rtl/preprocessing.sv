// preprocessing: the receiver's front stage, IF samples in, decimated
// complex baseband out.
//
// A digital down-converter (NCO + mixers) moves the band of interest from
// the IF frequency fcw/2^32 to DC; a 64-tap low-pass FIR then removes the
// mixing image and out-of-band energy and keeps one sample in DECIM. This
// is the document's preprocessing module: DDC followed by FIR decimation.
//
// Interface: in_valid/in_data, one real Q1.15 IF sample per clock at most;
// out_valid/out give one complex Q1.15 sample per DECIM inputs. Timing:
// STAGES+3 clocks through the DDC, then 2+log2(64) = 8 clocks from the
// sample that completes a decimation block to its output.
module preprocessing
  import score_pkg::*;
#(
  parameter int unsigned STAGES = 16,
  parameter int unsigned DECIM  = 32
) (
  input  logic    clk,
  input  logic    rst_n,
  input  phase_t  ddc_fcw,
  input  logic    in_valid,
  input  sample_t in_data,
  output logic    out_valid,
  output cplx_t   out
);
  logic  bb_valid;
  cplx_t bb;

  ddc #(.STAGES(STAGES)) u_ddc (
    .clk(clk), .rst_n(rst_n), .fcw(ddc_fcw),
    .in_valid(in_valid), .in_data(in_data),
    .out_valid(bb_valid), .out(bb)
  );

  fir_decimator #(.DECIM(DECIM)) u_fir (
    .clk(clk), .rst_n(rst_n),
    .in_valid(bb_valid), .in(bb),
    .out_valid(out_valid), .out(out)
  );
endmodule
