// cordic_vectoring: fully pipelined CORDIC in vectoring mode.
//
// Drives the input vector (x_in + j*y_in) onto the positive real axis and
// reports the angle it turned through, so that mag_out = K*|v| (K ~= 1.6468,
// the CORDIC gain, left in the result) and phase_out = atan2(y_in, x_in) in
// phase units (2^32 = one turn). A first stage turns vectors in the left
// half plane by pi; STAGES micro-rotations follow, one per register stage.
//
// Interface: in_valid/in_tag enter with the vector, out_valid/out_tag leave
// with the result. Timing: latency STAGES+1 clocks, one input per clock.
// mag_out is W+2 bits, unsigned in value.
//
// The document places a CORDIC in the weight update engine to compute
// magnitude and phase; the stage count, widths and tag channel are this
// design's own choices.
module cordic_vectoring
  import score_pkg::*;
#(
  parameter int unsigned W      = 16,
  parameter int unsigned STAGES = 16,
  parameter int unsigned TAG_W  = 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [TAG_W-1:0]      in_tag,
  input  logic signed [W-1:0]   x_in,
  input  logic signed [W-1:0]   y_in,
  output logic                  out_valid,
  output logic [TAG_W-1:0]      out_tag,
  output logic signed [W+1:0]   mag_out,
  output phase_t                phase_out
);
  localparam int unsigned IW = W + 2;

  if (STAGES > CORDIC_MAX_STAGES) begin : g_bad_param
    $error("cordic_vectoring: STAGES too large");
  end

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  phase_t               zs [STAGES+1];
  logic                 vs [STAGES+1];
  logic [TAG_W-1:0]     ts [STAGES+1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vs[0] <= 1'b0;
      xs[0] <= '0;
      ys[0] <= '0;
      zs[0] <= '0;
      ts[0] <= '0;
    end else begin
      vs[0] <= in_valid;
      ts[0] <= in_tag;
      if (x_in[W-1]) begin
        xs[0] <= -IW'(x_in);
        ys[0] <= -IW'(y_in);
        zs[0] <= PHASE_HALF;
      end else begin
        xs[0] <= IW'(x_in);
        ys[0] <= IW'(y_in);
        zs[0] <= '0;
      end
    end
  end

  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vs[i+1] <= 1'b0;
        xs[i+1] <= '0;
        ys[i+1] <= '0;
        zs[i+1] <= '0;
        ts[i+1] <= '0;
      end else begin
        vs[i+1] <= vs[i];
        ts[i+1] <= ts[i];
        if (!ys[i][IW-1]) begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + cordic_atan(i);
        end else begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - cordic_atan(i);
        end
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign out_tag   = ts[STAGES];
  assign mag_out   = xs[STAGES];
  assign phase_out = zs[STAGES];

endmodule
