// cordic_rotator: fully pipelined CORDIC in rotation mode.
//
// Rotates the complex input (x_in + j*y_in) counter-clockwise by the phase
// z_in, where 2^32 phase units are one full turn. The first pipeline stage
// folds the phase into (-pi/2, pi/2) by negating the vector when needed;
// STAGES micro-rotations by +-atan(2^-i) follow, one per register stage.
// The result carries the CORDIC gain K ~= 1.6468: callers that want a unit
// gain pre-scale the input by 1/K (the NCO does this).
//
// Interface: in_valid/in_tag travel with the sample; out_valid/out_tag come
// out with the result. Timing: latency STAGES+1 clocks, one new input per
// clock, no stalls. Outputs are W+2 bits wide so that gain growth never
// overflows.
//
// The document asks for CORDIC rotators in the cyclic correlation unit and
// lets sine/cosine tables be used instead; the stage count, widths and the
// tag side channel are this design's own choices.
module cordic_rotator
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
  input  phase_t                z_in,
  output logic                  out_valid,
  output logic [TAG_W-1:0]      out_tag,
  output logic signed [W+1:0]   x_out,
  output logic signed [W+1:0]   y_out
);
  localparam int unsigned IW = W + 2;

  if (STAGES > CORDIC_MAX_STAGES) begin : g_bad_param
    $error("cordic_rotator: STAGES too large");
  end

  logic signed [IW-1:0] xs [STAGES+1];
  logic signed [IW-1:0] ys [STAGES+1];
  phase_t               zs [STAGES+1];
  logic                 vs [STAGES+1];
  logic [TAG_W-1:0]     ts [STAGES+1];

  // Stage 0: fold the phase into the right half plane.
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
      if (z_in[PHASE_W-1] ^ z_in[PHASE_W-2]) begin
        xs[0] <= -IW'(x_in);
        ys[0] <= -IW'(y_in);
        zs[0] <= z_in - PHASE_HALF;
      end else begin
        xs[0] <= IW'(x_in);
        ys[0] <= IW'(y_in);
        zs[0] <= z_in;
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
        if (!zs[i][PHASE_W-1]) begin
          xs[i+1] <= xs[i] - (ys[i] >>> i);
          ys[i+1] <= ys[i] + (xs[i] >>> i);
          zs[i+1] <= zs[i] - cordic_atan(i);
        end else begin
          xs[i+1] <= xs[i] + (ys[i] >>> i);
          ys[i+1] <= ys[i] - (xs[i] >>> i);
          zs[i+1] <= zs[i] + cordic_atan(i);
        end
      end
    end
  end

  assign out_valid = vs[STAGES];
  assign out_tag   = ts[STAGES];
  assign x_out     = xs[STAGES];
  assign y_out     = ys[STAGES];

endmodule
