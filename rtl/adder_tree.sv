// adder_tree: pipelined binary adder tree.
//
// Sums N signed IN_W-bit operands into one OUT_W-bit result. The operands
// are sign-extended to OUT_W bits and padded with zeros to a power of two;
// each tree level is followed by a register, so the latency is
// ceil(log2(N)) clocks and a new operand set is accepted every clock.
// in_valid is carried alongside as out_valid. OUT_W must leave room for
// the log2(N) bits of growth.
module adder_tree #(
  parameter int unsigned N     = 8,
  parameter int unsigned IN_W  = 32,
  parameter int unsigned OUT_W = 35
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in [N],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] sum
);
  localparam int unsigned LV = (N > 1) ? $clog2(N) : 0;
  localparam int unsigned NP = 1 << LV;

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic signed [OUT_W-1:0] s [NP >> l];
    logic                    v;
    if (l == 0) begin : g_leaf
      always_comb begin
        for (int i = 0; i < NP; i++) s[i] = (i < N) ? OUT_W'(in[i]) : '0;
        v = in_valid;
      end
    end else begin : g_node
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int i = 0; i < (NP >> l); i++) s[i] <= '0;
          v <= 1'b0;
        end else begin
          for (int i = 0; i < (NP >> l); i++)
            s[i] <= g_lvl[l-1].s[2*i] + g_lvl[l-1].s[2*i+1];
          v <= g_lvl[l-1].v;
        end
      end
    end
  end

  assign sum       = g_lvl[LV].s[0];
  assign out_valid = g_lvl[LV].v;
endmodule
