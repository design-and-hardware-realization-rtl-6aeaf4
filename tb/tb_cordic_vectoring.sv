// tb_cordic_vectoring: self-checking test of the pipelined vectoring CORDIC
// at the 32-bit width the correlation unit uses.
//
// Streams 600 vectors (axis and quadrant corners first, then random, some
// of them small) and compares mag_out with K*|v| and phase_out with
// atan2(y, x), both in floating point. Magnitude may be off by 16 LSB plus
// 1e-6 relative; the phase by 1e-4 rad plus 16 LSB of arc. Also checks the
// STAGES+1 clock latency and the tag.
module tb_cordic_vectoring;
  import score_pkg::*;

  localparam int unsigned W = 32;
  localparam int unsigned STAGES = 16;
  localparam int unsigned N = 600;
  localparam real K = 1.6467602581;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic [9:0]           in_tag;
  logic signed [W-1:0]  x_in, y_in;
  logic                 out_valid;
  logic [9:0]           out_tag;
  logic signed [W+1:0]  mag_out;
  phase_t               phase_out;

  cordic_vectoring #(.W(W), .STAGES(STAGES), .TAG_W(10)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real    emag [N];
  real    eang [N];
  longint t_in [N];
  longint cycle = 0;
  int     n_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int  i;
      real got_ang, d;
      i = n_out;
      checks++;
      if (out_tag != 10'(i)) begin
        failures++;
        $display("tag mismatch: got %0d expected %0d", out_tag, i);
      end
      checks++;
      if (rabs(real'(mag_out) - emag[i]) > 16.0 + 1.0e-6 * emag[i]) begin
        failures++;
        $display("magnitude mismatch %0d: got %0d expected %f", i, mag_out, emag[i]);
      end
      checks++;
      got_ang = TWO_PI * real'(int'(phase_out)) / 4294967296.0;
      d = got_ang - eang[i];
      if (d > TWO_PI / 2.0)  d = d - TWO_PI;
      if (d < -TWO_PI / 2.0) d = d + TWO_PI;
      if (rabs(d) > 1.0e-4 + 16.0 * K / (emag[i] + 1.0)) begin
        failures++;
        $display("phase mismatch %0d: got %f expected %f", i, got_ang, eang[i]);
      end
      checks++;
      if (cycle - t_in[i] != longint'(STAGES) + 1) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t_in[i], STAGES + 1);
      end
      n_out++;
    end
  end

  initial begin
    int n;
    in_valid = 0; in_tag = 0; x_in = 0; y_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if (($urandom % 8) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in_tag   = 10'(n);
        case (n)
          0: begin x_in = 32'sh7fff_ffff; y_in = 0; end
          1: begin x_in = 32'sh8000_0000; y_in = 0; end
          2: begin x_in = 0;              y_in = 32'sh7fff_ffff; end
          3: begin x_in = 0;              y_in = 32'sh8000_0000; end
          4: begin x_in = 32'sh8000_0000; y_in = 32'sh8000_0000; end
          5: begin x_in = -1000000;       y_in = 1000000; end
          default: begin
            if (n % 3 == 0) begin
              x_in = W'($signed(16'($urandom)));
              y_in = W'($signed(16'($urandom)));
            end else begin
              x_in = $urandom;
              y_in = $urandom;
            end
          end
        endcase
        emag[n] = K * $sqrt(real'(x_in) * real'(x_in) + real'(y_in) * real'(y_in));
        eang[n] = $atan2(real'(y_in), real'(x_in));
        t_in[n] = cycle;
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 5) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("got %0d outputs, expected %0d", n_out, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
