// tb_cordic_rotator: self-checking test of the pipelined CORDIC rotator.
//
// Streams 600 random vectors and phases, one per clock (with a few idle
// gaps), and compares each output with K*(x + jy)*exp(j*z) computed in
// floating point, allowing 8 LSB of error (truncation in 16 unguarded stages). Also checks that every result
// appears exactly STAGES+1 clocks after its input and that the tag follows.
module tb_cordic_rotator;
  import score_pkg::*;

  localparam int unsigned W = 16;
  localparam int unsigned STAGES = 16;
  localparam int unsigned N = 600;
  localparam real K = 1.6467602581;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 in_valid;
  logic [9:0]           in_tag;
  logic signed [W-1:0]  x_in, y_in;
  phase_t               z_in;
  logic                 out_valid;
  logic [9:0]           out_tag;
  logic signed [W+1:0]  x_out, y_out;

  cordic_rotator #(.W(W), .STAGES(STAGES), .TAG_W(10)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction
  real    ex [N];
  real    ey [N];
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
      int i;
      i = n_out;
      checks++;
      if (out_tag != 10'(i)) begin
        failures++;
        $display("tag mismatch: got %0d expected %0d", out_tag, i);
      end
      if (rabs(real'(x_out) - ex[i]) > 8.0 || rabs(real'(y_out) - ey[i]) > 8.0) begin
        failures++;
        $display("value mismatch %0d: got (%0d,%0d) expected (%f,%f)", i, x_out, y_out, ex[i], ey[i]);
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
    in_valid = 0; in_tag = 0; x_in = 0; y_in = 0; z_in = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if (($urandom % 8) == 0) begin
        in_valid = 0;
      end else begin
        real a;
        in_valid = 1;
        in_tag   = 10'(n);
        // Full-scale corners for the first few samples, then random.
        case (n)
          0: begin x_in = 16'sh7fff; y_in = 16'sh7fff; z_in = 32'h2000_0000; end
          1: begin x_in = 16'sh8000; y_in = 16'sh8000; z_in = 32'hC000_0000; end
          2: begin x_in = 16'sh7fff; y_in = 0;         z_in = 32'h8000_0000; end
          default: begin x_in = W'($urandom); y_in = W'($urandom); z_in = $urandom; end
        endcase
        a = TWO_PI * real'(z_in) / 4294967296.0;
        ex[n] = K * (real'(x_in) * $cos(a) - real'(y_in) * $sin(a));
        ey[n] = K * (real'(x_in) * $sin(a) + real'(y_in) * $cos(a));
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
