// tb_ddc: self-checking test of the digital down-converter.
//
// Feeds 800 random real IF samples with random idle gaps and checks every
// complex output against x[n]*AMP/2^15*exp(-j*2*pi*fcw*n/2^32) computed in
// floating point (n counts accepted samples only), within 9 LSB. Checks the
// STAGES+3 clock latency and, with a second frequency word, that a full-scale
// tone at the NCO frequency comes out at DC with half its amplitude.
module tb_ddc;
  import score_pkg::*;

  localparam int unsigned STAGES = 16;
  localparam int unsigned N = 800;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phase_t  fcw;
  logic    in_valid;
  sample_t in_data;
  logic    out_valid;
  cplx_t   out;

  ddc #(.STAGES(STAGES)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  real    er [N];
  real    ei [N];
  longint t_in [N];
  longint cycle = 0;
  int     n_out = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    #300000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid && n_out < N) begin
      int i;
      i = n_out;
      checks++;
      if (rabs(real'(out.re) - er[i]) > 9.0 || rabs(real'(out.im) - ei[i]) > 9.0) begin
        failures++;
        $display("mismatch %0d: got (%0d,%0d) expected (%f,%f)", i, out.re, out.im, er[i], ei[i]);
      end
      checks++;
      if (cycle - t_in[i] != longint'(STAGES) + 3) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t_in[i], STAGES + 3);
      end
      n_out++;
    end
  end

  initial begin
    int n;
    real a;
    fcw = 32'h1234_5678;
    in_valid = 0; in_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if (($urandom % 6) == 0) begin
        in_valid = 0;
      end else begin
        in_valid = 1;
        in_data  = sample_t'($urandom);
        a = TWO_PI * real'(32'(n * fcw)) / 4294967296.0;
        er[n] =  real'(in_data) * 32767.0 / 32768.0 * $cos(a);
        ei[n] = -real'(in_data) * 32767.0 / 32768.0 * $sin(a);
        t_in[n] = cycle;
        n++;
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (STAGES + 6) @(posedge clk);
    checks++;
    if (n_out != N) begin
      failures++;
      $display("got %0d outputs, expected %0d", n_out, N);
    end

    // Tone at the NCO frequency: its mean over whole periods lands at DC.
    // The NCO phase continues from n = N; the tone is phased to match.
    begin
      real sr, si;
      int  cnt;
      sr = 0.0; si = 0.0; cnt = 0;
      fcw = 32'h0800_0000;   // 1/32 cycle per sample
      for (int m = 0; m < 256 + STAGES + 3; m++) begin
        @(negedge clk);
        in_valid = (m < 256);
        a = TWO_PI * real'(32'((N * 32'h1234_5678) + m * fcw)) / 4294967296.0;
        in_data = sample_t'($rtoi(30000.0 * $cos(a)));
        if (out_valid) begin
          sr += real'(out.re);
          si += real'(out.im);
          cnt++;
        end
      end
      @(posedge clk);
      checks++;
      if (cnt < 200 || rabs(sr / cnt - 15000.0) > 60.0 || rabs(si / cnt) > 60.0) begin
        failures++;
        $display("tone at NCO frequency: mean (%f,%f) over %0d, expected (15000,0)", sr / cnt, si / cnt, cnt);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
