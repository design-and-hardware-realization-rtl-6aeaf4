// tb_preprocessing: end-to-end test of the DDC + decimating FIR front end.
//
// The NCO is set to 0.25 cycles/sample. (1) An IF tone 0.002 cycles/sample
// above it must come out as a complex baseband tone of half the IF
// amplitude (+-5%) turning by 2*pi*0.002*DECIM rad per output sample (the
// image at the sum frequency is removed). (2) An IF tone 0.1 cycles/sample
// away must be suppressed below 1% of full scale. Exactly one output per
// DECIM inputs is expected, and the delay from the input that completes a
// block to its output must be the fixed STAGES+3+9 clocks.
module tb_preprocessing;
  import score_pkg::*;

  localparam int unsigned STAGES = 16;
  localparam int unsigned DECIM  = 32;
  localparam int unsigned NOUT   = 60;
  localparam real TWO_PI = 6.283185307179586;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  phase_t  ddc_fcw;
  logic    in_valid;
  sample_t in_data;
  logic    out_valid;
  cplx_t   out;

  preprocessing #(.STAGES(STAGES), .DECIM(DECIM)) dut (.*);

  int checks = 0, failures = 0;

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  int     n_in = 0, n_out = 0;
  longint t_blk [$];
  int     test = 1;
  real    prev_ang = 0.0;
  real    peak2 = 0.0;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real m, ang, d;
      longint t0;
      m   = $sqrt(real'(out.re) * real'(out.re) + real'(out.im) * real'(out.im));
      ang = $atan2(real'(out.im), real'(out.re));
      t0  = t_blk.pop_front();
      checks++;
      if (cycle - t0 != longint'(STAGES) + 3 + 9) begin
        failures++;
        $display("latency %0d, expected %0d", cycle - t0, STAGES + 3 + 9);
      end
      if (test == 1 && n_out >= 4) begin
        checks++;
        if (rabs(m - 15000.0) > 750.0) begin
          failures++;
          $display("in-band tone magnitude %f, expected 15000", m);
        end
        d = ang - prev_ang;
        if (d < 0.0) d += TWO_PI;
        checks++;
        if (rabs(d - TWO_PI * 0.002 * DECIM) > 0.02) begin
          failures++;
          $display("phase step %f, expected %f", d, TWO_PI * 0.002 * DECIM);
        end
      end
      if (test == 2 && n_out >= NOUT + 4 && m > peak2) peak2 = m;
      prev_ang = ang;
      n_out++;
    end
  end

  task automatic feed(input real f, input int count);
    for (int i = 0; i < count; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = sample_t'($rtoi(30000.0 * $cos(TWO_PI * f * real'(n_in))));
      if ((n_in % DECIM) == DECIM - 1) t_blk.push_back(cycle);
      n_in++;
    end
    @(negedge clk) in_valid = 0;
  endtask

  initial begin
    ddc_fcw  = 32'h4000_0000;   // 0.25 cycles per sample
    in_valid = 0;
    in_data  = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    test = 1;
    feed(0.252, NOUT * DECIM);
    repeat (40) @(posedge clk);
    test = 2;
    feed(0.35, NOUT * DECIM);
    repeat (40) @(posedge clk);
    checks++;
    if (n_out != 2 * NOUT) begin
      failures++;
      $display("got %0d outputs, expected %0d", n_out, 2 * NOUT);
    end
    checks++;
    if (peak2 > 328.0) begin
      failures++;
      $display("out-of-band tone came through at %f", peak2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
