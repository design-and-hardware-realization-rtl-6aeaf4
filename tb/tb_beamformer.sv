// tb_beamformer: self-checking test of weight application.
//
// Streams 500 random complex samples (random gaps) through the 8-tap
// beamformer while the weights are changed to a new random set every 50
// samples (weights change only between samples, as the weight engine
// guarantees). Each output must equal the rounded, saturated sum
// sum_i w_i * x(n-i) / 2^20, computed here in 64-bit integers, 6 clocks
// after its input; the exposed tap register must hold x(n)...x(n-7).
module tb_beamformer;
  import score_pkg::*;

  localparam int unsigned NW = 8;
  localparam int unsigned N  = 500;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic    in_valid;
  cplx_t   in;
  cplx_w_t w [NW];
  cplx_t   taps [NW];
  logic    out_valid;
  cplx_t   out;

  beamformer #(.NW(NW)) dut (.*);

  int checks = 0, failures = 0;
  int xr [N];
  int xi [N];
  int er [N];
  int ei [N];
  longint t_in [N];
  longint cycle = 0;
  int n_out = 0, n_sat = 0;

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int rnd_sat(input longint v);
    longint r;
    r = (v + (64'sd1 <<< 19)) >>> 20;
    if (r > 32767) r = 32767;
    if (r < -32768) r = -32768;
    return int'(r);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (int'(out.re) != er[n_out] || int'(out.im) != ei[n_out]) begin
        failures++;
        $display("output %0d: got (%0d,%0d) expected (%0d,%0d)", n_out, out.re, out.im, er[n_out], ei[n_out]);
      end
      checks++;
      if (cycle - t_in[n_out] != 64'd6) begin
        failures++;
        $display("latency %0d, expected 6", cycle - t_in[n_out]);
      end
      if (out.re == 16'sh7fff || out.re == 16'sh8000) n_sat++;
      n_out++;
    end
  end

  initial begin
    int n;
    longint wr [NW];
    longint wi [NW];
    in_valid = 0; in = '0;
    for (int i = 0; i < NW; i++) w[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    n = 0;
    while (n < N) begin
      @(negedge clk);
      if ((n % 50) == 0 && !in_valid) begin
        // New weights while no sample is in flight.
        repeat (8) @(negedge clk);
        for (int i = 0; i < NW; i++) begin
          // Mostly modest weights; every fourth set large enough to saturate.
          if ((n / 50) % 4 == 3) begin
            w[i].re = 24'sd4194304; w[i].im = 24'sd0;
          end else begin
            w[i].re = WEIGHT_W'($signed(22'($urandom)));
            w[i].im = WEIGHT_W'($signed(22'($urandom)));
          end
          wr[i] = longint'(w[i].re);
          wi[i] = longint'(w[i].im);
        end
      end
      if (($urandom % 4) == 0) begin
        in_valid = 0;
      end else begin
        longint sr, si;
        in_valid = 1;
        in.re = sample_t'($urandom);
        in.im = sample_t'($urandom);
        xr[n] = int'(in.re);
        xi[n] = int'(in.im);
        sr = 0; si = 0;
        for (int i = 0; i < NW; i++) begin
          if (n - i >= 0) begin
            sr += longint'(xr[n-i]) * wr[i] - longint'(xi[n-i]) * wi[i];
            si += longint'(xr[n-i]) * wi[i] + longint'(xi[n-i]) * wr[i];
          end
        end
        er[n] = rnd_sat(sr);
        ei[n] = rnd_sat(si);
        t_in[n] = cycle;
        n++;
        // Tap register check one clock after the sample is taken.
        @(negedge clk);
        in_valid = 0;
        for (int i = 0; i < NW; i++) begin
          checks++;
          if (n - 1 - i >= 0 && (int'(taps[i].re) != xr[n-1-i] || int'(taps[i].im) != xi[n-1-i])) begin
            failures++;
            $display("tap %0d after sample %0d wrong", i, n - 1);
          end
        end
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (12) @(posedge clk);
    checks++;
    if (n_out != N || n_sat == 0) begin
      failures++;
      $display("outputs %0d (expected %0d), saturated %0d", n_out, N, n_sat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
