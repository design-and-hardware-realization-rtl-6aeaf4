// delay_line: programmable multi-tap delay line for a sample stream.
//
// Each accepted sample is written into a DEPTH-entry circular buffer (a
// block or distributed RAM on an FPGA). For every read port k the sample
// written lag[k] accepts earlier is read out in the same clock as the new
// sample is written, so port k delivers x(n-lag[k]) alongside x(n); lag 0
// returns x(n) itself. Positions before the start of the stream read as
// zero: a fill counter masks entries that have never been written, so the
// RAM needs no reset.
//
// Interface: in_valid/in; one clock later out_valid, cur = x(n) and
// tap[k] = x(n - lag[k]). lag may change at any time and takes effect on
// the next sample. One sample per clock. The document asks for
// programmable delay lines in block RAM and shift registers; the circular
// buffer organisation and the zero fill are this design's choice.
module delay_line #(
  parameter int unsigned W     = 32,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned NREAD = 4,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [W-1:0]  in,
  input  logic [AW-1:0] lag [NREAD],
  output logic          out_valid,
  output logic [W-1:0]  cur,
  output logic [W-1:0]  tap [NREAD]
);
  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wptr;
  logic [AW:0]   filled;   // number of samples written, saturating at DEPTH

  always_ff @(posedge clk) begin
    if (in_valid) mem[wptr] <= in;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr      <= '0;
      filled    <= '0;
      out_valid <= 1'b0;
      cur       <= '0;
      for (int k = 0; k < NREAD; k++) tap[k] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        wptr <= wptr + 1'b1;
        if (filled != (AW+1)'(DEPTH)) filled <= filled + 1'b1;
        cur <= in;
        for (int k = 0; k < NREAD; k++) begin
          if (lag[k] == '0)                    tap[k] <= in;
          else if ((AW+1)'(lag[k]) > filled)   tap[k] <= '0;
          else                                 tap[k] <= mem[wptr - lag[k]];
        end
      end
    end
  end
endmodule
