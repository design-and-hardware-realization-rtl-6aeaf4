// phase_accumulator: PHASE_W-bit phase register advanced by a frequency
// control word.
//
// On every clock with step high the phase grows by fcw (modulo 2^PHASE_W,
// i.e. modulo one turn); clear forces it back to zero. phase is the value
// before the step, so the first stepped sample sees phase 0. One clock per
// step, no latency beyond the register.
module phase_accumulator
  import score_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   step,
  input  phase_t fcw,
  output phase_t phase
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      phase <= '0;
    else if (clear)  phase <= '0;
    else if (step)   phase <= phase + fcw;
  end
endmodule
