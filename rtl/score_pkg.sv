// score_pkg: types and constants shared by the adaptive SCORE receiver.
//
// Samples are signed two's-complement fixed point. A "Q1.15" sample of
// SAMPLE_W = 16 bits represents values in [-1, 1). Complex samples are
// carried as packed structs {re, im}. Phases are unsigned PHASE_W-bit words
// in which 2^PHASE_W corresponds to one full turn (2*pi), so a phase
// accumulator wraps naturally.
//
// The CORDIC arctangent table atan(2^-i) is given by the formula
//   CORDIC_ATAN[i] = round(atan(2^-i) / (2*pi) * 2^32)
// and CORDIC_GAIN_Q16 = round(2^16 / prod_i sqrt(1 + 2^-2i)) = 1/K in Q0.16,
// with K ~= 1.646760 the gain of an unscaled CORDIC.
package score_pkg;

  localparam int unsigned SAMPLE_W = 16;   // input / baseband sample width
  localparam int unsigned PHASE_W  = 32;   // phase word width (2^32 = 2*pi)
  localparam int unsigned ACC_W    = 32;   // extended-precision accumulator width

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic        [PHASE_W-1:0]  phase_t;

  typedef struct packed {
    sample_t re;
    sample_t im;
  } cplx_t;

  // Adaptive weights: WEIGHT_W-bit signed, WEIGHT_FRAC fraction bits
  // (1.0 = 2^20, range +-8).
  localparam int unsigned WEIGHT_W    = 24;
  localparam int unsigned WEIGHT_FRAC = 20;

  typedef struct packed {
    logic signed [WEIGHT_W-1:0] re;
    logic signed [WEIGHT_W-1:0] im;
  } cplx_w_t;

  typedef struct packed {
    logic signed [ACC_W-1:0] re;
    logic signed [ACC_W-1:0] im;
  } cplx_acc_t;

  localparam int unsigned CORDIC_MAX_STAGES = 24;

  // Half a turn in phase units.
  localparam phase_t PHASE_HALF    = 32'h8000_0000;

  // 1/K in Q0.16 (0.6072529 * 65536).
  localparam int unsigned CORDIC_INV_GAIN_Q16 = 39797;

  function automatic phase_t cordic_atan(input int unsigned i);
    case (i)
      0:  return 32'd536870912;
      1:  return 32'd316933406;
      2:  return 32'd167458907;
      3:  return 32'd85004756;
      4:  return 32'd42667331;
      5:  return 32'd21354465;
      6:  return 32'd10679838;
      7:  return 32'd5340245;
      8:  return 32'd2670163;
      9:  return 32'd1335087;
      10: return 32'd667544;
      11: return 32'd333772;
      12: return 32'd166886;
      13: return 32'd83443;
      14: return 32'd41722;
      15: return 32'd20861;
      16: return 32'd10430;
      17: return 32'd5215;
      18: return 32'd2608;
      19: return 32'd1304;
      20: return 32'd652;
      21: return 32'd326;
      22: return 32'd163;
      23: return 32'd81;
      default: return '0;
    endcase
  endfunction

  // Round a wide signed value right by SH bits (round half up) and
  // saturate it to SAMPLE_W bits.
  function automatic sample_t round_sat(input logic signed [63:0] v, input int unsigned sh);
    logic signed [63:0] r;
    r = (sh == 0) ? v : ((v + (64'sd1 <<< (sh - 1))) >>> sh);
    if (r > 64'sd32767)       return 16'sh7fff;
    else if (r < -64'sd32768) return 16'sh8000;
    else                      return r[SAMPLE_W-1:0];
  endfunction

endpackage
