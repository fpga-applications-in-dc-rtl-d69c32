// qalu_pkg: the Q-format arithmetic library shared by the SPWM and SVPWM
// modulators.
//
// Every datum in both modulators (phase voltages, alpha/beta components,
// sine and cosine values, carrier and references) is a 1Q8 word: a 9-bit
// two's-complement number whose binary point sits after the first magnitude
// bit, so the weight of the LSB is 2^-7 and the range is -2.0 .. +2.0-2^-7.
// +1.0 is 9'b0_1000_0000 and -1.0 is 9'b1_1000_0000, as in the data-format
// table of the source design; the 9-bit width also matches the three-hex-
// digit waveform values of its simulation plots.
//
// The functions below are the arithmetic library ("QALU as generic library
// functions"): addition, subtraction and multiplication that round to
// nearest and saturate instead of wrapping, plus scaling by a Q.15 constant
// with an internal precision wider than 1Q8. The qalu module wraps the same
// functions behind an opcode for places where one shared ALU is time-
// multiplexed. Angles are binary angles: 16 bits for a full turn.
package qalu_pkg;

  localparam int QW = 9;          // word width, sign + 8 bits
  localparam int QF = 7;          // fractional bits (LSB = 2^-7)

  typedef logic signed [QW-1:0] q_t;

  localparam q_t Q_MAX = 9'sh0FF; // +2 - 2^-7
  localparam q_t Q_MIN = 9'sh100; // -2
  localparam q_t Q_ONE = 9'sh080; // +1.0
  localparam q_t Q_NEG_ONE = 9'sh180; // -1.0

  // Binary angle: 2^16 units per turn.
  localparam int AW = 16;
  typedef logic [AW-1:0] angle_t;
  localparam angle_t ANG_60  = 16'd10923;
  localparam angle_t ANG_90  = 16'd16384;
  localparam angle_t ANG_120 = 16'd21845;

  // Q.15 constants used by the coordinate transformation and duty equations.
  localparam int signed C_ONE_THIRD   = 10923;  // 1/3
  localparam int signed C_INV_SQRT3   = 18919;  // 1/sqrt(3)
  localparam int signed C_SQRT3_HALF  = 28378;  // sqrt(3)/2
  localparam int unsigned C_SQRT3     = 56756;  // sqrt(3)

  typedef enum logic [3:0] {
    OP_ADD, OP_SUB, OP_MUL, OP_NEG, OP_ABS, OP_MAX, OP_MIN,
    OP_AND, OP_OR, OP_XOR, OP_NOT, OP_SHL, OP_SHR
  } qalu_op_e;

  // Clamp a wide signed integer (in LSB units) into a 1Q8 word.
  function automatic q_t q_sat(input logic signed [47:0] v);
    if (v > 48'sd255)       return Q_MAX;
    else if (v < -48'sd256) return Q_MIN;
    else                    return q_t'(v);
  endfunction

  function automatic logic q_would_sat(input logic signed [47:0] v);
    return (v > 48'sd255) || (v < -48'sd256);
  endfunction

  function automatic q_t q_add(input q_t a, input q_t b);
    return q_sat(48'(a) + 48'(b));
  endfunction

  function automatic q_t q_sub(input q_t a, input q_t b);
    return q_sat(48'(a) - 48'(b));
  endfunction

  // Full product, then round half up to 7 fractional bits.
  function automatic logic signed [47:0] q_mul_raw(input q_t a, input q_t b);
    logic signed [47:0] p;
    p = 48'(a) * 48'(b);
    return (p + 48'sd64) >>> QF;
  endfunction

  function automatic q_t q_mul(input q_t a, input q_t b);
    return q_sat(q_mul_raw(a, b));
  endfunction

  // v (a wide integer in LSB units) times a Q.15 constant, rounded.
  function automatic q_t q_scale(input logic signed [47:0] v, input int signed c);
    logic signed [47:0] p;
    p = v * 48'(c);
    return q_sat((p + 48'sd16384) >>> 15);
  endfunction

  function automatic logic q_gt(input q_t a, input q_t b);
    return a > b;
  endfunction

endpackage
