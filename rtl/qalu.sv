// qalu: Q-format arithmetic and logic unit.
//
// Combinational ALU on two 1Q8 operands (see qalu_pkg). Arithmetic results
// round to nearest and saturate at the ends of the 1Q8 range; the `ovf`
// flag reports that saturation took place. Logic operations work bitwise on
// the raw words; the shifts are arithmetic shifts by b[2:0] places (left
// shifts saturate). Flags `zero` and `neg` describe the result.
//
// The source design names a QALU in both of its architectures and says only
// that it performs all arithmetic and logic functions in Q format; the
// operation set, rounding and saturation here are this design's choices.
// Result is valid in the same cycle as the operands (no clock).
module qalu
  import qalu_pkg::*;
(
  input  qalu_op_e op,
  input  q_t       a,
  input  q_t       b,
  output q_t       y,
  output logic     zero,
  output logic     neg,
  output logic     ovf
);

  logic signed [47:0] wide;

  always_comb begin
    wide = '0;
    ovf  = 1'b0;
    unique case (op)
      OP_ADD: begin wide = 48'(a) + 48'(b); y = q_sat(wide); ovf = q_would_sat(wide); end
      OP_SUB: begin wide = 48'(a) - 48'(b); y = q_sat(wide); ovf = q_would_sat(wide); end
      OP_MUL: begin wide = q_mul_raw(a, b); y = q_sat(wide); ovf = q_would_sat(wide); end
      OP_NEG: begin wide = -48'(a);         y = q_sat(wide); ovf = q_would_sat(wide); end
      OP_ABS: begin
        wide = (a < 0) ? -48'(a) : 48'(a);
        y = q_sat(wide); ovf = q_would_sat(wide);
      end
      OP_MAX: y = (a > b) ? a : b;
      OP_MIN: y = (a < b) ? a : b;
      OP_AND: y = a & b;
      OP_OR:  y = a | b;
      OP_XOR: y = a ^ b;
      OP_NOT: y = ~a;
      OP_SHL: begin
        wide = 48'(a) <<< b[2:0];
        y = q_sat(wide); ovf = q_would_sat(wide);
      end
      OP_SHR: y = a >>> b[2:0];
      default: y = '0;
    endcase
    zero = (y == '0);
    neg  = y[QW-1];
  end

endmodule
