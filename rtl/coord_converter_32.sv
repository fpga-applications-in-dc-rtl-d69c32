// coord_converter_32: 3-to-2 coordinate converter (Clarke transformation).
//
// Converts the three phase voltages va, vb, vc (1Q8, normalised) into the
// orthogonal components of the voltage vector:
//   alpha = (2 va - vb - vc) / 3
//   beta  = (vb - vc) / sqrt(3)
// The sums are formed exactly, then multiplied by Q.15 constants and rounded
// once to 1Q8 with saturation (qalu_pkg::q_scale). For a balanced set of
// amplitude V this gives a vector of length V. `in_valid` registers the
// inputs' result: `out_valid`, alpha and beta follow one clock later and
// hold until the next in_valid.
//
// The source design takes the three phase voltages and computes the
// orthogonal components in its 3-2 co-ordinate converter; the amplitude-
// invariant form of the transformation and the arithmetic are this
// design's choices.
module coord_converter_32
  import qalu_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  q_t   va,
  input  q_t   vb,
  input  q_t   vc,
  output logic out_valid,
  output q_t   alpha,
  output q_t   beta
);

  logic signed [47:0] s_alpha, s_beta;

  assign s_alpha = 48'sd2 * 48'(va) - 48'(vb) - 48'(vc);
  assign s_beta  = 48'(vb) - 48'(vc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      alpha     <= '0;
      beta      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        alpha <= q_scale(s_alpha, C_ONE_THIRD);
        beta  <= q_scale(s_beta,  C_INV_SQRT3);
      end
    end
  end

endmodule
