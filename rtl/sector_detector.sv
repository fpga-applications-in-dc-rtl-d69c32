// sector_detector: which 60-degree sector holds the voltage vector.
//
// Sector k (1..6) spans angles (k-1)*60 .. k*60 degrees of the vector
// (alpha, beta). The sector follows from three sign tests, made exactly in
// integer arithmetic with sqrt(3)/2 as a Q.15 constant:
//   A = beta >= 0
//   B = sqrt(3)/2 alpha - beta/2 >  0
//   C = -sqrt(3)/2 alpha - beta/2 >= 0
// and N = A + 2B + 4C maps to the sector as N = 3,1,5,4,6,2 -> 1..6.
// A vector exactly on a sector border may land in either neighbour; the
// zero vector gives sector 3. The result is registered: `sector`
// follows alpha/beta by one clock.
//
// The source design names a sector detection block; the sign-test method
// and the sector numbering are this design's choices.
module sector_detector
  import qalu_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  q_t         alpha,
  input  q_t         beta,
  output logic [2:0] sector
);

  logic signed [47:0] ra, rb;   // sqrt(3)/2 alpha and beta/2, both << 15
  logic a_pos, b_pos, c_pos;
  logic [2:0] n;

  always_comb begin
    ra    = 48'(alpha) * 48'(C_SQRT3_HALF);
    rb    = 48'(beta) <<< 14;
    a_pos = (beta >= 0);
    b_pos = (ra - rb) > 0;
    c_pos = (-ra - rb) >= 0;
    n     = {c_pos, b_pos, a_pos};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sector <= 3'd1;
    else begin
      unique case (n)
        3'd3:    sector <= 3'd1;
        3'd1:    sector <= 3'd2;
        3'd5:    sector <= 3'd3;
        3'd4:    sector <= 3'd4;
        3'd6:    sector <= 3'd5;
        3'd2:    sector <= 3'd6;
        default: sector <= 3'd1;   // N = 0 and 7 cannot occur
      endcase
    end
  end

endmodule
