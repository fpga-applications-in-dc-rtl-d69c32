// sincos_generator: iterative CORDIC sine/cosine generator.
//
// On `start` it takes a binary angle (16 bits per turn) and, ITER+2 clocks
// later, pulses `done` with sin and cos of that angle as 1Q8 words, which
// stay valid until the next start. `busy` is high in between; a start while
// busy is ignored.
//
// How it works: angles outside -90..+90 degrees are first turned by 180
// degrees and the results negated. The vector (K, 0), K being the CORDIC gain
// compensation 0.60725, is then rotated towards the angle by ITER
// micro-rotations of atan(2^-i), one per clock, with shifts and adds only, in
// an 18-bit datapath with 15 fractional bits. The result is rounded to 1Q8.
//
// In the SVPWM architecture the source design names a sin/cos generator that
// feeds the duty calculator; that it is a CORDIC, its iteration count and
// the angle format are this design's choices. The same module serves as a
// stand-in for the vendor CORDIC core of the SPWM architecture in
// simulation.
module sincos_generator
  import qalu_pkg::*;
#(
  parameter int unsigned ITER = 14
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t angle,
  output logic   busy,
  output logic   done,
  output q_t     sin_q,
  output q_t     cos_q
);

  localparam int DW = 18;          // datapath width
  localparam int DF = 15;          // datapath fractional bits
  localparam logic signed [DW-1:0] K_GAIN = 18'sd19898;

  typedef logic signed [DW-1:0] d_t;

  // atan(2^-i) in binary-angle units (2^16 per turn)
  function automatic logic signed [AW:0] atan_tab(input logic [3:0] i);
    case (i)
      4'd0:  return 17'sd8192; 4'd1:  return 17'sd4836; 4'd2:  return 17'sd2555;
      4'd3:  return 17'sd1297; 4'd4:  return 17'sd651;  4'd5:  return 17'sd326;
      4'd6:  return 17'sd163;  4'd7:  return 17'sd81;   4'd8:  return 17'sd41;
      4'd9:  return 17'sd20;   4'd10: return 17'sd10;   4'd11: return 17'sd5;
      4'd12: return 17'sd3;    4'd13: return 17'sd1;    4'd14: return 17'sd1;
      default: return 17'sd0;
    endcase
  endfunction

  function automatic q_t to_q(input d_t v);
    logic signed [DW:0] r;
    r = (DW+1)'(v) + (DW+1)'(1 <<< (DF - QF - 1));
    return q_t'(r >>> (DF - QF));
  endfunction

  d_t x, y;
  logic signed [AW:0] z;          // residual angle, one guard bit
  logic flip;
  logic [$clog2(ITER+1)-1:0] it;
  logic run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0; flip <= 1'b0; it <= '0; run <= 1'b0;
      done <= 1'b0; sin_q <= '0; cos_q <= '0;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          // fold into -90..+90 degrees
          logic signed [AW-1:0] a;
          a = $signed(angle);
          if (a > $signed(ANG_90) || a < -$signed(ANG_90)) begin
            z    <= (AW+1)'($signed(angle ^ 16'h8000));
            flip <= 1'b1;
          end else begin
            z    <= (AW+1)'(a);
            flip <= 1'b0;
          end
          x   <= K_GAIN;
          y   <= '0;
          it  <= '0;
          run <= 1'b1;
        end
      end else if (it == ITER[$bits(it)-1:0]) begin
        run   <= 1'b0;
        done  <= 1'b1;
        sin_q <= flip ? to_q(-y) : to_q(y);
        cos_q <= flip ? to_q(-x) : to_q(x);
      end else begin
        if (z >= 0) begin
          x <= x - (y >>> it);
          y <= y + (x >>> it);
          z <= z - atan_tab(4'(it));
        end else begin
          x <= x + (y >>> it);
          y <= y - (x >>> it);
          z <= z + atan_tab(4'(it));
        end
        it <= it + 1'b1;
      end
    end
  end

  assign busy = run;

endmodule
