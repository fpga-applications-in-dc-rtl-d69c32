// duty_calculator: dwell times of the space-vector switching pattern.
//
// For a reference vector (alpha, beta) in sector s, whose borders are the
// active vectors at angles (s-1)*60 and s*60 degrees, it computes the times
// (in clock cycles of the switching period Ts) spent on the first active
// vector (T1), the second (T2) and the zero vectors (T0):
//   p1 = sin(s*60) alpha - cos(s*60) beta
//   p2 = cos((s-1)*60) beta - sin((s-1)*60) alpha
//   T1 = sqrt(3) Ts p1 / Vdc,  T2 = sqrt(3) Ts p2 / Vdc,  T0 = Ts - T1 - T2
// which is the usual T1 = sqrt(3) Ts |V|/Vdc sin(60 - theta'),
// T2 = sqrt(3) Ts |V|/Vdc sin(theta') written with the sector-border sines
// and cosines supplied by the sin/cos generator.
//
// How it works: after `start` (all inputs stable until `done`), one shared
// QALU evaluates the four products and two differences in six clocks, in
// 1Q8. The scale factor Kf = round(sqrt(3) Ts 256 / Vdc) comes from a
// 32-by-16-bit sequential divider (33 clocks), and T1, T2 = round(Kf p/256).
// Negative projections count as 0. If T1 + T2 exceeds Ts (over-modulation)
// T1 is clipped to Ts and T2 to Ts - T1, so T0 is never negative. Vdc <= 0
// is treated as a division by zero (T1 = Ts). `done` pulses 44 clocks
// after start; t1, t2, t0 then hold until the next start.
//
// The source design names a duty calculator with Ts as its input, fed by
// the sin/cos generator; the equations are the standard space-vector dwell
// times and the arithmetic, timing and over-modulation handling are this
// design's choices.
module duty_calculator
  import qalu_pkg::*;
#(
  parameter int unsigned TW = 16    // width of Ts and of the times
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  q_t            alpha,
  input  q_t            beta,
  input  q_t            sin1,     // sin((s-1)*60)
  input  q_t            cos1,     // cos((s-1)*60)
  input  q_t            sin2,     // sin(s*60)
  input  q_t            cos2,     // cos(s*60)
  input  logic [TW-1:0] ts,
  input  q_t            vdc,
  output logic          done,
  output logic [TW-1:0] t1,
  output logic [TW-1:0] t2,
  output logic [TW-1:0] t0
);

  typedef enum logic [2:0] {S_IDLE, S_ALU, S_DIV, S_WAIT, S_SCALE, S_CLIP} state_e;

  state_e     state;
  logic [2:0] step;
  q_t         m_a, m_b, p1, p2;

  // shared QALU
  qalu_op_e alu_op;
  q_t       alu_a, alu_b, alu_y;
  logic     alu_zero, alu_neg, alu_ovf;

  qalu u_qalu (
    .op(alu_op), .a(alu_a), .b(alu_b),
    .y(alu_y), .zero(alu_zero), .neg(alu_neg), .ovf(alu_ovf)
  );

  always_comb begin
    alu_op = OP_MUL;
    alu_a  = '0;
    alu_b  = '0;
    unique case (step)
      3'd0: begin alu_a = sin2; alu_b = alpha; end
      3'd1: begin alu_a = cos2; alu_b = beta;  end
      3'd2: begin alu_op = OP_SUB; alu_a = m_a; alu_b = m_b; end
      3'd3: begin alu_a = cos1; alu_b = beta;  end
      3'd4: begin alu_a = sin1; alu_b = alpha; end
      3'd5: begin alu_op = OP_SUB; alu_a = m_a; alu_b = m_b; end
      default: ;
    endcase
  end

  // divider for Kf = sqrt(3) * Ts * 2^15 / (Vdc * 2^7), rounded
  logic        div_start, div_busy, div_done;
  logic [31:0] div_num, div_quo;
  logic [15:0] div_den, div_rem;

  assign div_den = (vdc > 0) ? {1'b0, vdc[7:0], 7'd0} : 16'd0;
  assign div_num = 32'(ts) * 32'(C_SQRT3) + 32'(div_den >> 1);

  seq_divider #(.NW(32), .DW(16)) u_div (
    .clk, .rst_n, .start(div_start), .num(div_num), .den(div_den),
    .busy(div_busy), .done(div_done), .quo(div_quo), .rem(div_rem)
  );

  logic [47:0] t1_w, t2_w;
  logic [31:0] kf;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; m_a <= '0; m_b <= '0; p1 <= '0; p2 <= '0;
      div_start <= 1'b0; kf <= '0; t1_w <= '0; t2_w <= '0;
      done <= 1'b0; t1 <= '0; t2 <= '0; t0 <= '0;
    end else begin
      done      <= 1'b0;
      div_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          step  <= '0;
          state <= S_ALU;
        end
        S_ALU: begin
          unique case (step)
            3'd0, 3'd3: m_a <= alu_y;
            3'd1, 3'd4: m_b <= alu_y;
            3'd2:       p1  <= alu_y;
            default:    p2  <= alu_y;
          endcase
          if (step == 3'd5) begin
            div_start <= 1'b1;
            state     <= S_DIV;
          end
          step <= step + 1'b1;
        end
        S_DIV:  state <= S_WAIT;     // divider takes the start this clock
        S_WAIT: if (div_done) begin
          kf    <= div_quo;
          state <= S_SCALE;
        end
        S_SCALE: begin
          t1_w  <= (p1 > 0) ? ((48'(kf) * 48'(p1[7:0]) + 48'd128) >> 8) : '0;
          t2_w  <= (p2 > 0) ? ((48'(kf) * 48'(p2[7:0]) + 48'd128) >> 8) : '0;
          state <= S_CLIP;
        end
        S_CLIP: begin
          logic [TW-1:0] a, b;
          a = (t1_w > 48'(ts)) ? ts : t1_w[TW-1:0];
          b = (t2_w > 48'(ts - a)) ? (ts - a) : t2_w[TW-1:0];
          t1    <= a;
          t2    <= b;
          t0    <= ts - a - b;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
