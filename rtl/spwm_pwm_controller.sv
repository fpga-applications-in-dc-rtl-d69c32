// spwm_pwm_controller: sine-triangle PWM for three phases.
//
// A symmetric triangular carrier in 1Q8 runs from -1.0 to +1.0 and back, one
// LSB (2^-7) per `tick` from the clock divider, so one carrier period is 512
// ticks. Each phase's PWM output is high while its reference is above the
// carrier (registered, one clock after the compare).
//
// References use regular sampling: at every carrier valley the controller
// latches the phase angle `theta` from the frequency selector and asks the
// CORDIC core, one request at a time, for sin(theta), sin(theta - 120 deg)
// and sin(theta + 120 deg) (start/angle out, done/sine back). Each sine is
// scaled by the modulation index `m_index` in the QALU (rounded,
// saturating 1Q8 multiply) and stored in a shadow register. The shadow set
// becomes the active references at the next valley, so references change
// only at the carrier minimum and lag the sampled angle by one carrier
// period. The three CORDIC requests must finish within one carrier period.
// A sampling round also runs right after reset. `phase_wave` shows the
// active references (the phase_a/b/c_wave traces of the source design's
// simulation) and `valley` pulses when a carrier period starts.
//
// The source design names a PWM controller fed by the clock divider, the
// frequency selector, the QALU and a CORDIC core; the carrier shape and
// resolution, the regular sampling, the modulation-index input and the
// CORDIC handshake are this design's choices.
module spwm_pwm_controller
  import qalu_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   tick,
  input  angle_t theta,
  input  q_t     m_index,
  // CORDIC core request/response
  output logic   cordic_start,
  output angle_t cordic_angle,
  input  logic   cordic_done,
  input  q_t     cordic_sin,
  // outputs
  output logic [2:0] pwm,          // {c, b, a}
  output q_t     phase_wave [3],
  output q_t     carrier,
  output logic   valley
);

  typedef enum logic [1:0] {S_IDLE, S_REQ, S_WAIT} state_e;

  state_e     state;
  logic [1:0] idx;
  angle_t     theta_s;
  logic       dir_up;
  logic       kick;
  q_t         shadow [3];
  q_t         ref_q  [3];

  // QALU: sine times modulation index
  q_t   alu_y;
  logic alu_zero, alu_neg, alu_ovf;
  qalu u_qalu (
    .op(OP_MUL), .a(cordic_sin), .b(m_index),
    .y(alu_y), .zero(alu_zero), .neg(alu_neg), .ovf(alu_ovf)
  );

  // carrier
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      carrier <= Q_NEG_ONE;
      dir_up  <= 1'b1;
      valley  <= 1'b0;
    end else begin
      valley <= 1'b0;
      if (tick) begin
        if (dir_up) begin
          if (carrier == Q_ONE - 9'sd1) dir_up <= 1'b0;
          carrier <= carrier + 9'sd1;
        end else begin
          if (carrier == Q_NEG_ONE + 9'sd1) begin
            dir_up <= 1'b1;
            valley <= 1'b1;
          end
          carrier <= carrier - 9'sd1;
        end
      end
    end
  end

  // sampling sequence
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      idx          <= '0;
      theta_s      <= '0;
      kick         <= 1'b1;
      cordic_start <= 1'b0;
      cordic_angle <= '0;
      for (int k = 0; k < 3; k++) begin
        shadow[k] <= '0;
        ref_q[k]  <= '0;
      end
    end else begin
      cordic_start <= 1'b0;
      kick         <= 1'b0;
      if (valley) begin
        for (int k = 0; k < 3; k++) ref_q[k] <= shadow[k];
      end
      unique case (state)
        S_IDLE: if (valley || kick) begin
          theta_s <= theta;
          idx     <= '0;
          state   <= S_REQ;
        end
        S_REQ: begin
          cordic_start <= 1'b1;
          unique case (idx)
            2'd1:    cordic_angle <= theta_s - ANG_120;
            2'd2:    cordic_angle <= theta_s + ANG_120;
            default: cordic_angle <= theta_s;
          endcase
          state <= S_WAIT;
        end
        S_WAIT: if (cordic_done) begin
          shadow[idx] <= alu_y;
          if (idx == 2'd2) state <= S_IDLE;
          else begin
            idx   <= idx + 1'b1;
            state <= S_REQ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // comparison
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= '0;
    else for (int k = 0; k < 3; k++) pwm[k] <= q_gt(ref_q[k], carrier);
  end

  assign phase_wave = ref_q;

endmodule
