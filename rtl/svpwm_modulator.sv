// svpwm_modulator: single-chip space-vector PWM modulator.
//
// Inputs are the three phase voltages va, vb, vc and the dc-bus voltage vdc
// (1Q8, normalised to one common base), the switching period ts in clock
// cycles and the dead time td in clock cycles. Outputs are the six gate
// signals P1..P6 of a two-level three-phase inverter.
//
// Once per switching period a sequencer samples the inputs and runs the
// chain of the architecture: the 3-2 co-ordinate converter gives (alpha,
// beta); sector detection gives the sector s; the sin/cos generator is run
// twice for the sector-border angles (s-1)*60 and s*60 degrees; the duty
// calculator turns all of this into the dwell times T1, T2, T0; the PWM
// generator takes them over at the next period boundary and produces the
// centre-aligned phase signals; the dead-time inserter makes the gate
// signals. The computation takes about 85 clocks, so ts must exceed about
// 100 clocks; the output lags the sampled voltages by one period.
// `sector`, `alpha`, `beta`, `t1`, `t2`, `t0` expose the last computed
// values and `update` pulses when a new set is handed to the PWM generator.
//
// Block structure and the order of the steps follow the source design's
// SVPWM architecture; the sequencer, the per-period sampling and all widths
// are this design's choices.
module svpwm_modulator
  import qalu_pkg::*;
#(
  parameter int unsigned TW   = 16,
  parameter int unsigned TD_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  q_t              va,
  input  q_t              vb,
  input  q_t              vc,
  input  q_t              vdc,
  input  logic [TW-1:0]   ts,
  input  logic [TD_W-1:0] td,
  output logic [6:1]      p,
  output logic [2:0]      pwm,
  output logic [2:0]      sector,
  output q_t              alpha,
  output q_t              beta,
  output logic [TW-1:0]   t1,
  output logic [TW-1:0]   t2,
  output logic [TW-1:0]   t0,
  output logic            update
);

  typedef enum logic [2:0] {
    S_IDLE, S_CLARKE, S_SECTOR, S_SC1, S_SC2, S_DUTY
  } state_e;

  state_e state;

  // sampled inputs
  q_t            va_s, vb_s, vc_s, vdc_s;
  logic [TW-1:0] ts_s;

  // 3-2 converter
  logic clk_valid_in, clk_valid_out;
  coord_converter_32 u_c32 (
    .clk, .rst_n, .in_valid(clk_valid_in), .va(va_s), .vb(vb_s), .vc(vc_s),
    .out_valid(clk_valid_out), .alpha(alpha), .beta(beta)
  );

  // sector detection
  sector_detector u_sec (.clk, .rst_n, .alpha(alpha), .beta(beta), .sector(sector));

  // sin/cos generator
  logic   sc_start, sc_busy, sc_done;
  angle_t sc_angle;
  q_t     sc_sin, sc_cos;
  q_t     sin1, cos1, sin2, cos2;
  sincos_generator u_sc (
    .clk, .rst_n, .start(sc_start), .angle(sc_angle),
    .busy(sc_busy), .done(sc_done), .sin_q(sc_sin), .cos_q(sc_cos)
  );

  // duty calculator
  logic dc_start, dc_done;
  duty_calculator #(.TW(TW)) u_duty (
    .clk, .rst_n, .start(dc_start), .alpha(alpha), .beta(beta),
    .sin1, .cos1, .sin2, .cos2, .ts(ts_s), .vdc(vdc_s),
    .done(dc_done), .t1(t1), .t2(t2), .t0(t0)
  );

  // PWM generation
  logic period_start;
  svpwm_pwm_generator #(.TW(TW)) u_pwm (
    .clk, .rst_n, .load(dc_done), .sector(sector), .t1(t1), .t2(t2), .t0(t0),
    .ts(ts_s), .pwm(pwm), .period_start(period_start)
  );

  // dead time
  dead_time_inserter #(.TD_W(TD_W)) u_dt (.clk, .rst_n, .pwm(pwm), .td(td), .p(p));

  assign update = dc_done;

  // sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      va_s <= '0; vb_s <= '0; vc_s <= '0; vdc_s <= '0; ts_s <= '0;
      clk_valid_in <= 1'b0; sc_start <= 1'b0; sc_angle <= '0; dc_start <= 1'b0;
      sin1 <= '0; cos1 <= '0; sin2 <= '0; cos2 <= '0;
    end else begin
      clk_valid_in <= 1'b0;
      sc_start     <= 1'b0;
      dc_start     <= 1'b0;
      unique case (state)
        S_IDLE: if (period_start) begin
          va_s <= va; vb_s <= vb; vc_s <= vc; vdc_s <= vdc; ts_s <= ts;
          clk_valid_in <= 1'b1;
          state <= S_CLARKE;
        end
        S_CLARKE: if (clk_valid_out) state <= S_SECTOR;
        S_SECTOR: begin
          // sector is registered one clock after alpha/beta: valid now
          sc_angle <= angle_t'(16'(sector - 3'd1) * ANG_60);
          sc_start <= 1'b1;
          state    <= S_SC1;
        end
        S_SC1: if (sc_done) begin
          sin1 <= sc_sin; cos1 <= sc_cos;
          sc_angle <= angle_t'(16'(sector) * ANG_60);
          sc_start <= 1'b1;
          state    <= S_SC2;
        end
        S_SC2: if (sc_done) begin
          sin2 <= sc_sin; cos2 <= sc_cos;
          dc_start <= 1'b1;
          state    <= S_DUTY;
        end
        S_DUTY: if (dc_done) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
