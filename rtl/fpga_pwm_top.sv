// fpga_pwm_top: SPWM and SVPWM modulators on one chip.
//
// The two modulators sit side by side on one clock and reset, each with its
// own inputs and its own six gate outputs, so that either (or both) can
// drive a three-phase inverter:
//   spwm_*  : sine-triangle PWM. Fundamental fo_hz, switching frequency
//             f_clk / (512 * sw_div), modulation index, dead time. The sine
//             values come from an external CORDIC core through the
//             spwm_cordic_* request/response ports.
//   svpwm_* : space-vector PWM from the three phase voltages and the dc-bus
//             voltage, with switching period ts and dead time td in clock
//             cycles.
// Gate outputs are P1..P6 in inverter numbering: P1/P4 top/bottom of phase
// a, P3/P6 of phase b, P5/P2 of phase c. The monitoring outputs (references,
// carrier, carrier valley, the PWM signals before dead time, the alpha/beta
// components, sector, dwell times) are for observation and test.
//
// Putting both schemes on one device follows the source design; the port
// set is this design's.
module fpga_pwm_top
  import qalu_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000,
  parameter int unsigned     TW     = 16,
  parameter int unsigned     TD_W   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  // SPWM
  input  logic [7:0]      spwm_fo_hz,
  input  logic [15:0]     spwm_sw_div,
  input  q_t              spwm_m_index,
  input  logic [TD_W-1:0] spwm_td,
  output logic            spwm_cordic_start,
  output angle_t          spwm_cordic_angle,
  input  logic            spwm_cordic_done,
  input  q_t              spwm_cordic_sin,
  output logic [6:1]      spwm_p,
  output q_t              spwm_phase_wave [3],
  output q_t              spwm_carrier,
  output logic            spwm_valley,
  output logic [2:0]      spwm_pwm,
  // SVPWM
  input  q_t              svpwm_va,
  input  q_t              svpwm_vb,
  input  q_t              svpwm_vc,
  input  q_t              svpwm_vdc,
  input  logic [TW-1:0]   svpwm_ts,
  input  logic [TD_W-1:0] svpwm_td,
  output logic [6:1]      svpwm_p,
  output logic [2:0]      svpwm_pwm,
  output logic [2:0]      svpwm_sector,
  output q_t              svpwm_alpha,
  output q_t              svpwm_beta,
  output logic [TW-1:0]   svpwm_t1,
  output logic [TW-1:0]   svpwm_t2,
  output logic [TW-1:0]   svpwm_t0,
  output logic            svpwm_update
);

  spwm_modulator #(.CLK_HZ(CLK_HZ), .DIV_W(16), .FO_W(8), .TD_W(TD_W)) u_spwm (
    .clk, .rst_n,
    .fo_hz(spwm_fo_hz), .sw_div(spwm_sw_div), .m_index(spwm_m_index), .td(spwm_td),
    .cordic_start(spwm_cordic_start), .cordic_angle(spwm_cordic_angle),
    .cordic_done(spwm_cordic_done), .cordic_sin(spwm_cordic_sin),
    .p(spwm_p), .pwm(spwm_pwm), .phase_wave(spwm_phase_wave),
    .carrier(spwm_carrier), .valley(spwm_valley)
  );

  svpwm_modulator #(.TW(TW), .TD_W(TD_W)) u_svpwm (
    .clk, .rst_n,
    .va(svpwm_va), .vb(svpwm_vb), .vc(svpwm_vc), .vdc(svpwm_vdc),
    .ts(svpwm_ts), .td(svpwm_td),
    .p(svpwm_p), .pwm(svpwm_pwm), .sector(svpwm_sector),
    .alpha(svpwm_alpha), .beta(svpwm_beta),
    .t1(svpwm_t1), .t2(svpwm_t2), .t0(svpwm_t0), .update(svpwm_update)
  );

endmodule
