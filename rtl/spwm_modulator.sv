// spwm_modulator: single-chip sinusoidal PWM modulator.
//
// Generates the six gate signals P1..P6 of a two-level three-phase inverter
// by comparing three sine references, 120 degrees apart, with a triangular
// carrier. Both frequencies are programmable: the fundamental through
// `fo_hz` (hertz), the switching frequency through the clock divider ratio
// `sw_div`, f_sw = f_clk / (512 * sw_div) (with a 50 MHz clock, sw_div = 5
// gives 19.5 kHz). `m_index` (1Q8) scales the sine amplitude and `td` sets
// the dead time in clock cycles.
//
// Inside: the clock divider gives the carrier step, the frequency selector
// the phase angle, the PWM controller the carrier, the sampled references
// (through its QALU) and the comparison, and the dead-time inserter the
// gate signals. The sine values come from a CORDIC core outside this module
// through a request/response pair: `cordic_start` with `cordic_angle`
// (binary angle, 16 bits per turn) asks for a sine, `cordic_done` with
// `cordic_sin` (1Q8) answers; three requests are made per carrier period.
// `phase_wave` shows the three active references and `carrier` the carrier.
//
// The block set and its connections follow the source design's SPWM
// architecture; the CORDIC handshake and all widths are this design's.
module spwm_modulator
  import qalu_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000,
  parameter int unsigned     DIV_W  = 16,
  parameter int unsigned     FO_W   = 8,
  parameter int unsigned     TD_W   = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [FO_W-1:0]  fo_hz,
  input  logic [DIV_W-1:0] sw_div,
  input  q_t               m_index,
  input  logic [TD_W-1:0]  td,
  output logic             cordic_start,
  output angle_t           cordic_angle,
  input  logic             cordic_done,
  input  q_t               cordic_sin,
  output logic [6:1]       p,
  output logic [2:0]       pwm,
  output q_t               phase_wave [3],
  output q_t               carrier,
  output logic             valley
);

  logic   tick;
  angle_t theta;

  clock_divider #(.DIV_W(DIV_W)) u_div (.clk, .rst_n, .div(sw_div), .tick(tick));

  frequency_selector #(.CLK_HZ(CLK_HZ), .FO_W(FO_W)) u_fsel (
    .clk, .rst_n, .fo_hz(fo_hz), .theta(theta)
  );

  spwm_pwm_controller u_ctrl (
    .clk, .rst_n, .tick(tick), .theta(theta), .m_index(m_index),
    .cordic_start, .cordic_angle, .cordic_done, .cordic_sin,
    .pwm(pwm), .phase_wave(phase_wave), .carrier(carrier), .valley(valley)
  );

  dead_time_inserter #(.TD_W(TD_W)) u_dt (.clk, .rst_n, .pwm(pwm), .td(td), .p(p));

endmodule
