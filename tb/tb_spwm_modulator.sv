// tb_spwm_modulator: end-to-end sine-triangle PWM with a 1 MHz clock, a
// behavioural CORDIC core, fo = 50 Hz and sw_div = 2 (carrier period 1024
// clocks). Checks at every carrier valley that the three references are
// m * sin of the phase angle at the previous valley (-0, -120, +120 deg);
// over every carrier period that phase a's PWM on-time is
// (1 + ref/128)/2 of the period; that no leg's gates are on together; and
// that reprogramming fo (to 25 Hz) and sw_div (to 1) changes the
// reference frequency and the carrier period.
module tb_spwm_modulator;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] fo, td;
  logic [15:0] sw_div;
  q_t m_index;
  logic cordic_start, cordic_done;
  angle_t cordic_angle;
  q_t cordic_sin;
  logic [6:1] p;
  logic [2:0] pwm;
  q_t phase_wave [3];
  q_t carrier;
  logic valley;
  int requests;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  spwm_modulator #(.CLK_HZ(1_000_000)) dut (
    .clk, .rst_n, .fo_hz(fo), .sw_div, .m_index, .td,
    .cordic_start, .cordic_angle, .cordic_done, .cordic_sin,
    .p, .pwm, .phase_wave, .carrier, .valley
  );
  cordic_model #(.LAT(16)) u_cordic (.clk, .rst_n, .start(cordic_start), .angle(cordic_angle),
    .done(cordic_done), .sin_q(cordic_sin), .requests);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference phase in turns, integrated independently of the design
  real turns = 0.0;
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    turns = turns + real'(fo) / 1.0e6;
    cyc++;
  end

  real turns_prev = -1.0;
  int last_valley = -1, on_a = 0, n_valley = 0, period_exp;
  bit skip = 0;
  q_t ref_a;
  always @(posedge clk) if (rst_n) begin
    if ((p[1] && p[4]) || (p[3] && p[6]) || (p[5] && p[2])) begin
      failures++; $display("FAIL shoot-through %b", p);
    end
    if (pwm[0]) on_a++;
    if (valley) begin
      n_valley++;
      if (skip) skip = 0;
      else if (last_valley >= 0 && n_valley > 3) begin
        real e;
        checks += 2;
        if (cyc - last_valley != period_exp) begin
          failures++; $display("FAIL carrier period %0d exp %0d", cyc - last_valley, period_exp);
        end
        e = (1.0 + real'(ref_a) / 128.0) / 2.0 * real'(period_exp);
        if (fabs(real'(on_a) - e) > 4.0) begin
          failures++; $display("FAIL on-time %0d exp %f", on_a, e);
        end
      end
      on_a = 0;
      last_valley = cyc;
      ref_a = phase_wave[0];
      // the references about to be loaded come from the previous valley's angle
      if (turns_prev >= 0.0) begin
        @(negedge clk);
        for (int k = 0; k < 3; k++) begin
          real er;
          er = real'(m_index) * $sin(2.0 * PI * (turns_prev - real'(k) / 3.0));
          checks++;
          if (fabs(real'(phase_wave[k]) - er) > 2.0) begin
            failures++; $display("FAIL ref[%0d]=%0d exp=%f", k, phase_wave[k], er);
          end
        end
        ref_a = phase_wave[0];
      end
      turns_prev = turns;
    end
  end

  initial begin
    fo = 50; sw_div = 2; period_exp = 1024; m_index = 9'sd115; td = 8'd4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (40000) @(posedge clk);       // two fundamental periods
    @(posedge clk iff valley);
    @(negedge clk); #2;
    fo = 25; sw_div = 1; period_exp = 512; skip = 1;   // first period is mixed
    repeat (40000) @(posedge clk);       // one period at 25 Hz
    checks++;
    if (n_valley < 110) begin failures++; $display("FAIL %0d valleys", n_valley); end
    checks++;
    if (requests < 3 * n_valley) begin failures++; $display("FAIL %0d requests", requests); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
