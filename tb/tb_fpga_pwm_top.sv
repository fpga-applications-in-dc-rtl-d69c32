// tb_fpga_pwm_top: both modulators of the chip at their default sizes
// (50 MHz clock) through one full 50 Hz fundamental period and beyond.
//
// SPWM: fo = 50 Hz, sw_div = 5 (19.5 kHz carrier), m = 0.9, dead time 25
// clocks (0.5 us), sines from a behavioural CORDIC core. At every carrier
// valley the three references must match m*sin of the angle at the previous
// valley; after one fundamental fo and sw_div are reprogrammed (100 Hz,
// sw_div = 4) and the check continues.
// SVPWM: Ts = 8334 clocks (6 kHz), Vdc = 1.0, dead time 25 clocks. Balanced
// voltages of amplitude 0.5 step by 12 degrees every four switching
// periods. In steady state the on-time of gate P1 over one period must be
// d_a Ts - (td + 1), d_a = 1/2 + (v_a - (v_max + v_min)/2)/Vdc, within
// 3 % of Ts. A last step at amplitude 0.75 must over-modulate (T0 = 0).
// Counted mechanisms, each of which must occur: carrier periods, CORDIC
// requests, frequency reprogramming, dead-time gaps on both modulators, all
// six sectors, duty updates and over-modulation clipping.
module tb_fpga_pwm_top;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real FCLK = 50.0e6;
  localparam int TS = 8334;
  localparam int TD = 25;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [7:0] spwm_fo_hz, spwm_td, svpwm_td;
  logic [15:0] spwm_sw_div, svpwm_ts, svpwm_t1, svpwm_t2, svpwm_t0;
  q_t spwm_m_index, spwm_cordic_sin, spwm_carrier;
  logic spwm_cordic_start, spwm_cordic_done, svpwm_update;
  angle_t spwm_cordic_angle;
  logic [6:1] spwm_p, svpwm_p;
  q_t spwm_phase_wave [3];
  q_t svpwm_va, svpwm_vb, svpwm_vc, svpwm_vdc;
  logic [2:0] svpwm_sector, svpwm_pwm, spwm_pwm;
  logic spwm_valley;
  q_t svpwm_alpha, svpwm_beta;
  int requests;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  function automatic q_t qr(input real v);
    return q_t'($rtoi($floor(128.0 * v + 0.5)));
  endfunction

  fpga_pwm_top dut (.*);
  cordic_model #(.LAT(16)) u_cordic (.clk, .rst_n, .start(spwm_cordic_start),
    .angle(spwm_cordic_angle), .done(spwm_cordic_done), .sin_q(spwm_cordic_sin), .requests);
  always #10 clk = ~clk;   // 50 MHz

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_valley = 0, n_fo_change = 0, n_dt_spwm = 0, n_dt_svpwm = 0;
  int n_update = 0, n_clip = 0;
  int sector_seen [7];

  // dead-time gaps: a leg with both gates off after one was on
  logic [6:1] sp_d, sv_d;
  always @(posedge clk) if (rst_n) begin
    if ((spwm_p[1] && spwm_p[4]) || (spwm_p[3] && spwm_p[6]) || (spwm_p[5] && spwm_p[2]) ||
        (svpwm_p[1] && svpwm_p[4]) || (svpwm_p[3] && svpwm_p[6]) || (svpwm_p[5] && svpwm_p[2])) begin
      failures++; $display("FAIL shoot-through");
    end
    if ((sp_d[1] || sp_d[4]) && !spwm_p[1] && !spwm_p[4]) n_dt_spwm++;
    if ((sv_d[1] || sv_d[4]) && !svpwm_p[1] && !svpwm_p[4]) n_dt_svpwm++;
    sp_d <= spwm_p; sv_d <= svpwm_p;
  end

  // SPWM reference check at every valley
  real turns = 0.0, turns_prev = -1.0;
  always @(posedge clk) if (rst_n) begin
    turns = turns + real'(spwm_fo_hz) / FCLK;
    if (spwm_valley) begin
      n_valley++;
      if (turns_prev >= 0.0) begin
        @(negedge clk);
        for (int k = 0; k < 3; k++) begin
          real er;
          er = real'(spwm_m_index) * $sin(2.0 * PI * (turns_prev - real'(k) / 3.0));
          checks++;
          if (fabs(real'(spwm_phase_wave[k]) - er) > 2.0) begin
            failures++; $display("FAIL spwm ref[%0d]=%0d exp=%f", k, spwm_phase_wave[k], er);
          end
        end
      end
      turns_prev = turns;
    end
  end

  // SVPWM stepping and on-time check
  real v [3];
  real m_sv = 0.5;
  int step_i = 0, n_step = 0;
  always @(posedge clk) if (rst_n && svpwm_update) begin
    n_update++;
    sector_seen[svpwm_sector]++;
  end
  always @(posedge clk) if (rst_n && svpwm_update) begin
    n_step++;
    checks++;
    if (32'(svpwm_t1) + 32'(svpwm_t2) + 32'(svpwm_t0) != TS) begin
      failures++; $display("FAIL t1+t2+t0 = %0d", svpwm_t1 + svpwm_t2 + svpwm_t0);
    end
    if (svpwm_t0 == 0) n_clip++;
    if (n_step % 4 == 0) begin
      real th;
      th = 2.0 * PI * (real'(step_i) * 12.0 + 5.0) / 360.0;
      step_i++;
      v[0] = m_sv * $cos(th); v[1] = m_sv * $cos(th - 2.0 * PI / 3.0); v[2] = m_sv * $cos(th + 2.0 * PI / 3.0);
      svpwm_va <= qr(v[0]); svpwm_vb <= qr(v[1]); svpwm_vc <= qr(v[2]);
    end else if (n_step % 4 == 2 && n_step > 4 && m_sv < 0.6) begin
      int on;
      real vmax, vmin, e;
      on = 0;
      repeat (TS) begin
        @(posedge clk);
        if (svpwm_p[1]) on++;
      end
      vmax = v[0]; vmin = v[0];
      for (int k = 1; k < 3; k++) begin
        if (v[k] > vmax) vmax = v[k];
        if (v[k] < vmin) vmin = v[k];
      end
      e = (0.5 + (v[0] - (vmax + vmin) / 2.0)) * TS - real'(TD + 1);
      checks++;
      if (fabs(real'(on) - e) > 0.03 * TS) begin
        failures++; $display("FAIL svpwm P1 on=%0d exp=%f", on, e);
      end
    end
  end

  initial begin
    spwm_fo_hz = 50; spwm_sw_div = 5; spwm_m_index = qr(0.9); spwm_td = 8'(TD);
    svpwm_va = 0; svpwm_vb = 0; svpwm_vc = 0; svpwm_vdc = Q_ONE; svpwm_ts = 16'(TS);
    svpwm_td = 8'(TD);
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (1_000_000) @(posedge clk);          // one 50 Hz fundamental (20 ms)
    @(posedge clk iff spwm_valley);
    @(negedge clk); #2;
    spwm_fo_hz = 100; spwm_sw_div = 4;          // reprogram both frequencies
    n_fo_change++;
    m_sv = 0.75;                                // next SVPWM step over-modulates
    repeat (250_000) @(posedge clk);
    checks++;
    if (n_valley < 400) begin failures++; $display("FAIL %0d carrier periods", n_valley); end
    checks++;
    if (requests < 3 * n_valley) begin failures++; $display("FAIL %0d CORDIC requests", requests); end
    checks++;
    if (n_fo_change == 0) begin failures++; $display("FAIL no frequency change"); end
    checks++;
    if (n_dt_spwm == 0 || n_dt_svpwm == 0) begin
      failures++; $display("FAIL dead-time gaps %0d %0d", n_dt_spwm, n_dt_svpwm);
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (sector_seen[k] == 0) begin failures++; $display("FAIL sector %0d never seen", k); end
    end
    checks++;
    if (n_update < 140) begin failures++; $display("FAIL %0d duty updates", n_update); end
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL no over-modulation"); end
    $display("carrier periods=%0d cordic requests=%0d fo changes=%0d dead-time gaps spwm=%0d svpwm=%0d",
             n_valley, requests, n_fo_change, n_dt_spwm, n_dt_svpwm);
    $display("duty updates=%0d over-modulated=%0d sectors=%0d %0d %0d %0d %0d %0d", n_update, n_clip,
             sector_seen[1], sector_seen[2], sector_seen[3], sector_seen[4], sector_seen[5], sector_seen[6]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
