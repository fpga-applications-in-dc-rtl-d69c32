// tb_pwm_workloads: the chip at its default sizes (50 MHz clock) in the
// operating points it is meant for, judged from the gate signals alone.
//
// Two runs, each from reset through one 50 Hz fundamental period:
//   run 0: SPWM carrier 19.5 kHz (sw_div = 5), SVPWM 6 kHz (Ts = 8334)
//   run 1: SPWM carrier 2.64 kHz (sw_div = 37), SVPWM 40 kHz (Ts = 1250)
// SPWM (m = 0.9): each carrier period must last exactly 512 * sw_div
// clocks and hold one pulse of P1 (top, phase a). The on-time of P4 (the
// bottom switch, whose pulse is centred on the carrier peak) must be
// 2 * sw_div * (128 - r) - (td + 1) clocks, r = 128 m sin(2 pi 50 t) taken at
// the valley one period earlier, within 4 carrier steps. The reference
// must cross zero upwards once, 20 ms after reset.
// SVPWM (amplitude 0.5, Vdc = 1, voltages rotating at 50 Hz and set at each
// duty update): updates must come exactly Ts apart, each P1 pulse must
// last d_a Ts - (td + 1) with d_a = 1/2 + v_a - (v_max + v_min)/2 for the
// voltages set two updates earlier (within 3 % of Ts), the sector must step
// 1, 2, ..., 6 in order and change to sector 2 and back to sector 1 when the
// vector passes 60 and 360 degrees (within one period plus the angle error
// of 1Q8 voltages). Checks of the update spacing begin with the third
// update: the first periods after reset are shorter or one clock longer.
module tb_pwm_workloads;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam real FCLK = 50.0e6;
  localparam int TD = 25;
  localparam real M_SPWM = 0.9;
  localparam real A_SV = 0.5;
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
  // clock at which the 50 Hz test vector reaches angle a (it starts at 0.05)
  function automatic real t_at(input real a);
    return (a - 0.05) / (2.0 * PI * 50.0) * 50.0e6;
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

  // time since reset, in clocks
  longint t = 0;
  always @(posedge clk) t <= rst_n ? t + 1 : 0;

  // ---------------- SPWM ----------------
  longint v_time [3];                 // last three valley times
  int     n_val = 0, p4_on = 0, p1_rise = 0, p4_prev = -1;
  longint spwm_cross = -1;
  logic   p1_d;
  always @(posedge clk) p1_d <= spwm_p[1];
  always @(posedge clk) if (rst_n) begin
    if (spwm_valley) begin
      int div, mid;
      div = int'(spwm_sw_div);
      mid = 256 * div - (TD + 1);
      if (n_val >= 1) begin
        checks++;
        if (t - v_time[0] != longint'(512 * div)) begin
          failures++; $display("FAIL carrier period %0d", t - v_time[0]);
        end
      end
      if (n_val >= 3) begin
        real r, e;
        // period [v_time[0], t) runs with the reference sampled at v_time[1]
        r = 128.0 * M_SPWM * $sin(2.0 * PI * 50.0 * real'(v_time[1]) / FCLK);
        e = 2.0 * real'(div) * (128.0 - r) - real'(TD + 1);
        checks++;
        if (fabs(real'(p4_on) - e) > 8.0 * real'(div) + 4.0) begin
          failures++; $display("FAIL spwm P4 on=%0d exp=%f", p4_on, e);
        end
        checks++;
        if (p1_rise != 1) begin failures++; $display("FAIL %0d P1 pulses in a period", p1_rise); end
        if (p4_prev > mid && p4_on <= mid && t > 500_000) spwm_cross = t;
        p4_prev = p4_on;
      end
      v_time[2] = v_time[1]; v_time[1] = v_time[0]; v_time[0] = t;
      n_val++;
      p4_on = 0; p1_rise = 0;
    end
    if (spwm_p[4]) p4_on++;
    if (spwm_p[1] && !p1_d) p1_rise++;
  end

  // ---------------- SVPWM ----------------
  real    vh [4][3];                  // voltages set at the last updates
  int     n_upd = 0, n_pulse = 0, n_seq = 0;
  longint last_upd = 0, enter_s1 = -1, enter_s2 = -1;
  logic [2:0] last_sec = 0;
  always @(posedge clk) if (rst_n && svpwm_update) begin
    real th;
    if (n_upd >= 3) begin
      checks++;
      if (t - last_upd != longint'(svpwm_ts)) begin
        failures++; $display("FAIL svpwm period %0d at update %0d t=%0d", t - last_upd, n_upd, t);
      end
    end
    if (n_upd >= 3 && svpwm_sector != last_sec) begin
      checks++;
      if (svpwm_sector != (last_sec == 3'd6 ? 3'd1 : last_sec + 3'd1)) begin
        failures++; $display("FAIL sector %0d after %0d", svpwm_sector, last_sec);
      end else n_seq++;
      if (svpwm_sector == 3'd2 && enter_s2 < 0) enter_s2 = t;
      if (svpwm_sector == 3'd1 && enter_s1 < 0) enter_s1 = t;
    end
    last_sec = svpwm_sector;
    last_upd = t;
    n_upd++;
    for (int j = 3; j > 0; j--) vh[j] = vh[j-1];
    th = 2.0 * PI * 50.0 * real'(t) / FCLK + 0.05;
    for (int k = 0; k < 3; k++)
      vh[0][k] = real'(qr(A_SV * $cos(th - 2.0 * PI * real'(k) / 3.0))) / 128.0;
    svpwm_va <= qr(vh[0][0]); svpwm_vb <= qr(vh[0][1]); svpwm_vc <= qr(vh[0][2]);
  end

  // P1 pulse widths; at a falling edge the pulse belongs to the voltages
  // set two updates back
  int w = 0;
  logic sv1_d;
  always @(posedge clk) begin
    sv1_d <= svpwm_p[1];
    if (!rst_n) w <= 0;
    else if (svpwm_p[1]) w <= w + 1;
    else if (sv1_d) begin
      if (n_upd >= 6) begin
        real vmax, vmin, e;
        vmax = vh[2][0]; vmin = vh[2][0];
        for (int k = 1; k < 3; k++) begin
          if (vh[2][k] > vmax) vmax = vh[2][k];
          if (vh[2][k] < vmin) vmin = vh[2][k];
        end
        e = (0.5 + vh[2][0] - (vmax + vmin) / 2.0) * real'(svpwm_ts) - real'(TD + 1);
        checks++;
        n_pulse++;
        if (fabs(real'(w) - e) > 0.03 * real'(svpwm_ts)) begin
          failures++; $display("FAIL svpwm P1 width=%0d exp=%f", w, e);
        end
      end
      w <= 0;
    end
  end

  initial begin
    spwm_fo_hz = 50; spwm_m_index = qr(M_SPWM); spwm_td = 8'(TD);
    svpwm_va = 0; svpwm_vb = 0; svpwm_vc = 0; svpwm_vdc = Q_ONE; svpwm_td = 8'(TD);
    for (int run = 0; run < 2; run++) begin
      spwm_sw_div = (run == 0) ? 16'd5 : 16'd37;
      svpwm_ts    = (run == 0) ? 16'd8334 : 16'd1250;
      rst_n = 0;
      n_val = 0; p4_prev = -1; spwm_cross = -1;
      n_upd = 0; n_pulse = 0; n_seq = 0; last_sec = 0; enter_s1 = -1; enter_s2 = -1;
      repeat (3) @(posedge clk);
      rst_n = 1;
      repeat (1_080_000) @(posedge clk);
      // fundamental of the SPWM reference: upward zero crossing at 20 ms
      checks++;
      if (spwm_cross < 0 || fabs(real'(spwm_cross) - 1.0e6) > 4.0 * 512.0 * real'(spwm_sw_div)) begin
        failures++; $display("FAIL spwm zero crossing at %0d", spwm_cross);
      end
      // fundamental of the SVPWM vector: the sector changes to 2 and back
      // to 1 when the 50 Hz vector passes 60 and 360 degrees
      checks++;
      if (fabs(real'(enter_s2) - (t_at(PI / 3.0) + 1.5 * real'(svpwm_ts))) > real'(svpwm_ts) + 3000.0) begin
        failures++; $display("FAIL svpwm sector 2 entered at %0d", enter_s2);
      end
      checks++;
      if (fabs(real'(enter_s1) - (t_at(2.0 * PI) + 1.5 * real'(svpwm_ts))) > real'(svpwm_ts) + 3000.0) begin
        failures++; $display("FAIL svpwm sector 1 entered at %0d", enter_s1);
      end
      checks++;
      if (n_seq < 6 || n_pulse < 100) begin
        failures++; $display("FAIL svpwm %0d sector steps %0d pulses", n_seq, n_pulse);
      end
      $display("run %0d: sw_div=%0d carrier periods=%0d zero crossing at %0d; Ts=%0d updates=%0d pulses=%0d sector steps=%0d sector 2 at %0d, sector 1 at %0d",
               run, spwm_sw_div, n_val, spwm_cross, svpwm_ts, n_upd, n_pulse, n_seq, enter_s2, enter_s1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
