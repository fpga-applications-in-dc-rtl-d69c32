// tb_spwm_pwm_controller: drives the carrier with a tick every clock and a
// slowly turning angle, answers sine requests with a behavioural CORDIC
// model, and checks
//  - the carrier: triangle between -1.0 and +1.0, 512 ticks per period;
//  - the references taken over at each valley: m * sin(theta + k*120 deg)
//    of the angle latched at the previous valley (within 1 LSB);
//  - the three comparisons: pwm = reference > carrier, one clock later.
module tb_spwm_pwm_controller;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  logic clk = 0, rst_n = 0;
  logic tick;
  angle_t theta;
  q_t m_index;
  logic cordic_start, cordic_done;
  angle_t cordic_angle;
  q_t cordic_sin;
  logic [2:0] pwm;
  q_t phase_wave [3];
  q_t carrier;
  logic valley;
  int requests;

  spwm_pwm_controller dut (
    .clk, .rst_n, .tick, .theta, .m_index,
    .cordic_start, .cordic_angle, .cordic_done, .cordic_sin,
    .pwm, .phase_wave, .carrier, .valley
  );
  cordic_model #(.LAT(12)) u_cordic (
    .clk, .rst_n, .start(cordic_start), .angle(cordic_angle),
    .done(cordic_done), .sin_q(cordic_sin), .requests
  );
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // the angle turns by 37 units per clock
  always_ff @(posedge clk) theta <= rst_n ? theta + 16'd37 : 16'd0;
  assign tick = rst_n;

  q_t prev_carrier;
  q_t ref_d [3];
  int n_valley = 0, last_valley = -1, cyc = 0;
  real mi;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    // carrier shape
    if (cyc > 2) begin
      checks++;
      if (carrier > Q_ONE || carrier < Q_NEG_ONE ||
          (carrier - prev_carrier != 1 && prev_carrier - carrier != 1)) begin
        failures++; $display("FAIL carrier %0d after %0d", carrier, prev_carrier);
      end
    end
    prev_carrier <= carrier;
    // comparison, one clock late
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (cyc > 3 && pwm[k] != (ref_d[k] > prev_carrier)) begin
        failures++; $display("FAIL pwm[%0d]=%b ref=%0d carrier=%0d", k, pwm[k], ref_d[k], prev_carrier);
      end
      ref_d[k] <= phase_wave[k];
    end
    if (valley) begin
      n_valley++;
      if (last_valley >= 0) begin
        checks++;
        if (cyc - last_valley != 512) begin
          failures++; $display("FAIL carrier period %0d", cyc - last_valley);
        end
      end
      last_valley = cyc;
    end
  end

  // references: check one clock after the valley
  angle_t th_last;
  bit     th_valid = 0;
  always @(posedge clk) if (rst_n && valley) begin
    angle_t th;
    real e;
    bit ok;
    th = th_last; ok = th_valid;
    th_last = theta; th_valid = 1;
    @(negedge clk);
    if (ok)
    for (int k = 0; k < 3; k++) begin
      e = mi * $sin(2.0 * PI * (real'(th) / 65536.0 - real'(k) / 3.0));
      checks++;
      if (fabs(real'(phase_wave[k]) - e) > 1.5) begin
        failures++; $display("FAIL ref[%0d]=%0d exp=%f", k, phase_wave[k], e);
      end
    end
  end

  initial begin
    m_index = 9'sd128; mi = 128.0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20 * 512 + 200) @(posedge clk);
    // mid-period change: the next valley still shows the old index, the
    // one after it the new one
    m_index = 9'sd77;
    @(posedge clk iff valley);
    @(negedge clk); #2;
    mi = 77.0;
    repeat (20 * 512) @(posedge clk);
    checks++;
    if (n_valley < 40) begin failures++; $display("FAIL only %0d valleys", n_valley); end
    checks++;
    if (requests < 3 * n_valley || requests > 3 * n_valley + 3) begin
      failures++; $display("FAIL %0d CORDIC requests for %0d valleys", requests, n_valley);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
