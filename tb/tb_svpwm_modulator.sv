// tb_svpwm_modulator: end-to-end space-vector modulation. Balanced phase
// voltages of amplitude m (relative to Vdc = 1.0) are held for a few
// switching periods at each of 36 angles around the circle. Over one
// period in steady state, each phase's on-time must match the duty of
// space-vector modulation, d_x = 1/2 + (v_x - (v_max + v_min)/2) / Vdc,
// within 3 % of Ts; all six sectors must be visited; the gate outputs
// must never turn both switches of a leg on. A final over-modulated vector
// must give T0 = 0.
module tb_svpwm_modulator;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  localparam int TS = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  q_t va, vb, vc, vdc, al, be;
  logic [15:0] ts, t1, t2, t0;
  logic [7:0] td;
  logic [6:1] p;
  logic [2:0] pwm, sector;
  logic update;
  int seen [7];
  int n_update = 0;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  function automatic q_t qr(input real v);
    return q_t'($rtoi($floor(128.0 * v + 0.5)));
  endfunction

  svpwm_modulator dut (.clk, .rst_n, .va, .vb, .vc, .vdc, .ts, .td, .p, .pwm,
    .sector, .alpha(al), .beta(be), .t1, .t2, .t0, .update);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (update) n_update++;
    if ((p[1] && p[4]) || (p[3] && p[6]) || (p[5] && p[2])) begin
      failures++; $display("FAIL shoot-through %b", p);
    end
  end

  task automatic step(input real m, input real th);
    real v [3], vmax, vmin, d;
    int on [3];
    v[0] = m * $cos(th); v[1] = m * $cos(th - 2.0 * PI / 3.0); v[2] = m * $cos(th + 2.0 * PI / 3.0);
    @(negedge clk);
    va = qr(v[0]); vb = qr(v[1]); vc = qr(v[2]);
    repeat (3 * TS) @(posedge clk);
    seen[sector]++;
    on = '{0, 0, 0};
    repeat (TS) begin
      @(posedge clk);
      for (int k = 0; k < 3; k++) if (pwm[k]) on[k]++;
    end
    vmax = v[0]; vmin = v[0];
    for (int k = 1; k < 3; k++) begin
      if (v[k] > vmax) vmax = v[k];
      if (v[k] < vmin) vmin = v[k];
    end
    for (int k = 0; k < 3; k++) begin
      d = 0.5 + (v[k] - (vmax + vmin) / 2.0);
      checks++;
      if (fabs(real'(on[k]) - d * TS) > 0.03 * TS) begin
        failures++; $display("FAIL th=%f phase %0d on=%0d exp=%f", th, k, on[k], d * TS);
      end
    end
  endtask

  initial begin
    va = 0; vb = 0; vc = 0; vdc = Q_ONE; ts = 16'(TS); td = 8'd3;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 36; i++) step(0.5, 2.0 * PI * (real'(i) + 0.5) / 36.0);
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL sector %0d never seen", k); end
    end
    checks++;
    if (n_update < 36 * 4 - 10) begin failures++; $display("FAIL only %0d updates", n_update); end
    // over-modulation: |V| = 0.8 Vdc at 30 degrees
    @(negedge clk);
    va = qr(0.8 * $cos(PI / 6.0)); vb = qr(0.8 * $cos(PI / 6.0 - 2.0 * PI / 3.0));
    vc = qr(0.8 * $cos(PI / 6.0 + 2.0 * PI / 3.0));
    repeat (3 * TS) @(posedge clk);
    checks++;
    if (t0 != 0 || 32'(t1) + 32'(t2) != TS) begin
      failures++; $display("FAIL over-modulation t1=%0d t2=%0d t0=%0d", t1, t2, t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
