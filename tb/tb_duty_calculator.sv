// tb_duty_calculator: random reference vectors, dc-bus voltages and
// switching periods. The sector-border sines and cosines are given as
// rounded real values. T1 and T2 must match sqrt(3) Ts |V|/Vdc sin(60-th)
// and sqrt(3) Ts |V|/Vdc sin(th) (th: angle within the sector) computed in
// real arithmetic, within the 1Q8 rounding of the inputs; T0 must be
// Ts - T1 - T2, and done must come 44 clocks after start. Over-modulated
// vectors must be clipped so that T1 + T2 <= Ts.
module tb_duty_calculator;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  int n_clip = 0;
  logic clk = 0, rst_n = 0, start = 0, done;
  q_t al, be, s1, c1, s2, c2, vdc;
  logic [15:0] ts, t1, t2, t0;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  function automatic q_t qr(input real v);
    return q_t'($rtoi($floor(128.0 * v + 0.5)));
  endfunction

  duty_calculator dut (.clk, .rst_n, .start, .alpha(al), .beta(be),
    .sin1(s1), .cos1(c1), .sin2(s2), .cos2(c2), .ts, .vdc, .done, .t1, .t2, .t0);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input real m, input real th, input real vd, input int tsv);
    int sec, n;
    real deg, thr, mag, k, e1, e2, tol;
    @(negedge clk);
    al = qr(m * $cos(th)); be = qr(m * $sin(th)); vdc = qr(vd); ts = 16'(tsv);
    deg = $atan2(real'(be), real'(al)) * 180.0 / PI;
    if (deg < 0) deg += 360.0;
    sec = int'($floor(deg / 60.0)) % 6 + 1;
    thr = (deg - 60.0 * (sec - 1)) * PI / 180.0;
    s1 = qr($sin((sec - 1) * PI / 3.0)); c1 = qr($cos((sec - 1) * PI / 3.0));
    s2 = qr($sin(sec * PI / 3.0));       c2 = qr($cos(sec * PI / 3.0));
    start = 1;
    @(negedge clk); start = 0; n = 1;
    while (!done) begin @(negedge clk); n++; end
    mag = $sqrt(real'(al) * real'(al) + real'(be) * real'(be));
    k = $sqrt(3.0) * real'(tsv) / real'(vdc);
    e1 = k * mag * $sin(PI / 3.0 - thr);
    e2 = k * mag * $sin(thr);
    tol = k * 1.6 + 2.0;
    checks += 3;
    if (n != 44) begin failures++; $display("FAIL latency %0d", n); end
    if (t0 != ts - t1 - t2 || 32'(t1) + 32'(t2) > 32'(ts)) begin
      failures++; $display("FAIL t0=%0d t1=%0d t2=%0d ts=%0d", t0, t1, t2, ts);
    end
    if (e1 + e2 <= real'(tsv) - 2.0 * tol) begin
      checks += 2;
      if (fabs(real'(t1) - e1) > tol) begin failures++; $display("FAIL t1=%0d exp=%f tol=%f", t1, e1, tol); end
      if (fabs(real'(t2) - e2) > tol) begin failures++; $display("FAIL t2=%0d exp=%f tol=%f", t2, e2, tol); end
    end else if (e1 + e2 > real'(tsv) + 2.0 * tol) begin
      n_clip++;
      checks++;
      if (t0 != 0) begin failures++; $display("FAIL over-modulation t0=%0d", t0); end
    end
  endtask

  initial begin
    al = 0; be = 0; s1 = 0; c1 = 0; s2 = 0; c2 = 0; vdc = 0; ts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 600; i++)
      one(0.1 + 0.45 * real'($urandom_range(0, 1000)) / 1000.0,
          2.0 * PI * real'($urandom_range(0, 3599)) / 3600.0,
          1.0 + 0.9 * real'($urandom_range(0, 1000)) / 1000.0,
          $urandom_range(200, 20000));
    for (int i = 0; i < 50; i++)   // over-modulation
      one(1.3, 2.0 * PI * real'($urandom_range(0, 3599)) / 3600.0, 1.0, 1000);
    checks++;
    if (n_clip == 0) begin failures++; $display("FAIL no over-modulated case"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
