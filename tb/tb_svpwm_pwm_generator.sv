// tb_svpwm_pwm_generator: loads dwell times for every sector and measures
// each phase over a whole period: its on-time must be T0/2 plus the times
// of the active vectors in which the phase is switched on (within 1 clock),
// the pulse must be centred in the period, and per period each phase must
// switch on and off once. Also checks the period length and that a new set
// waits for the end of the running period.
module tb_svpwm_pwm_generator;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, period_start;
  logic [2:0] sector, pwm;
  logic [15:0] t1, t2, t0, ts;

  svpwm_pwm_generator dut (.clk, .rst_n, .load, .sector, .t1, .t2, .t0, .ts, .pwm, .period_start);
  always #5 clk = ~clk;

  int cyc = 0, last_start = -1, period_len = 0;
  always @(posedge clk) begin
    cyc++;
    if (period_start) begin
      period_len = cyc - last_start;
      last_start = cyc;
    end
  end

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // switching states of the six active vectors, as strings "abc"
  string vstate [7] = '{"000", "100", "110", "010", "011", "001", "101"};

  task automatic one(input int sec, input int a, input int b, input int tsv);
    int on_cnt [3], first [3], last [3], edges [3];
    int exp_on, plen, nxt;
    logic [2:0] prev;
    @(negedge clk);
    sector = 3'(sec); t1 = 16'(a); t2 = 16'(b); t0 = 16'(tsv - a - b); ts = 16'(tsv);
    load = 1;
    @(negedge clk); load = 0;
    // skip the running period and the first one with the new values
    // (the register stage makes pwm lag the counter by one clock)
    @(posedge clk iff period_start);
    @(posedge clk iff period_start);
    @(posedge clk);
    for (int k = 0; k < 3; k++) begin on_cnt[k] = 0; first[k] = -1; last[k] = -1; edges[k] = 0; end
    prev = pwm; plen = 0;
    do begin
      for (int k = 0; k < 3; k++) if (pwm[k]) begin
        on_cnt[k]++; if (first[k] < 0) first[k] = plen; last[k] = plen;
      end
      for (int k = 0; k < 3; k++) if (pwm[k] != prev[k]) edges[k]++;
      prev = pwm;
      plen++;
      @(posedge clk);
    end while (!period_start);
    @(negedge clk);
    checks++;
    if (period_len != tsv) begin failures++; $display("FAIL period %0d exp %0d", period_len, tsv); end
    nxt = sec == 6 ? 1 : sec + 1;
    for (int k = 0; k < 3; k++) begin
      exp_on = (tsv - a - b) / 2 + (vstate[sec][k] == "1" ? a : 0) + (vstate[nxt][k] == "1" ? b : 0);
      checks += 2;
      if (on_cnt[k] - exp_on > 1 || exp_on - on_cnt[k] > 1) begin
        failures++; $display("FAIL sec=%0d phase=%0d on=%0d exp=%0d", sec, k, on_cnt[k], exp_on);
      end
      if (on_cnt[k] > 0 && (first[k] + last[k] + 1 - tsv > 1 || tsv - first[k] - last[k] - 1 > 1)) begin
        failures++; $display("FAIL sec=%0d phase=%0d not centred %0d..%0d", sec, k, first[k], last[k]);
      end
    end
  endtask

  initial begin
    sector = 1; t1 = 0; t2 = 0; t0 = 0; ts = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int s = 1; s <= 6; s++) one(s, 300, 150, 1000);
    for (int i = 0; i < 60; i++) begin
      int tsv, a, b;
      tsv = 2 * $urandom_range(50, 2000);
      a = $urandom_range(0, tsv / 2);
      b = $urandom_range(0, tsv - a);
      one($urandom_range(1, 6), a, b, tsv);
    end
    one(3, 0, 0, 500);      // zero vectors only
    one(4, 500, 0, 500);    // one active vector for the whole period
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
