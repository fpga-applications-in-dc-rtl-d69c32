// tb_dead_time_inserter: for several dead times, checks when each gate of
// each leg switches after a PWM edge (old gate off after 1 clock, new gate
// on after td + 2 clocks), that a pulse shorter than the dead time turns
// both gates of its leg off, and, on random PWM, that no leg ever has both
// gates on.
module tb_dead_time_inserter;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [2:0] pwm = 0;
  logic [7:0] td;
  logic [6:1] p;

  dead_time_inserter dut (.clk, .rst_n, .pwm, .td, .p);
  always #5 clk = ~clk;

  function automatic logic top_of(input int k);
    return k == 0 ? p[1] : k == 1 ? p[3] : p[5];
  endfunction
  function automatic logic bot_of(input int k);
    return k == 0 ? p[4] : k == 1 ? p[6] : p[2];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // toggle phase k, then count clocks until the old gate is off and the new on
  task automatic edge_test(input int k, input int d);
    logic lvl; int n_off, n_on;
    td = 8'(d);
    @(posedge clk); #1;
    lvl = !pwm[k];
    pwm[k] = lvl;
    n_off = -1; n_on = -1;
    for (int c = 1; c < d + 10; c++) begin
      @(posedge clk); #1;
      if (n_off < 0 && (lvl ? !bot_of(k) : !top_of(k))) n_off = c;
      if (n_on < 0 && (lvl ? top_of(k) : bot_of(k))) n_on = c;
    end
    checks += 2;
    if (n_off != 1) begin failures++; $display("FAIL k=%0d td=%0d off after %0d", k, d, n_off); end
    if (n_on != d + 2) begin failures++; $display("FAIL k=%0d td=%0d on after %0d", k, d, n_on); end
  endtask

  always @(posedge clk) if (rst_n) begin
    checks++;
    if ((p[1] && p[4]) || (p[3] && p[6]) || (p[5] && p[2])) begin
      failures++; $display("FAIL shoot-through p=%b", p);
    end
  end

  initial begin
    td = 4;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    foreach (pwm[k]) for (int d = 0; d < 12; d += 3) begin
      edge_test(k, d); edge_test(k, d);
    end
    // short pulse on phase b with td = 8: both gates stay off
    td = 8;
    pwm = 3'b000;
    repeat (20) @(posedge clk); #1;
    pwm[1] = 1; repeat (4) @(posedge clk); #1; pwm[1] = 0;
    for (int c = 0; c < 9; c++) begin
      @(posedge clk); #1;
      checks++;
      if (p[3] || p[6]) begin
        failures++; $display("FAIL short pulse c=%0d p3=%b p6=%b", c, p[3], p[6]);
      end
    end
    repeat (12) @(posedge clk); #1;
    checks++;
    if (!p[6]) begin failures++; $display("FAIL bottom gate did not return"); end
    // random PWM
    for (int i = 0; i < 5000; i++) begin
      @(posedge clk); #1;
      if ($urandom_range(0, 3) == 0) pwm = 3'($urandom);
      if (i % 1000 == 0) td = 8'($urandom_range(0, 6));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
