// tb_sincos_generator: compares sine and cosine against real arithmetic
// (within 1 LSB of 1Q8) for the sector-border angles and random angles, and
// checks the latency from start to done (ITER + 2 clocks).
module tb_sincos_generator;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start = 0, busy, done;
  angle_t angle;
  q_t s, c;

  sincos_generator dut (.clk, .rst_n, .start, .angle, .busy, .done, .sin_q(s), .cos_q(c));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input angle_t a);
    int n; real es, ec;
    @(negedge clk);
    angle = a; start = 1;
    @(negedge clk);
    start = 0; n = 1;
    while (!done) begin @(negedge clk); n++; end
    es = 128.0 * $sin(2.0 * PI * real'(a) / 65536.0);
    ec = 128.0 * $cos(2.0 * PI * real'(a) / 65536.0);
    checks += 3;
    if (n != 16) begin failures++; $display("FAIL latency %0d", n); end
    if (real'(s) - es > 1.0 || es - real'(s) > 1.0) begin
      failures++; $display("FAIL sin angle=%0d got=%0d exp=%f", a, s, es);
    end
    if (real'(c) - ec > 1.0 || ec - real'(c) > 1.0) begin
      failures++; $display("FAIL cos angle=%0d got=%0d exp=%f", a, c, ec);
    end
  endtask

  initial begin
    angle = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k <= 6; k++) one(angle_t'(k * 10923));
    one(16'd16384); one(16'd32768); one(16'd49152); one(16'd16385); one(16'd49151);
    for (int i = 0; i < 500; i++) one(angle_t'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
