// tb_frequency_selector: with a 100 kHz clock, checks that the phase angle
// advances at fo_hz turns per second (within 2 binary-angle units over
// several periods) for several frequencies, and holds for fo = 0.
module tb_frequency_selector;
  import qalu_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [7:0] fo;
  angle_t theta;

  frequency_selector #(.CLK_HZ(100_000)) dut (.clk, .rst_n, .fo_hz(fo), .theta);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int f, input int cycles);
    angle_t start;
    real expd, diff;
    fo = 8'(f);
    @(posedge clk); #1;
    start = theta;
    for (int c = 1; c <= cycles; c++) begin
      @(posedge clk); #1;
      if (c % 97 == 0 || c == cycles) begin
        expd = real'(f) * real'(c) / 100000.0 * 65536.0;
        diff = real'(16'(theta - start)) - (expd - 65536.0 * $floor(expd / 65536.0));
        if (diff > 32768.0) diff -= 65536.0;
        if (diff < -32768.0) diff += 65536.0;
        checks++;
        if (diff > 2.0 || diff < -2.0) begin
          failures++;
          $display("FAIL fo=%0d c=%0d theta=%0d start=%0d diff=%f", f, c, theta, start, diff);
        end
      end
    end
  endtask

  initial begin
    fo = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(50, 8000);     // four periods of 50 Hz
    run(0, 1000);
    run(60, 5000);
    run(255, 3000);
    run(1, 20000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
