// tb_clock_divider: measures the spacing of `tick` pulses for several
// division ratios, including the change of ratio while running.
module tb_clock_divider;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [15:0] div;
  logic tick;

  clock_divider dut (.clk, .rst_n, .div, .tick);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(input int d);
    int last, n;
    div = 16'(d);
    // let the old ratio run out
    repeat (2) @(posedge clk iff tick);
    last = -1; n = 0;
    for (int c = 0; c < 20 * (d < 1 ? 1 : d) && n < 10; c++) begin
      @(posedge clk);
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != (d < 1 ? 1 : d)) begin
            failures++;
            $display("FAIL div=%0d spacing=%0d", d, c - last);
          end
          n++;
        end
        last = c;
      end
    end
    checks++;
    if (n < 5) begin failures++; $display("FAIL div=%0d too few ticks", d); end
  endtask

  initial begin
    div = 5;
    repeat (3) @(posedge clk);
    rst_n = 1;
    measure(5);
    measure(1);
    measure(0);
    measure(3);
    measure(17);
    measure(2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
