// tb_sector_detector: vectors at random angles and lengths; the sector must
// be floor(angle / 60 deg) + 1 of the quantised (alpha, beta), either
// neighbour being accepted within 0.6 deg of a border.
module tb_sector_detector;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  q_t al, be;
  logic [2:0] sector;
  int hits [7];

  sector_detector dut (.clk, .rst_n, .alpha(al), .beta(be), .sector);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m, th, deg, pos;
    int s, s2;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      m = 0.05 + 1.3 * real'($urandom_range(0, 1000)) / 1000.0;
      th = 2.0 * PI * real'($urandom_range(0, 35999)) / 36000.0;
      @(negedge clk);
      al = q_t'($rtoi($floor(128.0 * m * $cos(th) + 0.5)));
      be = q_t'($rtoi($floor(128.0 * m * $sin(th) + 0.5)));
      @(negedge clk);
      deg = $atan2(real'(be), real'(al)) * 180.0 / PI;
      if (deg < 0) deg += 360.0;
      s = int'($floor(deg / 60.0)) % 6 + 1;
      pos = deg - 60.0 * $floor(deg / 60.0);
      s2 = (pos < 0.6) ? (s == 1 ? 6 : s - 1) : (pos > 59.4) ? (s == 6 ? 1 : s + 1) : s;
      checks++;
      if (int'(sector) != s && int'(sector) != s2) begin
        failures++;
        $display("FAIL alpha=%0d beta=%0d deg=%f sector=%0d exp=%0d", al, be, deg, sector, s);
      end
      hits[sector]++;
    end
    for (int k = 1; k <= 6; k++) begin
      checks++;
      if (hits[k] == 0) begin failures++; $display("FAIL sector %0d never seen", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
