// tb_coord_converter_32: random and balanced phase voltages; alpha and beta
// must equal the Clarke transformation computed in real arithmetic within
// one LSB, one clock after in_valid.
module tb_coord_converter_32;
  import qalu_pkg::*;
  localparam real PI = 3.14159265358979;
  int checks = 0, failures = 0;

  function automatic real fabs(input real v);
    return v < 0.0 ? -v : v;
  endfunction
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  q_t va, vb, vc, al, be;

  coord_converter_32 dut (.clk, .rst_n, .in_valid, .va, .vb, .vc, .out_valid, .alpha(al), .beta(be));
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real clampq(input real v);
    return v > 255.0 ? 255.0 : v < -256.0 ? -256.0 : v;
  endfunction

  task automatic one(input int a, input int b, input int c);
    real ea, eb;
    @(negedge clk);
    va = q_t'(a); vb = q_t'(b); vc = q_t'(c); in_valid = 1;
    @(negedge clk);
    in_valid = 0;
    ea = clampq((2.0 * a - b - c) / 3.0);
    eb = clampq((b - c) / $sqrt(3.0));
    checks += 3;
    if (!out_valid) begin failures++; $display("FAIL out_valid"); end
    if (fabs(real'(al) - ea) > 1.0) begin failures++; $display("FAIL alpha %0d exp %f", al, ea); end
    if (fabs(real'(be) - eb) > 1.0) begin failures++; $display("FAIL beta %0d exp %f", be, eb); end
  endtask

  initial begin
    real m, th;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      m = 0.2 + 0.8 * real'($urandom_range(0, 1000)) / 1000.0;
      th = 2.0 * PI * real'($urandom_range(0, 3599)) / 3600.0;
      one(int'($rtoi($floor(128.0 * m * $cos(th) + 0.5))),
          int'($rtoi($floor(128.0 * m * $cos(th - 2.0 * PI / 3.0) + 0.5))),
          int'($rtoi($floor(128.0 * m * $cos(th + 2.0 * PI / 3.0) + 0.5))));
    end
    for (int i = 0; i < 300; i++)
      one(int'($urandom_range(0, 511)) - 256, int'($urandom_range(0, 511)) - 256,
          int'($urandom_range(0, 511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
