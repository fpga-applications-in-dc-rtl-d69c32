// frequency_selector: programmable fundamental-frequency phase generator.
//
// Turns the requested fundamental frequency `fo_hz` (whole hertz) into a
// running binary angle `theta` (16 bits per turn). A phase accumulator of
// ACC_W bits adds fo_hz * K every clock, with K = round(2^ACC_W / CLK_HZ), so
// the top 16 bits of the accumulator turn once every 1/fo seconds. With the
// defaults (50 MHz clock, 40-bit accumulator) K = 21990 and the frequency
// error is below 2e-5. A new fo_hz is used from the next clock on, with no
// phase jump.
//
// The source design names a frequency selector that programs the SPWM
// fundamental (50 Hz in its results); the numerically controlled
// oscillator inside, the 8-bit hertz input and the clock frequency are this
// design's choices.
module frequency_selector
  import qalu_pkg::*;
#(
  parameter longint unsigned CLK_HZ = 50_000_000,
  parameter int unsigned     ACC_W  = 40,
  parameter int unsigned     FO_W   = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [FO_W-1:0] fo_hz,
  output angle_t          theta
);

  localparam longint unsigned K = ((64'd1 << ACC_W) + CLK_HZ / 2) / CLK_HZ;

  logic [ACC_W-1:0] acc;
  logic [ACC_W-1:0] inc;

  assign inc   = ACC_W'(fo_hz) * ACC_W'(K);
  assign theta = acc[ACC_W-1 -: AW];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) acc <= '0;
    else        acc <= acc + inc;
  end

endmodule
