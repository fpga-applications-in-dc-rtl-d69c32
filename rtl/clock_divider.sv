// clock_divider: programmable clock-enable divider.
//
// Produces a one-cycle pulse `tick` every `div` cycles of `clk` (every cycle
// when div is 0 or 1). The SPWM PWM controller advances its triangular
// carrier by one step per tick, so `div` sets the switching frequency:
// f_sw = f_clk / (512 * div) with the 512-step carrier of spwm_pwm_controller.
// The source design only names a clock divider between the input clock and
// the PWM controller; producing a clock enable instead of a derived clock,
// and the programmable ratio, are this design's choices (the source states
// the switching frequency is programmable). A new `div` takes effect when
// the running count next wraps.
module clock_divider #(
  parameter int unsigned DIV_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DIV_W-1:0] div,
  output logic             tick
);

  logic [DIV_W-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else if (cnt + 1'b1 >= div) begin
      cnt  <= '0;
      tick <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      tick <= 1'b0;
    end
  end

endmodule
