// cordic_model: behavioural model of the CORDIC core that supplies sines to
// the SPWM modulator (testbench only, not synthesizable).
//
// On `start` it takes a binary angle (16 bits per turn) and LAT clocks
// later pulses `done` with round(128 * sin(angle)) as a 1Q8 word, computed
// with real arithmetic. `requests` counts the starts seen.
module cordic_model
  import qalu_pkg::*;
#(
  parameter int LAT = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  angle_t angle,
  output logic   done,
  output q_t     sin_q,
  output int     requests
);
  localparam real PI = 3.14159265358979;
  int   count;
  real  s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done <= 1'b0; sin_q <= '0; count <= 0; requests <= 0;
    end else begin
      done <= 1'b0;
      if (start) begin
        count    <= LAT;
        requests <= requests + 1;
        s = $sin(2.0 * PI * real'(angle) / 65536.0) * 128.0;
        sin_q <= q_t'($rtoi(s >= 0 ? s + 0.5 : s - 0.5));
      end else if (count > 1) count <= count - 1;
      else if (count == 1) begin
        count <= 0;
        done  <= 1'b1;
      end
    end
  end
endmodule
