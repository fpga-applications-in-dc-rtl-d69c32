// dead_time_inserter: complementary gate signals with adjustable dead time.
//
// For each of the three phase legs it turns one PWM signal into a top and a
// bottom gate signal. When a phase's PWM changes, both switches of that leg
// are off one clock later, and the switch for the new level turns on after
// td + 1 clocks with both off (a gap of at least one clock, even for
// td = 0). A pulse shorter than that leaves both switches of the leg off.
// Both switches of a leg are never on together. Gate outputs are registered:
// a gate follows its PWM edge after td + 2 clocks.
//
// Outputs follow the inverter switch numbering of the source design:
// P1/P4 are the top/bottom switches of phase a, P3/P6 of phase b and P5/P2
// of phase c (p[1] .. p[6]). The source design gives the block's function
// (dead time inserted by an adjustable delay, input Td); the counter
// implementation and the td unit (clock cycles) are this design's choices.
module dead_time_inserter #(
  parameter int unsigned TD_W = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [2:0]      pwm,      // {c, b, a}
  input  logic [TD_W-1:0] td,
  output logic [6:1]      p
);

  logic [2:0]      state;
  logic [TD_W-1:0] cnt [3];
  logic [2:0]      top, bot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      for (int k = 0; k < 3; k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < 3; k++) begin
        if (pwm[k] != state[k]) begin
          state[k] <= pwm[k];
          cnt[k]   <= '0;
        end else if (cnt[k] != '1) begin
          cnt[k] <= cnt[k] + 1'b1;
        end
      end
    end
  end

  always_comb begin
    for (int k = 0; k < 3; k++) begin
      top[k] =  state[k] && (cnt[k] >= td) && (pwm[k] == state[k]);
      bot[k] = !state[k] && (cnt[k] >= td) && (pwm[k] == state[k]);
    end
  end

  // register the gates; P1..P6 numbering of the inverter legs
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) p <= '0;
    else begin
      p[1] <= top[0]; p[4] <= bot[0];
      p[3] <= top[1]; p[6] <= bot[1];
      p[5] <= top[2]; p[2] <= bot[2];
    end
  end

  // a leg's two switches never conduct together
  a_no_shoot_through: assert property (@(posedge clk) disable iff (!rst_n)
    !(p[1] && p[4]) && !(p[3] && p[6]) && !(p[5] && p[2]))
    else $error("dead_time_inserter: shoot-through on a leg");

endmodule
