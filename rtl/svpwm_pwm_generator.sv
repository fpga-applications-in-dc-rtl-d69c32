// svpwm_pwm_generator: centre-aligned seven-segment space-vector PWM.
//
// A period counter runs 0 .. Ts-1. Within each period every phase is on for
//   on_x = T0/2 + T1 * x(V_s) + T2 * x(V_s+1)
// clock cycles, centred on the middle of the period: phase x is on while
// thr_x <= count < Ts - thr_x, with thr_x = floor((Ts - on_x) / 2). Here
// x(V) is the phase's bit in the switching state of active vector V
// (V1..V6 = 100, 110, 010, 011, 001, 101 for phases a, b, c) and V_s,
// V_s+1 are the two vectors bordering sector s. This gives the symmetric
// sequence 000 - V - V' - 111 - V' - V - 000 with one switching per phase
// per half period.
//
// `load` with sector, t1, t2, t0 and ts writes a shadow set; the shadow set
// is taken over when a period ends, so a period always runs with one
// consistent set. `period_start` pulses on the first count of each period
// (every clock while Ts is 0, as after reset, when all phases are off).
//
// The source design says only that the PWM waveforms are converted into
// centralised PWM with minimal switching; the counter, the compare scheme
// and the shadow update are this design's choices.
module svpwm_pwm_generator #(
  parameter int unsigned TW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [2:0]    sector,
  input  logic [TW-1:0] t1,
  input  logic [TW-1:0] t2,
  input  logic [TW-1:0] t0,
  input  logic [TW-1:0] ts,
  output logic [2:0]    pwm,          // {c, b, a}
  output logic          period_start
);

  // switching state {c,b,a} of active vector k (1..6)
  function automatic logic [2:0] vec(input logic [2:0] k);
    case (k)
      3'd1: return 3'b001;   // a
      3'd2: return 3'b011;   // a b
      3'd3: return 3'b010;   // b
      3'd4: return 3'b110;   // b c
      3'd5: return 3'b100;   // c
      3'd6: return 3'b101;   // a c
      default: return 3'b000;
    endcase
  endfunction

  logic          pend;
  logic [2:0]    sh_sector;
  logic [TW-1:0] sh_t1, sh_t2, sh_t0, sh_ts;
  logic [TW-1:0] act_ts, cnt;
  logic [TW-1:0] thr [3];
  logic          wrap;

  assign wrap = (32'(cnt) + 1 >= 32'(act_ts));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend <= 1'b0; sh_sector <= 3'd1;
      sh_t1 <= '0; sh_t2 <= '0; sh_t0 <= '0; sh_ts <= '0;
      act_ts <= '0; cnt <= '0; period_start <= 1'b1;
      for (int k = 0; k < 3; k++) thr[k] <= '0;
    end else begin
      if (load) begin
        pend <= 1'b1;
        sh_sector <= sector; sh_t1 <= t1; sh_t2 <= t2; sh_t0 <= t0; sh_ts <= ts;
      end
      period_start <= wrap;
      if (wrap) begin
        cnt <= '0;
        if (pend && !load) begin
          logic [2:0] v1, v2;
          logic [TW:0] on_x;
          pend   <= 1'b0;
          act_ts <= sh_ts;
          v1 = vec(sh_sector);
          v2 = vec((sh_sector == 3'd6) ? 3'd1 : sh_sector + 3'd1);
          for (int k = 0; k < 3; k++) begin
            on_x = (TW+1)'(sh_t0 >> 1)
                 + (v1[k] ? (TW+1)'(sh_t1) : '0)
                 + (v2[k] ? (TW+1)'(sh_t2) : '0);
            thr[k] <= (on_x >= (TW+1)'(sh_ts)) ? '0 : TW'(((TW+1)'(sh_ts) - on_x) >> 1);
          end
        end
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) pwm <= '0;
    else for (int k = 0; k < 3; k++)
      pwm[k] <= (32'(cnt) >= 32'(thr[k])) && (32'(cnt) < 32'(act_ts) - 32'(thr[k]));
  end

endmodule
