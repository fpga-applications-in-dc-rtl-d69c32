// seq_divider: sequential unsigned restoring divider.
//
// On `start` it latches `num` and `den` and produces one quotient bit per
// clock, most significant first. NW + 1 clocks after start `done` pulses
// with quo = floor(num / den) and rem = num mod den, both held until the
// next start. Division by zero returns an all-ones quotient. Helper of the
// duty calculator; the algorithm is this design's choice.
module seq_divider #(
  parameter int unsigned NW = 32,
  parameter int unsigned DW = 16
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quo,
  output logic [DW-1:0] rem
);

  logic [DW:0]           r;        // partial remainder, one guard bit
  logic [NW-1:0]         q;
  logic [DW-1:0]         d;
  logic [$clog2(NW+1)-1:0] n;
  logic [DW:0]           trial;

  assign trial = {r[DW-1:0], q[NW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r <= '0; q <= '0; d <= '0; n <= '0; busy <= 1'b0; done <= 1'b0;
      quo <= '0; rem <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          r    <= '0;
          q    <= num;
          d    <= den;
          n    <= '0;
          busy <= 1'b1;
        end
      end else if (n == NW[$bits(n)-1:0]) begin
        busy <= 1'b0;
        done <= 1'b1;
        quo  <= (d == '0) ? '1 : q;
        rem  <= r[DW-1:0];
      end else begin
        // shift the next dividend bit in, subtract when it fits
        if (trial >= {1'b0, d}) begin
          r <= trial - {1'b0, d};
          q <= {q[NW-2:0], 1'b1};
        end else begin
          r <= trial;
          q <= {q[NW-2:0], 1'b0};
        end
        n <= n + 1'b1;
      end
    end
  end

endmodule
