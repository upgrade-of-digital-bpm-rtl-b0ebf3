// seq_divider: sequential unsigned fixed-point divider.
//
// Computes quot = floor(num * 2^FRAC / den) with the restoring (shift and
// subtract) method, one quotient bit per cycle, NUM_W + FRAC cycles in all.
// A zero denominator gives an all-ones quotient and raises `div0`.
// It serves both position algorithms: (V_A - V_C)/(V_A + V_C) for the
// stripline BPM and v_x/v_r for the cavity BPM; the division itself is from
// the design, the method and formats are this implementation's choice.
//
// Interface: pulse `start` with num/den; `done` pulses once when quot is
// valid. Latency NUM_W + FRAC + 1 cycles from start to done.
module seq_divider #(
  parameter int unsigned NUM_W = 22,
  parameter int unsigned DEN_W = 22,
  parameter int unsigned FRAC  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [NUM_W-1:0]       num,
  input  logic [DEN_W-1:0]       den,
  output logic                   busy,
  output logic                   done,
  output logic                   div0,
  output logic [NUM_W+FRAC-1:0]  quot
);

  localparam int unsigned QW = NUM_W + FRAC;
  localparam int unsigned CW = $clog2(QW + 1);

  logic [QW-1:0]    dividend;
  logic [DEN_W-1:0] d;
  logic [DEN_W-1:0] rem;
  logic [DEN_W:0]   rem_sh;
  logic [CW-1:0]    cnt;

  assign rem_sh = {rem, dividend[QW-1]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      div0     <= 1'b0;
      quot     <= '0;
      dividend <= '0;
      d        <= '0;
      rem      <= '0;
      cnt      <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        dividend <= {num, FRAC'(0)};
        d        <= den;
        rem      <= '0;
        quot     <= '0;
        div0     <= (den == '0);
        if (den == '0) begin
          quot <= '1;
          done <= 1'b1;
        end else begin
          busy <= 1'b1;
          cnt  <= CW'(QW);
        end
      end else if (busy) begin
        dividend <= dividend << 1;
        if (rem_sh >= {1'b0, d}) begin
          rem  <= DEN_W'(rem_sh - {1'b0, d});   // remainder < d
          quot <= {quot[QW-2:0], 1'b1};
        end else begin
          rem  <= DEN_W'(rem_sh);
          quot <= {quot[QW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == CW'(1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
