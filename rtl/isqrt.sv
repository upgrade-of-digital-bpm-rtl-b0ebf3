// isqrt: sequential integer square root, root = floor(sqrt(radicand)).
//
// Digit-by-digit (restoring) method: each cycle brings down two radicand
// bits, tries to subtract (root<<2 | 1) from the partial remainder and shifts
// one root bit in. An IN_W-bit radicand takes IN_W/2 cycles. The square root
// itself comes from the channel-amplitude formula of the design; the
// algorithm is this implementation's choice.
//
// Interface: pulse `start` with `radicand`; `done` pulses once when `root`
// is valid (it stays valid until the next start). `busy` is high meanwhile.
// Latency: IN_W/2 + 1 cycles from start to done.
module isqrt #(
  parameter int unsigned IN_W = 42
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [IN_W-1:0]     radicand,
  output logic                busy,
  output logic                done,
  output logic [IN_W/2-1:0]   root
);

  localparam int unsigned OW = IN_W / 2;
  localparam int unsigned CW = $clog2(OW + 1);

  logic [IN_W-1:0] x;
  logic [OW-1:0]   rem;
  logic [CW-1:0]   cnt;
  logic [OW+1:0]   rem_sh, trial;

  assign rem_sh = {rem[OW-1:0], x[IN_W-1 -: 2]};
  assign trial  = {root, 2'b01};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      root <= '0;
      rem  <= '0;
      x    <= '0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        x    <= radicand;
        rem  <= '0;
        root <= '0;
        cnt  <= CW'(OW);
      end else if (busy) begin
        x <= x << 2;
        if (rem_sh >= trial) begin
          rem  <= OW'(rem_sh - trial);   // fits: remainder <= 2*root
          root <= {root[OW-2:0], 1'b1};
        end else begin
          rem  <= OW'(rem_sh);
          root <= {root[OW-2:0], 1'b0};
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
