// period_trigger: internal periodic trigger for tests without beam.
//
// A free-running counter produces a one-cycle pulse every `period` clock
// cycles while enabled (period values below 2 are treated as 2). The counter
// restarts when the trigger is disabled, so the first pulse comes `period`
// cycles after enabling. The existence of a period trigger for tests follows
// the design description; the counter width and behaviour are this
// implementation's choice.
module period_trigger #(
  parameter int unsigned CNT_W = 32
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [CNT_W-1:0] period,
  output logic             trig
);

  logic [CNT_W-1:0] cnt;
  logic [CNT_W-1:0] last;

  assign last = (period < CNT_W'(2)) ? CNT_W'(1) : period - 1'b1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      trig <= 1'b0;
    end else if (!enable) begin
      cnt  <= '0;
      trig <= 1'b0;
    end else if (cnt >= last) begin
      cnt  <= '0;
      trig <= 1'b1;
    end else begin
      cnt  <= cnt + 1'b1;
      trig <= 1'b0;
    end
  end

endmodule
