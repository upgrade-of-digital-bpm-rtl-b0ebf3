// capture_gate: the ON/OFF switch between the two FIFO stages.
//
// The gate is normally OFF. A trigger pulse turns it ON provided that the
// first stage is primed and the second stage is free; it then passes exactly
// WIN_LEN valid samples of the delayed stream into the second stage, with
// write addresses 0..WIN_LEN-1, and turns OFF again with a one-cycle `done`
// pulse. Because the first stage delays the stream by PRE samples, the
// window holds PRE samples from before the trigger and WIN_LEN-PRE from after
// it. Triggers that arrive while the gate is ON or the second stage is busy
// are ignored and counted in `dropped`.
// The ON/OFF gate and window length follow the design description; the
// acceptance and drop rules are this implementation's choice.
module capture_gate
  import bpm_pkg::*;
#(
  parameter int unsigned WIN = WIN_LEN,
  parameter int unsigned W   = NUM_CH * ADC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   trig,
  input  logic                   primed,
  input  logic                   buf_free,
  input  logic                   in_valid,
  input  logic [W-1:0]           in_data,
  output logic                   wr_en,
  output logic [$clog2(WIN)-1:0] wr_addr,
  output logic [W-1:0]           wr_data,
  output logic                   on,
  output logic                   done,
  output logic [15:0]            accepted,
  output logic [15:0]            dropped
);

  localparam int unsigned AW = $clog2(WIN);

  logic [AW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      on       <= 1'b0;
      cnt      <= '0;
      done     <= 1'b0;
      wr_en    <= 1'b0;
      wr_addr  <= '0;
      wr_data  <= '0;
      accepted <= '0;
      dropped  <= '0;
    end else begin
      done  <= 1'b0;
      wr_en <= 1'b0;
      if (trig) begin
        if (!on && primed && buf_free) begin
          on       <= 1'b1;
          cnt      <= '0;
          accepted <= accepted + 1'b1;
        end else begin
          dropped  <= dropped + 1'b1;
        end
      end
      if (on && in_valid) begin
        wr_en   <= 1'b1;
        wr_addr <= cnt;
        wr_data <= in_data;
        cnt     <= cnt + 1'b1;
        if (cnt == AW'(WIN - 1)) begin
          on   <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

endmodule
