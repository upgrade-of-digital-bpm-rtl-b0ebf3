// self_trigger: fires when the beam signal itself appears on the inputs.
//
// Each cycle the absolute value of every ADC channel is compared with a
// programmable threshold. A one-cycle trigger pulse is produced on the first
// sample where any channel exceeds the threshold; the detector then re-arms
// only after HOLDOFF consecutive samples in which all channels stayed at or
// below the threshold, so one bunch signal yields one trigger.
// The amplitude/threshold principle follows the design description; the
// re-arm (holdoff) rule and its length are this implementation's choice.
//
// Interface: adc[] + adc_valid (one sample set per valid cycle), threshold
// (unsigned magnitude), enable. Output trig is registered (1 cycle latency).
module self_trigger
  import bpm_pkg::*;
#(
  parameter int unsigned HOLDOFF = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              enable,
  input  logic              adc_valid,
  input  sample_vec_t       adc,
  input  logic [ADC_W-1:0]  threshold,
  output logic              trig
);

  localparam int unsigned HW = $clog2(HOLDOFF + 1);

  logic          above;
  logic          armed;
  logic [HW-1:0] quiet_cnt;

  always_comb begin
    above = 1'b0;
    for (int c = 0; c < NUM_CH; c++) begin
      logic [ADC_W-1:0] mag;
      mag = adc[c][ADC_W-1] ? ADC_W'(-adc[c]) : ADC_W'(adc[c]);
      if (mag > threshold) above = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      armed     <= 1'b1;
      quiet_cnt <= '0;
      trig      <= 1'b0;
    end else begin
      trig <= 1'b0;
      if (!enable) begin
        armed     <= 1'b1;
        quiet_cnt <= '0;
      end else if (adc_valid) begin
        if (above) begin
          quiet_cnt <= '0;
          if (armed) begin
            trig  <= 1'b1;
            armed <= 1'b0;
          end
        end else if (!armed) begin
          if (quiet_cnt == HW'(HOLDOFF - 1)) begin
            armed     <= 1'b1;
            quiet_cnt <= '0;
          end else begin
            quiet_cnt <= quiet_cnt + 1'b1;
          end
        end
      end
    end
  end

endmodule
