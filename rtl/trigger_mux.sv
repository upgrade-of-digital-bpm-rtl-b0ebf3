// trigger_mux: selects the trigger source for the capture gate.
//
// Three sources exist: an external trigger input, the self-trigger and the
// period trigger. The external input is asynchronous to the ADC clock: it is
// passed through a two-flop synchroniser and its rising edge is turned into a
// one-cycle pulse. The self and period triggers are already one-cycle pulses
// in this clock domain. `mode` (trig_mode_e) picks one source, or none.
// The three sources follow the design description; synchronisation, edge
// detection and the mode encoding are this implementation's choice.
// Latency: ext -> trig 4 cycles; self/period -> trig 1 cycle (registered).
module trigger_mux
  import bpm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  trig_mode_e mode,
  input  logic       ext_trig,
  input  logic       self_trig,
  input  logic       period_trig,
  output logic       trig
);

  logic [2:0] ext_sync;
  logic       ext_pulse;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ext_sync <= '0;
    else        ext_sync <= {ext_sync[1:0], ext_trig};
  end

  assign ext_pulse = ext_sync[1] & ~ext_sync[2];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      trig <= 1'b0;
    end else begin
      unique case (mode)
        TRIG_EXT:    trig <= ext_pulse;
        TRIG_SELF:   trig <= self_trig;
        TRIG_PERIOD: trig <= period_trig;
        default:     trig <= 1'b0;
      endcase
    end
  end

endmodule
