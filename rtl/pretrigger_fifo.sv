// pretrigger_fifo: first stage of the two-stage capture FIFO.
//
// The 4-channel ADC stream is written into a DEPTH-entry circular buffer
// every valid cycle. Once DEPTH samples have been written the buffer is kept
// at that fill level: each new write also reads out the oldest entry, so the
// output is the input stream delayed by exactly DEPTH samples. When a trigger
// opens the gate behind this stage, the samples that preceded the trigger are
// therefore still available, which puts the trigger in the centre of the
// captured window. Depth (256 x 4 channels) follows the design description;
// the constant-fill-level read policy is this implementation's reading of it.
//
// Timing: out_valid/out_data are registered; out_data is the sample that was
// written DEPTH valid cycles before the current input. `primed` goes high
// once DEPTH samples have been written.
module pretrigger_fifo
  import bpm_pkg::*;
#(
  parameter int unsigned DEPTH = PRE_DEPTH,
  parameter int unsigned W     = NUM_CH * ADC_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  output logic         primed
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp;
  logic [AW:0]   fill;

  assign primed = (fill == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (in_valid) begin
      out_data <= mem[wp];   // read-before-write: oldest entry
      mem[wp]  <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && primed;
      if (in_valid) begin
        wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        if (!primed) fill <= fill + 1'b1;
      end
    end
  end

endmodule
