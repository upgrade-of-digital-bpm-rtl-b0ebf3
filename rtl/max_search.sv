// max_search: peak of a magnitude spectrum.
//
// Scans a stream of (bin index, magnitude, phase) and keeps the bin with the
// largest magnitude whose index lies in [lo_bin, hi_bin]; at the stream's
// `last` flag it presents that bin's magnitude, phase and index. The peak
// search on the CORDIC output is from the design; the programmable bin range
// (which lets the DC bin and out-of-band bins be excluded) and the tie rule
// (first maximum wins) are this implementation's choice.
//
// Timing: peak_valid pulses one cycle after the last input.
module max_search #(
  parameter int unsigned MAG_W = 28,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned IDX_W = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [IDX_W-1:0]       lo_bin,
  input  logic [IDX_W-1:0]       hi_bin,
  input  logic                   in_valid,
  input  logic [IDX_W-1:0]       in_index,
  input  logic [MAG_W-1:0]       in_mag,
  input  logic signed [PH_W-1:0] in_phase,
  input  logic                   in_last,
  output logic                   peak_valid,
  output logic [MAG_W-1:0]       peak_mag,
  output logic signed [PH_W-1:0] peak_phase,
  output logic [IDX_W-1:0]       peak_index
);

  logic [MAG_W-1:0]       best_mag;
  logic signed [PH_W-1:0] best_ph;
  logic [IDX_W-1:0]       best_idx;
  logic                   have;
  logic                   take;

  assign take = in_valid && (in_index >= lo_bin) && (in_index <= hi_bin)
                && (!have || in_mag > best_mag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_mag   <= '0;
      best_ph    <= '0;
      best_idx   <= '0;
      have       <= 1'b0;
      peak_valid <= 1'b0;
      peak_mag   <= '0;
      peak_phase <= '0;
      peak_index <= '0;
    end else begin
      peak_valid <= 1'b0;
      if (take) begin
        best_mag <= in_mag;
        best_ph  <= in_phase;
        best_idx <= in_index;
        have     <= 1'b1;
      end
      if (in_valid && in_last) begin
        peak_valid <= 1'b1;
        peak_mag   <= take ? in_mag   : best_mag;
        peak_phase <= take ? in_phase : best_ph;
        peak_index <= take ? in_index : best_idx;
        have       <= 1'b0;
      end
    end
  end

endmodule
