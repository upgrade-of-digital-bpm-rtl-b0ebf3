// channel_amplitude: amplitude of one stripline electrode signal.
//
// Implements V = sqrt( sum_{i=s..e} x_i^2 ) over the captured window: while
// the window streams past (one sample per valid cycle, with its index), the
// squares of the samples whose index lies in [s, e] are accumulated; on the
// window's last sample the sum goes to a sequential square root. The
// formula and the start/end indices come from the design; the accumulator
// width (exact, no rounding) and the sequential root are this
// implementation's choice.
//
// Timing: amp_valid pulses ACC_W/2 + 2 cycles after in_last.
module channel_amplitude
  import bpm_pkg::*;
#(
  parameter int unsigned WIN   = WIN_LEN,
  parameter int unsigned ACC_W = 2 * ADC_W + 10   // 42: 512 full-scale squares
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [$clog2(WIN)-1:0] in_index,
  input  sample_t                in_sample,
  input  logic                   in_last,
  input  logic [$clog2(WIN)-1:0] idx_s,
  input  logic [$clog2(WIN)-1:0] idx_e,
  output logic                   amp_valid,
  output logic [ACC_W/2-1:0]     amp
);

  logic [ACC_W-1:0]     acc, acc_next;
  logic signed [2*ADC_W-1:0] prod;
  logic [2*ADC_W-1:0]   sq;
  logic                 in_range;
  logic                 sqrt_start;
  logic [ACC_W/2-1:0]   root;

  assign prod     = (2*ADC_W)'(in_sample) * (2*ADC_W)'(in_sample);
  assign sq       = unsigned'(prod);
  assign in_range = (in_index >= idx_s) && (in_index <= idx_e);
  assign acc_next = acc + (in_range ? ACC_W'(sq) : '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc        <= '0;
      sqrt_start <= 1'b0;
    end else begin
      sqrt_start <= 1'b0;
      if (in_valid) begin
        if (in_last) begin
          acc        <= acc_next;   // held for the root, cleared at index 0
          sqrt_start <= 1'b1;
        end else if (in_index == '0) begin
          acc <= in_range ? ACC_W'(sq) : '0;
        end else begin
          acc <= acc_next;
        end
      end
    end
  end

  isqrt #(.IN_W(ACC_W)) u_sqrt (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (sqrt_start),
    .radicand (acc),
    .busy     (),
    .done     (amp_valid),
    .root     (root)
  );

  assign amp = root;

endmodule
