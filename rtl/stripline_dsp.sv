// stripline_dsp: stripline BPM signal processing for one captured window.
//
// Four channel_amplitude units compute V = sqrt(sum x_i^2) over the sample
// range [s, e] of electrodes A, B, C, D as the window streams in. When all
// four are ready, two stripline_position units compute
//   x = k_x (V_A - V_C)/(V_A + V_C)   and   y = k_y (V_B - V_D)/(V_B + V_D).
// The amplitude formula, the difference-over-sum algorithm and k follow the
// design. The channel-to-electrode order (ch0..ch3 = A, B, C, D, with A/C the
// horizontal pair) and the separate k for each plane are this
// implementation's choice.
//
// Timing: result_valid pulses about 47 + 42 cycles after the last sample.
module stripline_dsp
  import bpm_pkg::*;
#(
  parameter int unsigned WIN   = WIN_LEN,
  parameter int unsigned ACC_W = 2 * ADC_W + 10,
  parameter int unsigned K_W   = 32,
  parameter int unsigned POS_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic [$clog2(WIN)-1:0]  in_index,
  input  sample_vec_t             in_sample,
  input  logic                    in_last,
  input  logic [$clog2(WIN)-1:0]  idx_s,
  input  logic [$clog2(WIN)-1:0]  idx_e,
  input  logic [K_W-1:0]          k_x,
  input  logic [K_W-1:0]          k_y,
  output logic                    result_valid,
  output logic [ACC_W/2-1:0]      amp [NUM_CH],
  output logic signed [POS_W-1:0] pos_x,
  output logic signed [POS_W-1:0] pos_y
);

  localparam int unsigned AMP_W = ACC_W / 2;

  logic [NUM_CH-1:0] amp_valid;
  logic [AMP_W-1:0]  amp_w [NUM_CH];
  logic              vx, vy, pending_x, pending_y;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    channel_amplitude #(.WIN(WIN), .ACC_W(ACC_W)) u_amp (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (in_valid),
      .in_index  (in_index),
      .in_sample (in_sample[c]),
      .in_last   (in_last),
      .idx_s     (idx_s),
      .idx_e     (idx_e),
      .amp_valid (amp_valid[c]),
      .amp       (amp_w[c])
    );
  end

  // all four roots take the same number of cycles and finish together;
  // both planes start when every amplitude is ready
  stripline_position #(.AMP_W(AMP_W), .K_W(K_W), .POS_W(POS_W)) u_pos_x (
    .clk (clk), .rst_n (rst_n), .start (&amp_valid),
    .va (amp_w[0]), .vc (amp_w[2]), .k (k_x),
    .pos_valid (vx), .pos (pos_x), .ratio (), .div0 ()
  );

  stripline_position #(.AMP_W(AMP_W), .K_W(K_W), .POS_W(POS_W)) u_pos_y (
    .clk (clk), .rst_n (rst_n), .start (&amp_valid),
    .va (amp_w[1]), .vc (amp_w[3]), .k (k_y),
    .pos_valid (vy), .pos (pos_y), .ratio (), .div0 ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending_x    <= 1'b0;
      pending_y    <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (vx) pending_x <= 1'b1;
      if (vy) pending_y <= 1'b1;
      if ((pending_x || vx) && (pending_y || vy)) begin
        result_valid <= 1'b1;
        pending_x    <= 1'b0;
        pending_y    <= 1'b0;
      end
    end
  end

  assign amp = amp_w;

endmodule
