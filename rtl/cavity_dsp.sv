// cavity_dsp: cavity BPM signal processing for one captured window.
//
// Three cavity_channel chains (FFT, CORDIC, max search) run in parallel on
// the X position cavity (ch0), the Y position cavity (ch1) and the reference
// cavity (ch2). When all three have their peak, two cavity_position units
// compute x = +/- k_x v_x/v_r and y = +/- k_y v_y/v_r, each with its own
// rotation phase; the sign threshold is shared. The processing chain is from
// the design; the channel assignment, a separate k and rotation per plane and
// a shared threshold are this implementation's choice. ch3 is not used by
// this algorithm.
//
// Timing: `ready` is high when all FFTs are idle. result_valid pulses about
// N/2*log2(N) + N/2 + MAG_W + FRAC + 30 cycles after the last input sample.
module cavity_dsp
  import bpm_pkg::*;
#(
  parameter int unsigned N     = WIN_LEN,
  parameter int unsigned DW    = 28,
  parameter int unsigned K_W   = 32,
  parameter int unsigned POS_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,
  input  logic                    in_valid,
  input  logic [$clog2(N)-1:0]    in_index,
  input  sample_t                 in_x,
  input  sample_t                 in_y,
  input  sample_t                 in_ref,
  input  logic                    in_last,
  input  logic [$clog2(N)-1:0]    lo_bin,
  input  logic [$clog2(N)-1:0]    hi_bin,
  input  logic [K_W-1:0]          k_x,
  input  logic [K_W-1:0]          k_y,
  input  logic signed [PH_W-1:0]  th_rot_x,
  input  logic signed [PH_W-1:0]  th_rot_y,
  input  logic [PH_W-1:0]         th_thr,
  output logic                    result_valid,
  output logic [DW-1:0]           amp [3],     // v_x, v_y, v_r
  output logic signed [PH_W-1:0]  phase [3],   // theta_x, theta_y, theta_r
  output logic signed [PH_W-1:0]  th_diff_x,
  output logic signed [PH_W-1:0]  th_diff_y,
  output logic signed [POS_W-1:0] pos_x,
  output logic signed [POS_W-1:0] pos_y
);

  localparam int unsigned IW = $clog2(N);

  logic [2:0]             rdy, rv;
  logic [DW-1:0]          a [3];
  logic signed [PH_W-1:0] p [3];
  sample_t                din [3];
  logic                   vx, vy, pend_x, pend_y;

  assign din[0] = in_x;
  assign din[1] = in_y;
  assign din[2] = in_ref;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    cavity_channel #(.N(N), .DW(DW)) u_ch (
      .clk (clk), .rst_n (rst_n), .ready (rdy[c]),
      .in_valid (in_valid), .in_index (in_index), .in_sample (din[c]),
      .in_last (in_last), .lo_bin (lo_bin), .hi_bin (hi_bin),
      .res_valid (rv[c]), .amp (a[c]), .phase (p[c]), .bin ()
    );
  end

  assign ready = &rdy;
  assign amp   = a;
  assign phase = p;

  // the three chains run in lockstep, so their results arrive together
  cavity_position #(.MAG_W(DW), .K_W(K_W), .POS_W(POS_W)) u_pos_x (
    .clk (clk), .rst_n (rst_n), .start (&rv),
    .v_x (a[0]), .th_x (p[0]), .v_r (a[2]), .th_r (p[2]),
    .k (k_x), .th_rot (th_rot_x), .th_thr (th_thr),
    .pos_valid (vx), .pos (pos_x), .ratio (), .th_diff (th_diff_x), .negative ()
  );

  cavity_position #(.MAG_W(DW), .K_W(K_W), .POS_W(POS_W)) u_pos_y (
    .clk (clk), .rst_n (rst_n), .start (&rv),
    .v_x (a[1]), .th_x (p[1]), .v_r (a[2]), .th_r (p[2]),
    .k (k_y), .th_rot (th_rot_y), .th_thr (th_thr),
    .pos_valid (vy), .pos (pos_y), .ratio (), .th_diff (th_diff_y), .negative ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_x       <= 1'b0;
      pend_y       <= 1'b0;
      result_valid <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (vx) pend_x <= 1'b1;
      if (vy) pend_y <= 1'b1;
      if ((pend_x || vx) && (pend_y || vy)) begin
        result_valid <= 1'b1;
        pend_x       <= 1'b0;
        pend_y       <= 1'b0;
      end
    end
  end

endmodule
