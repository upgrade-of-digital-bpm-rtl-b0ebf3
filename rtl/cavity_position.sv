// cavity_position: beam position from a position cavity and a reference cavity.
//
// Magnitude: x = k * v_x / v_r (sequential divider, FRAC fractional bits,
// then a multiply by k). Sign: the phase difference theta_x - theta_r is
// rotated by the calibrated offset theta_rot (a binary angle, so the addition
// wraps modulo 2 pi). A beam on one side of the cavity centre gives a
// rotated difference near 0, on the other side near pi; if the absolute
// rotated difference is below theta_thr the position is positive, otherwise
// negative. The divide/multiply/subtract/rotate/compare/sign chain is from
// the design; the formats, the "below threshold means +" convention and
// saturation of the result to POS_W bits are this implementation's choice.
//
// Timing: pos_valid pulses MAG_W + FRAC + 4 cycles after start.
module cavity_position
  import bpm_pkg::*;
#(
  parameter int unsigned MAG_W = 28,
  parameter int unsigned K_W   = 32,
  parameter int unsigned POS_W = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [MAG_W-1:0]        v_x,
  input  logic signed [PH_W-1:0]  th_x,
  input  logic [MAG_W-1:0]        v_r,
  input  logic signed [PH_W-1:0]  th_r,
  input  logic [K_W-1:0]          k,
  input  logic signed [PH_W-1:0]  th_rot,
  input  logic [PH_W-1:0]         th_thr,
  output logic                    pos_valid,
  output logic signed [POS_W-1:0] pos,
  output logic [MAG_W+FRAC-1:0]   ratio,
  output logic signed [PH_W-1:0]  th_diff,
  output logic                    negative
);

  localparam int unsigned QW = MAG_W + FRAC;
  localparam int unsigned PW = QW + K_W;
  localparam logic [PW-1:0] POS_MAX = (PW'(1) << (POS_W - 1)) - 1'b1;

  logic                   div_done, prod_valid;
  logic [QW-1:0]          quot;
  logic [PW-1:0]          prod, mag;
  logic signed [PH_W-1:0] rot;
  logic [PH_W-1:0]        rot_abs;

  seq_divider #(.NUM_W(MAG_W), .DEN_W(MAG_W), .FRAC(FRAC)) u_div (
    .clk (clk), .rst_n (rst_n), .start (start), .num (v_x), .den (v_r),
    .busy (), .done (div_done), .div0 (), .quot (quot)
  );

  // phase path, latched at start
  assign rot     = th_x - th_r + th_rot;   // wraps modulo 2 pi
  assign rot_abs = rot[PH_W-1] ? PH_W'(-rot) : PH_W'(rot);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      th_diff  <= '0;
      negative <= 1'b0;
    end else if (start) begin
      th_diff  <= rot;
      negative <= !(rot_abs < th_thr);
    end
  end

  assign mag = prod >> FRAC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prod       <= '0;
      ratio      <= '0;
      prod_valid <= 1'b0;
      pos_valid  <= 1'b0;
      pos        <= '0;
    end else begin
      prod_valid <= div_done;
      pos_valid  <= prod_valid;
      if (div_done) begin
        ratio <= quot;
        prod  <= PW'(quot) * PW'(k);
      end
      if (prod_valid) begin
        if (mag > POS_MAX) pos <= negative ? -POS_W'(POS_MAX) : POS_W'(POS_MAX);
        else               pos <= negative ? -POS_W'(mag)     : POS_W'(mag);
      end
    end
  end

endmodule
