// cordic_vec: pipelined vectoring CORDIC, (re, im) -> (magnitude, phase).
//
// A first stage folds the left half-plane onto the right one (negating the
// vector and adding pi to the phase); then ITER micro-rotation stages each
// drive the imaginary part toward zero by +/- atan(2^-i), accumulating the
// angle. Four guard bits below the input LSB keep the truncation of the
// shifts small for weak signals. The final real part, multiplied by the inverse CORDIC gain
// (0.60725), is the magnitude. The phase is a binary angle: 2^PH_W counts per
// turn, read as signed (-pi .. pi). A tag (e.g. the FFT bin index) and a
// `last` flag travel with each sample. The use of CORDIC after the FFT is
// from the design; iteration count, widths and gain compensation are this
// implementation's choice.
//
// Timing: fully pipelined, one vector per cycle, latency ITER + 2 cycles.
module cordic_vec #(
  parameter int unsigned IN_W  = 28,
  parameter int unsigned PH_W  = 16,
  parameter int unsigned ITER  = 18,
  parameter int unsigned TAG_W = 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_re,
  input  logic signed [IN_W-1:0]  in_im,
  input  logic [TAG_W-1:0]        in_tag,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic [IN_W-1:0]         out_mag,
  output logic signed [PH_W-1:0]  out_phase,
  output logic [TAG_W-1:0]        out_tag,
  output logic                    out_last
);

  localparam int unsigned G  = 4;           // fraction guard bits on x, y
  localparam int unsigned XW = IN_W + 2 + G;  // room for sign fold, gain 1.65, guard
  localparam int unsigned ZW = PH_W + 4;    // guard bits on the angle
  localparam int unsigned GAIN_INV = 39797; // round(0.607253 * 2^16)

  typedef logic signed [ZW-1:0] atan_t [ITER];

  function automatic atan_t make_atan();
    atan_t t;
    for (int i = 0; i < ITER; i++)
      t[i] = ZW'($rtoi($floor($atan(2.0 ** (-i)) / (2.0 * 3.141592653589793)
                               * (2.0 ** ZW) + 0.5)));
    return t;
  endfunction

  localparam atan_t ATAN_T = make_atan();

  logic signed [XW-1:0] x [ITER+1];
  logic signed [XW-1:0] y [ITER+1];
  logic signed [ZW-1:0] z [ITER+1];
  logic [TAG_W-1:0]     tag [ITER+1];
  logic [ITER:0]        vld, lst;

  // stage 0: fold into the right half-plane
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld[0] <= 1'b0;
      lst[0] <= 1'b0;
    end else begin
      vld[0] <= in_valid;
      lst[0] <= in_last;
    end
  end

  always_ff @(posedge clk) begin
    tag[0] <= in_tag;
    if (in_re < 0) begin
      x[0] <= -(XW'(in_re) <<< G);
      y[0] <= -(XW'(in_im) <<< G);
      z[0] <= ZW'(1) <<< (ZW - 1);   // pi
    end else begin
      x[0] <= XW'(in_re) <<< G;
      y[0] <= XW'(in_im) <<< G;
      z[0] <= '0;
    end
  end

  for (genvar i = 0; i < ITER; i++) begin : g_it
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        vld[i+1] <= 1'b0;
        lst[i+1] <= 1'b0;
      end else begin
        vld[i+1] <= vld[i];
        lst[i+1] <= lst[i];
      end
    end
    always_ff @(posedge clk) begin
      tag[i+1] <= tag[i];
      if (y[i] >= 0) begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + ATAN_T[i];
      end else begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - ATAN_T[i];
      end
    end
  end

  // output: gain compensation and phase rounding
  logic [XW+16-1:0] mag_full;
  assign mag_full = unsigned'(x[ITER]) * (XW+16)'(GAIN_INV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_mag   <= '0;
      out_phase <= '0;
      out_tag   <= '0;
    end else begin
      out_valid <= vld[ITER];
      out_last  <= lst[ITER];
      out_tag   <= tag[ITER];
      out_mag   <= IN_W'((mag_full + (XW+16)'(1 << (15 + G))) >> (16 + G));
      out_phase <= PH_W'((z[ITER] + ZW'(1 << (ZW - PH_W - 1))) >>> (ZW - PH_W));
    end
  end

endmodule
