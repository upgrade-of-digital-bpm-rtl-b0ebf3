// cavity_channel: amplitude and phase of one cavity BPM signal.
//
// The chain FFT -> CORDIC -> MAX SEARCH: the captured window is transformed,
// each output bin is converted to magnitude and phase, and the bin with the
// largest magnitude inside [lo_bin, hi_bin] gives the signal amplitude v and
// phase theta. The chain is from the design; sizes and formats are set by
// the sub-blocks (see fft_r2, cordic_vec, max_search).
//
// Timing: `ready` is high while the FFT can take a new window. The result
// (valid pulse) comes N/2*log2(N) + N/2 + ITER + 3 cycles after the last
// input sample.
module cavity_channel
  import bpm_pkg::*;
#(
  parameter int unsigned N    = WIN_LEN,
  parameter int unsigned DW   = 28,
  parameter int unsigned ITER = 18
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   ready,
  input  logic                   in_valid,
  input  logic [$clog2(N)-1:0]   in_index,
  input  sample_t                in_sample,
  input  logic                   in_last,
  input  logic [$clog2(N)-1:0]   lo_bin,
  input  logic [$clog2(N)-1:0]   hi_bin,
  output logic                   res_valid,
  output logic [DW-1:0]          amp,
  output logic signed [PH_W-1:0] phase,
  output logic [$clog2(N)-1:0]   bin
);

  localparam int unsigned IW = $clog2(N);

  logic                 f_valid, f_last;
  logic [IW-1:0]        f_index;
  logic signed [DW-1:0] f_re, f_im;
  logic                 c_valid, c_last;
  logic [DW-1:0]        c_mag;
  logic signed [PH_W-1:0] c_ph;
  logic [IW-1:0]        c_tag;

  fft_r2 #(.N(N), .IN_W(ADC_W), .DW(DW)) u_fft (
    .clk (clk), .rst_n (rst_n), .ready (ready),
    .in_valid (in_valid), .in_index (in_index), .in_sample (in_sample),
    .in_last (in_last),
    .out_valid (f_valid), .out_index (f_index), .out_re (f_re),
    .out_im (f_im), .out_last (f_last)
  );

  cordic_vec #(.IN_W(DW), .PH_W(PH_W), .ITER(ITER), .TAG_W(IW)) u_cordic (
    .clk (clk), .rst_n (rst_n),
    .in_valid (f_valid), .in_re (f_re), .in_im (f_im), .in_tag (f_index),
    .in_last (f_last),
    .out_valid (c_valid), .out_mag (c_mag), .out_phase (c_ph),
    .out_tag (c_tag), .out_last (c_last)
  );

  max_search #(.MAG_W(DW), .PH_W(PH_W), .IDX_W(IW)) u_max (
    .clk (clk), .rst_n (rst_n), .lo_bin (lo_bin), .hi_bin (hi_bin),
    .in_valid (c_valid), .in_index (c_tag), .in_mag (c_mag),
    .in_phase (c_ph), .in_last (c_last),
    .peak_valid (res_valid), .peak_mag (amp), .peak_phase (phase),
    .peak_index (bin)
  );

endmodule
