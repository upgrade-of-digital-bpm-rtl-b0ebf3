// bpm_processor: FPGA firmware of a four-channel digital BPM processor.
//
// All beam-position processing runs in the FPGA; the host only configures the
// firmware and reads results. Data path, per trigger:
//   ADC (4 x 16 bit) -> pretrigger_fifo (4 x 256, constant delay)
//                    -> capture_gate (ON/OFF, 512 samples after a trigger)
//                    -> window_buffer (4 x 512, trigger in the centre)
//                    -> drained once to stripline_dsp, cavity_dsp and
//                       capture_ram (1024 successive triggers)
// The trigger is chosen by trigger_mux among the external input, the
// self-trigger (amplitude above a threshold) and the period trigger. The BPM
// type register selects which position result (stripline difference-over-
// sum, or cavity FFT/CORDIC) is streamed out and stored as the latest
// result; the same firmware serves both BPM types. The host reaches every
// setting, result and raw sample through control_regs.
// The structure follows the design description; the host bus, the register
// map, the single clock domain (ADC sample clock) and the drain handshake
// are this implementation's choices.
//
// Interface: adc/adc_valid in the ADC clock domain; ext_trig asynchronous;
// host register bus (see control_regs); streaming result: pos_valid pulses
// with pos_x/pos_y and, for cavity BPMs, the rotated phase differences.
module bpm_processor
  import bpm_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  // ADC
  input  logic                    adc_valid,
  input  sample_vec_t             adc,
  // external trigger
  input  logic                    ext_trig,
  // host register bus
  input  logic                    host_wr,
  input  logic                    host_rd,
  input  logic [7:0]              host_addr,
  input  logic [31:0]             host_wdata,
  output logic [31:0]             host_rdata,
  output logic                    host_rvalid,
  // streaming position / phase
  output logic                    pos_valid,
  output logic signed [31:0]      pos_x,
  output logic signed [31:0]      pos_y,
  output logic signed [PH_W-1:0]  ph_diff_x,
  output logic signed [PH_W-1:0]  ph_diff_y,
  output logic                    trig_out
);

  localparam int unsigned W = NUM_CH * ADC_W;

  cfg_t    cfg;
  status_t stat;

  // ---------------------------------------------------------------- triggers
  logic self_trig, period_trig, trig;

  self_trigger u_self (
    .clk (clk), .rst_n (rst_n), .enable (cfg.trig_mode == TRIG_SELF),
    .adc_valid (adc_valid), .adc (adc), .threshold (cfg.threshold),
    .trig (self_trig)
  );

  period_trigger u_period (
    .clk (clk), .rst_n (rst_n), .enable (cfg.trig_mode == TRIG_PERIOD),
    .period (cfg.period), .trig (period_trig)
  );

  trigger_mux u_tmux (
    .clk (clk), .rst_n (rst_n), .mode (cfg.trig_mode), .ext_trig (ext_trig),
    .self_trig (self_trig), .period_trig (period_trig), .trig (trig)
  );

  assign trig_out = trig;

  // ---------------------------------------------------- two-stage capture
  logic                 d_valid, primed;
  logic [W-1:0]         d_data;
  logic                 g_wr, g_on, g_done, buf_free;
  logic [IDX_W-1:0]     g_addr;
  logic [W-1:0]         g_data;
  logic                 sink_ready;
  logic                 dr_valid, dr_last;
  logic [IDX_W-1:0]     dr_index;
  logic [W-1:0]         dr_data;
  sample_vec_t          dr_vec;

  pretrigger_fifo u_fifo1 (
    .clk (clk), .rst_n (rst_n), .in_valid (adc_valid),
    .in_data (pack_samples(adc)), .out_valid (d_valid), .out_data (d_data),
    .primed (primed)
  );

  capture_gate u_gate (
    .clk (clk), .rst_n (rst_n), .trig (trig), .primed (primed),
    .buf_free (buf_free), .in_valid (d_valid), .in_data (d_data),
    .wr_en (g_wr), .wr_addr (g_addr), .wr_data (g_data), .on (g_on),
    .done (g_done), .accepted (stat.accepted), .dropped (stat.dropped)
  );

  window_buffer u_fifo2 (
    .clk (clk), .rst_n (rst_n), .wr_en (g_wr), .wr_addr (g_addr),
    .wr_data (g_data), .gate_on (g_on), .wr_done (g_done),
    .buf_free (buf_free), .sink_ready (sink_ready), .dr_valid (dr_valid),
    .dr_index (dr_index), .dr_data (dr_data), .dr_last (dr_last),
    .host_hold (cfg.hold), .host_addr (cfg.win_addr),
    .host_data (stat.win_data), .window_ready (stat.win_held)
  );

  assign dr_vec = unpack_samples(dr_data);

  capture_ram u_ram (
    .clk (clk), .rst_n (rst_n), .arm (cfg.ram_arm), .in_valid (dr_valid),
    .in_index (dr_index), .in_data (dr_data), .in_last (dr_last),
    .host_addr (cfg.ram_addr), .host_data (stat.ram_data),
    .stored (stat.ram_stored), .recording (stat.ram_recording),
    .full (stat.ram_full)
  );

  assign stat.gate_on = g_on;

  // --------------------------------------------------------------- DSP
  logic                    s_valid;
  logic [STRIP_AMP_W-1:0]        s_amp [NUM_CH];
  logic signed [31:0]      s_x, s_y;
  logic                    c_ready, c_valid;
  logic [CAV_W-1:0]        c_amp [3];
  logic signed [PH_W-1:0]  c_ph [3];
  logic signed [PH_W-1:0]  c_dx, c_dy;
  logic signed [31:0]      c_x, c_y;
  logic                    cav_sel;

  assign cav_sel    = (cfg.bpm_type == BPM_CAVITY);
  assign sink_ready = cav_sel ? c_ready : 1'b1;

  stripline_dsp u_strip (
    .clk (clk), .rst_n (rst_n), .in_valid (dr_valid && !cav_sel),
    .in_index (dr_index), .in_sample (dr_vec), .in_last (dr_last),
    .idx_s (cfg.idx_s), .idx_e (cfg.idx_e), .k_x (cfg.k_x), .k_y (cfg.k_y),
    .result_valid (s_valid), .amp (s_amp), .pos_x (s_x), .pos_y (s_y)
  );

  cavity_dsp u_cav (
    .clk (clk), .rst_n (rst_n), .ready (c_ready),
    .in_valid (dr_valid && cav_sel), .in_index (dr_index),
    .in_x (dr_vec[0]), .in_y (dr_vec[1]), .in_ref (dr_vec[2]),
    .in_last (dr_last), .lo_bin (cfg.lo_bin), .hi_bin (cfg.hi_bin),
    .k_x (cfg.k_x), .k_y (cfg.k_y), .th_rot_x (cfg.rot_x),
    .th_rot_y (cfg.rot_y), .th_thr (cfg.ph_thr),
    .result_valid (c_valid), .amp (c_amp), .phase (c_ph),
    .th_diff_x (c_dx), .th_diff_y (c_dy), .pos_x (c_x), .pos_y (c_y)
  );

  // ------------------------------------------------ result stream / latch
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos_valid     <= 1'b0;
      pos_x         <= '0;
      pos_y         <= '0;
      ph_diff_x     <= '0;
      ph_diff_y     <= '0;
      stat.results  <= '0;
      stat.amp      <= '0;
      stat.cav_amp  <= '0;
      stat.cav_ph   <= '0;
      stat.cav_diff <= '0;
    end else begin
      pos_valid <= 1'b0;
      if (s_valid && !cav_sel) begin
        pos_valid    <= 1'b1;
        pos_x        <= s_x;
        pos_y        <= s_y;
        ph_diff_x    <= '0;
        ph_diff_y    <= '0;
        stat.results <= stat.results + 1'b1;
        for (int c = 0; c < NUM_CH; c++) stat.amp[c] <= s_amp[c];
      end
      if (c_valid && cav_sel) begin
        pos_valid    <= 1'b1;
        pos_x        <= c_x;
        pos_y        <= c_y;
        ph_diff_x    <= c_dx;
        ph_diff_y    <= c_dy;
        stat.results <= stat.results + 1'b1;
        for (int c = 0; c < 3; c++) begin
          stat.cav_amp[c] <= c_amp[c];
          stat.cav_ph[c]  <= c_ph[c];
        end
        stat.cav_diff <= {c_dy, c_dx};
      end
    end
  end

  assign stat.pos_x = pos_x;
  assign stat.pos_y = pos_y;

  // ------------------------------------------------------------ host
  control_regs u_regs (
    .clk (clk), .rst_n (rst_n), .wr (host_wr), .rd (host_rd),
    .addr (host_addr), .wdata (host_wdata), .rdata (host_rdata),
    .rvalid (host_rvalid), .cfg (cfg), .stat (stat)
  );

endmodule
