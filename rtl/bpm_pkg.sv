// bpm_pkg: types and constants shared by the BPM processor firmware.
//
// The processor digitises four BPM electrode (or cavity) signals with 16-bit
// ADCs and processes a 512-sample window around each beam trigger. This
// package holds the sample types, the trigger-mode encoding and the
// fixed-point formats used throughout. The channel count, ADC width and
// window length follow the design description; the encodings and fixed-point
// formats are this implementation's own choices.
package bpm_pkg;

  localparam int unsigned NUM_CH    = 4;    // ADC channels
  localparam int unsigned ADC_W     = 16;   // ADC bits
  localparam int unsigned PRE_DEPTH = 256;  // first FIFO stage depth
  localparam int unsigned WIN_LEN   = 512;  // second FIFO stage depth (window)
  localparam int unsigned NUM_TRIG  = 1024; // triggers kept in the capture RAM

  // Fixed-point ratio format: FRAC fractional bits.
  localparam int unsigned FRAC = 16;
  // Phase: binary angle, 2^PH_W counts per full turn (signed: -pi .. +pi).
  localparam int unsigned PH_W = 16;

  typedef logic signed [ADC_W-1:0] sample_t;
  typedef sample_t                 sample_vec_t [NUM_CH];
  typedef logic [NUM_CH*ADC_W-1:0] sample_word_t;  // four samples, ch0 in LSBs

  typedef enum logic [1:0] {
    TRIG_EXT    = 2'd0,
    TRIG_SELF   = 2'd1,
    TRIG_PERIOD = 2'd2,
    TRIG_OFF    = 2'd3
  } trig_mode_e;

  typedef enum logic {
    BPM_STRIPLINE = 1'b0,
    BPM_CAVITY    = 1'b1
  } bpm_type_e;

  localparam int unsigned IDX_W = $clog2(WIN_LEN);
  localparam int unsigned RAM_AW = $clog2(NUM_TRIG) + $clog2(WIN_LEN);
  localparam int unsigned STRIP_AMP_W = ADC_W + 5;   // sqrt of a 42-bit sum of squares
  localparam int unsigned CAV_W = 28;          // FFT / CORDIC data width

  // Host register map (32-bit word addresses).
  localparam logic [7:0] REG_CTRL      = 8'h00;  // [1:0] trig mode, [2] bpm type, [3] hold, [4] arm RAM (pulse)
  localparam logic [7:0] REG_THRESHOLD = 8'h01;  // [15:0] self-trigger threshold
  localparam logic [7:0] REG_PERIOD    = 8'h02;  // period trigger, clock cycles
  localparam logic [7:0] REG_INDEX     = 8'h03;  // [8:0] s, [24:16] e
  localparam logic [7:0] REG_K_X       = 8'h04;
  localparam logic [7:0] REG_K_Y       = 8'h05;
  localparam logic [7:0] REG_BINS      = 8'h06;  // [8:0] lo bin, [24:16] hi bin
  localparam logic [7:0] REG_ROT       = 8'h07;  // [15:0] rot x, [31:16] rot y
  localparam logic [7:0] REG_PH_THR    = 8'h08;  // [15:0] phase threshold
  localparam logic [7:0] REG_WIN_ADDR  = 8'h09;  // window read address
  localparam logic [7:0] REG_RAM_ADDR  = 8'h0A;  // capture RAM read address {slot, sample}
  localparam logic [7:0] REG_STATUS    = 8'h10;  // [0] window held, [1] RAM recording, [2] RAM full, [3] gate on
  localparam logic [7:0] REG_TRIGS     = 8'h11;  // [15:0] accepted, [31:16] dropped
  localparam logic [7:0] REG_RESULTS   = 8'h12;  // results produced
  localparam logic [7:0] REG_POS_X     = 8'h13;
  localparam logic [7:0] REG_POS_Y     = 8'h14;
  localparam logic [7:0] REG_AMP0      = 8'h15;  // 0x15..0x18 stripline V_A..V_D
  localparam logic [7:0] REG_CAV_AMP0  = 8'h19;  // 0x19..0x1B cavity v_x, v_y, v_r
  localparam logic [7:0] REG_CAV_PH    = 8'h1C;  // [15:0] theta_x, [31:16] theta_y
  localparam logic [7:0] REG_CAV_PH_R  = 8'h1D;  // [15:0] theta_r
  localparam logic [7:0] REG_CAV_DIFF  = 8'h1E;  // [15:0] rotated diff x, [31:16] y
  localparam logic [7:0] REG_WIN_LO    = 8'h20;  // window sample: {ch1, ch0}
  localparam logic [7:0] REG_WIN_HI    = 8'h21;  // {ch3, ch2}
  localparam logic [7:0] REG_RAM_LO    = 8'h22;
  localparam logic [7:0] REG_RAM_HI    = 8'h23;
  localparam logic [7:0] REG_RAM_CNT   = 8'h24;  // windows stored

  typedef struct packed {
    trig_mode_e         trig_mode;
    bpm_type_e          bpm_type;
    logic               hold;
    logic               ram_arm;      // one-cycle pulse
    logic [ADC_W-1:0]   threshold;
    logic [31:0]        period;
    logic [IDX_W-1:0]   idx_s;
    logic [IDX_W-1:0]   idx_e;
    logic [31:0]        k_x;
    logic [31:0]        k_y;
    logic [IDX_W-1:0]   lo_bin;
    logic [IDX_W-1:0]   hi_bin;
    logic [PH_W-1:0]    rot_x;
    logic [PH_W-1:0]    rot_y;
    logic [PH_W-1:0]    ph_thr;
    logic [IDX_W-1:0]   win_addr;
    logic [RAM_AW-1:0]  ram_addr;
  } cfg_t;

  typedef struct packed {
    logic               win_held;
    logic               ram_recording;
    logic               ram_full;
    logic               gate_on;
    logic [15:0]        accepted;
    logic [15:0]        dropped;
    logic [31:0]        results;
    logic [31:0]        pos_x;
    logic [31:0]        pos_y;
    logic [3:0][STRIP_AMP_W-1:0] amp;
    logic [2:0][CAV_W-1:0] cav_amp;
    logic [2:0][PH_W-1:0]  cav_ph;
    logic [1:0][PH_W-1:0]  cav_diff;
    sample_word_t       win_data;
    sample_word_t       ram_data;
    logic [$clog2(NUM_TRIG):0] ram_stored;
  } status_t;

  function automatic sample_word_t pack_samples(input sample_vec_t s);
    sample_word_t w;
    for (int c = 0; c < NUM_CH; c++) w[c*ADC_W +: ADC_W] = s[c];
    return w;
  endfunction

  function automatic sample_vec_t unpack_samples(input sample_word_t w);
    sample_vec_t s;
    for (int c = 0; c < NUM_CH; c++) s[c] = sample_t'(w[c*ADC_W +: ADC_W]);
    return s;
  endfunction

endpackage
