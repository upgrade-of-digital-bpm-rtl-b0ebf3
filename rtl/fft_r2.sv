// fft_r2: in-place radix-2 decimation-in-time FFT of one real input window.
//
// Load: the N real samples of a window stream in (one per valid cycle, with
// their index) and are stored at bit-reversed addresses; imaginary parts are
// zero. Compute: log2(N) stages of N/2 butterflies, one butterfly per cycle,
// reading and writing the two operands in the same cycle; the twiddle factors
// exp(-j 2 pi m / N) are a ROM built at elaboration from cos/sin in TW_W-bit
// fixed point (1.0 = 2^(TW_W-2)). Output: bins 0..OUT_BINS-1 stream out, one
// per cycle, with index and a `last` flag. Data grow without scaling, so
// DW must be at least IN_W + log2(N) + 2.
// The FFT on each cavity signal is from the design; its size (the whole
// window), the radix-2 in-place architecture, the fixed-point formats and
// truncation of the twiddle products are this implementation's choice.
//
// Timing: after the last input sample, N/2*log2(N) compute cycles, then
// OUT_BINS output cycles. `ready` is high only while idle; samples offered
// while not ready are ignored.
module fft_r2 #(
  parameter int unsigned N        = 512,
  parameter int unsigned IN_W     = 16,
  parameter int unsigned DW       = 28,
  parameter int unsigned TW_W     = 16,
  parameter int unsigned OUT_BINS = N / 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    ready,
  input  logic                    in_valid,
  input  logic [$clog2(N)-1:0]    in_index,
  input  logic signed [IN_W-1:0]  in_sample,
  input  logic                    in_last,
  output logic                    out_valid,
  output logic [$clog2(N)-1:0]    out_index,
  output logic signed [DW-1:0]    out_re,
  output logic signed [DW-1:0]    out_im,
  output logic                    out_last
);

  localparam int unsigned LOGN = $clog2(N);
  localparam int unsigned TSH  = TW_W - 2;          // twiddle fraction bits
  localparam int unsigned PW   = DW + TW_W;         // product width

  typedef logic signed [TW_W-1:0] tw_t [N/2];

  function automatic tw_t make_cos();
    tw_t t;
    for (int m = 0; m < N / 2; m++)
      t[m] = TW_W'($rtoi($floor($cos(2.0 * 3.141592653589793 * m / N) * (2.0 ** TSH) + 0.5)));
    return t;
  endfunction

  function automatic tw_t make_sin();
    tw_t t;
    for (int m = 0; m < N / 2; m++)
      t[m] = TW_W'($rtoi($floor($sin(2.0 * 3.141592653589793 * m / N) * (2.0 ** TSH) + 0.5)));
    return t;
  endfunction

  localparam tw_t COS_T = make_cos();
  localparam tw_t SIN_T = make_sin();

  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] a);
    for (int b = 0; b < LOGN; b++) bitrev[b] = a[LOGN-1-b];
  endfunction

  typedef enum logic [1:0] {IDLE, COMPUTE, OUTPUT} state_e;

  state_e                   state;
  logic signed [DW-1:0]     mem_re [N];
  logic signed [DW-1:0]     mem_im [N];
  logic [$clog2(LOGN)-1:0]  stage;
  logic [LOGN-2:0]          bfly;
  logic [LOGN-1:0]          i0, i1, oidx;
  logic [LOGN-2:0]          tw_idx;
  logic signed [DW-1:0]     a_re, a_im, b_re, b_im;
  logic signed [TW_W-1:0]   wc, ws;
  logic signed [PW-1:0]     t_re_full, t_im_full;
  logic signed [DW-1:0]     t_re, t_im;

  // butterfly addressing: half = 2^stage, pos = bfly mod half
  always_comb begin
    logic [LOGN-2:0] pos_mask;
    logic [LOGN-1:0] grp, pos;
    pos_mask = (LOGN-1)'((1 << stage) - 1);
    pos      = LOGN'(bfly & pos_mask);
    grp      = LOGN'(bfly >> stage);
    i0       = (grp << (stage + 1)) | pos;
    i1       = i0 | LOGN'(1 << stage);
    tw_idx   = (LOGN-1)'(pos << (LOGN - 1 - int'(stage)));
  end

  assign a_re = mem_re[i0];
  assign a_im = mem_im[i0];
  assign b_re = mem_re[i1];
  assign b_im = mem_im[i1];
  assign wc   = COS_T[tw_idx];
  assign ws   = SIN_T[tw_idx];

  // t = b * (cos - j sin)
  assign t_re_full = PW'(b_re) * PW'(wc) + PW'(b_im) * PW'(ws);
  assign t_im_full = PW'(b_im) * PW'(wc) - PW'(b_re) * PW'(ws);
  assign t_re      = DW'(t_re_full >>> TSH);
  assign t_im      = DW'(t_im_full >>> TSH);

  assign ready = (state == IDLE);

  always_ff @(posedge clk) begin
    if (state == IDLE && in_valid) begin
      mem_re[bitrev(in_index)] <= DW'(in_sample);
      mem_im[bitrev(in_index)] <= '0;
    end else if (state == COMPUTE) begin
      mem_re[i0] <= a_re + t_re;
      mem_im[i0] <= a_im + t_im;
      mem_re[i1] <= a_re - t_re;
      mem_im[i1] <= a_im - t_im;
    end
    out_re <= mem_re[oidx];
    out_im <= mem_im[oidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= IDLE;
      stage     <= '0;
      bfly      <= '0;
      oidx      <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (state)
        IDLE: if (in_valid && in_last) begin
          state <= COMPUTE;
          stage <= '0;
          bfly  <= '0;
        end
        COMPUTE: begin
          bfly <= bfly + 1'b1;
          if (bfly == '1) begin
            if (stage == ($clog2(LOGN))'(LOGN - 1)) begin
              state <= OUTPUT;
              oidx  <= '0;
            end else begin
              stage <= stage + 1'b1;
            end
          end
        end
        OUTPUT: begin
          out_valid <= 1'b1;
          out_index <= oidx;
          out_last  <= (oidx == LOGN'(OUT_BINS - 1));
          if (oidx == LOGN'(OUT_BINS - 1)) state <= IDLE;
          else                             oidx  <= oidx + 1'b1;
        end
        default: state <= IDLE;
      endcase
    end
  end

endmodule
