// window_buffer: second stage of the capture FIFO (4 channels x 512).
//
// Holds one triggered window. States: EMPTY (free for the gate), FILLING
// (gate writing), FULL (waiting for the processing chain), DRAIN (streaming
// the window out once, one sample per cycle, with its index and a `last`
// flag, to the DSP and to the capture RAM), HELD (drained; kept for the host).
// The host reads the window at its own, lower rate through a separate
// synchronous read port. While `host_hold` is set the drained window is kept
// and no new capture is accepted; when it is clear the buffer frees itself
// right after the drain.
// Depth follows the design description; the state machine, the drain
// handshake (`sink_ready` must be high to start a drain) and the hold rule
// are this implementation's choice.
//
// Timing: dr_* are registered, first sample 2 cycles after the drain starts;
// host_data is valid one cycle after host_addr.
module window_buffer
  import bpm_pkg::*;
#(
  parameter int unsigned WIN = WIN_LEN,
  parameter int unsigned W   = NUM_CH * ADC_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // write side (capture gate)
  input  logic                   wr_en,
  input  logic [$clog2(WIN)-1:0] wr_addr,
  input  logic [W-1:0]           wr_data,
  input  logic                   gate_on,
  input  logic                   wr_done,
  output logic                   buf_free,
  // drain stream (DSP and capture RAM)
  input  logic                   sink_ready,
  output logic                   dr_valid,
  output logic [$clog2(WIN)-1:0] dr_index,
  output logic [W-1:0]           dr_data,
  output logic                   dr_last,
  // host side
  input  logic                   host_hold,
  input  logic [$clog2(WIN)-1:0] host_addr,
  output logic [W-1:0]           host_data,
  output logic                   window_ready
);

  localparam int unsigned AW = $clog2(WIN);

  typedef enum logic [2:0] {EMPTY, FILLING, FULL, DRAIN, HELD} state_e;

  logic [W-1:0]  mem [WIN];
  state_e        state;
  logic [AW-1:0] rd_ptr;
  logic          rd_en, rd_en_q, rd_last_q;
  logic [AW-1:0] rd_idx_q;

  assign buf_free     = (state == EMPTY) || (state == HELD && !host_hold);
  assign window_ready = (state == HELD);
  assign rd_en        = (state == DRAIN);

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) dr_data <= mem[rd_ptr];
    host_data <= mem[host_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= EMPTY;
      rd_ptr    <= '0;
      rd_en_q   <= 1'b0;
      rd_last_q <= 1'b0;
      rd_idx_q  <= '0;
    end else begin
      rd_en_q   <= rd_en;
      rd_idx_q  <= rd_ptr;
      rd_last_q <= rd_en && (rd_ptr == AW'(WIN - 1));
      unique case (state)
        EMPTY, HELD: if (gate_on) state <= FILLING;
        FILLING:     if (wr_done) state <= FULL;
        FULL:        if (sink_ready) begin
                       state  <= DRAIN;
                       rd_ptr <= '0;
                     end
        DRAIN:       begin
                       rd_ptr <= rd_ptr + 1'b1;
                       if (rd_ptr == AW'(WIN - 1)) state <= HELD;
                     end
        default:     state <= EMPTY;
      endcase
    end
  end

  assign dr_valid = rd_en_q;
  assign dr_index = rd_idx_q;
  assign dr_last  = rd_last_q;

endmodule
