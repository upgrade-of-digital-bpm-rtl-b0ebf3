// capture_ram: archive of the raw windows of successive triggers.
//
// After the host arms it, every drained window is written into the next of
// NTRIG slots (WIN samples of all four channels each). When NTRIG windows
// have been stored the RAM stops recording and raises `full`, so the host can
// read NTRIG successive triggered waveforms at leisure through a synchronous
// read port addressed by {slot, sample}. Arming again restarts at slot 0.
// The slot count (1024 successive triggers) follows the design description;
// in hardware this store lives in the board's external memory, modelled here
// as an on-chip array. The arm/stop protocol is this implementation's choice.
//
// Timing: host_data is valid one cycle after host_addr.
module capture_ram
  import bpm_pkg::*;
#(
  parameter int unsigned NTRIG = NUM_TRIG,
  parameter int unsigned WIN   = WIN_LEN,
  parameter int unsigned W     = NUM_CH * ADC_W
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic                                 arm,
  input  logic                                 in_valid,
  input  logic [$clog2(WIN)-1:0]               in_index,
  input  logic [W-1:0]                         in_data,
  input  logic                                 in_last,
  input  logic [$clog2(NTRIG)+$clog2(WIN)-1:0] host_addr,
  output logic [W-1:0]                         host_data,
  output logic [$clog2(NTRIG):0]               stored,
  output logic                                 recording,
  output logic                                 full
);

  localparam int unsigned SW = $clog2(NTRIG);
  localparam int unsigned IW = $clog2(WIN);

  logic [W-1:0]  mem [NTRIG * WIN];
  logic [SW-1:0] slot;
  logic          wr;

  assign full = (stored == (SW+1)'(NTRIG));
  assign wr   = recording && in_valid;

  always_ff @(posedge clk) begin
    if (wr) mem[{slot, in_index}] <= in_data;
    host_data <= mem[host_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      slot      <= '0;
      stored    <= '0;
      recording <= 1'b0;
    end else if (arm) begin
      slot      <= '0;
      stored    <= '0;
      recording <= 1'b1;
    end else if (wr && in_last) begin
      slot   <= slot + 1'b1;
      stored <= stored + 1'b1;
      if (stored == (SW+1)'(NTRIG - 1)) recording <= 1'b0;
    end
  end

  // in_index width is tied to WIN; IW documents the address split
  if (IW + SW != $bits(host_addr)) begin : g_bad_addr
    $error("capture_ram: address width mismatch");
  end

endmodule
