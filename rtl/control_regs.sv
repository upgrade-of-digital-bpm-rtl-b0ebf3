// control_regs: register file between the host bus and the firmware.
//
// The embedded ARM host reads and writes the firmware through a simple
// 32-bit register bus (in the board this bus sits behind the PCIe endpoint).
// Writes update the configuration (trigger mode and threshold, period,
// stripline index range and k factors, cavity bin range, rotation and
// threshold phases, read addresses); reads return configuration, status,
// the latest results and raw samples of the held window and of the capture
// RAM (see bpm_pkg for the map). Writing 1 to CTRL bit 4 produces a one-cycle
// arm pulse for the capture RAM. That the host only configures and reads
// results follows the design; the bus, the map and the reset values are
// this implementation's choice.
//
// Timing: a write takes effect the cycle after `wr`; rdata/rvalid appear the
// cycle after `rd`. Unmapped addresses read as zero.
module control_regs
  import bpm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr,
  input  logic        rd,
  input  logic [7:0]  addr,
  input  logic [31:0] wdata,
  output logic [31:0] rdata,
  output logic        rvalid,
  output cfg_t        cfg,
  input  status_t     stat
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg.trig_mode <= TRIG_OFF;
      cfg.bpm_type  <= BPM_STRIPLINE;
      cfg.hold      <= 1'b0;
      cfg.ram_arm   <= 1'b0;
      cfg.threshold <= 16'd1000;
      cfg.period    <= 32'd1_172_800;     // 100 Hz at 117.28 MHz
      cfg.idx_s     <= '0;
      cfg.idx_e     <= IDX_W'(WIN_LEN - 1);
      cfg.k_x       <= 32'd1 << 20;
      cfg.k_y       <= 32'd1 << 20;
      cfg.lo_bin    <= IDX_W'(1);
      cfg.hi_bin    <= IDX_W'(WIN_LEN / 2 - 1);
      cfg.rot_x     <= '0;
      cfg.rot_y     <= '0;
      cfg.ph_thr    <= PH_W'(1 << (PH_W - 2));   // pi/2
      cfg.win_addr  <= '0;
      cfg.ram_addr  <= '0;
    end else begin
      cfg.ram_arm <= 1'b0;
      if (wr) begin
        unique case (addr)
          REG_CTRL: begin
            cfg.trig_mode <= trig_mode_e'(wdata[1:0]);
            cfg.bpm_type  <= bpm_type_e'(wdata[2]);
            cfg.hold      <= wdata[3];
            cfg.ram_arm   <= wdata[4];
          end
          REG_THRESHOLD: cfg.threshold <= wdata[ADC_W-1:0];
          REG_PERIOD:    cfg.period    <= wdata;
          REG_INDEX: begin
            cfg.idx_s <= wdata[IDX_W-1:0];
            cfg.idx_e <= wdata[16 +: IDX_W];
          end
          REG_K_X:       cfg.k_x <= wdata;
          REG_K_Y:       cfg.k_y <= wdata;
          REG_BINS: begin
            cfg.lo_bin <= wdata[IDX_W-1:0];
            cfg.hi_bin <= wdata[16 +: IDX_W];
          end
          REG_ROT: begin
            cfg.rot_x <= wdata[PH_W-1:0];
            cfg.rot_y <= wdata[16 +: PH_W];
          end
          REG_PH_THR:    cfg.ph_thr   <= wdata[PH_W-1:0];
          REG_WIN_ADDR:  cfg.win_addr <= wdata[IDX_W-1:0];
          REG_RAM_ADDR:  cfg.ram_addr <= wdata[RAM_AW-1:0];
          default: ;
        endcase
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rdata  <= '0;
      rvalid <= 1'b0;
    end else begin
      rvalid <= rd;
      if (rd) begin
        unique case (addr)
          REG_CTRL:      rdata <= {27'd0, 1'b0, cfg.hold, cfg.bpm_type, cfg.trig_mode};
          REG_THRESHOLD: rdata <= 32'(cfg.threshold);
          REG_PERIOD:    rdata <= cfg.period;
          REG_INDEX:     rdata <= {7'd0, cfg.idx_e, 7'd0, cfg.idx_s};
          REG_K_X:       rdata <= cfg.k_x;
          REG_K_Y:       rdata <= cfg.k_y;
          REG_BINS:      rdata <= {7'd0, cfg.hi_bin, 7'd0, cfg.lo_bin};
          REG_ROT:       rdata <= {cfg.rot_y, cfg.rot_x};
          REG_PH_THR:    rdata <= 32'(cfg.ph_thr);
          REG_WIN_ADDR:  rdata <= 32'(cfg.win_addr);
          REG_RAM_ADDR:  rdata <= 32'(cfg.ram_addr);
          REG_STATUS:    rdata <= {28'd0, stat.gate_on, stat.ram_full,
                                   stat.ram_recording, stat.win_held};
          REG_TRIGS:     rdata <= {stat.dropped, stat.accepted};
          REG_RESULTS:   rdata <= stat.results;
          REG_POS_X:     rdata <= stat.pos_x;
          REG_POS_Y:     rdata <= stat.pos_y;
          8'h15, 8'h16, 8'h17, 8'h18:
                         rdata <= 32'(stat.amp[addr[1:0] - 2'd1]);
          8'h19, 8'h1A, 8'h1B:
                         rdata <= 32'(stat.cav_amp[addr[1:0] - 2'd1]);
          REG_CAV_PH:    rdata <= {stat.cav_ph[1], stat.cav_ph[0]};
          REG_CAV_PH_R:  rdata <= 32'(stat.cav_ph[2]);
          REG_CAV_DIFF:  rdata <= {stat.cav_diff[1], stat.cav_diff[0]};
          REG_WIN_LO:    rdata <= stat.win_data[31:0];
          REG_WIN_HI:    rdata <= stat.win_data[63:32];
          REG_RAM_LO:    rdata <= stat.ram_data[31:0];
          REG_RAM_HI:    rdata <= stat.ram_data[63:32];
          REG_RAM_CNT:   rdata <= 32'(stat.ram_stored);
          default:       rdata <= '0;
        endcase
      end
    end
  end

endmodule
