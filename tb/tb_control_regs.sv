// tb_control_regs: checks the host register file.
// Writes every configuration register and reads it back, checks field
// placement in the cfg output, the one-cycle RAM arm pulse, read-only
// status fields, raw-data registers and that unmapped addresses read zero.
module tb_control_regs;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, wr = 0, rd = 0, rvalid;
  logic [7:0] addr = '0;
  logic [31:0] wdata = '0, rdata;
  cfg_t cfg;
  status_t stat;
  int checks = 0, failures = 0;

  control_regs dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); wr = 1; addr = a; wdata = d;
    @(negedge clk); wr = 0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); rd = 1; addr = a;
    @(negedge clk); rd = 0;
    chk(rvalid, "rvalid missing");
    d = rdata;
  endtask

  initial begin
    logic [31:0] d;
    int arms = 0;
    stat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    chk(cfg.trig_mode == TRIG_OFF && cfg.idx_e == 9'd511, "reset values");
    wreg(REG_CTRL, 32'h0000_000E);   // period mode, cavity, hold
    chk(cfg.trig_mode == TRIG_PERIOD && cfg.bpm_type == BPM_CAVITY && cfg.hold, "CTRL fields");
    rreg(REG_CTRL, d); chk(d == 32'h0000_000E, $sformatf("CTRL read %h", d));
    fork
      wreg(REG_CTRL, 32'h0000_0011);
      repeat (4) begin @(posedge clk); #1 arms += cfg.ram_arm; end
    join
    chk(arms == 1 && cfg.trig_mode == TRIG_SELF && !cfg.hold, $sformatf("arm pulses %0d", arms));
    wreg(REG_THRESHOLD, 32'h0000_1234); chk(cfg.threshold == 16'h1234, "threshold");
    wreg(REG_PERIOD, 32'd11728);        chk(cfg.period == 32'd11728, "period");
    wreg(REG_INDEX, {7'd0, 9'd300, 7'd0, 9'd200});
    chk(cfg.idx_s == 9'd200 && cfg.idx_e == 9'd300, "index range");
    wreg(REG_K_X, 32'd5_000_000);       chk(cfg.k_x == 32'd5_000_000, "k_x");
    wreg(REG_K_Y, 32'd6_000_000);       chk(cfg.k_y == 32'd6_000_000, "k_y");
    wreg(REG_BINS, {7'd0, 9'd90, 7'd0, 9'd40});
    chk(cfg.lo_bin == 9'd40 && cfg.hi_bin == 9'd90, "bins");
    wreg(REG_ROT, 32'hABCD_1234);       chk(cfg.rot_x == 16'h1234 && cfg.rot_y == 16'hABCD, "rot");
    wreg(REG_PH_THR, 32'h0000_2000);    chk(cfg.ph_thr == 16'h2000, "ph_thr");
    wreg(REG_WIN_ADDR, 32'h0000_0105);  chk(cfg.win_addr == 9'h105, "win_addr");
    wreg(REG_RAM_ADDR, 32'h0007_ABCD);  chk(cfg.ram_addr == 19'h7ABCD, "ram_addr");
    rreg(REG_INDEX, d); chk(d == {7'd0, 9'd300, 7'd0, 9'd200}, "index read");
    rreg(REG_ROT, d);   chk(d == 32'hABCD_1234, "rot read");
    rreg(REG_RAM_ADDR, d); chk(d == 32'h0007_ABCD, "ram_addr read");
    stat.win_held = 1; stat.ram_full = 1; stat.accepted = 16'd7; stat.dropped = 16'd3;
    stat.results = 32'd99; stat.pos_x = -32'sd1234; stat.pos_y = 32'sd777;
    for (int c = 0; c < 4; c++) stat.amp[c] = STRIP_AMP_W'(100 + c);
    for (int c = 0; c < 3; c++) stat.cav_amp[c] = CAV_W'(1000 + c);
    stat.cav_ph = {16'h3333, 16'h2222, 16'h1111};
    stat.cav_diff = {16'h5555, 16'h4444};
    stat.win_data = 64'h0123_4567_89AB_CDEF;
    stat.ram_data = 64'hFEDC_BA98_7654_3210;
    stat.ram_stored = 11'd1024;
    rreg(REG_STATUS, d);  chk(d == 32'h5, $sformatf("status %h", d));
    rreg(REG_TRIGS, d);   chk(d == {16'd3, 16'd7}, "trigs");
    rreg(REG_RESULTS, d); chk(d == 32'd99, "results");
    rreg(REG_POS_X, d);   chk(d == 32'(-1234), "pos_x");
    rreg(REG_POS_Y, d);   chk(d == 32'd777, "pos_y");
    for (int c = 0; c < 4; c++) begin
      rreg(REG_AMP0 + 8'(c), d); chk(d == 32'(100 + c), $sformatf("amp %0d read %0d", c, d));
    end
    for (int c = 0; c < 3; c++) begin
      rreg(REG_CAV_AMP0 + 8'(c), d); chk(d == 32'(1000 + c), $sformatf("cav amp %0d", c));
    end
    rreg(REG_CAV_PH, d);   chk(d == 32'h2222_1111, "cav phase");
    rreg(REG_CAV_PH_R, d); chk(d == 32'h0000_3333, "cav phase r");
    rreg(REG_CAV_DIFF, d); chk(d == 32'h5555_4444, "cav diff");
    rreg(REG_WIN_LO, d); chk(d == 32'h89AB_CDEF, "win lo");
    rreg(REG_WIN_HI, d); chk(d == 32'h0123_4567, "win hi");
    rreg(REG_RAM_LO, d); chk(d == 32'h7654_3210, "ram lo");
    rreg(REG_RAM_HI, d); chk(d == 32'hFEDC_BA98, "ram hi");
    rreg(REG_RAM_CNT, d); chk(d == 32'd1024, "ram count");
    rreg(8'h7F, d); chk(d == 0, "unmapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
