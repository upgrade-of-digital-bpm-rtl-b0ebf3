// tb_bpm_rates: bunch-rate workloads for the BPM processor (default sizes).
//
// Bunches arrive with an external trigger at a fixed rate, each one a burst
// on the stripline electrodes (or a tone pair on the cavities) whose
// position changes from bunch to bunch. Runs:
//   * 120 Hz and 50 Hz, stripline, then 120 Hz cavity: every bunch must give
//     exactly one result, with the right position, and no trigger may be
//     dropped. At 117.28 MHz a 120 Hz period is 977,333 clocks and 50 Hz is
//     2,345,600 clocks; a few bunches of each are simulated.
//   * 1 MHz (117 clocks per bunch), stripline: faster than one 512-sample
//     capture, so most triggers must be dropped; the accepted ones still give
//     correct results, and the achieved rate is reported.
module tb_bpm_rates;
  import bpm_pkg::*;

  logic clk = 0, rst_n = 0, adc_valid = 0, ext_trig = 0;
  sample_vec_t adc;
  logic host_wr = 0, host_rd = 0, host_rvalid;
  logic [7:0] host_addr = '0;
  logic [31:0] host_wdata = '0, host_rdata;
  logic pos_valid, trig_out;
  logic signed [31:0] pos_x, pos_y;
  logic signed [15:0] ph_diff_x, ph_diff_y;
  int checks = 0, failures = 0;

  bpm_processor dut (.*);

  always #4.264 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 20) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  localparam real PI = 3.141592653589793;
  localparam logic [31:0] KX = 32'd5_000_000, KY = 32'd4_000_000;
  localparam int CAV_BIN = 77;

  // generator: sig_mode 0 stripline bursts, 2 cavity tones
  int sig_mode = 0;
  longint n = 0;
  longint burst_t = -1000000;
  real g[NUM_CH] = '{0.0, 0.0, 0.0, 0.0};
  real cav_a[3] = '{0.0, 0.0, 20000.0};
  real cav_off[2] = '{0.0, 0.0};
  real w;

  function automatic int burst_val(input int c, input longint m);
    real t = real'(m - burst_t);
    if (m < burst_t || m >= burst_t + 100) return 0;
    return $rtoi(g[c] * $exp(-t / 15.0) * $sin(2.0 * PI * 0.27 * t + 0.5));
  endfunction

  always @(negedge clk) begin
    if (rst_n) begin
      adc_valid <= 1'b1;
      w = 2.0 * PI * CAV_BIN * real'(n) / 512.0;
      for (int c = 0; c < NUM_CH; c++) begin
        if (sig_mode == 0)  adc[c] <= sample_t'(burst_val(c, n));
        else if (c < 2)     adc[c] <= sample_t'($rtoi(cav_a[c] * $cos(w + cav_off[c])));
        else if (c == 2)    adc[c] <= sample_t'($rtoi(cav_a[2] * $cos(w)));
        else                adc[c] <= '0;
      end
      n <= n + 1;
    end
  end

  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_rd = 1; host_addr = a;
    @(negedge clk); host_rd = 0;
    d = host_rdata;
  endtask

  function automatic longint ref_sqrt(input longint x);
    longint r = longint'($sqrt(real'(x)));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  function automatic longint ref_pos(input longint a, input longint c, input longint kk);
    longint r, x;
    r = ((a > c ? a - c : c - a) << 16) / (a + c);
    x = (r * kk) >> 16;
    return (c > a) ? -x : x;
  endfunction

  // expected stripline x/y of the current burst
  task automatic strip_ref(output longint ex, output longint ey);
    longint v[NUM_CH];
    for (int c = 0; c < NUM_CH; c++) begin
      longint s = 0;
      for (longint m = burst_t; m < burst_t + 100; m++)
        s += longint'(burst_val(c, m)) * longint'(burst_val(c, m));
      v[c] = ref_sqrt(s);
    end
    ex = ref_pos(v[0], v[2], longint'(KX));
    ey = ref_pos(v[1], v[3], longint'(KY));
  endtask

  // result monitor
  int results = 0;
  longint rx, ry;
  always @(posedge clk) if (pos_valid) begin results++; rx = pos_x; ry = pos_y; end

  // one bunch: set its signal, fire the external trigger, burst 20 clocks later
  // (a cavity bunch's tones are set 1000 clocks ahead of its trigger)
  task automatic bunch(input int k, input bit cavity);
    if (cavity) begin
      cav_a[0] = 500.0 + 300.0 * k;
      cav_a[1] = 4000.0 - 700.0 * k;
      cav_off[0] = (k % 2) ? PI : 0.0;
      cav_off[1] = (k % 2) ? 0.0 : PI;
      // the window starts before the trigger, so the tones change early
      repeat (1000) @(negedge clk);
    end else begin
      g = '{10000.0 + 1500.0 * k, 12000.0, 14000.0 - 1000.0 * k, 9000.0 + 800.0 * k};
    end
    @(negedge clk); ext_trig = 1;
    burst_t = n + 20;
    repeat (4) @(negedge clk);
    ext_trig = 0;
  endtask

  // run nb bunches spaced by `period` clocks; check every one
  task automatic train(input string name, input int nb, input int period, input bit cavity);
    logic [31:0] d;
    int acc0, drop0, r0;
    rreg(REG_TRIGS, d); acc0 = int'(d[15:0]); drop0 = int'(d[31:16]);
    for (int k = 0; k < nb; k++) begin
      longint ex, ey;
      r0 = results;
      bunch(k, cavity);
      repeat (period - (cavity ? 1006 : 6)) @(posedge clk);
      chk(results == r0 + 1, $sformatf("%s bunch %0d: %0d results", name, k, results - r0));
      if (cavity) begin
        ex = longint'(real'(KX) * cav_a[0] / cav_a[2]) * ((k % 2) ? -1 : 1);
        ey = longint'(real'(KY) * cav_a[1] / cav_a[2]) * ((k % 2) ? 1 : -1);
        chk(rx - ex < 3000 && ex - rx < 3000 && ry - ey < 3000 && ey - ry < 3000,
            $sformatf("%s bunch %0d: (%0d,%0d) expected (%0d,%0d)", name, k, rx, ry, ex, ey));
      end else begin
        strip_ref(ex, ey);
        chk(rx == ex && ry == ey, $sformatf("%s bunch %0d: (%0d,%0d) expected (%0d,%0d)", name, k, rx, ry, ex, ey));
      end
    end
    rreg(REG_TRIGS, d);
    chk(int'(d[15:0]) - acc0 == nb && int'(d[31:16]) == drop0,
        $sformatf("%s: accepted %0d dropped %0d", name, int'(d[15:0]) - acc0, int'(d[31:16]) - drop0));
    $display("%s: %0d bunches, %0d clocks apart, all processed", name, nb, period);
  endtask

  initial begin
    logic [31:0] d;
    int acc0, drop0, r0, good;
    for (int c = 0; c < NUM_CH; c++) adc[c] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    wreg(REG_INDEX, {7'd0, 9'd450, 7'd0, 9'd220});
    wreg(REG_K_X, KX);
    wreg(REG_K_Y, KY);
    wreg(REG_CTRL, {28'd0, 1'b0, 1'(BPM_STRIPLINE), 2'(TRIG_EXT)});
    repeat (400) @(posedge clk);

    train("stripline 120 Hz", 3, 977_333, 1'b0);
    train("stripline 50 Hz", 2, 2_345_600, 1'b0);
    wreg(REG_CTRL, {28'd0, 1'b0, 1'(BPM_CAVITY), 2'(TRIG_EXT)});
    sig_mode = 2;
    repeat (1000) @(posedge clk);
    train("cavity 120 Hz", 3, 977_333, 1'b1);

    // 1 MHz: 117 clocks per bunch, stripline
    wreg(REG_CTRL, {28'd0, 1'b0, 1'(BPM_STRIPLINE), 2'(TRIG_EXT)});
    sig_mode = 0;
    repeat (3000) @(posedge clk);
    rreg(REG_TRIGS, d); acc0 = int'(d[15:0]); drop0 = int'(d[31:16]);
    r0 = results; good = 0;
    for (int k = 0; k < 200; k++) begin
      longint ex, ey;
      int rb = results;
      g = '{10000.0 + 20.0 * k, 12000.0, 14000.0, 9000.0};
      @(negedge clk); ext_trig = 1;
      burst_t = n + 20;
      repeat (4) @(negedge clk); ext_trig = 0;
      repeat (111) @(posedge clk);
    end
    repeat (3000) @(posedge clk);
    rreg(REG_TRIGS, d);
    chk(int'(d[15:0]) - acc0 == results - r0, "1 MHz: results differ from accepted triggers");
    chk(int'(d[31:16]) - drop0 > 150, "1 MHz: triggers were not dropped");
    chk(int'(d[15:0]) - acc0 + int'(d[31:16]) - drop0 == 200, "1 MHz: triggers lost");
    $display("1 MHz: 200 bunches, %0d processed, %0d dropped (about %0d kHz sustained)",
             int'(d[15:0]) - acc0, int'(d[31:16]) - drop0, (int'(d[15:0]) - acc0) * 1000 / 200);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (12_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
