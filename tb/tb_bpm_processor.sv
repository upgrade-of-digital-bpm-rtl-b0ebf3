// tb_bpm_processor: end-to-end test of the BPM processor at full size.
//
// A signal generator plays the role of the RF front end and ADCs. The test
// walks the processor through its mechanisms with every parameter at its
// default (256/512-sample FIFO stages, 1024-trigger capture RAM, 512-point
// FFT):
//   1. stripline BPM, self-trigger: one bunch burst; checks the four
//      amplitudes and x/y against integer reference values, the host-held
//      window (trigger sample in the window centre) and that a second bunch
//      is dropped while the host holds the window;
//   2. stripline BPM, external trigger: a burst after the trigger edge;
//   3. period trigger with the capture RAM armed: a numbered sample stream;
//      the period is shorter than capture + drain, so every other trigger is
//      dropped; runs until 1024 successive windows are stored and checks
//      several of them through the host;
//   4. cavity BPM (mode switch), external trigger: position and reference
//      cavity tones in phase and in antiphase; checks x, y and their signs.
// Every mechanism is counted and must have occurred at least once.
module tb_bpm_processor;
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

  always #4.264 clk = ~clk;   // 117.28 MHz

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 20) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  // ------------------------------------------------------------ generator
  localparam real PI = 3.141592653589793;
  int   sig_mode = 0;          // 0 burst, 1 numbered stream, 2 cavity tones
  longint n = 0;               // sample number
  longint burst_t = -1000000;
  real  g[NUM_CH] = '{0.0, 0.0, 0.0, 0.0};
  real  cav_a[3] = '{0.0, 0.0, 0.0};
  real  cav_off[2] = '{0.0, 0.0};
  localparam int CAV_BIN = 77;

  function automatic int burst_val(input int c, input longint m);
    real t = real'(m - burst_t);
    if (m < burst_t || m >= burst_t + 150) return 0;
    return $rtoi(g[c] * $exp(-t / 20.0) * $sin(2.0 * PI * 0.27 * t + 0.5));
  endfunction

  function automatic int stream_val(input int c, input longint m);
    return int'(16'(m * (c + 1) + c * 1000));
  endfunction

  real w;
  always @(negedge clk) begin
    if (rst_n) begin
      adc_valid <= 1'b1;
      for (int c = 0; c < NUM_CH; c++) begin
        case (sig_mode)
          0: adc[c] <= sample_t'(burst_val(c, n));
          1: adc[c] <= sample_t'(stream_val(c, n));
          default: begin
            w = 2.0 * PI * CAV_BIN * real'(n) / 512.0;
            if (c < 2)       adc[c] <= sample_t'($rtoi(cav_a[c] * $cos(w + cav_off[c])));
            else if (c == 2) adc[c] <= sample_t'($rtoi(cav_a[2] * $cos(w)));
            else             adc[c] <= '0;
          end
        endcase
      end
      n <= n + 1;
    end
  end

  // ------------------------------------------------------------ host bus
  task automatic wreg(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); host_wr = 1; host_addr = a; host_wdata = d;
    @(negedge clk); host_wr = 0;
  endtask

  task automatic rreg(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); host_rd = 1; host_addr = a;
    @(negedge clk); host_rd = 0;
    d = host_rdata;
  endtask

  // read one sample set of the held window / of the capture RAM
  task automatic read_win(input int idx, output logic [63:0] w);
    logic [31:0] lo, hi;
    wreg(REG_WIN_ADDR, 32'(idx));
    rreg(REG_WIN_LO, lo); rreg(REG_WIN_HI, hi);
    w = {hi, lo};
  endtask

  task automatic read_ram(input int slot, input int idx, output logic [63:0] w);
    logic [31:0] lo, hi;
    wreg(REG_RAM_ADDR, 32'({10'(slot), 9'(idx)}));
    rreg(REG_RAM_LO, lo); rreg(REG_RAM_HI, hi);
    w = {hi, lo};
  endtask

  // ------------------------------------------------------------ references
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

  // mechanism counters
  int n_self = 0, n_ext = 0, n_period = 0, n_drop = 0, n_hold = 0, n_ram_full = 0;
  int n_strip = 0, n_cav_pos = 0, n_cav_neg = 0, n_switch = 0, n_results = 0;

  always @(posedge clk) if (pos_valid) n_results++;

  task automatic wait_result(output bit ok);
    int t = 0;
    ok = 0;
    while (t < 20000) begin
      @(posedge clk); t++;
      if (pos_valid) begin ok = 1; break; end
    end
    #1;
    chk(ok, "no result");
  endtask

  localparam logic [31:0] KX = 32'd5_000_000, KY = 32'd4_000_000;

  // check a stripline result against the burst's exact integer reference
  task automatic check_strip(input string tag);
    longint sum[NUM_CH], v[NUM_CH];
    logic [31:0] d;
    for (int c = 0; c < NUM_CH; c++) begin
      sum[c] = 0;
      for (longint m = burst_t; m < burst_t + 150; m++)
        sum[c] += longint'(burst_val(c, m)) * longint'(burst_val(c, m));
      v[c] = ref_sqrt(sum[c]);
    end
    chk(longint'(pos_x) == ref_pos(v[0], v[2], longint'(KX)),
        $sformatf("%s: x %0d expected %0d", tag, pos_x, ref_pos(v[0], v[2], longint'(KX))));
    chk(longint'(pos_y) == ref_pos(v[1], v[3], longint'(KY)),
        $sformatf("%s: y %0d expected %0d", tag, pos_y, ref_pos(v[1], v[3], longint'(KY))));
    for (int c = 0; c < NUM_CH; c++) begin
      rreg(REG_AMP0 + 8'(c), d);
      chk(longint'(d) == v[c], $sformatf("%s: amp %0d = %0d expected %0d", tag, c, d, v[c]));
    end
    rreg(REG_POS_X, d);
    chk(d == 32'(pos_x), "POS_X register");
    n_strip++;
  endtask

  initial begin
    logic [31:0] d;
    logic [63:0] w;
    bit ok;
    int acc0, drop0;
    for (int c = 0; c < NUM_CH; c++) adc[c] = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;

    // ---------------- 1. stripline, self trigger, host hold
    wreg(REG_THRESHOLD, 32'd1000);
    wreg(REG_INDEX, {7'd0, 9'd500, 7'd0, 9'd200});
    wreg(REG_K_X, KX);
    wreg(REG_K_Y, KY);
    wreg(REG_CTRL, {28'd0, 1'b1, 1'b0, 2'(TRIG_SELF)});   // hold, stripline, self
    repeat (400) @(posedge clk);                           // prime the first stage
    g = '{20000.0, 15000.0, 10000.0, 16000.0};
    burst_t = n + 20;
    wait_result(ok);
    if (ok) begin
      check_strip("self");
      n_self++;
    end
    repeat (20) @(posedge clk);
    rreg(REG_STATUS, d);
    chk(d[0], "window not held");
    // trigger sample (first above threshold) sits at index 254
    read_win(254, w);
    chk(sample_t'(w[15:0]) == sample_t'(burst_val(0, burst_t)), $sformatf("window[254] = %0d", sample_t'(w[15:0])));
    read_win(253, w);
    chk(w == '0, "window[253] not before the burst");
    read_win(300, w);
    chk(sample_t'(w[47:32]) == sample_t'(burst_val(2, burst_t + 46)), "window[300] ch2");
    n_hold++;
    // a second bunch while held: dropped
    rreg(REG_TRIGS, d); drop0 = int'(d[31:16]);
    burst_t = n + 20;
    repeat (1000) @(posedge clk);
    rreg(REG_TRIGS, d);
    chk(int'(d[31:16]) == drop0 + 1, "trigger not dropped while held");
    if (int'(d[31:16]) > drop0) n_drop++;

    // ---------------- 2. stripline, external trigger
    wreg(REG_CTRL, {28'd0, 1'b0, 1'b0, 2'(TRIG_EXT)});
    repeat (300) @(posedge clk);
    g = '{9000.0, 25000.0, 14000.0, 6000.0};
    @(negedge clk); ext_trig = 1;
    burst_t = n + 30;
    repeat (10) @(negedge clk); ext_trig = 0;
    wait_result(ok);
    if (ok) begin check_strip("ext"); n_ext++; end

    // ---------------- 3. period trigger, capture RAM, drops
    sig_mode = 1;
    wreg(REG_PERIOD, 32'd800);
    rreg(REG_TRIGS, d); acc0 = int'(d[15:0]); drop0 = int'(d[31:16]);
    wreg(REG_CTRL, {27'd0, 1'b1, 1'b0, 1'b0, 2'(TRIG_PERIOD)});   // arm RAM
    begin
      int t = 0;
      do begin
        repeat (5000) @(posedge clk);
        t += 5000;
        rreg(REG_STATUS, d);
      end while (!d[2] && t < 2_000_000);
    end
    chk(d[2], "capture RAM not full");
    if (d[2]) n_ram_full++;
    rreg(REG_RAM_CNT, d);
    chk(d == 32'd1024, $sformatf("RAM stored %0d windows", d));
    rreg(REG_TRIGS, d);
    n_period += int'(d[15:0]) - acc0;
    n_drop += int'(d[31:16]) - drop0;
    chk(int'(d[31:16]) - drop0 > 1000, "period triggers not dropped while busy");
    begin
      longint first[4];
      int slots[4] = '{0, 1, 511, 1023};
      foreach (slots[j]) begin
        read_ram(slots[j], 0, w);
        first[j] = longint'(w[15:0]);
        for (int i = 0; i < 512; i += 73) begin
          read_ram(slots[j], i, w);
          for (int c = 0; c < NUM_CH; c++)
            chk(w[c*16 +: 16] == 16'(stream_val(c, longint'(w[15:0]))) &&
                w[15:0] == 16'(first[j] + longint'(i)),
                $sformatf("RAM slot %0d sample %0d ch%0d", slots[j], i, c));
        end
      end
      // successive stored windows are two trigger periods (1600 samples) apart
      chk(16'(first[1] - first[0]) == 16'd1600, $sformatf("slot spacing %0d", 16'(first[1] - first[0])));
    end

    // ---------------- 4. cavity BPM, external trigger
    wreg(REG_CTRL, {28'd0, 1'b0, 1'(BPM_CAVITY), 2'(TRIG_EXT)});
    n_switch++;
    sig_mode = 2;
    for (int shot = 0; shot < 2; shot++) begin
      real ex, ey;
      cav_a = '{3000.0, 1200.0, 20000.0};
      cav_off = (shot == 0) ? '{0.0, PI} : '{PI, 0.0};
      repeat (1200) @(posedge clk);
      @(negedge clk); ext_trig = 1;
      repeat (10) @(negedge clk); ext_trig = 0;
      wait_result(ok);
      ex = real'(KX) * cav_a[0] / cav_a[2] * ((shot == 0) ? 1.0 : -1.0);
      ey = real'(KY) * cav_a[1] / cav_a[2] * ((shot == 0) ? -1.0 : 1.0);
      chk(real'(pos_x) > ex - 0.005 * 750000.0 && real'(pos_x) < ex + 0.005 * 750000.0,
          $sformatf("cavity x %0d expected %.0f", pos_x, ex));
      chk(real'(pos_y) > ey - 0.005 * 240000.0 && real'(pos_y) < ey + 0.005 * 240000.0,
          $sformatf("cavity y %0d expected %.0f", pos_y, ey));
      if (ok && pos_x > 0) n_cav_pos++;
      if (ok && pos_x < 0) n_cav_neg++;
      n_ext++;
    end
    rreg(REG_CAV_AMP0 + 8'd2, d);
    chk(real'(d) > 0.995 * 20000.0 * 256.0 && real'(d) < 1.005 * 20000.0 * 256.0, "cavity v_r register");

    // ---------------- mechanisms
    $display("mechanisms: self=%0d ext=%0d period=%0d dropped=%0d hold=%0d ram_full=%0d strip=%0d cav+=%0d cav-=%0d switch=%0d results=%0d",
             n_self, n_ext, n_period, n_drop, n_hold, n_ram_full, n_strip, n_cav_pos, n_cav_neg, n_switch, n_results);
    chk(n_self > 0, "self trigger never happened");
    chk(n_ext > 0, "external trigger never happened");
    chk(n_period > 0, "period trigger never happened");
    chk(n_drop > 0, "no trigger was dropped");
    chk(n_hold > 0, "window hold never happened");
    chk(n_ram_full > 0, "capture RAM never filled");
    chk(n_strip > 0, "no stripline result");
    chk(n_cav_pos > 0 && n_cav_neg > 0, "cavity sign not exercised both ways");
    chk(n_switch > 0, "BPM type never switched");
    rreg(REG_RESULTS, d);
    chk(int'(d) == n_results, $sformatf("result counter %0d vs %0d", d, n_results));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
