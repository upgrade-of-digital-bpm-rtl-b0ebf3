// tb_stripline_dsp: checks the four-electrode stripline processing.
// Streams windows holding a decaying 500 MHz-like burst whose amplitude
// differs per electrode; the reference computes each V by exact integer sums
// and roots and then x = k_x (V_A - V_C)/(V_A + V_C), y from B and D, with the
// same truncations as the fixed-point design.
module tb_stripline_dsp;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, result_valid;
  logic [8:0] in_index = '0, idx_s = 9'd200, idx_e = 9'd330;
  sample_vec_t in_sample;
  logic [31:0] k_x = 32'd5_000_000, k_y = 32'd4_000_000;
  logic [20:0] amp [NUM_CH];
  logic signed [31:0] pos_x, pos_y;
  int checks = 0, failures = 0;

  stripline_dsp dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
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

  task automatic window(input real g[NUM_CH]);
    longint sum[NUM_CH];
    longint v[NUM_CH];
    foreach (sum[c]) sum[c] = 0;
    for (int i = 0; i < 512; i++) begin
      for (int c = 0; c < NUM_CH; c++) begin
        real t = real'(i - 256);
        real s = (i < 256) ? 0.0 : g[c] * $exp(-t / 20.0) * $sin(2.0 * 3.14159265 * 0.27 * t);
        in_sample[c] = sample_t'($rtoi(s));
        if (i >= int'(idx_s) && i <= int'(idx_e))
          sum[c] += longint'(in_sample[c]) * longint'(in_sample[c]);
      end
      @(negedge clk);
      in_valid = 1; in_index = 9'(i); in_last = (i == 511);
      @(negedge clk);
      in_valid = 0;
    end
    in_last = 0;
    while (!result_valid) @(negedge clk);
    foreach (v[c]) begin
      v[c] = ref_sqrt(sum[c]);
      chk(longint'(amp[c]) == v[c], $sformatf("amp[%0d] %0d expected %0d", c, amp[c], v[c]));
    end
    chk(longint'(pos_x) == ref_pos(v[0], v[2], longint'(k_x)), $sformatf("x %0d expected %0d", pos_x, ref_pos(v[0], v[2], longint'(k_x))));
    chk(longint'(pos_y) == ref_pos(v[1], v[3], longint'(k_y)), $sformatf("y %0d expected %0d", pos_y, ref_pos(v[1], v[3], longint'(k_y))));
  endtask

  initial begin
    for (int c = 0; c < NUM_CH; c++) in_sample[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    window('{20000.0, 15000.0, 10000.0, 16000.0});
    window('{8000.0, 30000.0, 12000.0, 9000.0});
    idx_s = 9'd0; idx_e = 9'd511;
    window('{3000.0, 3000.0, 3000.0, 3000.0});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
