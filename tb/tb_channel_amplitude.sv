// tb_channel_amplitude: checks V = floor(sqrt(sum_{i=s..e} x_i^2)).
// Streams 512-sample windows (random samples, with gaps in valid) for several
// index ranges including full scale; the reference sum is formed in 64-bit
// integers. Also checks that amp_valid follows in_last by ACC_W/2 + 2 cycles.
module tb_channel_amplitude;
  import bpm_pkg::*;
  localparam int WIN = 512, ACC_W = 42;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, amp_valid;
  logic [8:0] in_index = '0, idx_s = '0, idx_e = '0;
  sample_t in_sample = '0;
  logic [ACC_W/2-1:0] amp;
  int checks = 0, failures = 0;

  channel_amplitude dut (.*);

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

  task automatic window(input int s, input int e, input int mode);
    longint sum = 0;
    int lat;
    idx_s = 9'(s); idx_e = 9'(e);
    for (int i = 0; i < WIN; i++) begin
      int v;
      case (mode)
        0: v = int'($urandom_range(0, 65535)) - 32768;
        1: v = -32768;
        default: v = int'($urandom_range(0, 2000)) - 1000;
      endcase
      if (i >= s && i <= e) sum += longint'(v) * longint'(v);
      while ($urandom_range(0, 3) == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk);
      in_valid = 1; in_index = 9'(i); in_sample = sample_t'(v); in_last = (i == WIN - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0; lat = 1;
    while (!amp_valid) begin @(negedge clk); lat++; end
    chk(longint'(amp) == ref_sqrt(sum), $sformatf("amp %0d, expected %0d (s=%0d e=%0d)", amp, ref_sqrt(sum), s, e));
    chk(lat == ACC_W / 2 + 2, $sformatf("latency %0d", lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    window(0, 511, 0);
    window(0, 511, 1);
    window(200, 300, 2);
    window(256, 256, 0);
    window(10, 5, 0);     // empty range
    for (int k = 0; k < 5; k++) begin
      int s = $urandom_range(0, 511);
      window(s, $urandom_range(s, 511), k % 3);
    end
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
