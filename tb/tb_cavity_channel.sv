// tb_cavity_channel: checks FFT -> CORDIC -> max search on single tones.
// x[n] = A cos(2 pi b n / N + phi) plus noise has its peak in bin b with
// magnitude A N / 2 and phase phi; these analytic values are the reference
// (0.5 % on magnitude, 0.2 degree on phase). Also checks that the bin range
// excludes a stronger tone outside it, and the result latency.
module tb_cavity_channel;
  import bpm_pkg::*;
  localparam int N = 512;
  logic clk = 0, rst_n = 0, ready, in_valid = 0, in_last = 0, res_valid;
  logic [8:0] in_index = '0, lo_bin = 9'd1, hi_bin = 9'd255, bin;
  sample_t in_sample = '0;
  logic [27:0] amp;
  logic signed [15:0] phase;
  int checks = 0, failures = 0;

  cavity_channel dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic tone(input int b, input real a, input real phi, input int b2, input real a2);
    real em, ep, dp;
    int lat = 0;
    while (!ready) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      @(negedge clk);
      in_valid = 1; in_index = 9'(n); in_last = (n == N - 1);
      in_sample = sample_t'($rtoi(a * $cos(2.0 * 3.141592653589793 * b * n / N + phi)
                  + a2 * $cos(2.0 * 3.141592653589793 * b2 * n / N))
                  + int'($urandom_range(0, 40)) - 20);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!res_valid) begin @(negedge clk); lat++; end
    em = a * N / 2.0;
    ep = phi / (2.0 * 3.141592653589793) * 65536.0;
    dp = real'(phase) - ep;
    while (dp > 32768.0) dp -= 65536.0;
    while (dp < -32768.0) dp += 65536.0;
    chk(bin == 9'(b), $sformatf("peak bin %0d expected %0d", bin, b));
    chk(real'(amp) > 0.995 * em && real'(amp) < 1.005 * em, $sformatf("amp %0d expected %.0f", amp, em));
    chk(dp < 36.0 && dp > -36.0, $sformatf("phase %0d expected %.0f", phase, ep));
    chk(lat == N / 2 * 9 + N / 2 + 18 + 3, $sformatf("latency %0d", lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    tone(53, 12000.0, 0.7, 0, 0.0);
    tone(120, 3000.0, -2.5, 0, 0.0);
    tone(200, 20000.0, 3.0, 0, 0.0);
    lo_bin = 9'd40; hi_bin = 9'd90;
    tone(60, 5000.0, 1.2, 150, 15000.0);   // stronger tone outside range
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
