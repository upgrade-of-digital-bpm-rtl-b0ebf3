// tb_fft_r2: checks the 512-point FFT against a direct DFT.
// Inputs: a two-tone signal with noise, a single full-scale tone and an
// impulse. Every output bin is compared with a floating-point DFT of the
// same integer samples; the allowed error covers twiddle quantisation and
// truncation (2e-4 of the summed input magnitude plus 64 LSB). Also checks
// the bin order and the documented compute time N/2*log2(N) cycles.
module tb_fft_r2;
  localparam int N = 512, DW = 28;
  logic clk = 0, rst_n = 0, ready, in_valid = 0, in_last = 0;
  logic [8:0] in_index = '0, out_index;
  logic signed [15:0] in_sample = '0;
  logic out_valid, out_last;
  logic signed [DW-1:0] out_re, out_im;
  int checks = 0, failures = 0;

  fft_r2 dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  task automatic run(input int kind);
    int x[N];
    real sumabs = 0, tol, er, ei, ph;
    int bin = 0, lat = 0;
    for (int n = 0; n < N; n++) begin
      case (kind)
        0: x[n] = $rtoi(9000.0 * $cos(2.0 * 3.141592653589793 * 37 * n / N + 0.3)
                        + 4000.0 * $sin(2.0 * 3.141592653589793 * 101 * n / N))
                  + int'($urandom_range(0, 200)) - 100;
        1: x[n] = $rtoi(32767.0 * $cos(2.0 * 3.141592653589793 * 200 * n / N));
        default: x[n] = (n == 3) ? -32768 : 0;
      endcase
      sumabs += (x[n] < 0) ? -x[n] : x[n];
    end
    tol = 2.0e-4 * sumabs + 64.0;
    // load in scrambled order to show the index is honoured
    for (int n = 0; n < N; n++) begin
      int m = (n * 5 + 3) % N;
      @(negedge clk);
      chk(ready, "not ready while loading");
      in_valid = 1; in_index = 9'(m); in_sample = 16'(x[m]); in_last = (n == N - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!out_valid) begin @(negedge clk); lat++; end
    chk(lat == N / 2 * 9 + 1, $sformatf("compute latency %0d", lat));
    while (out_valid) begin
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        ph = 2.0 * 3.141592653589793 * bin * n / N;
        er += x[n] * $cos(ph);
        ei -= x[n] * $sin(ph);
      end
      chk(out_index == 9'(bin), "bin order");
      chk((real'(out_re) - er) < tol && (er - real'(out_re)) < tol &&
          (real'(out_im) - ei) < tol && (ei - real'(out_im)) < tol,
          $sformatf("kind %0d bin %0d: (%0d,%0d) expected (%.0f,%.0f)", kind, bin, out_re, out_im, er, ei));
      chk(out_last == (bin == N / 2 - 1), "last flag");
      bin++;
      @(negedge clk);
    end
    chk(bin == N / 2, $sformatf("%0d bins", bin));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(0); run(1); run(2);
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
