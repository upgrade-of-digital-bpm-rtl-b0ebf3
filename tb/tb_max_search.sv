// tb_max_search: checks the spectral peak search.
// Streams random spectra with one planted peak, sometimes with a larger
// value outside the bin range, and a spectrum with two equal maxima (first
// one must win); the reference peak is found by a plain scan.
module tb_max_search;
  localparam int NB = 256;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, peak_valid;
  logic [8:0] lo_bin = 9'd1, hi_bin = 9'd255, in_index = '0, peak_index;
  logic [27:0] in_mag = '0, peak_mag;
  logic signed [15:0] in_phase = '0, peak_phase;
  int checks = 0, failures = 0;

  max_search dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic spectrum(input int lo, input int hi, input int kind);
    int mag[NB], ph[NB];
    int best = -1;
    lo_bin = 9'(lo); hi_bin = 9'(hi);
    for (int b = 0; b < NB; b++) begin
      mag[b] = $urandom_range(0, 100000);
      ph[b]  = $urandom_range(0, 65535);
    end
    mag[$urandom_range(lo, hi)] = 5000000;
    if (kind == 1) mag[0] = 9000000;                 // DC outside range
    if (kind == 2) begin mag[lo + 2] = 7000000; mag[hi - 1] = 7000000; end
    for (int b = lo; b <= hi; b++) if (best < 0 || mag[b] > mag[best]) best = b;
    for (int b = 0; b < NB; b++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      while (!in_valid) begin @(negedge clk); in_valid = ($urandom_range(0, 3) != 0); end
      in_index = 9'(b); in_mag = 28'(mag[b]); in_phase = 16'(ph[b]); in_last = (b == NB - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    #1 chk(peak_valid, "no peak_valid");
    chk(peak_index == 9'(best) && peak_mag == 28'(mag[best]) && peak_phase == 16'(ph[best]),
        $sformatf("peak at %0d, expected %0d", peak_index, best));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    spectrum(1, 255, 0);
    spectrum(1, 255, 1);
    spectrum(20, 80, 2);
    spectrum(0, 255, 1);
    spectrum(30, 30, 0);
    for (int i = 0; i < 5; i++) spectrum(1, 255, i % 3);
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
