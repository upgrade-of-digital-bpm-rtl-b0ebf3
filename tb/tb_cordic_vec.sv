// tb_cordic_vec: checks the pipelined vectoring CORDIC.
// Random vectors in all quadrants (including axis and extreme values) are
// streamed back to back; magnitude must match sqrt(re^2+im^2) within
// 1e-4 relative + 4 LSB, phase must match atan2 within 2 LSB of the 16-bit
// binary angle; tag and last must follow their vector after ITER+2 cycles.
module tb_cordic_vec;
  localparam int IN_W = 28, PH_W = 16, ITER = 18;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  logic signed [IN_W-1:0] in_re = '0, in_im = '0;
  logic [8:0] in_tag = '0, out_tag;
  logic [IN_W-1:0] out_mag;
  logic signed [PH_W-1:0] out_phase;
  int checks = 0, failures = 0;
  localparam int NV = 400;
  int vre[NV], vim[NV];

  cordic_vec dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  initial begin
    int lim = (1 << (IN_W - 1)) - 1;
    for (int i = 0; i < NV; i++) begin
      int sc = $urandom_range(4, IN_W - 1);
      vre[i] = int'($urandom_range(0, 2 * ((1 << sc) - 1))) - ((1 << sc) - 1);
      vim[i] = int'($urandom_range(0, 2 * ((1 << sc) - 1))) - ((1 << sc) - 1);
    end
    vre[0] = lim;  vim[0] = 0;
    vre[1] = -lim; vim[1] = 1;
    vre[2] = 0;    vim[2] = lim;
    vre[3] = 0;    vim[3] = -lim;
    vre[4] = -lim; vim[4] = -lim;
    vre[5] = 1000; vim[5] = -1000;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NV; i++) begin
      @(negedge clk);
      in_valid = 1; in_re = IN_W'(vre[i]); in_im = IN_W'(vim[i]);
      in_tag = 9'(i); in_last = (i == NV - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  end

  initial begin
    int got = 0, cyc = 0, first = -1;
    real m, p, dp;
    @(posedge rst_n);
    while (got < NV) begin
      @(posedge clk); #1; cyc++;
      if (out_valid) begin
        if (first < 0) first = cyc;
        m = $sqrt(real'(vre[got]) ** 2 + real'(vim[got]) ** 2);
        p = $atan2(real'(vim[got]), real'(vre[got])) / (2.0 * 3.141592653589793) * 65536.0;
        dp = real'(out_phase) - p;
        while (dp > 32768.0) dp -= 65536.0;
        while (dp < -32768.0) dp += 65536.0;
        chk(out_tag == 9'(got), "tag order");
        chk(out_last == (got == NV - 1), "last flag");
        chk((real'(out_mag) - m) < 1e-4 * m + 4.0 && (m - real'(out_mag)) < 1e-4 * m + 4.0,
            $sformatf("mag %0d expected %.1f (%0d,%0d)", out_mag, m, vre[got], vim[got]));
        chk(dp < 2.0 && dp > -2.0, $sformatf("phase %0d expected %.1f", out_phase, p));
        got++;
      end
    end
    chk(first == ITER + 2, $sformatf("latency %0d", first));
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
