// tb_cavity_position: checks x = +/- k v_x / v_r with the phase sign rule.
// Reference (64-bit integers): ratio = floor(v_x 2^16 / v_r),
// |x| = floor(ratio k / 2^16) saturated to 31 bits, rotated difference
// d = theta_x - theta_r + theta_rot modulo 2^16, negative when |d| >= thr.
module tb_cavity_position;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pos_valid, negative;
  logic [27:0] v_x = '0, v_r = '0;
  logic signed [15:0] th_x = '0, th_r = '0, th_rot = '0, th_diff;
  logic [15:0] th_thr = 16'd16384;
  logic [31:0] k = '0;
  logic signed [31:0] pos;
  logic [43:0] ratio;
  int checks = 0, failures = 0;
  int nneg = 0, npos = 0;

  cavity_position dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  task automatic one(input longint vx, input longint vr, input int tx, input int tr,
                     input int rot, input int thr, input longint kk);
    int lat = 1;
    longint r, m;
    logic signed [15:0] d;
    bit neg;
    @(negedge clk);
    v_x = 28'(vx); v_r = 28'(vr); th_x = 16'(tx); th_r = 16'(tr); th_rot = 16'(rot);
    th_thr = 16'(thr); k = 32'(kk); start = 1;
    @(negedge clk); start = 0;
    while (!pos_valid) begin @(negedge clk); lat++; end
    r = (vx << 16) / vr;
    m = (r * kk) >> 16;
    if (m > 64'h7FFF_FFFF) m = 64'h7FFF_FFFF;
    d = 16'(tx - tr + rot);
    neg = !(((d < 0) ? -int'(d) : int'(d)) < thr);
    if (neg) nneg++; else npos++;
    chk(longint'(ratio) == r, $sformatf("ratio %0d expected %0d", ratio, r));
    chk(th_diff == d && negative == neg, $sformatf("phase diff %0d/%0d expected %0d/%0d", th_diff, negative, d, neg));
    chk(longint'(pos) == (neg ? -m : m), $sformatf("pos %0d expected %0d", pos, neg ? -m : m));
    chk(lat == 28 + 16 + 3, $sformatf("latency %0d", lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(1000, 2000, 100, 50, 0, 16384, 1000000);          // +, diff near 0
    one(1000, 2000, 100 + 32768, 50, 0, 16384, 1000000);  // -, diff near pi
    one(1000, 2000, 100, 50, 32768, 16384, 1000000);      // rotation flips sign
    one(250000000, 3, 0, 0, 0, 100, 32'hFFFFFFFF);        // saturates
    for (int i = 0; i < 200; i++)
      one($urandom_range(0, 1 << 27), $urandom_range(1, (1 << 28) - 1), $urandom_range(0, 65535),
          $urandom_range(0, 65535), $urandom_range(0, 65535), $urandom_range(0, 32768),
          $urandom_range(0, 32'h7FFFFFFF));
    chk(nneg > 10 && npos > 10, "sign cases not both exercised");
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
