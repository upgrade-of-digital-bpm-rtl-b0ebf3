// tb_stripline_position: checks x = k (V_A - V_C)/(V_A + V_C).
// Reference: ratio = floor(|V_A - V_C| * 2^16 / (V_A + V_C)), then
// x = sign * floor(ratio * k / 2^16), in 64-bit integers. Also checks the
// zero-sum case and the latency.
module tb_stripline_position;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, pos_valid, div0;
  logic [20:0] va = '0, vc = '0;
  logic [31:0] k = '0;
  logic signed [31:0] pos;
  logic [16:0] ratio;
  int checks = 0, failures = 0;

  stripline_position dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  task automatic one(input longint a, input longint c, input longint kk);
    int lat;
    longint r, x;
    @(negedge clk); va = 21'(a); vc = 21'(c); k = 32'(kk); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!pos_valid) begin @(negedge clk); lat++; end
    if (a + c == 0) begin
      chk(div0, "zero sum not flagged");
    end else begin
      r = ((a > c ? a - c : c - a) << 16) / (a + c);
      x = (r * kk) >> 16;
      if (c > a) x = -x;
      chk(longint'(ratio) == r, $sformatf("ratio %0d expected %0d", ratio, r));
      chk(longint'(pos) == x, $sformatf("pos %0d expected %0d (a=%0d c=%0d k=%0d)", pos, x, a, c, kk));
      chk(lat == 22 + 16 + 3, $sformatf("latency %0d", lat));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(1000, 1000, 5000000);
    one(2000, 1000, 5000000);
    one(1000, 2000, 5000000);
    one(1, 0, 5000000);
    one(0, 0, 5000000);
    one((1 << 21) - 1, (1 << 21) - 1, 32'hFFFF_FFFF);
    for (int i = 0; i < 200; i++)
      one($urandom_range(0, (1 << 21) - 1), $urandom_range(1, (1 << 21) - 1), $urandom_range(0, 32'h7FFF_FFFF));
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
