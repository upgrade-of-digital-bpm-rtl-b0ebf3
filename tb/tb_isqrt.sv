// tb_isqrt: checks the sequential square root (42-bit radicand).
// Edge values and random radicands of all magnitudes; the reference root r
// satisfies r*r <= x < (r+1)*(r+1), computed in 64-bit integers. Also checks
// the latency of IN_W/2 + 1 cycles from start to done.
module tb_isqrt;
  localparam int IN_W = 42;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [IN_W-1:0] radicand = '0;
  logic [IN_W/2-1:0] root;
  int checks = 0, failures = 0;

  isqrt #(.IN_W(IN_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  function automatic longint ref_sqrt(input longint x);
    longint r = longint'($sqrt(real'(x)));
    while (r * r > x) r--;
    while ((r + 1) * (r + 1) <= x) r++;
    return r;
  endfunction

  task automatic one(input longint x);
    int lat = 0;
    @(negedge clk); radicand = IN_W'(x); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    chk(longint'(root) == ref_sqrt(x), $sformatf("sqrt(%0d) = %0d", x, root));
    chk(lat == IN_W / 2 + 1, $sformatf("latency %0d", lat));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4); one(99); one(100);
    one((longint'(1) << IN_W) - 1);
    for (int i = 0; i < 300; i++) begin
      int b = $urandom_range(1, IN_W);
      longint x = (longint'({$urandom, $urandom})) & ((longint'(1) << b) - 1);
      one(x);
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
