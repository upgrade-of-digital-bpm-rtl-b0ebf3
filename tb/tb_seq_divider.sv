// tb_seq_divider: checks the sequential fixed-point divider.
// quot must equal floor(num * 2^16 / den), computed in 64-bit integers, for
// edge and random operands; den = 0 must flag div0 with an all-ones
// quotient; latency NUM_W + FRAC + 1 cycles.
module tb_seq_divider;
  localparam int NW = 22, DW = 22, F = 16;
  logic clk = 0, rst_n = 0, start = 0, busy, done, div0;
  logic [NW-1:0] num = '0;
  logic [DW-1:0] den = '0;
  logic [NW+F-1:0] quot;
  int checks = 0, failures = 0;

  seq_divider #(.NUM_W(NW), .DEN_W(DW), .FRAC(F)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  task automatic one(input longint n, input longint d);
    int lat;
    longint q;
    @(negedge clk); num = NW'(n); den = DW'(d); start = 1;
    @(negedge clk); start = 0; lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    if (d == 0) begin
      chk(div0 && quot == '1, "divide by zero");
    end else begin
      q = (n << F) / d;
      chk(!div0 && longint'(quot) == q, $sformatf("%0d/%0d = %0d, expected %0d", n, d, quot, q));
      chk(lat == NW + F + 1, $sformatf("latency %0d", lat));
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    one(0, 5); one(5, 5); one(1, 3); one(3, 1); one(10, 0);
    one((1 << NW) - 1, 1); one((1 << NW) - 1, (1 << DW) - 1); one(1, (1 << DW) - 1);
    for (int i = 0; i < 300; i++)
      one(longint'($urandom_range(0, (1 << NW) - 1)) >> $urandom_range(0, 20),
          longint'($urandom_range(1, (1 << DW) - 1)) >> $urandom_range(0, 20));
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
