// tb_period_trigger: checks the periodic test trigger.
// Counts pulses and their spacing for several periods and checks that
// disabling stops the pulses.
module tb_period_trigger;
  logic clk = 0, rst_n = 0, enable = 0, trig;
  logic [31:0] period = 32'd10;
  int checks = 0, failures = 0;

  period_trigger dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int last, n, t;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int p = 3; p < 40; p += 7) begin
      period = 32'(p);
      enable = 1;
      last = -1; n = 0; t = 0;
      for (int i = 0; i < 10 * p + 2; i++) begin
        @(posedge clk); #1; t++;
        if (trig) begin
          if (last < 0) chk(t == p, $sformatf("first pulse at %0d, period %0d", t, p));
          else          chk(t - last == p, $sformatf("spacing %0d, period %0d", t - last, p));
          last = t; n++;
        end
      end
      chk(n == 10, $sformatf("%0d pulses for period %0d", n, p));
      enable = 0;
      n = 0;
      for (int i = 0; i < 50; i++) begin @(posedge clk); #1; n += trig; end
      chk(n == 0, "pulses while disabled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
