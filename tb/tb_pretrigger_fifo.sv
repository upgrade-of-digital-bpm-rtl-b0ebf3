// tb_pretrigger_fifo: checks the 256-deep first capture stage.
// Feeds a numbered sample stream with random gaps in `valid` and checks that
// `primed` rises after exactly DEPTH samples and that every output is the
// input from DEPTH valid samples earlier.
module tb_pretrigger_fifo;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, primed;
  logic [63:0] in_data = '0, out_data;
  int checks = 0, failures = 0;

  pretrigger_fifo dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond && failures < 10) $display("FAIL: %s", msg);
    if (!cond) failures++;
  endtask

  function automatic logic [63:0] pattern(input int n);
    return {16'(n * 7), 16'(n * 5 + 1), 16'(n * 3 + 2), 16'(n)};
  endfunction

  initial begin
    int n = 0, outs = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    while (outs < 1000) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_data  = pattern(n);
      @(posedge clk); #1;
      if (in_valid) begin
        n++;
        chk(primed == (n >= 256), $sformatf("primed=%0d after %0d samples", primed, n));
      end
      if (out_valid) begin
        // output produced by input sample n-1, which is sample n-1-256
        chk(out_data == pattern(n - 1 - 256), $sformatf("out %h at n=%0d", out_data, n));
        outs++;
      end else begin
        chk(!(in_valid && n > 257), "missing output");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
