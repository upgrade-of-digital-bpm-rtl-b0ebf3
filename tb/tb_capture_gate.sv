// tb_capture_gate: checks the ON/OFF gate between the FIFO stages.
// With a 16-sample window: a trigger opens the gate, exactly 16 valid samples
// are written at addresses 0..15 in order, `done` follows the last one;
// triggers while ON, while the buffer is not free or before the first stage
// is primed are dropped and counted.
module tb_capture_gate;
  import bpm_pkg::*;
  localparam int WIN = 16;
  logic clk = 0, rst_n = 0, trig = 0, primed = 1, buf_free = 1, in_valid = 0;
  logic [63:0] in_data, wr_data;
  logic wr_en, on, done;
  logic [3:0] wr_addr;
  logic [15:0] accepted, dropped;
  int checks = 0, failures = 0;
  int n = 0;

  capture_gate #(.WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // free-running stream with gaps; in_data = sample number
  always @(negedge clk) begin
    in_valid <= ($urandom_range(0, 4) != 0);
    if (in_valid) n <= n + 1;
  end
  assign in_data = 64'(n);

  task automatic capture(input int exp_acc, input int exp_drop);
    int writes = 0;
    logic [63:0] first;
    bit got_done = 0;
    bit mid = 0;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    while (!got_done) begin
      @(posedge clk); #1;
      if (wr_en) begin
        chk(wr_addr == 4'(writes), $sformatf("addr %0d, expected %0d", wr_addr, writes));
        if (writes == 0) first = wr_data;
        else chk(wr_data == first + 64'(writes), "non-consecutive samples");
        writes++;
      end
      if (done) got_done = 1;
      // a trigger while ON is dropped
      trig = (writes == 5 && !mid);   // one trigger while ON: dropped
      if (trig) mid = 1;
    end
    chk(writes == WIN, $sformatf("%0d writes", writes));
    #1 chk(!on, "gate still on");
    chk(accepted == 16'(exp_acc) && dropped == 16'(exp_drop),
        $sformatf("accepted %0d dropped %0d", accepted, dropped));
  endtask

  initial begin
    int w;
    repeat (3) @(posedge clk);
    rst_n = 1;
    capture(1, 1);
    capture(2, 2);
    // buffer busy: trigger dropped, no writes
    buf_free = 0;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    w = 0; repeat (40) begin @(posedge clk); #1; w += wr_en; end
    chk(w == 0 && dropped == 16'd3, "trigger accepted while buffer busy");
    buf_free = 1; primed = 0;
    @(negedge clk); trig = 1; @(negedge clk); trig = 0;
    w = 0; repeat (40) begin @(posedge clk); #1; w += wr_en; end
    chk(w == 0 && dropped == 16'd4, "trigger accepted before primed");
    primed = 1;
    capture(3, 5);
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
