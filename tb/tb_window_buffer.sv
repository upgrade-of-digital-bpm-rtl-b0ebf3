// tb_window_buffer: checks the second capture stage (16-sample window).
// Writes a window, checks it is drained once, in order, with index and
// `last`, only when the sink is ready; checks host random reads, the hold
// rule and that the buffer frees itself after the drain when not held.
module tb_window_buffer;
  import bpm_pkg::*;
  localparam int WIN = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, gate_on = 0, wr_done = 0, buf_free;
  logic [3:0] wr_addr = '0, dr_index, host_addr = '0;
  logic [63:0] wr_data = '0, dr_data, host_data;
  logic sink_ready = 0, dr_valid, dr_last, host_hold = 0, window_ready;
  int checks = 0, failures = 0;

  window_buffer #(.WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] pat(input int w, input int i);
    return {32'(w * 1000 + i), 32'hA5A5_0000 + 32'(i)};
  endfunction

  task automatic fill(input int w);
    @(negedge clk); gate_on = 1;
    @(negedge clk); gate_on = 0;
    #1 chk(!buf_free, "free while filling");
    for (int i = 0; i < WIN; i++) begin
      wr_en = 1; wr_addr = 4'(i); wr_data = pat(w, i);
      @(negedge clk);
    end
    wr_en = 0; wr_done = 1; @(negedge clk); wr_done = 0;
  endtask

  task automatic drain(input int w);
    int n = 0;
    repeat (10) begin @(posedge clk); #1 chk(!dr_valid, "drained while sink not ready"); end
    @(negedge clk); sink_ready = 1;
    repeat (WIN + 5) begin
      @(posedge clk); #1;
      if (dr_valid) begin
        chk(dr_index == 4'(n) && dr_data == pat(w, n), $sformatf("drain sample %0d", n));
        chk(dr_last == (n == WIN - 1), "last flag");
        n++;
      end
    end
    sink_ready = 0;
    chk(n == WIN, $sformatf("drained %0d samples", n));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    #1 chk(buf_free, "not free after reset");
    host_hold = 1;
    fill(1);
    drain(1);
    repeat (3) @(posedge clk); #1;
    chk(window_ready && !buf_free, "held window not kept");
    for (int i = WIN - 1; i >= 0; i -= 3) begin
      @(negedge clk); host_addr = 4'(i); @(negedge clk);
      chk(host_data == pat(1, i), $sformatf("host read %0d", i));
    end
    // releasing hold frees the buffer; new window replaces the old one
    host_hold = 0;
    #1 chk(buf_free, "not free after release");
    fill(2);
    drain(2);
    @(negedge clk); host_addr = 4'd7; @(negedge clk);
    chk(host_data == pat(2, 7), "host read of second window");
    #1 chk(buf_free, "not free after drain without hold");
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
