// tb_capture_ram: checks the successive-trigger archive (4 slots of 8).
// Before arming nothing is stored; after arming, windows go to slots 0..3,
// recording stops when full (a fifth window is not stored) and every stored
// sample reads back at {slot, index}. Re-arming restarts at slot 0.
module tb_capture_ram;
  import bpm_pkg::*;
  localparam int NT = 4, WIN = 8;
  logic clk = 0, rst_n = 0, arm = 0, in_valid = 0, in_last = 0;
  logic [2:0] in_index = '0;
  logic [63:0] in_data = '0, host_data;
  logic [4:0] host_addr = '0;
  logic [2:0] stored;
  logic recording, full;
  int checks = 0, failures = 0;

  capture_ram #(.NTRIG(NT), .WIN(WIN)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic logic [63:0] pat(input int w, input int i);
    return {32'(w), 32'(i * 3 + w * 100)};
  endfunction

  task automatic window(input int w);
    for (int i = 0; i < WIN; i++) begin
      @(negedge clk);
      in_valid = 1; in_index = 3'(i); in_data = pat(w, i); in_last = (i == WIN - 1);
    end
    @(negedge clk); in_valid = 0; in_last = 0;
  endtask

  task automatic pulse_arm();
    @(negedge clk); arm = 1; @(negedge clk); arm = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    window(99);
    chk(stored == 0 && !recording, "stored before arming");
    pulse_arm();
    chk(recording && stored == 0, "not recording after arm");
    for (int w = 0; w < NT + 1; w++) begin
      window(w);
      chk(stored == 3'(w < NT ? w + 1 : NT), $sformatf("stored %0d after %0d windows", stored, w + 1));
      chk(full == (w >= NT - 1), "full flag");
    end
    chk(!recording, "still recording when full");
    for (int s = 0; s < NT; s++)
      for (int i = 0; i < WIN; i++) begin
        @(negedge clk); host_addr = {2'(s), 3'(i)}; @(negedge clk);
        chk(host_data == pat(s, i), $sformatf("slot %0d sample %0d", s, i));
      end
    pulse_arm();
    window(7);
    @(negedge clk); host_addr = {2'd0, 3'd5}; @(negedge clk);
    chk(host_data == pat(7, 5) && stored == 1, "re-arm did not restart at slot 0");
    @(negedge clk); host_addr = {2'd1, 3'd5}; @(negedge clk);
    chk(host_data == pat(1, 5), "slot 1 overwritten after re-arm");
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
