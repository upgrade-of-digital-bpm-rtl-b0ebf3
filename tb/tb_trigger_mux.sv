// tb_trigger_mux: checks trigger source selection.
// In each mode, pulses on all three sources are applied separately; only the
// selected one may appear at the output (external with its synchroniser
// latency and as a single pulse per rising edge).
module tb_trigger_mux;
  import bpm_pkg::*;
  logic clk = 0, rst_n = 0, ext_trig = 0, self_trig = 0, period_trig = 0, trig;
  trig_mode_e mode = TRIG_OFF;
  int checks = 0, failures = 0;

  trigger_mux dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // apply a pulse on source src; return number of output pulses and the
  // cycle of the first one
  task automatic pulse(input int src, output int n, output int first);
    n = 0; first = -1;
    @(negedge clk);
    case (src)
      0: ext_trig = 1;
      1: self_trig = 1;
      default: period_trig = 1;
    endcase
    @(negedge clk);
    self_trig = 0; period_trig = 0;
    for (int i = 1; i < 20; i++) begin
      if (i == 6) ext_trig = 0;      // external held high for several cycles
      if (trig) begin n++; if (first < 0) first = i; end
      @(negedge clk);
    end
  endtask

  initial begin
    int n, first;
    trig_mode_e modes[4] = '{TRIG_EXT, TRIG_SELF, TRIG_PERIOD, TRIG_OFF};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (modes[m]) begin
      mode = modes[m];
      for (int src = 0; src < 3; src++) begin
        pulse(src, n, first);
        if (int'(mode) == src) begin
          chk(n == 1, $sformatf("mode %0d src %0d: %0d pulses", mode, src, n));
          chk(first == (src == 0 ? 3 : 1),
              $sformatf("mode %0d src %0d: latency %0d", mode, src, first));
        end else begin
          chk(n == 0, $sformatf("mode %0d src %0d leaked", mode, src));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
