// tb_self_trigger: checks the amplitude self-trigger.
// Drives sample sets below and above the threshold (both signs, every
// channel) and checks one pulse per excursion, the holdoff re-arm rule and
// the enable input. Expected pulses are derived from the stimulus schedule.
module tb_self_trigger;
  import bpm_pkg::*;
  localparam int HOLD = 8;
  logic clk = 0, rst_n = 0, enable = 0, adc_valid = 0, trig;
  sample_vec_t adc;
  logic [15:0] threshold = 16'd1000;
  int checks = 0, failures = 0;

  self_trigger #(.HOLDOFF(HOLD)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // drive one sample set; return whether trig pulsed on the following cycle
  task automatic drive(input int ch, input int val, output bit fired);
    for (int c = 0; c < NUM_CH; c++) adc[c] = '0;
    adc[ch] = sample_t'(val);
    adc_valid = 1;
    @(posedge clk); #1;
    fired = trig;
  endtask

  initial begin
    bit f;
    int n;
    for (int c = 0; c < NUM_CH; c++) adc[c] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // disabled: nothing fires
    drive(0, 5000, f); chk(!f, "fired while disabled");
    enable = 1;
    drive(0, 0, f);
    for (int ch = 0; ch < NUM_CH; ch++) begin
      for (int sgn = 0; sgn < 2; sgn++) begin
        // quiet for the holdoff so the trigger is armed
        for (int i = 0; i < HOLD + 1; i++) drive(ch, 100, f);
        drive(ch, 1000, f); chk(!f, "fired at threshold (not above)");
        drive(ch, sgn ? -1001 : 1001, f); chk(f, $sformatf("no trig ch%0d sgn%0d", ch, sgn));
        // staying above: no second trigger
        n = 0;
        for (int i = 0; i < 20; i++) begin drive(ch, sgn ? -3000 : 3000, f); n += f; end
        chk(n == 0, "retriggered while above");
      end
    end
    // short quiet gap (< HOLD) does not re-arm
    for (int i = 0; i < HOLD + 1; i++) drive(1, 0, f);
    drive(1, 2000, f); chk(f, "armed trigger after holdoff");
    for (int i = 0; i < HOLD - 2; i++) drive(1, 0, f);
    drive(1, 2000, f); chk(!f, "re-armed before holdoff");
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
