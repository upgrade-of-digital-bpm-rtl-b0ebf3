// tb_cavity_dsp: checks the complete cavity BPM processing.
// Position and reference cavities ring at the same frequency; the position
// signals are in phase (beam on the + side) or in antiphase (- side) with
// the reference, after an arbitrary common phase. Reference values are
// analytic: x = +/- k A_x / A_r (0.5 % tolerance), y likewise.
module tb_cavity_dsp;
  import bpm_pkg::*;
  localparam int N = 512, B = 77;
  logic clk = 0, rst_n = 0, ready, in_valid = 0, in_last = 0, result_valid;
  logic [8:0] in_index = '0, lo_bin = 9'd1, hi_bin = 9'd255;
  sample_t in_x = '0, in_y = '0, in_ref = '0;
  logic [31:0] k_x = 32'd2_000_000, k_y = 32'd3_000_000;
  logic signed [15:0] th_rot_x = '0, th_rot_y = '0, th_diff_x, th_diff_y;
  logic [15:0] th_thr = 16'd16384;
  logic [27:0] amp [3];
  logic signed [15:0] phase [3];
  logic signed [31:0] pos_x, pos_y;
  int checks = 0, failures = 0;

  cavity_dsp dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic bit near(input real v, input real e);
    real t = 0.005 * ((e < 0) ? -e : e) + 2.0;
    return (v - e) < t && (e - v) < t;
  endfunction

  // offx/offy: phase of x/y relative to ref (0 or pi, plus rotation error)
  task automatic shot(input real ax, input real ay, input real ar, input real offx,
                      input real offy, input real ph0);
    real ex, ey;
    while (!ready) @(negedge clk);
    for (int n = 0; n < N; n++) begin
      real w = 2.0 * 3.141592653589793 * B * n / N + ph0;
      @(negedge clk);
      in_valid = 1; in_index = 9'(n); in_last = (n == N - 1);
      in_x   = sample_t'($rtoi(ax * $cos(w + offx)));
      in_y   = sample_t'($rtoi(ay * $cos(w + offy)));
      in_ref = sample_t'($rtoi(ar * $cos(w)));
    end
    @(negedge clk); in_valid = 0; in_last = 0;
    while (!result_valid) @(negedge clk);
    ex = real'(k_x) * ax / ar * ($cos(offx) > 0 ? 1.0 : -1.0);
    ey = real'(k_y) * ay / ar * ($cos(offy) > 0 ? 1.0 : -1.0);
    chk(near(real'(pos_x), ex), $sformatf("x %0d expected %.0f", pos_x, ex));
    chk(near(real'(pos_y), ey), $sformatf("y %0d expected %.0f", pos_y, ey));
    chk(near(real'(amp[2]), ar * N / 2.0), $sformatf("v_r %0d", amp[2]));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    shot(3000.0, 1500.0, 20000.0, 0.0, 3.14159, 0.4);
    shot(5000.0, 8000.0, 15000.0, 3.14159, 0.0, -2.0);
    // a fixed cable phase of 0.8 rad on x, removed by the rotation setting
    th_rot_x = -16'(int'(0.8 / (2.0 * 3.141592653589793) * 65536.0));
    shot(1000.0, 200.0, 25000.0, 0.8, 3.0, 1.0);
    shot(1000.0, 200.0, 25000.0, 0.8 + 3.14159, 0.1, 2.5);
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
