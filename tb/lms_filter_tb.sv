// lms_filter_tb: checks the LMS filter sample by sample against a reference
// model and checks that it actually cancels noise.
//
// Stimulus (default parameters: 16 taps, 16-bit Q1.15): reference noise x is
// uniform white noise in +-0.25; the primary input is a two-tone signal plus
// x passed through a 3-tap path (0.5, -0.3, 0.15). in_valid is dropped at
// random on about a quarter of the cycles. Checks: every output sample, noise
// estimate and weight equals the model; out_valid follows in_valid by exactly
// one clock; over the last 500 samples the residual noise (e - speech) has
// under a tenth of the power of the noise in the primary input.
module lms_filter_tb;
  import approx_pkg::*;
  import lms_ref_pkg::*;

  localparam int TAPS = 16, DW = 16, CW = 16, MU = 4, ACC_Y = 8, UPD_Y = 2;
  localparam fa_mode_e MODE = FA_APPROX1;
  localparam int NS = 3000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] x_in = '0, d_in = '0;
  logic out_valid;
  logic signed [DW-1:0] e_out, y_out;
  logic signed [CW-1:0] w_out [TAPS];
  int checks = 0, failures = 0;

  lms_filter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NS * 2 + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    LmsRef m;
    longint xh [3];
    longint spch, noise;
    automatic real pn = 0, pr = 0;
    automatic int nerr = 0, n = 0, approx_diff = 0;
    bit bad;
    m = new(TAPS, DW, CW, MU, ACC_Y, UPD_Y, MODE);
    xh = '{0, 0, 0};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // out_valid must be low after reset
    checks++;
    if (out_valid) failures++;
    while (n < NS) begin
      if ($urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
        continue;
      end
      xh[2] = xh[1]; xh[1] = xh[0];
      xh[0] = longint'($urandom_range(16384)) - 8192;       // +-0.25
      spch  = longint'($rtoi(3000.0 * $sin(0.07 * n) + 2000.0 * $sin(0.31 * n)));
      noise = (16384 * xh[0] - 9830 * xh[1] + 4915 * xh[2]) >>> 15;
      x_in <= DW'(xh[0]);
      d_in <= DW'(spch + noise);
      in_valid <= 1'b1;
      if (m.step(xh[0], spch + noise)) approx_diff++;
      @(posedge clk);
      #1;
      bad = !out_valid || e_out != DW'(m.e) || y_out != DW'(m.y);
      for (int i = 0; i < TAPS; i++) if (w_out[i] != CW'(m.w[i])) bad = 1;
      checks++;
      if (bad) begin
        failures++;
        if (nerr++ < 10) $display("FAIL n=%0d e=%0d/%0d y=%0d/%0d", n, e_out, m.e, y_out, m.y);
      end
      if (n >= NS - 500) begin
        pn += real'(noise) ** 2;
        pr += real'(m.e - spch) ** 2;
      end
      n++;
    end
    in_valid <= 1'b0;
    $display("residual/noise power %0.4f, approximate sums differing from exact: %0d",
             pr / pn, approx_diff);
    checks++;
    if (pr >= 0.1 * pn) begin failures++; $display("FAIL noise not cancelled"); end
    checks++;
    if (approx_diff == 0) begin failures++; $display("FAIL approximation never changed a sum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
