// anc_top_tb: end-to-end run of the noise canceller at its default size.
//
// 24000 samples (three seconds at 8 kHz) are streamed through the canceller:
// the reference input is white noise in +-0.25, the primary input is a
// three-tone "speech" signal whose tones change every 4000 samples, plus the
// reference noise through a 3-tap acoustic path (0.5, -0.3, 0.15) that
// changes half way through, so the filter must re-adapt. Every output,
// noise estimate and weight is compared with the reference model each
// sample; out_valid must follow in_valid by one clock. Noise must be cut to
// under a tenth of its power over the last 1000 samples before and after the
// path change. The approximate multiplier is driven with random operands on
// every cycle and compared with a carry-save reference followed by the
// approximate adder model, and with a*b to within 2^(Y+1).
//
// Events counted, each of which must occur: weight updates, samples whose
// approximate sum of products differs from the exact one, idle cycles
// (in_valid low), re-adaptation after the path change, and multiplier
// products that differ from a*b.
module anc_top_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;
  import lms_ref_pkg::*;

  // Defaults of anc_top, restated for the reference model.
  localparam int TAPS = 16, DW = 16, CW = 16, MU = 4, ACC_Y = 8, UPD_Y = 2;
  localparam fa_mode_e MODE = FA_APPROX1;
  localparam int MW = 8, MY = 4;
  localparam fa_mode_e MMODE = FA_APPROX1;
  localparam int NS = 24000;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [DW-1:0] ref_in = '0, pri_in = '0;
  logic out_valid;
  logic signed [DW-1:0] clean_out, noise_est;
  logic signed [CW-1:0] weights [TAPS];
  logic [MW-1:0] mul_a = '0, mul_b = '0;
  logic [2*MW-1:0] mul_p;
  int checks = 0, failures = 0;

  anc_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (NS * 2 + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [2*MW-1:0] mult_ref(logic [MW-1:0] a, logic [MW-1:0] b);
    logic [2*MW-1:0] s, c, pp, ns;
    logic [64:0] r;
    s = (2*MW)'(a & {MW{b[0]}});
    c = (2*MW)'(a & {MW{b[1]}}) << 1;
    for (int k = 2; k < MW; k++) begin
      pp = (2*MW)'(a & {MW{b[k]}}) << k;
      ns = s ^ c ^ pp;
      c  = ((s & c) | (s & pp) | (c & pp)) << 1;
      s  = ns;
    end
    r = approx_add_ref(2*MW, MY, MMODE, 64'(s), 64'(c), 1'b0);
    return r[2*MW-1:0];
  endfunction

  initial begin
    LmsRef m;
    longint xh [3];
    longint g [3];
    longint spch, noise;
    automatic real pn1 = 0, pr1 = 0, pn2 = 0, pr2 = 0, f1, f2, f3;
    automatic int nerr = 0, n = 0, mdiff;
    automatic int ev_update = 0, ev_approx = 0, ev_idle = 0, ev_mult = 0, ev_readapt = 0;
    bit bad;
    logic signed [CW-1:0] wprev [TAPS];
    m = new(TAPS, DW, CW, MU, ACC_Y, UPD_Y, MODE);
    xh = '{0, 0, 0};
    g  = '{16384, -9830, 4915};
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
    for (int i = 0; i < TAPS; i++) wprev[i] = weights[i];
    while (n < NS) begin
      // multiplier: new random operands every cycle, checked after settling
      mul_a <= MW'($urandom);
      mul_b <= MW'($urandom);
      if ($urandom_range(7) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
        #1;
        ev_idle++;
        checks++;
        if (out_valid) begin failures++; $display("FAIL out_valid without input"); end
      end else begin
        if (n == NS / 2) begin
          g = '{-8192, 13107, 6554};   // acoustic path changes: -0.25, 0.4, 0.2
          ev_readapt++;
        end
        f1 = 0.02 + 0.01 * (n / 4000);
        f2 = 0.13 + 0.02 * (n / 4000);
        f3 = 0.41 - 0.03 * (n / 4000);
        xh[2] = xh[1]; xh[1] = xh[0];
        xh[0] = longint'($urandom_range(16384)) - 8192;
        spch  = longint'($rtoi(2500.0 * $sin(f1 * n) + 1800.0 * $sin(f2 * n)
                               + 900.0 * $sin(f3 * n)));
        noise = (g[0] * xh[0] + g[1] * xh[1] + g[2] * xh[2]) >>> 15;
        ref_in <= DW'(xh[0]);
        pri_in <= DW'(spch + noise);
        in_valid <= 1'b1;
        if (m.step(xh[0], spch + noise)) ev_approx++;
        @(posedge clk);
        #1;
        bad = !out_valid || clean_out != DW'(m.e) || noise_est != DW'(m.y);
        for (int i = 0; i < TAPS; i++) begin
          if (weights[i] != CW'(m.w[i])) bad = 1;
          if (weights[i] != wprev[i]) ev_update++;
          wprev[i] = weights[i];
        end
        checks++;
        if (bad) begin
          failures++;
          if (nerr++ < 10) $display("FAIL n=%0d e=%0d/%0d y=%0d/%0d", n, clean_out, m.e,
                                    noise_est, m.y);
        end
        if (n >= NS / 2 - 1000 && n < NS / 2) begin
          pn1 += real'(noise) ** 2; pr1 += real'(m.e - spch) ** 2;
        end
        if (n >= NS - 1000) begin
          pn2 += real'(noise) ** 2; pr2 += real'(m.e - spch) ** 2;
        end
        n++;
      end
      mdiff = int'(mul_p) - int'(mul_a) * int'(mul_b);
      if (mdiff != 0) ev_mult++;
      checks++;
      if (mul_p != mult_ref(mul_a, mul_b) || mdiff >= 2 ** (MY + 1) || -mdiff >= 2 ** (MY + 1)) begin
        failures++;
        if (nerr++ < 10) $display("FAIL mult %0d*%0d=%0d", mul_a, mul_b, mul_p);
      end
    end
    in_valid <= 1'b0;
    $display("residual/noise power: before path change %0.4f, after %0.4f", pr1 / pn1, pr2 / pn2);
    $display("events: weight updates %0d, approximate sums %0d, idle cycles %0d, path changes %0d, inexact products %0d",
             ev_update, ev_approx, ev_idle, ev_readapt, ev_mult);
    checks++; if (pr1 >= 0.1 * pn1) begin failures++; $display("FAIL no cancellation (1)"); end
    checks++; if (pr2 >= 0.1 * pn2) begin failures++; $display("FAIL no re-adaptation (2)"); end
    checks++; if (ev_update == 0)  begin failures++; $display("FAIL no weight update"); end
    checks++; if (ev_approx == 0)  begin failures++; $display("FAIL approximation never acted"); end
    checks++; if (ev_idle == 0)    begin failures++; $display("FAIL no idle cycle"); end
    checks++; if (ev_readapt == 0) begin failures++; $display("FAIL no path change"); end
    checks++; if (ev_mult == 0)    begin failures++; $display("FAIL multiplier always exact"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
