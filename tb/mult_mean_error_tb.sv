// mult_mean_error_tb: error of the 8x8 approximate multiplier for every cell
// variant and several numbers of approximate bits in its final adder.
//
// Twenty approx_mult instances (approximations 1 to 5, Y = 2, 4, 6, 8) are
// driven with all 65536 operand pairs. For each pair the testbench forms the
// two rows an exact carry-save array leaves, by its own bit-level reduction,
// and adds them with the reference approximate adder; each instance must
// match that bit for bit. The mean error and the largest error against a*b
// are printed for each configuration. This is the error side of the
// multiplier's power/error trade-off; power itself is not modelled.
module mult_mean_error_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int W  = 8;
  localparam int NM = 5;
  localparam int NY = 4;
  localparam fa_mode_e MODES [NM] = '{FA_APPROX1, FA_APPROX2, FA_APPROX3,
                                      FA_APPROX4, FA_APPROX5};
  localparam int YS [NY] = '{2, 4, 6, 8};

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p [NM][NY];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < NM; m++) begin : g_m
    for (genvar y = 0; y < NY; y++) begin : g_y
      approx_mult #(.W(W), .Y(YS[y]), .MODE(MODES[m])) dut (.a(a), .b(b), .p(p[m][y]));
    end
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint esum [NM][NY];
    int     emax [NM][NY];
    int     bad  [NM][NY];
    logic [2*W-1:0] s, c, pp, ns;
    logic [64:0]    r;
    int diff;
    for (int m = 0; m < NM; m++)
      for (int y = 0; y < NY; y++) begin esum[m][y] = 0; emax[m][y] = 0; bad[m][y] = 0; end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      s = (2*W)'(a & {W{b[0]}});
      c = (2*W)'(a & {W{b[1]}}) << 1;
      for (int k = 2; k < W; k++) begin
        pp = (2*W)'(a & {W{b[k]}}) << k;
        ns = s ^ c ^ pp;
        c  = ((s & c) | (s & pp) | (c & pp)) << 1;
        s  = ns;
      end
      for (int m = 0; m < NM; m++)
        for (int y = 0; y < NY; y++) begin
          r = approx_add_ref(2*W, YS[y], MODES[m], 64'(s), 64'(c), 1'b0);
          if (p[m][y] != r[2*W-1:0]) bad[m][y]++;
          diff = int'(p[m][y]) - int'(a) * int'(b);
          esum[m][y] += longint'(diff);
          if (diff > emax[m][y]) emax[m][y] = diff;
          if (-diff > emax[m][y]) emax[m][y] = -diff;
        end
    end
    for (int m = 0; m < NM; m++)
      for (int y = 0; y < NY; y++) begin
        $display("approx %0d  Y=%0d  mean error %9.3f  max |error| %0d  mismatches %0d",
                 m + 1, YS[y], real'(esum[m][y]) / 65536.0, emax[m][y], bad[m][y]);
        checks++;
        if (bad[m][y] != 0 || emax[m][y] >= 2 ** (YS[y] + 1)) failures++;
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
