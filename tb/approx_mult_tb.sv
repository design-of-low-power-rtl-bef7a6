// approx_mult_tb: exhaustive check of the 8x8 approximate multiplier.
//
// Two instances: one with an exact final adder (Y = 0), which must give a*b
// for all 65536 operand pairs, and the default one (approx 1 in the 4 low
// bits of the final adder). For the latter the testbench forms the two rows
// an exact carry-save array leaves (by its own bit-level reduction) and adds
// them with the reference approximate adder; the product must match exactly,
// and its error against a*b must stay below 2^(Y+1). The mean error over all
// pairs is reported.
module approx_mult_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int W = 8;
  localparam int Y = 4;

  logic [W-1:0]   a, b;
  logic [2*W-1:0] p_exact, p_apx;
  int checks = 0, failures = 0;

  approx_mult #(.W(W), .Y(0), .MODE(FA_APPROX1)) dut_x (.a(a), .b(b), .p(p_exact));
  approx_mult dut (.a(a), .b(b), .p(p_apx));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*W-1:0] s, c, pp, ns, nc;
    logic [64:0]    r;
    automatic longint         err_sum = 0;
    automatic int             nerr = 0, maxerr = 0, diff;
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      // independent carry-save reduction of the partial products
      s = (2*W)'(a & {W{b[0]}});
      c = (2*W)'(a & {W{b[1]}}) << 1;
      for (int k = 2; k < W; k++) begin
        pp = (2*W)'(a & {W{b[k]}}) << k;
        ns = s ^ c ^ pp;
        nc = ((s & c) | (s & pp) | (c & pp)) << 1;
        s = ns; c = nc;
      end
      r = approx_add_ref(2*W, Y, FA_APPROX1, 64'(s), 64'(c), 1'b0);
      diff = int'(p_apx) - int'(a) * int'(b);
      err_sum += diff;
      if (diff > maxerr) maxerr = diff;
      if (-diff > maxerr) maxerr = -diff;
      checks++;
      if (p_exact != (2*W)'(a * b) || p_apx != r[2*W-1:0] || diff >= 2 ** (Y+1) || -diff >= 2 ** (Y+1)) begin
        failures++;
        if (nerr++ < 10) $display("FAIL a=%0d b=%0d exact=%0d apx=%0d ref=%0d",
                                  a, b, p_exact, p_apx, r[2*W-1:0]);
      end
    end
    $display("mean error %0.4f, max |error| %0d", real'(err_sum) / 65536.0, maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
