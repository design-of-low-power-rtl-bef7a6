// rca_mean_error_tb: mean error of the approximate ripple-carry adder.
//
// For each approximate cell (1 to 5) and each number of approximate
// low-order bits y = 1 .. 6, an 8-bit approx_rca is driven with all 65536
// operand pairs (carry-in 0), and the mean of (approximate sum - exact sum)
// is compared with the closed form for uniformly distributed operand bits:
//   approx 1: 0              approx 2: y/4          approx 3: 1 - 2^-y
//   approx 4: (1 - 2^(y-1))/4                       approx 5: 1/2
// The error variance is printed alongside. Exhaustive inputs make the
// measured means exact, so the comparison tolerance is only rounding.
module rca_mean_error_tb;
  import approx_pkg::*;

  localparam int N  = 8;
  localparam int NY = 6;
  localparam fa_mode_e MODES [5] = '{FA_APPROX1, FA_APPROX2, FA_APPROX3,
                                     FA_APPROX4, FA_APPROX5};

  logic [N-1:0] a, b;
  logic [N-1:0] s  [5][NY];
  logic         co [5][NY];
  int checks = 0, failures = 0;

  for (genvar m = 0; m < 5; m++) begin : g_m
    for (genvar y = 1; y <= NY; y++) begin : g_y
      approx_rca #(.N(N), .Y(y), .MODE(MODES[m])) dut (
        .a(a), .b(b), .cin(1'b0), .sum(s[m][y-1]), .cout(co[m][y-1]));
    end
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real expected(int m, int y);
    case (m)
      0:       return 0.0;
      1:       return real'(y) / 4.0;
      2:       return 1.0 - 2.0 ** (-y);
      3:       return (1.0 - 2.0 ** (y - 1)) / 4.0;
      default: return 0.5;
    endcase
  endfunction

  initial begin
    longint sum_e [5][NY];
    longint sum_e2 [5][NY];
    longint e;
    real mean, var_e;
    for (int m = 0; m < 5; m++)
      for (int y = 0; y < NY; y++) begin sum_e[m][y] = 0; sum_e2[m][y] = 0; end
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      for (int m = 0; m < 5; m++)
        for (int y = 0; y < NY; y++) begin
          e = longint'({co[m][y], s[m][y]}) - longint'(a) - longint'(b);
          sum_e[m][y]  += e;
          sum_e2[m][y] += e * e;
        end
    end
    for (int m = 0; m < 5; m++)
      for (int y = 0; y < NY; y++) begin
        mean  = real'(sum_e[m][y]) / 65536.0;
        var_e = real'(sum_e2[m][y]) / 65536.0 - mean * mean;
        $display("approx %0d  y=%0d  mean error %8.4f (expected %8.4f)  variance %9.3f",
                 m + 1, y + 1, mean, expected(m, y + 1), var_e);
        checks++;
        if (mean - expected(m, y + 1) > 1e-9 || expected(m, y + 1) - mean > 1e-9) begin
          failures++;
          $display("FAIL approx %0d y=%0d", m + 1, y + 1);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
