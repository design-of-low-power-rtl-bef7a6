// approx_csa_tb: checks the carry-save adder row.
//
// An exact row (Y = 0) must satisfy x + y + z == s + 2c for random operands.
// Rows with approximate low-order cells (approx 1 and approx 5, Y = 4) are
// compared position by position with the cell reference model, and their
// upper bits must equal those of the exact row.
module approx_csa_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int N = 16;
  localparam int Y = 4;

  logic [N-1:0] x, y, z;
  logic [N-1:0] s0, c0, s1, c1, s5, c5;
  int checks = 0, failures = 0;

  approx_csa #(.N(N), .Y(0), .MODE(FA_APPROX1)) dut0 (.x(x), .y(y), .z(z), .s(s0), .c(c0));
  approx_csa #(.N(N), .Y(Y), .MODE(FA_APPROX1)) dut1 (.x(x), .y(y), .z(z), .s(s1), .c(c1));
  approx_csa #(.N(N), .Y(Y), .MODE(FA_APPROX5)) dut5 (.x(x), .y(y), .z(z), .s(s5), .c(c5));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N+1:0] lhs, rhs;
    logic [1:0]   o1, o5;
    logic         bad;
    automatic int nerr = 0;
    for (int t = 0; t < 2000; t++) begin
      x = N'($urandom); y = N'($urandom); z = N'($urandom);
      #1;
      lhs = (N+2)'(x) + (N+2)'(y) + (N+2)'(z);
      rhs = (N+2)'(s0) + ((N+2)'(c0) << 1);
      checks++;
      if (lhs != rhs) begin
        failures++;
        if (nerr++ < 10) $display("FAIL exact x=%h y=%h z=%h", x, y, z);
      end
      bad = 1'b0;
      for (int i = 0; i < N; i++) begin
        o1 = fa_ref((i < Y) ? FA_APPROX1 : FA_ACCURATE, x[i], y[i], z[i]);
        o5 = fa_ref((i < Y) ? FA_APPROX5 : FA_ACCURATE, x[i], y[i], z[i]);
        if ({c1[i], s1[i]} != o1 || {c5[i], s5[i]} != o5) bad = 1'b1;
      end
      if (s1[N-1:Y] != s0[N-1:Y] || c1[N-1:Y] != c0[N-1:Y]) bad = 1'b1;
      if (s5[N-1:Y] != s0[N-1:Y] || c5[N-1:Y] != c0[N-1:Y]) bad = 1'b1;
      checks++;
      if (bad) begin
        failures++;
        if (nerr++ < 10) $display("FAIL approx x=%h y=%h z=%h", x, y, z);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
