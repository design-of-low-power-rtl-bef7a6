// approx_rca_tb: checks the approximate ripple-carry adder.
//
// Instances: one per cell variant (N = 16, Y = 4), an all-exact one (Y = 0)
// and an all-approximate one (Y = N = 8, approx 2). Each gets 2000 random
// operand pairs with random carry-in, compared bit for bit with the cell-level
// reference model. The exact instances are also compared with a + b + cin.
module approx_rca_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int N  = 16;
  localparam int Y  = 4;
  localparam int NV = 6;
  localparam fa_mode_e MODES [NV] = '{FA_ACCURATE, FA_APPROX1, FA_APPROX2,
                                      FA_APPROX3, FA_APPROX4, FA_APPROX5};

  logic [N-1:0] a, b;
  logic         cin;
  logic [N-1:0] sum  [NV];
  logic         cout [NV];
  logic [N-1:0] sum_x;   // Y = 0
  logic         cout_x;
  logic [7:0]   sum_f;   // Y = N = 8, approx 2
  logic         cout_f;
  int checks = 0, failures = 0;

  for (genvar v = 0; v < NV; v++) begin : g_dut
    approx_rca #(.N(N), .Y(Y), .MODE(MODES[v])) dut (
      .a(a), .b(b), .cin(cin), .sum(sum[v]), .cout(cout[v]));
  end
  approx_rca #(.N(N), .Y(0), .MODE(FA_APPROX3)) dut_x (
    .a(a), .b(b), .cin(cin), .sum(sum_x), .cout(cout_x));
  approx_rca #(.N(8), .Y(8), .MODE(FA_APPROX2)) dut_f (
    .a(a[7:0]), .b(b[7:0]), .cin(cin), .sum(sum_f), .cout(cout_f));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [64:0] r;
    logic [N:0]  exact;
    automatic int nerr = 0;
    for (int t = 0; t < 2000; t++) begin
      a   = N'($urandom);
      b   = N'($urandom);
      cin = 1'($urandom);
      if (t == 0) begin a = '1; b = '0; cin = 1'b1; end   // full carry ripple
      #1;
      exact = (N+1)'(a) + (N+1)'(b) + (N+1)'(cin);
      for (int v = 0; v < NV; v++) begin
        r = approx_add_ref(N, Y, MODES[v], 64'(a), 64'(b), cin);
        checks++;
        if ({cout[v], sum[v]} != r[N:0]) begin
          failures++;
          if (nerr++ < 10) $display("FAIL mode %0d a=%h b=%h cin=%b got %b_%h want %h",
                                    v, a, b, cin, cout[v], sum[v], r[N:0]);
        end
      end
      checks++;
      if ({cout_x, sum_x} != exact || {cout[0], sum[0]} != exact) begin
        failures++;
        if (nerr++ < 10) $display("FAIL exact a=%h b=%h cin=%b", a, b, cin);
      end
      r = approx_add_ref(8, 8, FA_APPROX2, 64'(a[7:0]), 64'(b[7:0]), cin);
      checks++;
      if ({cout_f, sum_f} != r[8:0]) begin
        failures++;
        if (nerr++ < 10) $display("FAIL all-approx a=%h b=%h", a[7:0], b[7:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
