// approx_fa_tb: exhaustive check of every variant of the full-adder cell.
//
// One cell of each variant is instantiated; all eight input combinations are
// applied and both outputs compared with the Boolean reference model. The
// number of wrong Sum and Cout rows of each variant against an exact adder
// is also checked against the error counts of the truth tables
// (approx 1: Sum 2, Cout 1; approx 2: 2, 0; approx 3: 3, 1; approx 4: 3, 2;
// approx 5: Sum 4, Cout 2).
module approx_fa_tb;
  import approx_pkg::*;
  import approx_ref_pkg::*;

  localparam int NV = 6;
  localparam fa_mode_e MODES [NV] = '{FA_ACCURATE, FA_APPROX1, FA_APPROX2,
                                      FA_APPROX3, FA_APPROX4, FA_APPROX5};
  localparam int SUM_ERR  [NV] = '{0, 2, 2, 3, 3, 4};
  localparam int COUT_ERR [NV] = '{0, 1, 0, 1, 2, 2};

  logic a, b, cin;
  logic [NV-1:0] sum, cout;
  int checks = 0, failures = 0;

  for (genvar v = 0; v < NV; v++) begin : g_dut
    approx_fa #(.MODE(MODES[v])) dut (.a(a), .b(b), .cin(cin), .sum(sum[v]), .cout(cout[v]));
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int serr [NV];
    int cerr [NV];
    logic [1:0] exp_o, exact;
    for (int v = 0; v < NV; v++) begin serr[v] = 0; cerr[v] = 0; end
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      exact = 2'(a) + 2'(b) + 2'(cin);
      for (int v = 0; v < NV; v++) begin
        exp_o = fa_ref(MODES[v], a, b, cin);
        checks++;
        if ({cout[v], sum[v]} != exp_o) begin
          failures++;
          $display("FAIL mode %0d in %b%b%b: got %b%b want %b", v, a, b, cin,
                   cout[v], sum[v], exp_o);
        end
        if (sum[v]  != exact[0]) serr[v]++;
        if (cout[v] != exact[1]) cerr[v]++;
      end
    end
    for (int v = 0; v < NV; v++) begin
      checks++;
      if (serr[v] != SUM_ERR[v] || cerr[v] != COUT_ERR[v]) begin
        failures++;
        $display("FAIL mode %0d error rows sum=%0d cout=%0d", v, serr[v], cerr[v]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
