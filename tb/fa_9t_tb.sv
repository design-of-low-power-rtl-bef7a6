// fa_9t_tb: exhaustive check of the 9T full adder against A + B + Cin.
module fa_9t_tb;
  logic a, b, cin, sum, cout;
  int checks = 0, failures = 0;

  fa_9t dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, cin} = 3'(i);
      #1;
      checks++;
      if ({cout, sum} != 2'(a) + 2'(b) + 2'(cin)) begin
        failures++;
        $display("FAIL %b%b%b -> cout=%b sum=%b", a, b, cin, cout, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
