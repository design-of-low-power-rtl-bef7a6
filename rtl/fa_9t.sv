// fa_9t: exact one-bit full adder in the 9-transistor style.
//
// Rather than a sum tree, the cell splits the truth table on input A:
//   A = 0 : sum = B xor  Cin
//   A = 1 : sum = B xnor Cin
// so the sum is a 2:1 selection, by A, between an XOR and an XNOR of B and Cin.
// The carry is taken the same way: with A = 0 it is B and Cin, with A = 1 it
// is B or Cin. The sum split follows the design; the selection form of the
// carry is this implementation's choice (it equals A.B + Cin.(A xor B)).
// Purely combinational; no clock.
module fa_9t (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  logic bx;   // B xor Cin, shared by both halves

  always_comb begin
    bx   = b ^ cin;
    sum  = a ? ~bx : bx;
    cout = a ? (b | cin) : (b & cin);
  end

endmodule
