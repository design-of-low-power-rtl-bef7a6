// approx_rca: N-bit ripple-carry adder with approximate low-order cells.
//
// The Y least significant bit positions use the approximate full-adder cell
// chosen by MODE; positions Y .. N-1 use the exact cell. Keeping the exact
// cells in the high-order bits bounds the error to the low-order part of the
// word, while the approximate low-order cells shorten the carry chain and cut
// switched capacitance. With Y = 0 this is an exact adder; with FA_APPROX5
// the carry into position Y is simply A[Y-1] (no carry is computed inside the
// approximate part).
//
// The split into approximate LSBs and exact MSBs follows the design; the
// default word width, Y and cell choice are this implementation's choices.
// Combinational: sum and cout settle one carry-chain delay after the inputs.
module approx_rca
  import approx_pkg::*;
#(
  parameter int       N    = 16,
  parameter int       Y    = 4,
  parameter fa_mode_e MODE = FA_APPROX1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);

  logic [N:0] c;   // c[i] is the carry into bit i

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam fa_mode_e CELL = (i < Y) ? MODE : FA_ACCURATE;
    approx_fa #(.MODE(CELL)) u_fa (
      .a(a[i]), .b(b[i]), .cin(c[i]), .sum(sum[i]), .cout(c[i+1])
    );
  end

  assign cout = c[N];

  initial begin
    assert (Y >= 0 && Y <= N) else $error("approx_rca: Y must lie in 0..N");
  end

endmodule
