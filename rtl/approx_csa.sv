// approx_csa: N-bit carry-save adder (3:2 compressor row).
//
// Each bit position adds x[i], y[i] and z[i] in its own full-adder cell, with
// no carry propagation: s[i] is that cell's sum and c[i] its carry, which has
// weight 2^(i+1). So x + y + z = s + (c << 1) when every cell is exact. The Y
// least significant positions use the approximate cell chosen by MODE, the
// rest are exact. Using approximate cells only in the low-order positions of
// carry-save and ripple-carry structures follows the design; the defaults are
// this implementation's choices. Combinational, one cell delay.
module approx_csa
  import approx_pkg::*;
#(
  parameter int       N    = 16,
  parameter int       Y    = 4,
  parameter fa_mode_e MODE = FA_APPROX1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  input  logic [N-1:0] z,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);

  for (genvar i = 0; i < N; i++) begin : g_bit
    localparam fa_mode_e CELL = (i < Y) ? MODE : FA_ACCURATE;
    approx_fa #(.MODE(CELL)) u_fa (
      .a(x[i]), .b(y[i]), .cin(z[i]), .sum(s[i]), .cout(c[i])
    );
  end

  initial begin
    assert (Y >= 0 && Y <= N) else $error("approx_csa: Y must lie in 0..N");
  end

endmodule
