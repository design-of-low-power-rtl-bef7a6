// approx_mult: W x W unsigned multiplier with an approximate final adder.
//
// The W partial products a & {W{b[i]}} << i are reduced to two rows by a
// linear array of exact carry-save rows (approx_csa with Y = 0): row k adds
// partial product k+2 to the running sum and carry vectors. The final
// carry-propagate addition of those two 2W-bit rows is an approx_rca whose
// Y least significant cells are approximate (MODE). So all error comes from
// the final adder, and only from its low-order bits.
//
// The structure (exact carry-save accumulation, approximate ripple-carry
// final adder) and W = 8 follow the design; Y and MODE defaults are this
// implementation's choices. Combinational: p is valid one array delay after
// a and b.
module approx_mult
  import approx_pkg::*;
#(
  parameter int       W    = 8,
  parameter int       Y    = 4,
  parameter fa_mode_e MODE = FA_APPROX1
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  localparam int PW = 2 * W;

  logic [PW-1:0] pp  [W];     // shifted partial products
  logic [PW-1:0] sv  [W-1];   // running sum row after stage k
  logic [PW-1:0] cv  [W-1];   // running carry row (already aligned)
  logic          unused_cout;

  for (genvar i = 0; i < W; i++) begin : g_pp
    assign pp[i] = PW'(a & {W{b[i]}}) << i;
  end

  // Stage 0 is just the first two partial products.
  assign sv[0] = pp[0];
  assign cv[0] = pp[1];

  for (genvar k = 1; k < W - 1; k++) begin : g_row
    logic [PW-1:0] c_raw;
    approx_csa #(.N(PW), .Y(0), .MODE(FA_ACCURATE)) u_csa (
      .x(sv[k-1]), .y(cv[k-1]), .z(pp[k+1]), .s(sv[k]), .c(c_raw)
    );
    assign cv[k] = c_raw << 1;   // the product fits in PW bits: nothing is lost
  end

  approx_rca #(.N(PW), .Y(Y), .MODE(MODE)) u_rca (
    .a(sv[W-2]), .b(cv[W-2]), .cin(1'b0), .sum(p), .cout(unused_cout)
  );

endmodule
