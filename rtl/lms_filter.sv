// lms_filter: adaptive FIR filter trained by the LMS rule, built on
// approximate adders.
//
// Per accepted sample n (in_valid high for one clock):
//   x vector   X(n) = {x(n), x(n-1), ..., x(n-TAPS+1)}   (x: reference input)
//   estimate   y(n) = sum_i w_i(n) * x(n-i)
//   error      e(n) = d(n) - y(n)                        (d: primary input)
//   update     w_i(n+1) = w_i(n) + mu * e(n) * x(n-i),   mu = 2^-MU_SHIFT
// In the noise canceller, x is the reference noise, d is speech plus noise,
// y is the estimate of the noise reaching the primary input and e is the
// cleaned speech.
//
// Number format: samples and weights are signed Q1.(DW-1) / Q1.(CW-1)
// fractions. The TAPS products are summed by a balanced tree of ACC_W-bit
// approx_rca adders (sums of one level are the operands of the next) whose
// ACC_Y low-order cells are approximate; y is that sum shifted
// back to Q1.(DW-1) and saturated. The weight update mu*e*x is formed by an
// exact multiply and arithmetic shift, and added to the weight by a CW-bit
// approx_rca with UPD_Y approximate cells. Weights wrap on overflow; e and y
// saturate to DW bits. The subtraction d - y is exact.
//
// The LMS equations, the use of approximate adders in the filter and the
// multilevel adder tree follow the design. TAPS, the word widths, mu, the fixed-point format, the number
// of approximate bits, the choice of cell and the handshake are this
// implementation's choices, as the design gives none of them.
//
// Timing: one sample per clock. e_out, y_out and the updated weights appear
// on the clock edge that accepts the sample; out_valid is high in the
// following cycle. Reset (active low, synchronous) clears the delay line and
// all weights.
module lms_filter
  import approx_pkg::*;
#(
  parameter int       TAPS     = 16,
  parameter int       DW       = 16,
  parameter int       CW       = 16,
  parameter int       MU_SHIFT = 4,
  parameter int       ACC_Y    = 8,
  parameter int       UPD_Y    = 2,
  parameter fa_mode_e MODE     = FA_APPROX1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [DW-1:0] x_in,
  input  logic signed [DW-1:0] d_in,
  output logic                 out_valid,
  output logic signed [DW-1:0] e_out,
  output logic signed [DW-1:0] y_out,
  output logic signed [CW-1:0] w_out [TAPS]
);

  localparam int PW    = DW + CW;                    // product width
  localparam int ACC_W = PW + $clog2(TAPS);           // accumulator width
  localparam int Y_SH  = CW - 1;                      // acc -> Q1.(DW-1)
  localparam int U_SH  = DW - 1 + MU_SHIFT;           // e*x (Q2.2(DW-1)) -> Q1.(CW-1) times mu
  localparam int UW    = 2 * DW;                      // e*x width
  localparam int LEVELS = $clog2(TAPS);               // adder-tree depth

  // Number of entries on level l of the adder tree.
  function automatic int nodes(int l);
    int n = TAPS;
    for (int k = 0; k < l; k++) n = (n + 1) / 2;
    return n;
  endfunction

  logic signed [DW-1:0] xd [TAPS];   // registered delay line, xd[0] = x(n-1)
  logic signed [CW-1:0] w  [TAPS];   // weights

  logic signed [DW-1:0]    xv   [TAPS];   // X(n) for this sample
  logic signed [ACC_W-1:0] prod [TAPS];   // w_i * x(n-i), sign extended
  logic        [ACC_W-1:0] acc_sum;                 // sum of all products
  logic signed [DW-1:0]    y_sat, e_sat;
  logic signed [CW-1:0]    w_nxt [TAPS];

  // ---------------------------------------------------------------- filter
  always_comb begin
    xv[0] = x_in;
    for (int i = 1; i < TAPS; i++) xv[i] = xd[i-1];
    for (int i = 0; i < TAPS; i++) prod[i] = ACC_W'(w[i] * xv[i]);
  end

  // Multilevel adder tree: level 0 holds the products; level l adds
  // neighbouring pairs of level l-1, an odd last entry passes through.
  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    logic [ACC_W-1:0] v [nodes(l)];
    for (genvar j = 0; j < nodes(l); j++) begin : g_node
      if (l == 0) begin : g_leaf
        assign v[j] = prod[j];
      end else if (2 * j + 1 < nodes(l - 1)) begin : g_add
        logic unused_c;
        approx_rca #(.N(ACC_W), .Y(ACC_Y), .MODE(MODE)) u_add (
          .a(g_lvl[l-1].v[2*j]), .b(g_lvl[l-1].v[2*j+1]), .cin(1'b0),
          .sum(v[j]), .cout(unused_c)
        );
      end else begin : g_pass
        assign v[j] = g_lvl[l-1].v[2*j];
      end
    end
  end

  assign acc_sum = g_lvl[LEVELS].v[0];

  // Saturate a wider signed value to DW bits.
  function automatic logic signed [DW-1:0] sat_dw(input logic signed [ACC_W:0] v);
    logic signed [ACC_W:0] hi, lo;
    hi = (ACC_W+1)'(2 ** (DW - 1) - 1);
    lo = -(ACC_W+1)'(2 ** (DW - 1));
    if (v > hi)      return DW'(hi);
    else if (v < lo) return DW'(lo);
    else             return DW'(v);
  endfunction

  always_comb begin
    logic signed [ACC_W:0] y_full, e_full;
    y_full = (ACC_W+1)'(signed'(acc_sum)) >>> Y_SH;
    y_sat  = sat_dw(y_full);
    e_full = (ACC_W+1)'(d_in) - (ACC_W+1)'(y_sat);
    e_sat  = sat_dw(e_full);
  end

  // ---------------------------------------------------------------- update
  for (genvar i = 0; i < TAPS; i++) begin : g_upd
    logic signed [UW-1:0] ex;
    logic signed [CW-1:0] step;
    logic                 unused_c;
    always_comb begin
      ex   = e_sat * xv[i];
      step = CW'(ex >>> U_SH);
    end
    approx_rca #(.N(CW), .Y(UPD_Y), .MODE(MODE)) u_add (
      .a(w[i]), .b(step), .cin(1'b0), .sum(w_nxt[i]), .cout(unused_c)
    );
  end

  // ---------------------------------------------------------------- state
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) begin
        xd[i] <= '0;
        w[i]  <= '0;
      end
      out_valid <= 1'b0;
      e_out     <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        for (int i = 0; i < TAPS; i++) begin
          xd[i] <= xv[i];
          w[i]  <= w_nxt[i];
        end
        e_out <= e_sat;
        y_out <= y_sat;
      end
    end
  end

  assign w_out = w;

  initial begin
    assert (TAPS >= 2) else $error("lms_filter: TAPS must be at least 2");
    assert (CW >= 2 && DW >= 2) else $error("lms_filter: widths too small");
  end

endmodule
