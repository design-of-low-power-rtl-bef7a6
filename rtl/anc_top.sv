// anc_top: adaptive noise canceller on approximate arithmetic, with the
// approximate 8x8 multiplier beside it.
//
// The canceller takes two sample streams: ref_in, from a reference pick-up
// that hears (mostly) the ambient noise, and pri_in, from the primary pick-up
// that hears speech plus a filtered copy of that noise. An LMS-adapted FIR
// filter (lms_filter) shapes the reference noise into an estimate of the
// noise in the primary input and subtracts it; the difference, clean_out, is
// both the cleaned speech and the error that drives adaptation. All additions
// of the filter and of its weight update go through ripple-carry adders whose
// low-order cells are approximate.
//
// The approximate multiplier (approx_mult) is an independent unit: an exact
// carry-save array followed by an approximate final adder. Its operands and
// product are brought out on their own ports.
//
// Timing: one sample per clock when in_valid is high; clean_out and
// noise_est are valid when out_valid is high, one clock after the sample.
// mul_p is combinational in mul_a and mul_b. Reset is synchronous, active low.
module anc_top
  import approx_pkg::*;
#(
  parameter int       TAPS     = 16,
  parameter int       DW       = 16,
  parameter int       CW       = 16,
  parameter int       MU_SHIFT = 4,
  parameter int       ACC_Y    = 8,
  parameter int       UPD_Y    = 2,
  parameter fa_mode_e MODE     = FA_APPROX1,
  parameter int       MUL_W    = 8,
  parameter int       MUL_Y    = 4,
  parameter fa_mode_e MUL_MODE = FA_APPROX1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // noise canceller
  input  logic                   in_valid,
  input  logic signed [DW-1:0]   ref_in,
  input  logic signed [DW-1:0]   pri_in,
  output logic                   out_valid,
  output logic signed [DW-1:0]   clean_out,
  output logic signed [DW-1:0]   noise_est,
  output logic signed [CW-1:0]   weights [TAPS],
  // approximate multiplier
  input  logic [MUL_W-1:0]       mul_a,
  input  logic [MUL_W-1:0]       mul_b,
  output logic [2*MUL_W-1:0]     mul_p
);

  lms_filter #(
    .TAPS(TAPS), .DW(DW), .CW(CW), .MU_SHIFT(MU_SHIFT),
    .ACC_Y(ACC_Y), .UPD_Y(UPD_Y), .MODE(MODE)
  ) u_lms (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid),
    .x_in(ref_in), .d_in(pri_in),
    .out_valid(out_valid), .e_out(clean_out), .y_out(noise_est),
    .w_out(weights)
  );

  approx_mult #(.W(MUL_W), .Y(MUL_Y), .MODE(MUL_MODE)) u_mult (
    .a(mul_a), .b(mul_b), .p(mul_p)
  );

endmodule
