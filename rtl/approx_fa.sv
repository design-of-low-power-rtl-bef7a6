// approx_fa: one-bit full-adder cell, exact or approximate.
//
// MODE selects the circuit at elaboration (see approx_pkg::fa_mode_e):
//   FA_ACCURATE : exact full adder, built from the 9T cell (fa_9t).
//   FA_APPROX1  : simplified mirror adder; errors on Sum for inputs (A,B,Cin)
//                 = 010 and 100 and on Cout for 010. Cout' = A.B + Cin.(A+B)
//                 with 010 forced to 1, i.e. Cout' = B.(A+Cin)+A.Cin... given
//                 below directly as the truth table.
//   FA_APPROX2  : exact Cout, Sum = not Cout (wrong for 000 and 111).
//   FA_APPROX3  : approximation 1's carry with Sum = not Cout.
//   FA_APPROX4  : Cout = A; Sum wrong for 010, 011 and 100.
//   FA_APPROX5  : Sum = B, Cout = A; Cin is not used at all.
// The five approximate truth tables are the design's; each is written here as
// an 8-entry table indexed by {A,B,Cin}. Combinational; no clock.
module approx_fa
  import approx_pkg::*;
#(
  parameter fa_mode_e MODE = FA_ACCURATE
) (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic cout
);

  // Truth tables, bit i is the output for {A,B,Cin} = i.
  //                               111..000
  localparam logic [7:0] S1 = 8'b1000_0010;
  localparam logic [7:0] C1 = 8'b1110_1100;
  localparam logic [7:0] S2 = 8'b0001_0111;
  localparam logic [7:0] C2 = 8'b1110_1000;
  localparam logic [7:0] S3 = 8'b0001_0011;
  localparam logic [7:0] C3 = C1;
  localparam logic [7:0] S4 = 8'b1000_1010;
  localparam logic [7:0] C4 = 8'b1111_0000;

  if (MODE == FA_ACCURATE) begin : g_exact
    fa_9t u_fa (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));
  end else if (MODE == FA_APPROX5) begin : g_a5
    // Buffers only: Sum follows B, Cout follows A.
    always_comb begin
      sum  = b;
      cout = a;
    end
  end else begin : g_table
    logic [2:0] idx;
    logic [7:0] st, ct;
    always_comb begin
      idx = {a, b, cin};
      unique case (MODE)
        FA_APPROX1: begin st = S1; ct = C1; end
        FA_APPROX2: begin st = S2; ct = C2; end
        FA_APPROX3: begin st = S3; ct = C3; end
        default:    begin st = S4; ct = C4; end
      endcase
      sum  = st[idx];
      cout = ct[idx];
    end
  end

endmodule
