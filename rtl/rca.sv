// rca: W-bit ripple carry adder, s = a + b + cin, built from a chain of full
// adders so that the carry ripples from bit 0 to bit W-1 (RCA-1 and RCA-2 of
// the arithmetic unit). cout is the carry out of bit W-1. Combinational.
module rca #(
  parameter int W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i]       = a[i] ^ b[i] ^ carry[i];
    assign carry[i+1] = (a[i] & b[i]) | (carry[i] & (a[i] ^ b[i]));
  end

  assign cout = carry[W];

endmodule
