// peb_bias: biasing circuit of the fixed-width Booth multiplier, following the
// modified probability-estimation-bias (PEB) formula
//     sigma = A' + floor((TP_major + B') / 2)
// where TP_major is the number of ones in column N-1 (the most significant of
// the N truncated columns) and A', B' are the integer part and the rounded
// fraction of 3N/32 + 0.5 (for N = 12: A' = 1, B' = 1). The expected carry of
// the remaining N-1 truncated columns is thus a constant. sigma is added at
// the least significant kept column. Combinational. Counting the major column
// with a population count is this design's choice of circuit.
module peb_bias
  import dwt_pkg::*;
#(
  parameter int N = 12,
  localparam int SW = $clog2(N) + 1
) (
  input  logic [N/2-1:0] major_bits,  // the bits of column N-1, one per row
  output logic [SW-1:0]  sigma
);

  localparam int A_P = peb_a(N);
  localparam int B_P = peb_b(N);

  logic [SW-1:0] count;

  always_comb begin
    count = SW'(B_P);
    for (int i = 0; i < N / 2; i++) count = count + SW'(major_bits[i]);
    sigma = SW'(A_P) + (count >> 1);
  end

endmodule
