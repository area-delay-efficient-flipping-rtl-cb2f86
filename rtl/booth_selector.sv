// booth_selector: partial product selector ("Selector Unit") of the radix-4
// Booth multiplier.
//
// For each Booth digit it selects 0, x or 2x as an (N+1)-bit two's complement
// magnitude and inverts it when the digit is negative. The +1 that completes
// the negation is not added here: it is the row's neg bit, which sits at the
// row's least significant column and is handed on (neg_bit). Row i therefore
// carries the value d_i*x - neg_i and has weight 4^i. Combinational.
module booth_selector
  import dwt_pkg::*;
#(
  parameter int N = 12
) (
  input  logic [N-1:0]               x,
  input  booth_digit_t [N/2-1:0]     dig,
  output logic [N/2-1:0][N:0]        row,
  output logic [N/2-1:0]             neg_bit
);

  logic [N:0] x1, x2;  // x and 2x, sign-extended to N+1 bits

  assign x1 = {x[N-1], x};
  assign x2 = {x, 1'b0};

  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      logic [N:0] mag;
      mag = dig[i].one ? x1 : (dig[i].two ? x2 : '0);
      row[i]     = dig[i].neg ? ~mag : mag;
      neg_bit[i] = dig[i].neg;
    end
  end

endmodule
