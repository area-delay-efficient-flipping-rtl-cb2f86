// booth_encoder: radix-4 modified Booth encoder for an N-bit two's complement
// coefficient (the "Modified Booth Encoder" of the multiplier unit).
//
// Digit i is formed from coefficient bits c[2i+1], c[2i], c[2i-1] (c[-1] = 0)
// as d_i = -2*c[2i+1] + c[2i] + c[2i-1], so that c = sum d_i * 4^i. Each digit
// is output as one-hot magnitude flags (one, two) and a sign flag (neg); the
// all-ones triplet encodes zero with neg = 0. Purely combinational.
// N must be even. The document names the block; the encoding table is the
// usual radix-4 one.
module booth_encoder
  import dwt_pkg::*;
#(
  parameter int N = 12
) (
  input  logic [N-1:0]                  c,
  output booth_digit_t [N/2-1:0]        dig
);

  logic [N:0] cx;  // coefficient with the implicit c[-1] = 0 appended

  assign cx = {c, 1'b0};

  always_comb begin
    for (int i = 0; i < N / 2; i++) begin
      logic b2, b1, b0;
      b2 = cx[2*i+2];
      b1 = cx[2*i+1];
      b0 = cx[2*i];
      dig[i].one = b1 ^ b0;
      dig[i].two = (b2 & ~b1 & ~b0) | (~b2 & b1 & b0);
      dig[i].neg = b2 & ~(b1 & b0);
    end
  end

endmodule
