// peb_booth_mult: N x N fixed-width radix-4 Booth multiplier with modified PEB
// bias (the multiplier unit, MU).
//
// x (data) and c (coefficient) are N-bit two's complement. The coefficient is
// Booth encoded (booth_encoder), the selector forms N/2 partial product rows
// (booth_selector), the N least significant columns of the array are dropped
// and replaced by the bias sigma (peb_bias), and the N most significant columns
// plus sigma are summed (mu_adder). The selector's neg bits belong to the
// truncated columns and are therefore left unused. The result p ~= x*c / 2^N,
// N bits, wraps modulo 2^N. Combinational; N must be even.
module peb_booth_mult
  import dwt_pkg::*;
#(
  parameter int N = 12,
  localparam int SW = $clog2(N) + 1
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] c,
  output logic [N-1:0] p
);

  if (N % 2 != 0) begin : g_bad_n
    $error("peb_booth_mult: N must be even");
  end

  booth_digit_t [N/2-1:0] dig;
  logic [N/2-1:0][N:0]    row;
  logic [N/2-1:0]         neg_bit;
  logic [N/2-1:0]         major_bits;
  logic [SW-1:0]          sigma;

  booth_encoder  #(.N(N)) u_enc (.c(c), .dig(dig));
  booth_selector #(.N(N)) u_sel (.x(x), .dig(dig), .row(row), .neg_bit(neg_bit));

  // Column N-1 holds bit N-1-2i of row i; the neg bits are all in even columns.
  always_comb begin
    for (int i = 0; i < N / 2; i++) major_bits[i] = row[i][N-1-2*i];
  end

  peb_bias #(.N(N)) u_bias  (.major_bits(major_bits), .sigma(sigma));
  mu_adder #(.N(N)) u_adder (.row(row), .sigma(sigma), .qp(p));

endmodule
