// mu_adder: the adder of the fixed-width multiplier unit. It sums only the
// N most significant columns (MP) of the 2N-column partial product array,
// plus the sign-extension constant and the bias sigma from peb_bias, giving
// the N-bit quantized product QP = MP + sigma (in units of 2^N).
//
// Row i holds the (N+1)-bit selector output p_i at column offset 2i. Its sign
// extension is replaced by the usual trick: the row's top bit is inverted and
// a constant -2^(N+2i) is added; all those constants fall in the kept
// columns, so their sum -sum(4^i) is one constant here. Only bits at column N
// and above are summed (row i contributes bits N-2i..N). The neg bits lie in
// the truncated columns and are not used. Combinational.
module mu_adder
  import dwt_pkg::*;
#(
  parameter int N = 12,
  localparam int SW = $clog2(N) + 1
) (
  input  logic [N/2-1:0][N:0] row,
  input  logic [SW-1:0]       sigma,
  output logic [N-1:0]        qp
);

  function automatic logic [N-1:0] sign_const();
    logic [N-1:0] k;
    k = '0;
    for (int i = 0; i < N / 2; i++) k = k - (N'(1) << (2 * i));
    return k;
  endfunction

  localparam logic [N-1:0] KSIGN = sign_const();

  always_comb begin
    logic [N-1:0] acc;
    acc = KSIGN + N'(sigma);
    for (int i = 0; i < N / 2; i++) begin
      logic [N:0] r;
      r   = {~row[i][N], row[i][N-1:0]};
      acc = acc + N'(r >> (N - 2 * i));
    end
    qp = acc;
  end

endmodule
