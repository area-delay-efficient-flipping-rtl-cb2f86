// flip_au: arithmetic unit (AU) of the flipping DWT structure,
//     z = c*x2 + x1 + x3,   y = x3
// with the product taken by the fixed-width PEB Booth multiplier and the two
// additions by ripple carry adders: RCA-1 adds x1 + x3, RCA-2 adds that to
// the product. The multiplier returns ~ x2*c / 2^DW; the power-of-two
// exponent SHIFT of the coefficient (see dwt_pkg) is applied to it by wiring,
// left for SHIFT > 0 and arithmetic right for SHIFT < 0. All words are DW-bit
// two's complement and wrap on overflow, so the adders' carry outs are left
// unused. Combinational.
module flip_au #(
  parameter int DW    = 12,
  parameter int SHIFT = 0
) (
  input  logic [DW-1:0] x1,
  input  logic [DW-1:0] x2,
  input  logic [DW-1:0] x3,
  input  logic [DW-1:0] c,
  output logic [DW-1:0] z,
  output logic [DW-1:0] y
);

  logic [DW-1:0] prod, prod_sh, sum13;
  logic          co1, co2;

  peb_booth_mult #(.N(DW)) u_mu (.x(x2), .c(c), .p(prod));

  if (SHIFT >= 0) begin : g_shl
    assign prod_sh = prod << SHIFT;
  end else begin : g_shr
    assign prod_sh = DW'($signed(prod) >>> (-SHIFT));
  end

  rca #(.W(DW)) u_rca1 (.a(x1),      .b(x3),    .cin(1'b0), .s(sum13), .cout(co1));
  rca #(.W(DW)) u_rca2 (.a(prod_sh), .b(sum13), .cin(1'b0), .s(z),     .cout(co2));

  assign y = x3;

endmodule
