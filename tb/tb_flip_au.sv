// tb_flip_au: the arithmetic unit z = c*x2 + x1 + x3, y = x3 at DW = 12, in
// three instances with the exponents of 1/alpha (+1), 1/(beta*gamma) (+6) and
// alpha*beta*gamma/K (-2) and their mantissas. Random operands; z is compared
// with the integer reference, y with x3.
module tb_flip_au;
  import tb_ref_pkg::*;

  localparam int DW = 12;

  logic [DW-1:0] x1, x2, x3;
  logic [DW-1:0] z0, z1, z2, y0, y1, y2;
  int checks = 0, failures = 0;

  flip_au #(.DW(DW), .SHIFT(1))  u0 (.x1, .x2, .x3, .c(DW'(ref_coef(0, DW))), .z(z0), .y(y0));
  flip_au #(.DW(DW), .SHIFT(6))  u1 (.x1, .x2, .x3, .c(DW'(ref_coef(2, DW))), .z(z1), .y(y1));
  flip_au #(.DW(DW), .SHIFT(-2)) u2 (.x1, .x2, .x3, .c(DW'(ref_coef(4, DW))), .z(z2), .y(y2));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(input logic [DW-1:0] got, input longint exp_v, input string what);
    checks++;
    if (sext(longint'(got), DW) != exp_v) begin
      failures++;
      if (failures < 10) $display("%s: got %0d expected %0d", what, sext(longint'(got), DW), exp_v);
    end
  endtask

  initial begin
    for (int t = 0; t < 20000; t++) begin
      x1 = DW'($urandom); x2 = DW'($urandom); x3 = DW'($urandom);
      #1;
      cmp(z0, ref_au(longint'(x1), longint'(x2), longint'(x3), 0, DW), "z 1/alpha");
      cmp(z1, ref_au(longint'(x1), longint'(x2), longint'(x3), 2, DW), "z 1/(beta*gamma)");
      cmp(z2, ref_au(longint'(x1), longint'(x2), longint'(x3), 4, DW), "z abg/K");
      cmp(y0, sext(longint'(x3), DW), "y");
      cmp(y2, sext(longint'(x3), DW), "y");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
