// tb_peb_bias: exhaustive check of the PEB bias circuit. For N = 12 the bias
// constants are A' = 1 and B' = 1 (3*12/32 + 0.5 = 1.625), so
// sigma = 1 + floor((ones + 1) / 2) over all 64 patterns of the major column.
// A second instance with N = 16 (3*16/32 + 0.5 = 2.0: A' = 2, B' = 0) checks
// the constants' dependence on N.
module tb_peb_bias;
  localparam int N  = 12;
  localparam int N2 = 16;

  logic [N/2-1:0]           mb;
  logic [$clog2(N):0]       sigma;
  logic [N2/2-1:0]          mb2;
  logic [$clog2(N2):0]      sigma2;
  int checks = 0, failures = 0;

  peb_bias #(.N(N))  dut  (.major_bits(mb),  .sigma(sigma));
  peb_bias #(.N(N2)) dut2 (.major_bits(mb2), .sigma(sigma2));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (N2 / 2)); v++) begin
      mb  = (N/2)'(v);
      mb2 = (N2/2)'(v);
      #1;
      checks++;
      if (int'(sigma) != 1 + ($countones(mb) + 1) / 2) begin
        failures++;
        $display("N=12 bits=%b sigma=%0d", mb, sigma);
      end
      checks++;
      if (int'(sigma2) != 2 + $countones(mb2) / 2) begin
        failures++;
        $display("N=16 bits=%b sigma=%0d", mb2, sigma2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
