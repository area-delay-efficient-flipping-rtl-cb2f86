// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder at N = 12.
// For every coefficient the digits, rebuilt as d_i = (neg ? -1 : 1) *
// (one + 2*two), must sum (with weights 4^i) to the coefficient, each digit
// must be one-hot or zero, and the zero digit must not be negative.
module tb_booth_encoder;
  import dwt_pkg::*;

  localparam int N = 12;

  logic [N-1:0]           c;
  booth_digit_t [N/2-1:0] dig;
  int checks = 0, failures = 0;

  booth_encoder dut (.c(c), .dig(dig));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << N); v++) begin
      longint sum, expect_c;
      c = N'(v);
      #1;
      sum = 0;
      for (int i = 0; i < N / 2; i++) begin
        int mag, d;
        mag = int'(dig[i].one) + 2 * int'(dig[i].two);
        d   = dig[i].neg ? -mag : mag;
        sum += longint'(d) * (longint'(1) << (2 * i));
        checks++;
        if ((dig[i].one && dig[i].two) || (mag == 0 && dig[i].neg)) begin
          failures++;
          $display("bad digit %0d for c=%0d: %b", i, v, dig[i]);
        end
      end
      expect_c = (v >= (1 << (N - 1))) ? v - (1 << N) : v;
      checks++;
      if (sum != expect_c) begin
        failures++;
        if (failures < 10) $display("c=%0d: digits sum to %0d", expect_c, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
