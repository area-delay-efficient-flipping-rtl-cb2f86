// tb_booth_selector: random check of the partial product selector at N = 12.
// For each row, the (N+1)-bit row read as two's complement plus its neg bit
// must equal digit * x, for digits -2..2 and random x (plus the extremes).
module tb_booth_selector;
  import dwt_pkg::*;

  localparam int N = 12;

  logic [N-1:0]           x;
  booth_digit_t [N/2-1:0] dig;
  logic [N/2-1:0][N:0]    row;
  logic [N/2-1:0]         neg_bit;
  int checks = 0, failures = 0;
  int d [N/2];

  booth_selector dut (.x(x), .dig(dig), .row(row), .neg_bit(neg_bit));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint xs;
      if (t == 0)      x = N'(1 << (N - 1));
      else if (t == 1) x = N'((1 << (N - 1)) - 1);
      else             x = N'($urandom);
      for (int i = 0; i < N / 2; i++) begin
        d[i] = int'($urandom_range(4)) - 2;
        dig[i].neg = (d[i] < 0);
        dig[i].one = (d[i] == 1 || d[i] == -1);
        dig[i].two = (d[i] == 2 || d[i] == -2);
      end
      #1;
      xs = longint'($signed(x));
      for (int i = 0; i < N / 2; i++) begin
        longint rv;
        rv = longint'($signed(row[i])) + longint'(neg_bit[i]);
        checks++;
        if (rv != longint'(d[i]) * xs) begin
          failures++;
          if (failures < 10) $display("x=%0d d=%0d row gives %0d", xs, d[i], rv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
