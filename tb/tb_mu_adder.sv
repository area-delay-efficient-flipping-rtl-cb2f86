// tb_mu_adder: random check of the multiplier unit's adder at N = 12. Random
// partial product rows and bias go in; the expected result is the value of
// the whole array (each row read as an (N+1)-bit two's complement number,
// weight 4^i) minus the bits that fall into the N low columns, divided by
// 2^N, plus sigma, wrapped to N bits.
module tb_mu_adder;
  import tb_ref_pkg::*;

  localparam int N = 12;

  logic [N/2-1:0][N:0]  row;
  logic [$clog2(N):0]   sigma;
  logic [N-1:0]         qp;
  int checks = 0, failures = 0;

  mu_adder dut (.row(row), .sigma(sigma), .qp(qp));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      longint total, low, expect_q;
      for (int i = 0; i < N / 2; i++) row[i] = (N+1)'($urandom);
      sigma = ($clog2(N)+1)'($urandom_range(5));
      #1;
      total = 0;
      low   = 0;
      for (int i = 0; i < N / 2; i++) begin
        total += sext(longint'(row[i]), N + 1) * (longint'(1) << (2 * i));
        low   += (longint'(row[i]) << (2 * i)) & ((longint'(1) << N) - 1);
      end
      expect_q = wrap(((total - low) >>> N) + longint'(sigma), N);
      checks++;
      if (sext(longint'(qp), N) != expect_q) begin
        failures++;
        if (failures < 10) $display("got %0d expected %0d", sext(longint'(qp), N), expect_q);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
