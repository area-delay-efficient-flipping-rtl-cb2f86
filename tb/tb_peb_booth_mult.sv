// tb_peb_booth_mult: the 12 x 12 fixed-width PEB Booth multiplier.
//  * Bit-exact comparison with the integer reference of tb_ref_pkg for the
//    six DWT coefficients against all 4096 data values, and for random pairs.
//  * Accuracy: against the exact product / 2^12, the error of every result is
//    within a small bound, and its mean over random operands is near zero
//    (the point of the bias).
module tb_peb_booth_mult;
  import tb_ref_pkg::*;

  localparam int N = 12;

  logic [N-1:0] x, c, p;
  int checks = 0, failures = 0;

  peb_booth_mult dut (.x(x), .c(c), .p(p));

  initial begin
    #10ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(output real err);
    longint exp_q, got;
    real exact;
    #1;
    exp_q = ref_mult(longint'(x), longint'(c), N);
    got   = sext(longint'(p), N);
    checks++;
    if (got != exp_q) begin
      failures++;
      if (failures < 10) $display("x=%0d c=%0d got %0d expected %0d",
                                  $signed(x), $signed(c), got, exp_q);
    end
    exact = real'(longint'($signed(x)) * longint'($signed(c))) / real'(1 << N);
    err = real'(got) - exact;
  endtask

  initial begin
    real err, sum_err, max_err;
    int  cnt;
    // Coefficient sweep.
    for (int k = 0; k < 6; k++) begin
      c = N'(ref_coef(k, N));
      for (int v = 0; v < (1 << N); v++) begin
        x = N'(v);
        check_one(err);
      end
    end
    // Random operands, error statistics.
    sum_err = 0.0;
    max_err = 0.0;
    cnt = 0;
    for (int t = 0; t < 50000; t++) begin
      x = N'($urandom);
      c = N'($urandom);
      check_one(err);
      sum_err += err;
      cnt++;
      if (err > max_err) max_err = err;
      if (-err > max_err) max_err = -err;
    end
    $display("mean error %f LSB, max |error| %f LSB", sum_err / cnt, max_err);
    checks++;
    if (sum_err / cnt > 0.25 || sum_err / cnt < -0.25) begin
      failures++;
      $display("mean error too large");
    end
    checks++;
    if (max_err > 4.0) begin
      failures++;
      $display("max error too large");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
