// tb_rca: ripple carry adder, exhaustive at W = 6 (with both carry-ins) and
// random at the default W = 12. Sum and carry out are compared with the
// integer sum a + b + cin.
module tb_rca;
  logic [5:0]  a6, b6, s6;
  logic [11:0] a, b, s;
  logic        cin6, cout6, cin, cout;
  int checks = 0, failures = 0;

  rca #(.W(6)) dut6 (.a(a6), .b(b6), .cin(cin6), .s(s6), .cout(cout6));
  rca          dut  (.a(a),  .b(b),  .cin(cin),  .s(s),  .cout(cout));

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << 13); v++) begin
      {cin6, a6, b6} = 13'(v);
      #1;
      checks++;
      if ({cout6, s6} != 7'(int'(a6) + int'(b6) + int'(cin6))) begin
        failures++;
        if (failures < 10) $display("%0d+%0d+%0d gave %0d", a6, b6, cin6, {cout6, s6});
      end
    end
    for (int t = 0; t < 5000; t++) begin
      a = 12'($urandom); b = 12'($urandom); cin = 1'($urandom);
      #1;
      checks++;
      if ({cout, s} != 13'(int'(a) + int'(b) + int'(cin))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
