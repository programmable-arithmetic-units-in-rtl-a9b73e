// tb_mult8: exhaustive check of the signed 8x8 multiplier, all 65536
// operand pairs against the integer product.
module tb_mult8;
  logic signed [7:0] a, b;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  mult8 dut (.a, .b, .p);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int expected;
      {a, b} = 16'(i);
      #1;
      expected = int'(a) * int'(b);
      checks++;
      if (int'(p) !== expected) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d = %0d, want %0d", a, b, p, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
