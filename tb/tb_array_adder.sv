// tb_array_adder: checks the array's adder unit in all four accuracy
// settings (16-bit or split into two 8-bit adds, with or without the carry
// from the left neighbour) against byte-wise integer sums, with random and
// carry-forcing operands; then chains two units into a 32-bit adder.
module tb_array_adder;
  logic [15:0] a, b, s, a2, b2, s2;
  logic split, carry_en, carry_in, carry_out, co2;
  int checks = 0, failures = 0;

  array_adder dut  (.a, .b, .split, .carry_en, .carry_in, .s, .carry_out);
  array_adder dut2 (.a(a2), .b(b2), .split(1'b0), .carry_en(1'b1), .carry_in(carry_out),
                    .s(s2), .carry_out(co2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [8:0] lo, hi;
      logic [32:0] wide;
      a = 16'($urandom); b = 16'($urandom);
      if (i % 8 == 0) begin a[7:0] = 8'hff; b[7:0] = 8'h01; end
      {split, carry_en, carry_in} = 3'($urandom);
      a2 = 16'($urandom); b2 = 16'($urandom);
      #1;
      lo = 9'(a[7:0]) + 9'(b[7:0]) + 9'(carry_en & carry_in);
      hi = 9'(a[15:8]) + 9'(b[15:8]) + 9'(split ? 1'b0 : lo[8]);
      checks++;
      if (s !== {hi[7:0], lo[7:0]} || carry_out !== hi[8]) begin
        failures++;
        $display("FAIL %h+%h split=%b cen=%b ci=%b: %b %h", a, b, split, carry_en, carry_in, carry_out, s);
      end
      if (!split) begin
        wide = 33'({a2, a}) + 33'({b2, b}) + 33'(carry_en & carry_in);
        checks++;
        if ({co2, s2, s} !== wide) begin
          failures++;
          $display("FAIL 32-bit chain %h", {co2, s2, s});
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
