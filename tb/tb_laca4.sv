// tb_laca4: exhaustive check of the 4-bit look-ahead carry slice against
// integer addition: every a, b and carry-in, sum, carry-out and the group
// generate / propagate outputs.
module tb_laca4;
  logic [3:0] a, b, s;
  logic cin, cout, gg, gp;
  int checks = 0, failures = 0;

  laca4 dut (.a, .b, .cin, .s, .cout, .gg, .gp);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      logic [4:0] ref_sum;
      {cin, a, b} = 9'(i);
      #1;
      ref_sum = 5'(a) + 5'(b) + 5'(cin);
      checks++;
      if ({cout, s} !== ref_sum) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b got %b%h want %h", a, b, cin, cout, s, ref_sum);
      end
      checks++;
      if (gp !== ((a ^ b) == 4'hf) || gg !== ((5'(a) + 5'(b)) > 5'd15)) begin
        failures++;
        $display("FAIL group signals a=%h b=%h gg=%b gp=%b", a, b, gg, gp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
