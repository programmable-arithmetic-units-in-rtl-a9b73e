// tb_hard_limiter: every 16-bit input; checks the bipolar output (+1 for a
// sum of zero or more, -1 below zero) and its one-bit form.
module tb_hard_limiter;
  import iren_pkg::*;
  link_t x;
  data_t y;
  logic  y_bit;
  int checks = 0, failures = 0;

  hard_limiter dut (.x, .y, .y_bit);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -32768; i < 32768; i++) begin
      x = link_t'(i);
      #1;
      checks++;
      if ((i >= 0 && (y !== 8'sd1 || y_bit !== 1'b1)) || (i < 0 && (y !== -8'sd1 || y_bit !== 1'b0))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d y=%0d bit=%b", i, y, y_bit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
