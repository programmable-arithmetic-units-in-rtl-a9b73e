// tb_clk_circuit: programs four dividers (every cycle, every 2nd, 5th and
// 8th cycle), counts each output's pulses over a window and checks the
// pulse spacing; checks that no pulse appears while the circuit is disabled.
module tb_clk_circuit;
  logic clk = 0, rst_n = 0, enable = 0;
  logic [7:0] div [4];
  logic [3:0] clk_en;
  int checks = 0, failures = 0;
  int pulses [4];
  int last [4];

  clk_circuit dut (.clk, .rst_n, .enable, .div, .clk_en);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    div[0] = 0; div[1] = 1; div[2] = 4; div[3] = 7;
    for (int k = 0; k < 4; k++) begin pulses[k] = 0; last[k] = -1; end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (5) begin
      @(negedge clk);
      checks++;
      if (clk_en !== 4'b0) begin failures++; $display("FAIL pulse while disabled"); end
    end
    enable = 1;
    for (int t = 0; t < 400; t++) begin
      @(negedge clk);
      for (int k = 0; k < 4; k++) begin
        if (clk_en[k]) begin
          if (last[k] >= 0) begin
            checks++;
            if (t - last[k] != int'(div[k]) + 1) begin
              failures++;
              $display("FAIL clk%0d spacing %0d, want %0d", k + 1, t - last[k], div[k] + 1);
            end
          end
          last[k] = t;
          pulses[k]++;
        end
      end
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (pulses[k] < 400 / (int'(div[k]) + 1) - 1 || pulses[k] > 400 / (int'(div[k]) + 1) + 1) begin
        failures++;
        $display("FAIL clk%0d %0d pulses in 400 cycles", k + 1, pulses[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
