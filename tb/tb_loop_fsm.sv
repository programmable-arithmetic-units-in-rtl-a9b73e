// tb_loop_fsm: drives a loop FSM through passes of a loop body with random
// repeat counts (0 included) and checks that exactly `count` backward jumps
// are granted per entry into the loop, that the fall-through pass follows,
// that the FSM rearms for the next entry, and that at_end without step
// changes nothing.
module tb_loop_fsm;
  logic clk = 0, rst_n = 0;
  logic [7:0] count = 0;
  logic at_end = 0, step = 0, jump, active;
  int checks = 0, failures = 0;

  loop_fsm dut (.clk, .rst_n, .count, .at_end, .step, .jump, .active);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int entry = 0; entry < 40; entry++) begin
      int jumps, n;
      jumps = 0;
      n = (entry < 3) ? entry : int'($urandom_range(0, 12));
      @(negedge clk);
      count = 8'(n);
      // a pass through states outside the end state
      at_end = 0; step = 1;
      @(negedge clk);
      // at_end without step must not advance the FSM
      at_end = 1; step = 0;
      @(negedge clk);
      forever begin
        at_end = 1; step = 1;
        #1;
        if (!jump) break;
        jumps++;
        @(negedge clk);
        at_end = 0; step = 1;   // loop body
        @(negedge clk);
      end
      @(negedge clk);
      at_end = 0; step = 0;
      checks++;
      if (jumps != n) begin
        failures++;
        $display("FAIL entry %0d: %0d jumps, want %0d", entry, jumps, n);
      end
      checks++;
      if (active) begin
        failures++;
        $display("FAIL entry %0d: still active after the loop", entry);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
