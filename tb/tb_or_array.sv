// tb_or_array: programs random masks into every row of a 16-input, 8-output
// OR array and checks each output against the OR of the selected inputs,
// including the all-zero outputs after reset.
module tb_or_array;
  logic clk = 0, rst_n = 0;
  logic prog_we = 0;
  logic [2:0] prog_row = 0;
  logic [15:0] prog_mask = 0, in = 0;
  logic [7:0] out;
  logic [15:0] model [8];
  int checks = 0, failures = 0;

  or_array #(.IN_W(16), .OUT_W(8)) dut (.clk, .rst_n, .prog_we, .prog_row, .prog_mask, .in, .out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    logic [7:0] expected;
    for (int j = 0; j < 8; j++) expected[j] = |(in & model[j]);
    checks++;
    if (out !== expected) begin
      failures++;
      $display("FAIL in=%h out=%b want %b", in, out, expected);
    end
  endtask

  initial begin
    for (int j = 0; j < 8; j++) model[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    in = 16'hffff; #1; compare();
    for (int round = 0; round < 20; round++) begin
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        prog_we = 1; prog_row = 3'(j); prog_mask = 16'($urandom);
        if (round == 0 && j == 0) prog_mask = 16'h0010;  // a single state
        model[j] = prog_mask;
        @(negedge clk);
        prog_we = 0;
      end
      for (int t = 0; t < 50; t++) begin
        in = (t < 16) ? 16'(1) << t : 16'($urandom);
        #1; compare();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
