// tb_lane_mem: fills a 16-word x 8-lane memory one lane per clock, then
// reads every word back and checks all lanes; rewrites single lanes and
// checks that their neighbours are kept.
module tb_lane_mem;
  logic clk = 0;
  logic we = 0;
  logic [3:0] waddr = 0, raddr = 0;
  logic [2:0] wlane = 0;
  logic [7:0] wdata = 0;
  logic [7:0] rdata [8];
  logic [7:0] model [16][8];
  int checks = 0, failures = 0;

  lane_mem dut (.clk, .we, .waddr, .wlane, .wdata, .raddr, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(input int adr, input int lane, input logic [7:0] d);
    @(negedge clk);
    we = 1; waddr = 4'(adr); wlane = 3'(lane); wdata = d;
    model[adr][lane] = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic check_all();
    for (int adr = 0; adr < 16; adr++) begin
      raddr = 4'(adr);
      #1;
      for (int l = 0; l < 8; l++) begin
        checks++;
        if (rdata[l] !== model[adr][l]) begin
          failures++;
          $display("FAIL word %0d lane %0d: %h want %h", adr, l, rdata[l], model[adr][l]);
        end
      end
    end
  endtask

  initial begin
    for (int adr = 0; adr < 16; adr++)
      for (int l = 0; l < 8; l++) write(adr, l, 8'($urandom));
    check_all();
    for (int i = 0; i < 40; i++) write(int'($urandom_range(0, 15)), int'($urandom_range(0, 7)), 8'($urandom));
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
