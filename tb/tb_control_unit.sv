// tb_control_unit: programs the control unit with the example state graph of
// twelve states: a self loop on state 5 repeated n times, an inner loop
// 9 -> 7 repeated m times and an outer loop 11 -> 6 repeated k times, then a
// stop in state 12. Checks
//   * the visited state sequence against a sequence built from the graph,
//   * the number of clock cycles (one state per step, Clk1 every cycle or
//     every third cycle),
//   * every control signal against the OR of its programmed states,
//   * the RAM / Memory address generators against a model,
//   * the restart command, a restart row in the OR array, and the host
//     writes forwarded to the RAM.
module tb_control_unit;
  import iren_pkg::*;
  localparam int NS = 16;

  logic        clk = 0, rst_n = 0;
  logic        host_we = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic        run = 0, done, step;
  logic [NS-1:0] state;
  logic [CTRL_W-1:0] ctrl;
  logic [3:0]  clk_en;
  logic [2:0]  loop_jump;
  logic        ram_we;
  logic [3:0]  ram_waddr, ram_raddr, mem_raddr;
  logic [2:0]  ram_wlane;
  logic [7:0]  ram_wdata;

  int checks = 0, failures = 0;
  logic [NS-1:0] ctrl_mask [CTRL_W];

  control_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic host_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  function automatic int idx(input logic [NS-1:0] s);
    for (int i = 0; i < NS; i++) if (s[i]) return i;
    return -1;
  endfunction

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  // Run from state "1." until done; compare states, control signals,
  // addresses and cycles with the expected sequence.
  task automatic run_graph(input int n, input int m, input int k, input int clkdiv);
    int exp_seq[$];
    int got_seq[$];
    int cycles = 0;
    int ra = 0, ma = 0;
    exp_seq = {0, 1, 2, 3};
    repeat (n + 1) exp_seq.push_back(4);
    repeat (k + 1) begin
      exp_seq.push_back(5);
      repeat (m + 1) begin exp_seq.push_back(6); exp_seq.push_back(7); exp_seq.push_back(8); end
      exp_seq.push_back(9); exp_seq.push_back(10);
    end
    exp_seq.push_back(11);

    host_write(16'h3000, 32'(n));
    host_write(16'h3001, 32'(m));
    host_write(16'h3002, 32'(k));
    host_write(16'h4000, 32'(clkdiv));
    host_write(16'h6000, 32'd1);           // restart at state "1."
    @(negedge clk);
    run = 1;
    #1;
    while (!done && cycles < 2000) begin
      logic [CTRL_W-1:0] exp_ctrl;
      for (int j = 0; j < CTRL_W; j++) exp_ctrl[j] = |(state & ctrl_mask[j]);
      checks++;
      if (ctrl !== exp_ctrl) fail($sformatf("ctrl %b in state %0d, want %b", ctrl, idx(state) + 1, exp_ctrl));
      checks++;
      if (ram_raddr !== 4'(ra) || mem_raddr !== 4'(ma))
        fail($sformatf("addresses %0d/%0d, want %0d/%0d", ram_raddr, mem_raddr, ra, ma));
      if (step) begin
        got_seq.push_back(idx(state));
        if (exp_ctrl[CTRL_ADDR_CLR]) begin ra = 0; ma = 0; end
        else begin
          if (exp_ctrl[CTRL_RAM_INC]) ra = (ra + 1) % 16;
          if (exp_ctrl[CTRL_MEM_INC]) ma = (ma + 1) % 16;
        end
      end
      @(negedge clk);
      cycles++;
    end
    got_seq.push_back(idx(state));
    run = 0;
    checks++;
    if (got_seq != exp_seq) begin
      fail($sformatf("n=%0d m=%0d k=%0d: state sequence differs (%0d states, want %0d)", n, m, k,
                     got_seq.size(), exp_seq.size()));
      foreach (got_seq[i]) $write("%0d ", got_seq[i] + 1);
      $display("");
    end
    checks++;
    if (cycles != (exp_seq.size() - 1) * (clkdiv + 1))
      fail($sformatf("%0d cycles, want %0d", cycles, (exp_seq.size() - 1) * (clkdiv + 1)));
    checks++;
    if (host_rdata[31] !== 1'b1 || host_rdata[3:0] !== 4'd11) fail("status word");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    checks++;
    if (state !== NS'(1)) fail("reset does not enter state 1");

    // control signal OR array: a few fixed rows, the rest random
    ctrl_mask[CTRL_R_CLR]    = NS'(1);            // state 1
    ctrl_mask[CTRL_R_LOAD]   = 16'b0000_0111_1100_0000;
    ctrl_mask[CTRL_ADDR_CLR] = 16'b0000_0000_0010_0001; // states 1 and 6
    ctrl_mask[CTRL_RAM_INC]  = 16'b0000_0001_1100_0000; // 7, 8, 9
    ctrl_mask[CTRL_MEM_INC]  = 16'b0000_0000_0001_0000; // 5
    ctrl_mask[CTRL_OUT_STB]  = 16'b0000_1000_0000_0000; // 12
    ctrl_mask[6] = 16'($urandom);
    ctrl_mask[7] = 16'($urandom);
    for (int j = 0; j < CTRL_W; j++) host_write(16'h0000 | 16'(j), 32'(ctrl_mask[j]));

    // jump OR array: loop ends 5, 9, 11; stop in 12
    host_write(16'h1000, 32'(NS'(1) << 4));
    host_write(16'h1001, 32'(NS'(1) << 8));
    host_write(16'h1002, 32'(NS'(1) << 10));
    host_write(16'h1003, 32'(NS'(1) << 11));
    // loop targets: 5, 7, 6
    host_write(16'h2000, 32'd4);
    host_write(16'h2001, 32'd6);
    host_write(16'h2002, 32'd5);

    run_graph(2, 1, 2, 0);
    run_graph(0, 0, 0, 0);
    run_graph(3, 2, 1, 2);
    for (int i = 0; i < 4; i++)
      run_graph(int'($urandom_range(0, 5)), int'($urandom_range(0, 4)), int'($urandom_range(0, 3)), 0);

    // restart row: no stop, state 3 goes back to state 1
    host_write(16'h1003, 32'd0);
    host_write(16'h1004, 32'(NS'(1) << 2));
    host_write(16'h4000, 32'd0);
    host_write(16'h6000, 32'd1);
    @(negedge clk);
    run = 1;
    for (int t = 0; t < 9; t++) begin
      checks++;
      if (idx(state) != t % 3) fail($sformatf("restart row: state %0d at step %0d", idx(state) + 1, t));
      @(negedge clk);
    end
    run = 0;

    // host writes forwarded to the RAM
    @(negedge clk);
    host_we = 1; host_addr = 16'h5000 | (16'd9 << 4) | 16'd5; host_wdata = 32'h5a;
    #1;
    checks++;
    if (!ram_we || ram_waddr !== 4'd9 || ram_wlane !== 3'd5 || ram_wdata !== 8'h5a) fail("RAM write forwarding");
    @(negedge clk);
    host_we = 0;
    #1;
    checks++;
    if (ram_we) fail("RAM write without host write");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
