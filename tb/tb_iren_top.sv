// tb_iren_top: end-to-end run of the IREN top at its default sizes with a
// 4-neuron Hopfield network.
//
// Each neuron is the area-optimized cell: two multipliers and an adder form
// two products and their sum, the value is routed past the second multiplier
// row, and an adder with a register accumulates, so a neuron's four-input
// weighted sum takes two steps. Neuron j uses columns 2j and 2j+1; all four
// run side by side. RAM word t, lane c holds U(2t + c%2); Memory word t,
// lane c holds the weight from input 2t + c%2 to neuron c/2.
// The control program: state 1 clears the registers and the addresses,
// state 2 accumulates and steps the addresses and is repeated once by loop
// FSM 1, state 3 presents the result and stops.
//
// Each network update: the host writes U into the RAM, restarts and runs the
// control unit, waits for done, and compares the four sums and outputs with
// sum_i U_i * W_ij and its sign, and the cycle count with 3 steps. The
// next U is the Y just read. Runs a stored-pattern network from noisy
// starts and random networks, and once with Clk1 at half rate. Counts the
// mechanisms used: loop jump, bypass, register clear and accumulate, stop,
// restart, carry from the low to the high byte of an adder, both activation
// outcomes, the slowed clock, a carry between the two columns of a 32-bit
// adder and a split adder; each must happen.
// A last run reconfigures the adders for more accuracy: sixteen products are
// summed at 32 bits across two columns (loop FSM 1 repeating 7 times, 9
// steps) while another column's adder works as two 8-bit adders.
module tb_iren_top;
  import iren_pkg::*;
  localparam int COLS = 8;
  localparam int NSTATES = 16;

  logic        clk = 0, rst_n = 0;
  logic        host_we = 0;
  logic [15:0] host_addr = 0;
  logic [31:0] host_wdata = 0, host_rdata;
  logic        run = 0, done;
  logic        mem_we = 0;
  logic [3:0]  mem_waddr = 0;
  logic [2:0]  mem_wlane = 0;
  logic [7:0]  mem_wdata = 0;
  logic        cfg_we = 0;
  logic [5:0]  cfg_addr = 0;
  unit_cfg_t   cfg_wdata = '0;
  link_t       ext_in [COLS];
  link_t       r_out  [COLS];
  data_t       y_out  [COLS];
  logic [COLS-1:0] y_bit;
  logic        out_valid;
  logic [1:0]  ctrl_spare;
  logic [3:0]  clk_en;
  logic [NSTATES-1:0] state;
  logic [2:0]  loop_jump;
  logic        step;

  int checks = 0, failures = 0;
  int n_loop = 0, n_bypass = 0, n_clear = 0, n_accum = 0, n_stop = 0, n_restart = 0;
  int n_carry = 0, n_pos = 0, n_neg = 0, n_slow = 0, n_wide = 0, n_split = 0;

  iren_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  always @(posedge clk) if (rst_n) begin
    if (step && loop_jump[0]) n_loop++;
    if (step && dut.ctrl[CTRL_R_CLR]) n_clear++;
    if (step && dut.ctrl[CTRL_R_LOAD] && r_out[0] != 0) n_accum++;
    if (step && dut.ctrl[CTRL_R_LOAD] && dut.u_array.g_row[2].chan[0] != 0) n_bypass++;
    if (step && dut.ctrl[CTRL_R_LOAD] && dut.u_array.g_row[3].g_col[0].g_add.u_add.c_lo) n_carry++;
    if (run && !clk_en[0]) n_slow++;
    if (step && dut.ctrl[CTRL_R_LOAD] && dut.u_array.g_row[3].g_col[1].g_add.ci) n_wide++;
    if (step && dut.ctrl[CTRL_R_LOAD] && dut.u_array.g_row[3].g_col[4].g_add.u_add.c_lo) n_split++;
  end

  task automatic fail(input string msg);
    failures++;
    $display("FAIL %s", msg);
  endtask

  task automatic host_write(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk);
    host_we = 1; host_addr = a; host_wdata = d;
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic mem_write(input int adr, input int lane, input int d);
    @(negedge clk);
    mem_we = 1; mem_waddr = 4'(adr); mem_wlane = 3'(lane); mem_wdata = 8'(d);
    @(negedge clk);
    mem_we = 0;
  endtask

  task automatic cfg_write(input int r, input int c, input src_e a, input src_e b, input logic byp,
                           input logic split = 0, input logic carry_left = 0);
    @(negedge clk);
    cfg_we = 1; cfg_addr = 6'(r * COLS + c);
    cfg_wdata.sel_a = a; cfg_wdata.sel_b = b; cfg_wdata.bypass = byp;
    cfg_wdata.split = split; cfg_wdata.carry_left = carry_left;
    @(negedge clk);
    cfg_we = 0;
  endtask

  task automatic load_weights(input int w [4][4]);
    for (int t = 0; t < 2; t++)
      for (int c = 0; c < COLS; c++) mem_write(t, c, w[2*t + c % 2][c / 2]);
  endtask

  // One network update; u is replaced by the new outputs.
  task automatic update(inout int u [4], input int w [4][4], input int clkdiv);
    int cycles = 0;
    for (int t = 0; t < 2; t++)
      for (int c = 0; c < COLS; c++)
        host_write(16'h5000 | 16'(t << 4) | 16'(c), 32'(u[2*t + c % 2]));
    host_write(16'h4000, 32'(clkdiv));
    host_write(16'h6000, 32'd1);
    n_restart++;
    checks++;
    if (state !== NSTATES'(1)) fail("restart did not enter state 1");
    @(negedge clk);
    run = 1;
    #1;
    while (!done && cycles < 100) begin
      @(negedge clk);
      cycles++;
    end
    n_stop++;
    checks++;
    if (cycles != 3 * (clkdiv + 1)) fail($sformatf("update took %0d cycles, want %0d", cycles, 3 * (clkdiv + 1)));
    checks++;
    if (!out_valid) fail("out_valid low at the end");
    for (int j = 0; j < 4; j++) begin
      int sum = 0;
      for (int i = 0; i < 4; i++) sum += u[i] * w[i][j];
      checks++;
      if (r_out[2*j] !== link_t'(sum)) fail($sformatf("neuron %0d sum %0d, want %0d", j + 1, r_out[2*j], sum));
      checks++;
      if (y_out[2*j] !== ((sum >= 0) ? 8'sd1 : -8'sd1) || y_bit[2*j] !== (sum >= 0))
        fail($sformatf("neuron %0d output %0d for sum %0d", j + 1, y_out[2*j], sum));
      if (sum >= 0) n_pos++; else n_neg++;
    end
    for (int j = 0; j < 4; j++) u[j] = int'(y_out[2*j]);
    run = 0;
    checks++;
    if (host_rdata[31] !== 1'b1) fail("status shows not done");
  endtask

  initial begin
    int w [4][4];
    int u [4];
    int p [2][4];
    for (int c = 0; c < COLS; c++) ext_in[c] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // control program
    host_write(16'h0000 | CTRL_R_CLR,    32'b001);
    host_write(16'h0000 | CTRL_ADDR_CLR, 32'b001);
    host_write(16'h0000 | CTRL_R_LOAD,   32'b010);
    host_write(16'h0000 | CTRL_RAM_INC,  32'b010);
    host_write(16'h0000 | CTRL_MEM_INC,  32'b010);
    host_write(16'h0000 | CTRL_OUT_STB,  32'b100);
    host_write(16'h1000, 32'b010);   // loop 1 ends in state 2
    host_write(16'h2000, 32'd1);     // ... and jumps back to state 2
    host_write(16'h3000, 32'd1);     // once
    host_write(16'h1003, 32'b100);   // stop in state 3

    // array configuration: four optimized neuron cells
    for (int j = 0; j < 4; j++) begin
      cfg_write(0, 2*j,     SRC_RAM, SRC_MEM, 0);
      cfg_write(0, 2*j + 1, SRC_RAM, SRC_MEM, 0);
      cfg_write(1, 2*j,     SRC_UP,  SRC_UP_RIGHT, 0);
      cfg_write(2, 2*j,     SRC_ZERO, SRC_ZERO, 1);
      cfg_write(3, 2*j,     SRC_UP,  SRC_REG, 0);
      cfg_write(4, 2*j,     SRC_UP,  SRC_ZERO, 0);
    end

    // stored-pattern network: W = 20 * p p^T with zero diagonal, one
    // pattern at a time (four neurons hold one pattern without ambiguity)
    p[0] = '{1, -1, 1, -1};
    p[1] = '{1, 1, -1, -1};
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) w[i][j] = (i == j) ? 0 : 20 * p[k][i] * p[k][j];
      load_weights(w);
      u = p[k];
      u[3] = -u[3];                  // the pattern with one flipped bit
      update(u, w, k);               // k = 1: Clk1 at half rate
      update(u, w, 0);
      checks++;
      if (u != p[k]) fail($sformatf("network did not settle in pattern %0d: %0d %0d %0d %0d",
                                    k + 1, u[0], u[1], u[2], u[3]));
    end

    // random networks with random 8-bit states
    for (int n = 0; n < 8; n++) begin
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++) w[i][j] = int'($urandom_range(0, 255)) - 128;
      load_weights(w);
      for (int i = 0; i < 4; i++) u[i] = int'($urandom_range(0, 127)) - 64;
      for (int it = 0; it < 3; it++) update(u, w, 0);
    end

    // ---- extended accuracy: 16 products summed in 32 bits -------------
    // Column 1's second adder continues column 0's with its carry, so
    // {R1, R0} holds the sum at 32 bits; column 4's second adder is split
    // into two byte adders. Loop FSM 1 now repeats the accumulate state 7
    // times: 8 RAM / Memory words, 9 steps to the stop state.
    begin
      int uu [16], ww [16];
      longint total;
      logic [7:0] lo_b, hi_b;
      int cycles;
      cfg_write(3, 1, SRC_UP, SRC_REG, 0, 0, 1);
      cfg_write(4, 1, SRC_UP, SRC_ZERO, 0);
      cfg_write(3, 4, SRC_UP, SRC_REG, 0, 1, 0);
      host_write(16'h3000, 32'd7);
      total = 0; lo_b = 0; hi_b = 0;
      for (int t = 0; t < 8; t++) begin
        logic [15:0] pair4;
        for (int c = 0; c < COLS; c++) begin
          int uv, wv;
          uv = int'($urandom_range(90, 127));
          wv = int'($urandom_range(90, 127));
          host_write(16'h5000 | 16'(t << 4) | 16'(c), 32'(uv));
          mem_write(t, c, wv);
          if (c < 2) begin uu[2*t + c] = uv; ww[2*t + c] = wv; end
          if (c == 4) pair4 = 16'(uv * wv);
          if (c == 5) pair4 = pair4 + 16'(uv * wv);
        end
        total += longint'(uu[2*t] * ww[2*t] + uu[2*t+1] * ww[2*t+1]);
        lo_b += pair4[7:0];
        hi_b += pair4[15:8];
      end
      host_write(16'h6000, 32'd1);
      @(negedge clk);
      run = 1;
      #1;
      cycles = 0;
      while (!done && cycles < 100) begin @(negedge clk); cycles++; end
      run = 0;
      checks++;
      if (cycles != 9) fail($sformatf("wide accumulation took %0d cycles, want 9", cycles));
      checks++;
      if ({r_out[1], r_out[0]} !== 32'(total))
        fail($sformatf("32-bit sum %0d, want %0d", {r_out[1], r_out[0]}, total));
      checks++;
      if (total <= 65535) fail("32-bit sum did not exceed 16 bits");
      checks++;
      if (r_out[4] !== {hi_b, lo_b}) fail($sformatf("split sums %h, want %h", r_out[4], {hi_b, lo_b}));
    end

    $display("mechanisms: loop=%0d bypass=%0d clear=%0d accumulate=%0d stop=%0d restart=%0d carry=%0d pos=%0d neg=%0d slowclk=%0d wide=%0d split=%0d",
             n_loop, n_bypass, n_clear, n_accum, n_stop, n_restart, n_carry, n_pos, n_neg, n_slow, n_wide, n_split);
    checks++; if (n_loop == 0)    fail("loop jump never happened");
    checks++; if (n_bypass == 0)  fail("bypass never carried a value");
    checks++; if (n_clear == 0)   fail("register clear never happened");
    checks++; if (n_accum == 0)   fail("accumulation never happened");
    checks++; if (n_stop == 0)    fail("stop never happened");
    checks++; if (n_restart == 0) fail("restart never happened");
    checks++; if (n_carry == 0)   fail("adder byte carry never happened");
    checks++; if (n_pos == 0 || n_neg == 0) fail("activation outcome missing");
    checks++; if (n_slow == 0)    fail("slowed clock never happened");
    checks++; if (n_wide == 0)    fail("carry between the columns of a wide adder never happened");
    checks++; if (n_split == 0)   fail("split adder never cut a carry");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
