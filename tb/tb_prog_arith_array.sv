// tb_prog_arith_array: three parts.
//  1. The optimized neuron cell: columns 0/1 form U1*W11 + U2*W12 in the
//     first multiplier row and first adder row, the value is routed past the
//     second multiplier row by bypass, and the second adder row adds the
//     register, which thus accumulates. Two cycles must give the full
//     four-input weighted sum; a clear must give 0.
//  1b. Programmable adder accuracy: two adders of a row cascaded into a
//     32-bit accumulator, and a split adder holding two 8-bit accumulators,
//     checked against integer sums.
//  2. Random configurations of the whole array with random operands over
//     several clock cycles, compared each cycle with a behavioural model of
//     the array written here from the interconnect rules (sources, bypass,
//     byte-wise sums with split and row carry, signed 8-bit products).
module tb_prog_arith_array;
  import iren_pkg::*;
  localparam int COLS = 8;
  localparam int AW = $clog2(N_ROWS * COLS);

  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [AW-1:0] cfg_addr = 0;
  unit_cfg_t cfg_wdata = '0;
  data_t ram_lane [COLS];
  data_t mem_lane [COLS];
  link_t ext_in [COLS];
  logic r_clr = 0, r_load = 0;
  link_t r_out [COLS];

  unit_cfg_t cfg_model [N_ROWS * COLS];
  link_t     reg_model [COLS];
  int checks = 0, failures = 0;

  prog_arith_array dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write_cfg(input int r, input int c, input unit_cfg_t w);
    @(negedge clk);
    cfg_we = 1; cfg_addr = AW'(r * COLS + c); cfg_wdata = w;
    cfg_model[r * COLS + c] = w;
    @(negedge clk);
    cfg_we = 0;
  endtask

  function automatic unit_cfg_t mk(input src_e a, input src_e b, input logic byp,
                                   input logic split = 0, input logic carry_left = 0);
    unit_cfg_t w;
    w.sel_a = a; w.sel_b = b; w.bypass = byp; w.split = split; w.carry_left = carry_left;
    return w;
  endfunction

  // Behavioural model: the value on the register inputs.
  task automatic model_inputs(output link_t rin [COLS]);
    link_t chn [N_ROWS][COLS];
    for (int r = 0; r < N_ROWS; r++) begin
      logic carry = 0;   // carry-out of the adder to the left
      for (int c = 0; c < COLS; c++) begin
        link_t ops [2];
        link_t above;
        unit_cfg_t w = cfg_model[r * COLS + c];
        for (int o = 0; o < 2; o++) begin
          src_e s = (o == 0) ? w.sel_a : w.sel_b;
          link_t v = 0;
          case (s)
            SRC_UP_LEFT:  v = (r > 0 && c > 0) ? chn[r-1][c-1] : 0;
            SRC_UP:       v = (r > 0) ? chn[r-1][c] : 0;
            SRC_UP_RIGHT: v = (r > 0 && c < COLS - 1) ? chn[r-1][c+1] : 0;
            SRC_RAM:      v = link_t'(ram_lane[c]);
            SRC_MEM:      v = link_t'(mem_lane[c]);
            SRC_REG:      v = reg_model[c];
            SRC_EXT:      v = ext_in[c];
            default:      v = 0;
          endcase
          ops[o] = v;
        end
        above = (r > 0) ? chn[r-1][c] : 0;
        case (r)
          0, 2: chn[r][c] = w.bypass ? above
                          : link_t'(int'(signed'(ops[0][7:0])) * int'(signed'(ops[1][7:0])));
          1, 3: begin
            logic [8:0] lo, hi;
            lo = 9'(ops[0][7:0]) + 9'(ops[1][7:0]) + 9'(w.carry_left & carry);
            hi = 9'(ops[0][15:8]) + 9'(ops[1][15:8]) + 9'(w.split ? 1'b0 : lo[8]);
            carry = hi[8];
            chn[r][c] = w.bypass ? above : {hi[7:0], lo[7:0]};
          end
          default: begin
            chn[r][c] = reg_model[c];
            rin[c] = ops[0];
          end
        endcase
      end
    end
  endtask

  task automatic clock_regs(input logic clr, input logic load);
    link_t rin [COLS];
    model_inputs(rin);
    @(negedge clk);
    r_clr = clr; r_load = load;
    #1;
    model_inputs(rin);
    @(negedge clk);
    r_clr = 0; r_load = 0;
    for (int c = 0; c < COLS; c++) begin
      if (clr) reg_model[c] = 0;
      else if (load) reg_model[c] = rin[c];
    end
  endtask

  task automatic compare_regs(input string what);
    for (int c = 0; c < COLS; c++) begin
      checks++;
      if (r_out[c] !== reg_model[c]) begin
        failures++;
        $display("FAIL %s: column %0d register %0d, want %0d", what, c, r_out[c], reg_model[c]);
      end
    end
  endtask

  initial begin
    for (int i = 0; i < N_ROWS * COLS; i++) cfg_model[i] = '0;
    for (int c = 0; c < COLS; c++) begin
      reg_model[c] = 0; ram_lane[c] = 0; mem_lane[c] = 0; ext_in[c] = 0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // ---- part 1: the optimized neuron cell in columns 0 and 1 ----------
    write_cfg(0, 0, mk(SRC_RAM, SRC_MEM, 0));
    write_cfg(0, 1, mk(SRC_RAM, SRC_MEM, 0));
    write_cfg(1, 0, mk(SRC_UP, SRC_UP_RIGHT, 0));
    write_cfg(2, 0, mk(SRC_ZERO, SRC_ZERO, 1));
    write_cfg(3, 0, mk(SRC_UP, SRC_REG, 0));
    write_cfg(4, 0, mk(SRC_UP, SRC_ZERO, 0));
    for (int trial = 0; trial < 50; trial++) begin
      int u [4], w [4], sum;
      sum = 0;
      for (int i = 0; i < 4; i++) begin
        u[i] = int'($urandom_range(0, 255)) - 128;
        w[i] = int'($urandom_range(0, 255)) - 128;
        sum += u[i] * w[i];
      end
      @(negedge clk);
      r_clr = 1;
      @(negedge clk);
      r_clr = 0;
      checks++;
      if (r_out[0] !== 16'sd0) begin failures++; $display("FAIL register not cleared"); end
      for (int t = 0; t < 2; t++) begin
        ram_lane[0] = data_t'(u[2*t]); ram_lane[1] = data_t'(u[2*t+1]);
        mem_lane[0] = data_t'(w[2*t]); mem_lane[1] = data_t'(w[2*t+1]);
        @(negedge clk);
        r_load = 1;
        @(negedge clk);
        r_load = 0;
      end
      checks++;
      if (r_out[0] !== link_t'(sum)) begin
        failures++;
        $display("FAIL neuron sum %0d, want %0d", r_out[0], link_t'(sum));
      end
    end
    r_clr = 1; @(negedge clk); r_clr = 0;

    // ---- part 1b: programmable adder accuracy ---------------------------
    // columns 2 and 3: one 32-bit accumulator {R3, R2} += {ext3, ext2};
    // column 4: split adder, two independent 8-bit accumulators.
    write_cfg(1, 2, mk(SRC_EXT, SRC_REG, 0, 0, 0));
    write_cfg(1, 3, mk(SRC_EXT, SRC_REG, 0, 0, 1));
    write_cfg(1, 4, mk(SRC_EXT, SRC_REG, 0, 1, 0));
    for (int c = 2; c <= 4; c++) begin
      write_cfg(2, c, mk(SRC_ZERO, SRC_ZERO, 1));
      write_cfg(3, c, mk(SRC_UP, SRC_ZERO, 0));
      write_cfg(4, c, mk(SRC_UP, SRC_ZERO, 0));
    end
    begin
      logic [31:0] acc32, x32;
      logic [7:0] acc_lo, acc_hi;
      int wide_carries, lane_carries;
      acc32 = 0; acc_lo = 0; acc_hi = 0; wide_carries = 0; lane_carries = 0;
      for (int t = 0; t < 60; t++) begin
        x32 = $urandom;
        if (t % 4 == 0) x32[15:0] = 16'hffff;  // force a carry into column 3
        ext_in[2] = x32[15:0]; ext_in[3] = x32[31:16];
        ext_in[4] = 16'($urandom);
        if (17'(acc32[15:0]) + 17'(x32[15:0]) > 17'hffff) wide_carries++;
        if (9'(acc_lo) + 9'(ext_in[4][7:0]) > 9'hff) lane_carries++;
        acc32 += x32;
        acc_lo += ext_in[4][7:0];
        acc_hi += ext_in[4][15:8];
        @(negedge clk); r_load = 1;
        @(negedge clk); r_load = 0;
        checks++;
        if ({r_out[3], r_out[2]} !== acc32) begin
          failures++;
          $display("FAIL 32-bit accumulator %h, want %h", {r_out[3], r_out[2]}, acc32);
        end
        checks++;
        if (r_out[4] !== {acc_hi, acc_lo}) begin
          failures++;
          $display("FAIL split accumulator %h, want %h", r_out[4], {acc_hi, acc_lo});
        end
      end
      checks++;
      if (wide_carries == 0 || lane_carries == 0) begin
        failures++;
        $display("FAIL carry cases not exercised");
      end
    end
    r_clr = 1; @(negedge clk); r_clr = 0;
    for (int c = 0; c < COLS; c++) begin reg_model[c] = 0; ext_in[c] = 0; end

    // ---- part 2: random configurations against the model ---------------
    for (int round = 0; round < 30; round++) begin
      for (int i = 0; i < N_ROWS * COLS; i++) begin
        unit_cfg_t w;
        w = unit_cfg_t'($urandom);
        if ($urandom_range(0, 3) != 0) w.bypass = 0;
        write_cfg(i / COLS, i % COLS, w);
      end
      for (int t = 0; t < 8; t++) begin
        for (int c = 0; c < COLS; c++) begin
          ram_lane[c] = data_t'($urandom);
          mem_lane[c] = data_t'($urandom);
          ext_in[c]   = link_t'($urandom);
        end
        clock_regs(t == 0 && round % 5 == 0, 1'b1);
        compare_regs($sformatf("round %0d cycle %0d", round, t));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
