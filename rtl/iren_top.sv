// iren_top: the IREN architecture, a programmable datapath for emulated
// digital neural networks.
//
// Four parts, wired as in the architecture's block diagram:
//   * control_unit      programmable sequencer (OR arrays, three loop FSMs,
//                       clock circuit); the host programs it and writes the
//                       RAM through it; it drives the RAM and Memory read
//                       addresses and the array's control signals.
//   * RAM (lane_mem)    neuron states U, one byte per array column.
//   * Memory (lane_mem) weights W, loaded through its own port.
//   * prog_arith_array  multipliers, adders and registers joined by a
//                       programmable interconnect; configured and read
//                       through the array's own I/O port.
// A hard limiter per column (hard_limiter) turns each register value into
// the bipolar neuron output y_out, the step activation of a Hopfield cell.
//
// Timing: one control state per step (run & Clk1). The array's registers
// clear or load on the clock edge that ends a state whose control signals
// ask for it; the operands of that state come from the RAM and Memory words
// the address generators point at during the state. out_valid is control
// signal CTRL_OUT_STB, so r_out / y_out hold a result while it is high.
// Bits 6 and 7 of the control signals and the clock circuit's enables are
// brought out as ctrl_spare and clk_en.
//
// The four parts and their connections are the document's. Host, Memory
// and configuration ports and all sizes not printed in it are this
// design's choices (see the comments of the blocks).
module iren_top
  import iren_pkg::*;
#(
  parameter int unsigned COLS    = 8,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned NSTATES = 16,
  parameter int unsigned N_CLK   = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // host port of the control unit
  input  logic        host_we,
  input  logic [15:0] host_addr,
  input  logic [31:0] host_wdata,
  output logic [31:0] host_rdata,
  input  logic        run,
  output logic        done,
  // Memory load port
  input  logic                      mem_we,
  input  logic [$clog2(DEPTH)-1:0]  mem_waddr,
  input  logic [$clog2(COLS)-1:0]   mem_wlane,
  input  logic [7:0]                mem_wdata,
  // arithmetic array I/O port
  input  logic                      cfg_we,
  input  logic [$clog2(N_ROWS*COLS)-1:0] cfg_addr,
  input  unit_cfg_t                 cfg_wdata,
  input  link_t                     ext_in [COLS],
  output link_t                     r_out  [COLS],
  output data_t                     y_out  [COLS],
  output logic [COLS-1:0]           y_bit,
  output logic                      out_valid,
  // spare control signals and clock enables
  output logic [1:0]                ctrl_spare,
  output logic [N_CLK-1:0]          clk_en,
  output logic [NSTATES-1:0]        state,
  output logic [2:0]                loop_jump,
  output logic                      step
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [CTRL_W-1:0]       ctrl;
  logic                    ram_we;
  logic [AW-1:0]           ram_waddr, ram_raddr, mem_raddr;
  logic [$clog2(COLS)-1:0] ram_wlane;
  logic [7:0]              ram_wdata;
  logic [7:0]              ram_rd [COLS];
  logic [7:0]              mem_rd [COLS];
  data_t                   u_lane [COLS];
  data_t                   w_lane [COLS];

  control_unit #(
    .NSTATES(NSTATES), .N_LOOPS(3), .N_CLK(N_CLK), .DEPTH(DEPTH), .LANES(COLS)
  ) u_ctrl (
    .clk, .rst_n,
    .host_we, .host_addr, .host_wdata, .host_rdata,
    .run, .done, .step, .state, .ctrl, .clk_en, .loop_jump,
    .ram_we, .ram_waddr, .ram_wlane, .ram_wdata, .ram_raddr, .mem_raddr
  );

  lane_mem #(.DEPTH(DEPTH), .LANES(COLS), .W(8)) u_ram (
    .clk, .we(ram_we), .waddr(ram_waddr), .wlane(ram_wlane), .wdata(ram_wdata),
    .raddr(ram_raddr), .rdata(ram_rd)
  );

  lane_mem #(.DEPTH(DEPTH), .LANES(COLS), .W(8)) u_mem (
    .clk, .we(mem_we), .waddr(mem_waddr), .wlane(mem_wlane), .wdata(mem_wdata),
    .raddr(mem_raddr), .rdata(mem_rd)
  );

  always_comb begin
    for (int c = 0; c < int'(COLS); c++) begin
      u_lane[c] = data_t'(ram_rd[c]);
      w_lane[c] = data_t'(mem_rd[c]);
    end
  end

  prog_arith_array #(.COLS(COLS)) u_array (
    .clk, .rst_n,
    .cfg_we, .cfg_addr, .cfg_wdata,
    .ram_lane(u_lane), .mem_lane(w_lane), .ext_in,
    .r_clr (ctrl[CTRL_R_CLR]  && step),
    .r_load(ctrl[CTRL_R_LOAD] && step),
    .r_out
  );

  for (genvar c = 0; c < int'(COLS); c++) begin : g_act
    hard_limiter u_act (.x(r_out[c]), .y(y_out[c]), .y_bit(y_bit[c]));
  end

  assign out_valid  = ctrl[CTRL_OUT_STB];
  assign ctrl_spare = ctrl[7:6];
endmodule
