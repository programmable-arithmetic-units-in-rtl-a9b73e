// control_unit: the programmable Control and Timing Unit of IREN.
//
// A sequencer of NSTATES one-hot states "1." .. "n." steps from each state to
// the next (after the last it wraps to "1."). Reset, or a restart written by
// the host, enters state "1." (the reset multiplexer). Which way the
// sequencer leaves a state is decided by the top programmable OR array,
// whose rows select, out of the state vector:
//   rows 0..N_LOOPS-1  the end state of loop FSM 1..N_LOOPS,
//   row  N_LOOPS       the stop states (the sequencer holds, `done` = 1),
//   row  N_LOOPS+1     the restart states (next state is "1.").
// Each loop FSM (loop_fsm) decides whether its backward jump to its
// programmed target state is taken; FSM 1 has priority over 2 and 2 over 3,
// and a lower FSM does not see its end state while a higher one jumps. This
// lets the three FSMs build graphs such as a self loop repeated n times, an
// inner loop repeated m times and an outer loop around it repeated k times.
// The bottom programmable OR array forms the CTRL_W control signals, each the
// OR of the states its mask selects (bit assignment in iren_pkg).
//
// Timing: the sequencer advances on `step` = run & Clk1 & !done, where Clk1 is
// output 0 of the clock circuit (clk_circuit). The actions that the control
// signals of a state call for happen on the clock edge that leaves the state.
// The unit also holds the RAM and Memory read addresses (cleared or
// incremented by control signals on a step) and forwards host writes to the
// RAM.
//
// Host port (write only; host_rdata is a status word), host_addr[15:12]:
//   0  bottom OR array row host_addr[3:0]   <= host_wdata[NSTATES-1:0]
//   1  top OR array row host_addr[3:0]      <= host_wdata[NSTATES-1:0]
//   2  loop FSM host_addr[3:0] target state <= host_wdata (state index, 0 = "1.")
//   3  loop FSM host_addr[3:0] count        <= host_wdata[CNT_W-1:0]
//   4  clock divider host_addr[3:0]         <= host_wdata[DIV_W-1:0]
//   5  RAM word host_addr[11:4], lane host_addr[3:0] <= host_wdata[7:0]
//   6  command: host_wdata[0] = restart at state "1.", addresses to 0
// Status: {done, loops active, 0.., state index}.
//
// From the document: states in a chain, the reset multiplexer, two
// programmable OR arrays, three FSMs, a clock circuit, the control signals.
// This design's own: the row meaning of the OR arrays, the loop semantics,
// the FSM priority, the register map and all sizes.
module control_unit
  import iren_pkg::*;
#(
  parameter int unsigned NSTATES = 16,
  parameter int unsigned N_LOOPS = 3,
  parameter int unsigned CNT_W   = 8,
  parameter int unsigned N_CLK   = 4,
  parameter int unsigned DIV_W   = 8,
  parameter int unsigned DEPTH   = 16,
  parameter int unsigned LANES   = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // host port
  input  logic                       host_we,
  input  logic [15:0]                host_addr,
  input  logic [31:0]                host_wdata,
  output logic [31:0]                host_rdata,
  // sequencing
  input  logic                       run,
  output logic                       done,
  output logic                       step,
  output logic [NSTATES-1:0]         state,
  output logic [CTRL_W-1:0]          ctrl,
  output logic [N_CLK-1:0]           clk_en,
  output logic [N_LOOPS-1:0]         loop_jump,
  // RAM / Memory addressing
  output logic                       ram_we,
  output logic [$clog2(DEPTH)-1:0]   ram_waddr,
  output logic [$clog2(LANES)-1:0]   ram_wlane,
  output logic [7:0]                 ram_wdata,
  output logic [$clog2(DEPTH)-1:0]   ram_raddr,
  output logic [$clog2(DEPTH)-1:0]   mem_raddr
);
  localparam int unsigned SW      = $clog2(NSTATES);
  localparam int unsigned TOP_ROWS = N_LOOPS + 2;
  localparam int unsigned ROW_STOP = N_LOOPS;
  localparam int unsigned ROW_RST  = N_LOOPS + 1;
  localparam int unsigned AW      = $clog2(DEPTH);

  typedef enum logic [3:0] {
    R_CTRL_OR = 4'd0,
    R_JUMP_OR = 4'd1,
    R_TARGET  = 4'd2,
    R_COUNT   = 4'd3,
    R_CLKDIV  = 4'd4,
    R_RAM     = 4'd5,
    R_CMD     = 4'd6
  } region_e;

  region_e region;
  logic    wr_ctrl, wr_jump, restart;
  assign region  = region_e'(host_addr[15:12]);
  assign wr_ctrl = host_we && region == R_CTRL_OR;
  assign wr_jump = host_we && region == R_JUMP_OR;
  assign restart = host_we && region == R_CMD && host_wdata[0];

  // ---- programmable registers -------------------------------------------
  logic [SW-1:0]    target [N_LOOPS];
  logic [CNT_W-1:0] count  [N_LOOPS];
  logic [DIV_W-1:0] div    [N_CLK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_LOOPS); k++) begin
        target[k] <= '0;
        count[k]  <= '0;
      end
      for (int k = 0; k < int'(N_CLK); k++) div[k] <= '0;
    end else if (host_we) begin
      for (int k = 0; k < int'(N_LOOPS); k++) begin
        if (region == R_TARGET && int'(host_addr[3:0]) == k) target[k] <= host_wdata[SW-1:0];
        if (region == R_COUNT  && int'(host_addr[3:0]) == k) count[k]  <= host_wdata[CNT_W-1:0];
      end
      for (int k = 0; k < int'(N_CLK); k++) begin
        if (region == R_CLKDIV && int'(host_addr[3:0]) == k) div[k] <= host_wdata[DIV_W-1:0];
      end
    end
  end

  // ---- RAM write forwarding ---------------------------------------------
  assign ram_we    = host_we && region == R_RAM;
  assign ram_waddr = AW'(host_addr[11:4]);
  assign ram_wlane = host_addr[$clog2(LANES)-1:0];
  assign ram_wdata = host_wdata[7:0];

  // ---- clock circuit ----------------------------------------------------
  clk_circuit #(.N_CLK(N_CLK), .DIV_W(DIV_W)) u_clk (
    .clk, .rst_n, .enable(run), .div, .clk_en
  );

  // ---- OR arrays ---------------------------------------------------------
  logic [TOP_ROWS-1:0] jump_sel;

  or_array #(.IN_W(NSTATES), .OUT_W(TOP_ROWS)) u_jump_or (
    .clk, .rst_n,
    .prog_we  (wr_jump),
    .prog_row ($clog2(TOP_ROWS)'(host_addr[3:0])),
    .prog_mask(host_wdata[NSTATES-1:0]),
    .in       (state),
    .out      (jump_sel)
  );

  or_array #(.IN_W(NSTATES), .OUT_W(CTRL_W)) u_ctrl_or (
    .clk, .rst_n,
    .prog_we  (wr_ctrl),
    .prog_row ($clog2(CTRL_W)'(host_addr[3:0])),
    .prog_mask(host_wdata[NSTATES-1:0]),
    .in       (state),
    .out      (ctrl)
  );

  // ---- loop FSMs ---------------------------------------------------------
  logic [N_LOOPS-1:0] loop_active;
  logic [N_LOOPS:0]   blocked;   // a higher-priority FSM jumps

  assign done    = jump_sel[ROW_STOP];
  assign step    = run && clk_en[0] && !done;
  assign blocked[0] = 1'b0;

  for (genvar k = 0; k < int'(N_LOOPS); k++) begin : g_loop
    loop_fsm #(.CNT_W(CNT_W)) u_loop (
      .clk, .rst_n,
      .count (count[k]),
      .at_end(jump_sel[k] && !blocked[k]),
      .step  (step),
      .jump  (loop_jump[k]),
      .active(loop_active[k])
    );
    assign blocked[k+1] = blocked[k] || loop_jump[k];
  end

  // ---- state sequencer ----------------------------------------------------
  logic [NSTATES-1:0] next_state;

  always_comb begin
    next_state = {state[NSTATES-2:0], state[NSTATES-1]};
    if (jump_sel[ROW_RST]) next_state = NSTATES'(1);
    for (int k = int'(N_LOOPS) - 1; k >= 0; k--) begin
      if (loop_jump[k]) next_state = NSTATES'(1) << target[k];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       state <= NSTATES'(1);
    else if (restart) state <= NSTATES'(1);
    else if (step)    state <= next_state;
  end

  // ---- address generators -------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ram_raddr <= '0;
      mem_raddr <= '0;
    end else if (restart || (step && ctrl[CTRL_ADDR_CLR])) begin
      ram_raddr <= '0;
      mem_raddr <= '0;
    end else if (step) begin
      if (ctrl[CTRL_RAM_INC]) ram_raddr <= ram_raddr + 1'b1;
      if (ctrl[CTRL_MEM_INC]) mem_raddr <= mem_raddr + 1'b1;
    end
  end

  // ---- status --------------------------------------------------------------
  logic [SW-1:0] state_idx;
  always_comb begin
    state_idx = '0;
    for (int i = 0; i < int'(NSTATES); i++) if (state[i]) state_idx = SW'(i);
  end
  assign host_rdata = {done, 7'(loop_active), 24'(state_idx)};

  assert property (@(posedge clk) disable iff (!rst_n) $onehot(state))
    else $error("control_unit: state vector is not one-hot");
endmodule
