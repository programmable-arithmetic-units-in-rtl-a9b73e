// prog_arith_array: the Programmable Arithmetic Array.
//
// A grid of N_ROWS x COLS units whose rows, top to bottom, are multipliers,
// adders, multipliers, adders and registers. Between two rows runs a
// horizontal channel: one 16-bit link per column, driven by the unit above
// it. Every unit has two operand inputs (two 16-bit links); each picks its
// value through a programmable crossing from
//   "0", the channel above in column c-1, c or c+1, RAM lane c,
//   Memory lane c, the register of column c, or the array I/O lane c.
// A unit may instead be set to bypass: the channel below it then carries the
// channel above it, which routes a value past the row but leaves the unit
// itself unusable.
//
// Multipliers take the low 8 bits of their operand links (mult8, signed).
// Adders (array_adder) are 16 bits wide and of programmable accuracy: one
// 16-bit add, two separate 8-bit adds (split), or the upper part of a wider
// add whose carry comes from the adder to the left (carry_left), so that a
// row of adders cascades into 32, 48, ... bits across its columns.
// The register row is the only storage: on r_clr each register loads "0", on
// r_load it loads its operand A. Everything above the registers is
// combinational, so one step of the array is one clock cycle and the
// register outputs r_out are the array's result.
//
// Configuration: one unit_cfg_t word per unit, written at address
// row*COLS + col through cfg_we/cfg_addr/cfg_wdata; all words reset to
// "0" sources without bypass.
//
// From the document: the row pattern, the unit kinds, 16-bit two-operand
// interconnections, programmable crossings, registers that load "0" or feed
// back into an adder. Its own choices: the neighbourhood each crossing
// reaches, the bypass, the carry path along a row, the configuration port
// and COLS = 8 (sixteen multipliers, enough for the "4x4 multipliers" of the
// 4-neuron network). r_clr takes priority over r_load. In multiplier rows
// the upper byte of each operand link is unused, by design.
module prog_arith_array
  import iren_pkg::*;
#(
  parameter int unsigned COLS = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration port
  input  logic        cfg_we,
  input  logic [$clog2(N_ROWS*COLS)-1:0] cfg_addr,
  input  unit_cfg_t   cfg_wdata,
  // operand sources
  input  data_t       ram_lane [COLS],
  input  data_t       mem_lane [COLS],
  input  link_t       ext_in   [COLS],
  // control signals from the control unit
  input  logic        r_clr,
  input  logic        r_load,
  // results
  output link_t       r_out    [COLS]
);
  localparam int unsigned NUNITS = N_ROWS * COLS;

  unit_cfg_t cfg [NUNITS];
  link_t     r_q [COLS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NUNITS); i++) cfg[i] <= '0;
    end else if (cfg_we && int'(cfg_addr) < int'(NUNITS)) begin
      cfg[cfg_addr] <= cfg_wdata;
    end
  end

  for (genvar r = 0; r < int'(N_ROWS); r++) begin : g_row
    link_t chan [COLS];   // channel below the units of this row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      link_t up_l, up_c, up_r;
      link_t opa, opb, res;
      unit_cfg_t ucfg;

      assign ucfg = cfg[r*COLS + c];

      if (r == 0) begin : g_top
        assign up_l = '0;
        assign up_c = '0;
        assign up_r = '0;
      end else begin : g_inner
        assign up_c = g_row[r-1].chan[c];
        if (c == 0) begin : g_l0
          assign up_l = '0;
        end else begin : g_l
          assign up_l = g_row[r-1].chan[c-1];
        end
        if (c == COLS-1) begin : g_r0
          assign up_r = '0;
        end else begin : g_r
          assign up_r = g_row[r-1].chan[c+1];
        end
      end

      function automatic link_t pick(input src_e sel);
        case (sel)
          SRC_UP_LEFT:  return up_l;
          SRC_UP:       return up_c;
          SRC_UP_RIGHT: return up_r;
          SRC_RAM:      return link_t'(ram_lane[c]);
          SRC_MEM:      return link_t'(mem_lane[c]);
          SRC_REG:      return r_q[c];
          SRC_EXT:      return ext_in[c];
          default:      return '0;
        endcase
      endfunction

      assign opa = pick(ucfg.sel_a);
      assign opb = pick(ucfg.sel_b);

      if (row_kind(r) == UNIT_MUL) begin : g_mul
        mult8 u_mul (.a(opa[7:0]), .b(opb[7:0]), .p(res));
        assign chan[c] = ucfg.bypass ? up_c : res;
      end else if (row_kind(r) == UNIT_ADD) begin : g_add
        logic ci, co;
        if (c == 0) begin : g_c0
          assign ci = 1'b0;
        end else begin : g_cl
          assign ci = g_row[r].g_col[c-1].g_add.co;
        end
        array_adder u_add (
          .a(opa), .b(opb), .split(ucfg.split), .carry_en(ucfg.carry_left),
          .carry_in(ci), .s(res), .carry_out(co)
        );
        assign chan[c] = ucfg.bypass ? up_c : res;
      end else begin : g_reg
        // Register: operand A is its data input; operand B, bypass, split
        // and carry_left are not used in this row.
        always_ff @(posedge clk or negedge rst_n) begin
          if (!rst_n)      r_q[c] <= '0;
          else if (r_clr)  r_q[c] <= '0;
          else if (r_load) r_q[c] <= opa;
        end
        assign res     = r_q[c];
        assign chan[c] = res;
      end
    end
  end

  assign r_out = r_q;
endmodule
