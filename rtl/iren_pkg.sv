// iren_pkg: types and constants shared by the IREN blocks.
//
// The IREN datapath works on 8-bit operands (the accuracy the architecture
// is built for) and moves them on 16-bit interconnection links, wide enough
// for a full 8x8 product. The arithmetic array has the row order of its
// floorplan: multipliers, adders, multipliers, adders, registers. The
// operand-source encoding, the configuration word layout and the control
// signal bit assignment below are this implementation's own choices.
package iren_pkg;

  localparam int unsigned DATA_W = 8;   // operand accuracy
  localparam int unsigned LINK_W = 16;  // width of one interconnection link
  localparam int unsigned N_ROWS = 5;   // mul, add, mul, add, reg

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [LINK_W-1:0] link_t;

  // Kind of unit in each array row, top to bottom.
  typedef enum logic [1:0] {
    UNIT_MUL = 2'd0,
    UNIT_ADD = 2'd1,
    UNIT_REG = 2'd2
  } unit_kind_e;

  function automatic unit_kind_e row_kind(input int unsigned row);
    case (row)
      0, 2:    return UNIT_MUL;
      1, 3:    return UNIT_ADD;
      default: return UNIT_REG;
    endcase
  endfunction

  // Where one operand input of an array unit takes its value from.
  typedef enum logic [2:0] {
    SRC_ZERO     = 3'd0,  // constant "0"
    SRC_UP_LEFT  = 3'd1,  // channel above, column c-1
    SRC_UP       = 3'd2,  // channel above, column c
    SRC_UP_RIGHT = 3'd3,  // channel above, column c+1
    SRC_RAM      = 3'd4,  // RAM lane c
    SRC_MEM      = 3'd5,  // Memory lane c
    SRC_REG      = 3'd6,  // register row output, column c
    SRC_EXT      = 3'd7   // array I/O port lane c
  } src_e;

  // Configuration of one array unit (one crossing of the interconnect).
  // bypass: the channel below the unit carries the channel above it
  // unchanged, so the unit itself is unusable.
  // split, carry_left: adder accuracy (adder rows only): two independent
  // 8-bit adds, and carry-in from the adder of the column to the left.
  typedef struct packed {
    logic carry_left;
    logic split;
    logic bypass;
    src_e sel_b;
    src_e sel_a;
  } unit_cfg_t;

  localparam int unsigned UNIT_CFG_W = $bits(unit_cfg_t);

  // Control signals produced by the output OR array of the control unit.
  localparam int unsigned CTRL_W       = 8;
  localparam int unsigned CTRL_R_CLR   = 0;  // registers load "0"
  localparam int unsigned CTRL_R_LOAD  = 1;  // registers load their source
  localparam int unsigned CTRL_ADDR_CLR = 2; // RAM and Memory addresses to 0
  localparam int unsigned CTRL_RAM_INC = 3;  // RAM address + 1
  localparam int unsigned CTRL_MEM_INC = 4;  // Memory address + 1
  localparam int unsigned CTRL_OUT_STB = 5;  // array result is valid
  // bits 6 and 7 are free control lines brought out of the top

endpackage
