// cascade_adder: a WIDTH-bit adder built by cascading configurable adders.
//
// WIDTH must be a multiple of 4. ceil(WIDTH/8) cfg_adder units are chained
// through their Cin/Cout pins, each one working as a full 8-bit adder. When
// WIDTH is an odd number of nibbles, the last unit adds only its low nibble:
// its upper nibble gets zero operands and a "0" carry, and the cascade's
// carry-out is that unit's "Cout3" instead of its "Cout". The default of 20
// bits is the example cascade of the document (S0..7, S8..15, S16..19).
// Purely combinational.
module cascade_adder #(
  parameter int unsigned WIDTH = 20
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] s,
  output logic             cout
);
  localparam int unsigned NUNITS = (WIDTH + 7) / 8;
  localparam int unsigned PADW   = NUNITS * 8;
  localparam bit          HALF   = (WIDTH % 8) != 0;

  initial begin
    assert (WIDTH % 4 == 0 && WIDTH > 0) else $error("cascade_adder: WIDTH must be a multiple of 4");
  end

  logic [PADW-1:0] ap, bp, sp;
  logic [NUNITS:0] carry;
  logic [NUNITS-1:0] c3;

  assign ap = PADW'(a);
  assign bp = PADW'(b);
  assign carry[0] = cin;

  for (genvar k = 0; k < NUNITS; k++) begin : g_unit
    localparam bit LAST_HALF = HALF && (k == NUNITS - 1);
    cfg_adder u_add (
      .a         (ap[8*k +: 8]),
      .b         (bp[8*k +: 8]),
      .cin       (carry[k]),
      .cin4      (1'b0),
      .lo_cin_en (1'b1),
      .hi_cin_sel(LAST_HALF ? 2'd1 : 2'd0),
      .s         (sp[8*k +: 8]),
      .cout      (carry[k+1]),
      .cout3     (c3[k])
    );
  end

  assign s    = sp[WIDTH-1:0];
  assign cout = HALF ? c3[NUNITS-1] : carry[NUNITS];

  // The unused upper nibble of a half-used last unit and the Cout3 pins of
  // the fully used units are left open, as in the document's cascade.
  logic unused;
  assign unused = ^{sp, carry, c3};
endmodule
