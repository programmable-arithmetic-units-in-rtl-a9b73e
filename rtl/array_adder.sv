// array_adder: the adder unit of the programmable arithmetic array, a
// 16-bit adder with programmable accuracy.
//
// Two 8-bit configurable adders (each a one-unit cascade_adder) add the low
// and the high byte of the operand links. Two configuration bits set the
// accuracy:
//   split      the high byte takes carry "0" instead of the low byte's
//              carry-out, so the unit is two independent 8-bit adders;
//   carry_en   the low byte takes carry_in, the carry-out of the adder in the
//              column to the left, instead of "0", so neighbouring adders of
//              a row cascade into 32-bit and wider adders.
// carry_out is the high byte's carry-out, offered to the column to the right.
// Purely combinational.
//
// The configurable adders, their cascading through Cin/Cout and the
// resulting choice of accuracy follow the document; cascading along a row
// of the array and the two configuration bits are this design's choice.
module array_adder (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        split,
  input  logic        carry_en,
  input  logic        carry_in,
  output logic [15:0] s,
  output logic        carry_out
);
  logic c_lo, c_hi_in;

  assign c_hi_in = split ? 1'b0 : c_lo;

  cascade_adder #(.WIDTH(8)) u_lo (
    .a(a[7:0]), .b(b[7:0]), .cin(carry_en & carry_in), .s(s[7:0]), .cout(c_lo)
  );
  cascade_adder #(.WIDTH(8)) u_hi (
    .a(a[15:8]), .b(b[15:8]), .cin(c_hi_in), .s(s[15:8]), .cout(carry_out)
  );
endmodule
