// mult8: signed 8 x 8 bit multiplier of the arithmetic array.
//
// Multiplies two two's-complement 8-bit operands into a 16-bit product,
// the width of one interconnection link. The product is formed as a sum
// of shifted partial products: a is sign-extended to 16 bits, the partial
// products for bits 0..6 of b are added and the one for bit 7 is
// subtracted, since that bit carries weight -128. Purely combinational.
// The document names the multiplier and its accuracy only; signed operands
// and this structure are this design's choice.
module mult8 (
  input  logic signed [7:0]  a,
  input  logic signed [7:0]  b,
  output logic signed [15:0] p
);
  logic signed [15:0] ax;
  logic signed [15:0] acc;

  always_comb begin
    ax  = 16'(a);
    acc = '0;
    for (int i = 0; i < 7; i++) begin
      if (b[i]) acc = acc + (ax <<< i);
    end
    if (b[7]) acc = acc - (ax <<< 7);
    p = acc;
  end
endmodule
