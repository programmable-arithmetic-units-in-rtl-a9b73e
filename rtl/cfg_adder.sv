// cfg_adder: the 8-bit configurable adder of the arithmetic array.
//
// Two 4-bit look-ahead carry slices (laca4) add the low and the high nibble.
// The carry into the low slice is chosen by a multiplexer between the
// external "Cin" and constant "0". The carry into the high slice is chosen
// between the low slice's carry-out "Cout3", constant "0" and a separate
// input "Cin4". So the unit is one 8-bit adder (Cout3 chained), or two
// independent 4-bit adders, and "Cout3" is brought out so that a cascade can
// end after the low nibble. Purely combinational.
//
// Structure, signal names and the three multiplexer inputs follow the
// document. The select encodings are this design's choice.
module cfg_adder (
  input  logic [7:0] a,
  input  logic [7:0] b,
  input  logic       cin,       // carry into bit 0
  input  logic       cin4,      // alternative carry into bit 4
  input  logic       lo_cin_en, // 1: low slice takes cin, 0: takes "0"
  input  logic [1:0] hi_cin_sel,// 0: Cout3, 1: "0", 2/3: cin4
  output logic [7:0] s,
  output logic       cout,      // carry out of bit 7
  output logic       cout3      // carry out of bit 3
);
  logic lo_cin, hi_cin;
  logic gg_lo, gp_lo, gg_hi, gp_hi;

  always_comb begin
    lo_cin = lo_cin_en ? cin : 1'b0;
    unique case (hi_cin_sel)
      2'd0:    hi_cin = cout3;
      2'd1:    hi_cin = 1'b0;
      default: hi_cin = cin4;
    endcase
  end

  laca4 u_lo (.a(a[3:0]), .b(b[3:0]), .cin(lo_cin), .s(s[3:0]), .cout(cout3),
              .gg(gg_lo), .gp(gp_lo));
  laca4 u_hi (.a(a[7:4]), .b(b[7:4]), .cin(hi_cin), .s(s[7:4]), .cout(cout),
              .gg(gg_hi), .gp(gp_hi));

  // Group generate/propagate are not needed outside a single slice here.
  logic unused_gp;
  assign unused_gp = gg_lo ^ gp_lo ^ gg_hi ^ gp_hi;
endmodule
