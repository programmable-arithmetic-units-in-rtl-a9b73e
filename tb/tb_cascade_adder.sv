// tb_cascade_adder: checks cascades of configurable adders of 20 bits
// (two full units and the low half of a third), 16, 12 and 4 bits against
// integer addition, including carries that run through every unit.
module tb_cascade_adder;
  int checks = 0, failures = 0;

  logic [19:0] a20, b20, s20; logic ci20, co20;
  logic [15:0] a16, b16, s16; logic ci16, co16;
  logic [11:0] a12, b12, s12; logic ci12, co12;
  logic [3:0]  a4,  b4,  s4;  logic ci4,  co4;

  cascade_adder                dut20 (.a(a20), .b(b20), .cin(ci20), .s(s20), .cout(co20));
  cascade_adder #(.WIDTH(16))  dut16 (.a(a16), .b(b16), .cin(ci16), .s(s16), .cout(co16));
  cascade_adder #(.WIDTH(12))  dut12 (.a(a12), .b(b12), .cin(ci12), .s(s12), .cout(co12));
  cascade_adder #(.WIDTH(4))   dut4  (.a(a4),  .b(b4),  .cin(ci4),  .s(s4),  .cout(co4));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      logic [20:0] r20; logic [16:0] r16; logic [12:0] r12; logic [4:0] r4;
      if (i == 0) begin
        a20 = 20'hfffff; b20 = 20'h0; ci20 = 1; a16 = 16'hffff; b16 = 16'h1; ci16 = 0;
        a12 = 12'hfff; b12 = 12'h0; ci12 = 1; a4 = 4'hf; b4 = 4'h0; ci4 = 1;
      end else begin
        a20 = 20'($urandom); b20 = 20'($urandom); ci20 = 1'($urandom);
        a16 = 16'($urandom); b16 = 16'($urandom); ci16 = 1'($urandom);
        a12 = 12'($urandom); b12 = 12'($urandom); ci12 = 1'($urandom);
        a4  = 4'($urandom);  b4  = 4'($urandom);  ci4  = 1'($urandom);
      end
      #1;
      r20 = 21'(a20) + 21'(b20) + 21'(ci20);
      r16 = 17'(a16) + 17'(b16) + 17'(ci16);
      r12 = 13'(a12) + 13'(b12) + 13'(ci12);
      r4  = 5'(a4) + 5'(b4) + 5'(ci4);
      checks += 4;
      if ({co20, s20} !== r20) begin failures++; $display("FAIL 20: %h+%h+%b=%h", a20, b20, ci20, {co20, s20}); end
      if ({co16, s16} !== r16) begin failures++; $display("FAIL 16: %h+%h+%b=%h", a16, b16, ci16, {co16, s16}); end
      if ({co12, s12} !== r12) begin failures++; $display("FAIL 12: %h+%h+%b=%h", a12, b12, ci12, {co12, s12}); end
      if ({co4, s4} !== r4)    begin failures++; $display("FAIL 4: %h+%h+%b=%h", a4, b4, ci4, {co4, s4}); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
