// tb_cfg_adder: checks the 8-bit configurable adder in every carry-in
// configuration (low slice: Cin or "0"; high slice: Cout3, "0" or Cin4)
// with random and corner operands, against nibble-wise integer addition.
module tb_cfg_adder;
  logic [7:0] a, b, s;
  logic cin, cin4, lo_cin_en, cout, cout3;
  logic [1:0] hi_cin_sel;
  int checks = 0, failures = 0;

  cfg_adder dut (.a, .b, .cin, .cin4, .lo_cin_en, .hi_cin_sel, .s, .cout, .cout3);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4000; i++) begin
      logic [4:0] lo, hi;
      logic lc, hc;
      if (i < 16) begin
        a = (i & 1) ? 8'hff : 8'h0f; b = (i & 2) ? 8'h01 : 8'hf1;
      end else begin
        a = 8'($urandom); b = 8'($urandom);
      end
      cin = 1'($urandom); cin4 = 1'($urandom);
      lo_cin_en = 1'($urandom); hi_cin_sel = 2'($urandom);
      #1;
      lc = lo_cin_en ? cin : 1'b0;
      lo = 5'(a[3:0]) + 5'(b[3:0]) + 5'(lc);
      case (hi_cin_sel)
        2'd0: hc = lo[4];
        2'd1: hc = 1'b0;
        default: hc = cin4;
      endcase
      hi = 5'(a[7:4]) + 5'(b[7:4]) + 5'(hc);
      checks++;
      if (s !== {hi[3:0], lo[3:0]} || cout !== hi[4] || cout3 !== lo[4]) begin
        failures++;
        $display("FAIL a=%h b=%h cfg=%b%0d got s=%h co=%b c3=%b", a, b, lo_cin_en, hi_cin_sel, s, cout, cout3);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
