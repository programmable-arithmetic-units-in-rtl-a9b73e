// clk_circuit: the control unit's clock circuit, giving Clk1 .. Clkn.
//
// The outputs are clock enables, one-cycle pulses in the single system
// clock domain, not separate clocks: output k pulses once every div[k]+1
// cycles, so div[k] = 0 gives an enable in every cycle. Each output has its
// own counter that runs while `enable` is high and restarts when it is low.
// The document names the clock circuit and its outputs Clk1..Clkn only;
// dividing down one clock into enables is this design's choice.
module clk_circuit #(
  parameter int unsigned N_CLK = 4,
  parameter int unsigned DIV_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             enable,
  input  logic [DIV_W-1:0] div    [N_CLK],
  output logic [N_CLK-1:0] clk_en
);
  logic [DIV_W-1:0] cnt [N_CLK];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(N_CLK); k++) cnt[k] <= '0;
    end else begin
      for (int k = 0; k < int'(N_CLK); k++) begin
        if (!enable || cnt[k] >= div[k]) cnt[k] <= '0;
        else                             cnt[k] <= cnt[k] + 1'b1;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < int'(N_CLK); k++) clk_en[k] = enable && (cnt[k] >= div[k]);
  end
endmodule
