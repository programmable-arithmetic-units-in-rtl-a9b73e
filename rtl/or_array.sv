// or_array: programmable OR array.
//
// Output j is the OR of those inputs that row j's programmed mask selects:
// out[j] = |(in & mask[j]). The masks are held in registers written one row
// at a time through prog_we / prog_row / prog_mask and cleared by reset, so
// an unprogrammed row gives 0. The output is combinational in the inputs.
// The control unit uses two of these, fed by its one-hot state vector: one
// decides the state jumps, the other forms the control signals. The
// document names the OR arrays and their use; the mask registers and the
// write port are this design's choice.
module or_array #(
  parameter int unsigned IN_W  = 16,
  parameter int unsigned OUT_W = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     prog_we,
  input  logic [$clog2(OUT_W)-1:0] prog_row,
  input  logic [IN_W-1:0]          prog_mask,
  input  logic [IN_W-1:0]          in,
  output logic [OUT_W-1:0]         out
);
  logic [IN_W-1:0] mask [OUT_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < int'(OUT_W); j++) mask[j] <= '0;
    end else if (prog_we && int'(prog_row) < int'(OUT_W)) begin
      mask[prog_row] <= prog_mask;
    end
  end

  always_comb begin
    for (int j = 0; j < int'(OUT_W); j++) out[j] = |(in & mask[j]);
  end
endmodule
