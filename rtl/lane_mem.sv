// lane_mem: a word-wide memory feeding one operand lane per array column.
//
// DEPTH words, each LANES bytes wide. The read port presents all lanes of
// word raddr at once (asynchronous read, as from distributed FPGA RAM),
// one byte per column of the arithmetic array. The write port writes one
// lane of one word per clock. Used twice in the IREN top: as the RAM that
// holds the neuron states U and as the Memory that holds the weights W. The
// contents are not reset. The document names the RAM and the Memory and
// their place in the architecture; organisation and sizes are this
// design's choice.
module lane_mem #(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned LANES = 8,
  parameter int unsigned W     = 8
) (
  input  logic                       clk,
  input  logic                       we,
  input  logic [$clog2(DEPTH)-1:0]   waddr,
  input  logic [$clog2(LANES)-1:0]   wlane,
  input  logic [W-1:0]               wdata,
  input  logic [$clog2(DEPTH)-1:0]   raddr,
  output logic [W-1:0]               rdata [LANES]
);
  logic [W-1:0] mem [DEPTH][LANES];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wlane] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
