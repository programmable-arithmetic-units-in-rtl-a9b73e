// hard_limiter: the step activation of a Hopfield neuron cell.
//
// Maps the neuron's weighted sum to a bipolar state: +1 when the sum is zero
// or positive, -1 when it is negative, as an 8-bit two's-complement value
// ready to be used as a neuron state U again, plus the same decision as one
// bit (1 for +1). Purely combinational. The step shape is the document's;
// the output coding and the choice that 0 maps to +1 are this design's.
module hard_limiter
  import iren_pkg::*;
(
  input  link_t x,
  output data_t y,
  output logic  y_bit
);
  always_comb begin
    y_bit = ~x[LINK_W-1];
    y     = y_bit ? data_t'(1) : data_t'(-1);
  end
endmodule
