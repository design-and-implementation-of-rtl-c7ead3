// haar_bpu: basic processing unit of the transform, a two-input two-output
// butterfly. The upper output is the sum a+b, the lower output the difference
// a-b; there is no multiplier. In this transform a butterfly only ever sees
// approximation (running-sum) values, which are never negative, so both inputs
// are taken as unsigned. Each output is one bit wider than the inputs: the
// sum as an unsigned number, the difference as a two's-complement number,
// so neither can overflow.
//
// Purely combinational; the pipeline registers belong to the stages.
// The add/subtract structure is taken from the published design; treating the inputs as
// unsigned and widening by one bit are this design's reading of its bit widths.
module haar_bpu #(
  parameter int unsigned W = 8               // input width
) (
  input  logic [W-1:0] a,                    // upper input  (even sample)
  input  logic [W-1:0] b,                    // lower input  (odd sample)
  output logic [W:0]   sum,                  // a + b, unsigned
  output logic [W:0]   diff                  // a - b, two's complement
);

  always_comb begin
    sum  = {1'b0, a} + {1'b0, b};
    diff = {1'b0, a} - {1'b0, b};
  end

endmodule
