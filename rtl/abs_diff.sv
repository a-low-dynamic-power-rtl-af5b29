// abs_diff: absolute differencer of the ADA, y = |a - b| for two unsigned pixels.
//
// Purely combinational; it sits between the input registers and the pipeline
// register of the absolute difference accumulator (first pipeline stage).
// The subtraction is done one bit wider and the sign picks the operand order;
// this circuit form is this design's own choice, the block's function follows
// the processor description.
module abs_diff #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] y
);
  logic [W:0] diff;

  always_comb begin
    diff = {1'b0, a} - {1'b0, b};
    y    = diff[W] ? (b - a) : diff[W-1:0];
  end
endmodule
