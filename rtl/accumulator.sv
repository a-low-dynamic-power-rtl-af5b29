// accumulator: 16-bit accumulator of the ADA with its output register.
//
// The output register is fed back to the adder (second pipeline stage).  When
// en is high the register takes acc + x, or x alone when load is also high
// (first pixel of a new block match), so consecutive block matches need no
// idle cycle between them.  x is zero-extended from IN_W bits.  256 pixels of
// at most 255 fit in 16 bits, so no overflow can occur for 16x16 blocks.
// Timing: acc is updated on the rising clock edge after en.  Reset clears it.
module accumulator #(
  parameter int IN_W  = 8,
  parameter int ACC_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             load,
  input  logic [IN_W-1:0]  x,
  output logic [ACC_W-1:0] acc
);
  logic [ACC_W-1:0] x_ext;
  assign x_ext = ACC_W'(x);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc <= '0;
    else if (en)    acc <= load ? x_ext : acc + x_ext;
  end
endmodule
