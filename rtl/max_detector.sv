// max_detector: maximum data detector of the DVFS controller.
//
// Finds Max. n_m, the largest n_m among the co-located M-Blk of the reference
// frame and the top, left and upper-left M-Blks of the current frame.  The
// values arrive one per cycle (the controller reads them from the n_m SRAM in
// turn): clr starts a new search, each cycle with en high folds x into the
// running maximum, and max holds the result from the edge after the last en.
// Serial operation over a single-port SRAM is this design's own choice.
module max_detector #(
  parameter int W = 9
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [W-1:0] x,
  output logic [W-1:0] max
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              max <= '0;
    else if (clr)            max <= '0;
    else if (en && x > max)  max <= x;
  end
endmodule
