// sync_2ff: two-flip-flop synchronizer for one level signal entering a clock
// domain.  q follows d two to three rising edges of clk later.  Used between
// the DVFS controller clock and the ADA clock, which are unrelated.
module sync_2ff (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);
  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meta <= 1'b0; q <= 1'b0;
    end else begin
      meta <= d; q <= meta;
    end
  end
endmodule
