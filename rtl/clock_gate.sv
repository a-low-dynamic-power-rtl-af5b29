// clock_gate: glitch-free clock gate for the DVFS controller.
//
// The controller works only for a few clocks per M-Blk and for one clock per
// block-match result, so its clock is stopped the rest of the time.  The
// enable is sampled on the falling edge of clk and held through the following
// high phase, and gclk = clk AND the held enable.  This gives whole clock
// pulses only, with no latch.  Timing: an en that is high just before a
// rising edge of clk lets that edge through to gclk.  The gating of the
// controller clock follows the processor description; this circuit (a
// falling-edge flop instead of the usual latch) is this design's choice.
module clock_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic gclk
);
  logic en_q;

  always_ff @(negedge clk or negedge rst_n) begin
    if (!rst_n) en_q <= 1'b1;
    else        en_q <= en;
  end

  assign gclk = clk & en_q;
endmodule
