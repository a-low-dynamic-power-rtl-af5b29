// pll_clock_driver: behavioural model of the PLL clock driver (an analog
// macro; this model is for simulation only, it uses delays).
//
// It delivers the ADA clock at the optimum frequency fc selected by the
// DVFS control signal k: 680 MHz for k = 8, halving with each step down to
// 43 MHz for k = 4 (the table rounds 42.5 MHz up); any other k gives 680 MHz.  The model is a free
// running oscillator whose half period is re-read at every edge, so a change of
// k takes effect within one old period; lock time and jitter are not modelled.
// While rst_n is low the output is held low.  The reference clock of a real
// PLL is not modelled.  A synthesis tool that ignores the delays sees the
// oscillator as a combinational loop; that is expected, since this model only
// stands in for the analog macro in simulation.
module pll_clock_driver (
  input  logic       rst_n,
  input  logic [3:0] k,
  output logic       clk_out
);

  int unsigned half_ps;

  // half periods: 1e6 / (2 * fc[MHz]) ps
  always_comb begin
    unique case (k)
      4'd7:    half_ps = 1471;   // 340 MHz
      4'd6:    half_ps = 2941;   // 170 MHz
      4'd5:    half_ps = 5882;   // 85 MHz
      4'd4:    half_ps = 11628;  // 43 MHz
      default: half_ps = 735;    // 680 MHz
    endcase
  end

  initial clk_out = 1'b0;

  always begin
    #(half_ps * 1ps);
    clk_out = rst_n ? ~clk_out : 1'b0;
  end
endmodule
