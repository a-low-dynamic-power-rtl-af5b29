// dcdc_converter: behavioural model of the on-chip DC/DC converter (not
// synthesizable as the real part: it is five analog power switches).
//
// Five pMOS switches SW1..SW5 in parallel connect the 1.0 V supply VDD to the
// virtual supply of the ADA, each through its own voltage drop v_m, so that
// the ADA sees VD = VDD - v_m.  A switch is on while its control is 0.  The
// resulting supplies are SW1 1.00 V, SW2 0.60 V, SW3 0.50 V, SW4 0.45 V and
// SW5 0.40 V, the optimum voltages of the five DVFS operating points.  The
// model reports VD in millivolts as an integer: 0 when no switch is on, and
// the highest of the selected voltages if several are on (parallel paths;
// the controller never does this; the processor top asserts it).  No settling
// time is modelled.
module dcdc_converter #(
  parameter int VDD_MV = 1000
) (
  input  logic [4:0]  sw_n,    // bit 0 = SW1 ... bit 4 = SW5, active low
  output logic [10:0] vd_mv
);
  // VDD - v_m for SW1..SW5, in mV
  localparam int VD_OF_SW [5] = '{VDD_MV, 600, 500, 450, 400};

  always_comb begin
    vd_mv = '0;
    for (int m = 4; m >= 0; m--)
      if (!sw_n[m]) vd_mv = 11'(VD_OF_SW[m]);
  end
endmodule
