// dvfs_table: DVFS operating points indexed by the quantized exponent k.
//
// One row per quantized n_q = 2^k, k = 8 .. 4:
//   n_q  fc [MHz]  VD [V]  n_p   DC/DC switch on
//   256    680     1.00    450   SW1
//   128    340     0.60    225   SW2
//    64    170     0.50    112   SW3
//    32     85     0.45     56   SW4
//    16     43     0.40     28   SW5
// fc halves with each step of k (43 MHz stands for 42.5 MHz).  n_p is the
// number of 256-cycle block matches that fit into one M-Blk slot of about
// 170 us at fc.  The frequencies, voltages and n_p values are those of the
// processor's operating-point table; the switch assignment follows the DC/DC
// converter diagram (SW1 serves 2^8 ... SW5 serves 2^4), and the controls are
// active low.  A k outside 4..8 selects the 680 MHz row (this design's safe
// default).  Combinational.
module dvfs_table
  import me_pkg::*;
(
  input  logic [K_W-1:0] k,
  output dvfs_point_t    pt
);
  always_comb begin
    unique case (k)
      K_W'(7):  pt = '{fc_mhz: FC_W'(340), vd_mv: VD_W'(600),  np: N_W'(225), sw_n: 5'b11101};
      K_W'(6):  pt = '{fc_mhz: FC_W'(170), vd_mv: VD_W'(500),  np: N_W'(112), sw_n: 5'b11011};
      K_W'(5):  pt = '{fc_mhz: FC_W'(85),  vd_mv: VD_W'(450),  np: N_W'(56),  sw_n: 5'b10111};
      K_W'(4):  pt = '{fc_mhz: FC_W'(43),  vd_mv: VD_W'(400),  np: N_W'(28),  sw_n: 5'b01111};
      default:  pt = '{fc_mhz: FC_W'(680), vd_mv: VD_W'(1000), np: N_W'(450), sw_n: 5'b11110};
    endcase
  end
endmodule
