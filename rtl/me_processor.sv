// me_processor: low-power motion-estimation processor with dynamic voltage and
// frequency scaling (DVFS).
//
// For each 16x16 macro-block (M-Blk) the DVFS controller predicts how many
// block matches the search will need from the n_m of neighbouring and
// co-located M-Blks, picks one of five operating points (clock fc, supply VD)
// and sets the PLL clock driver and the DC/DC converter; the absolute
// difference accumulator (ADA), clocked at fc, then computes d(n) for the
// candidates from the centre of a +/-10 search window outward, and the
// controller breaks the search off once d(n) has not decreased for n_q = 2^k
// block matches.
//
// Clock domains: clk_ctl (680 MHz) runs the controller, which gates its own
// clock off while it has nothing to do (ctl_clk_on); clk_ada, from the PLL
// model, runs bm_sequencer and the ADA.  run / busy / res_tgl cross between
// them through two-flop synchronizers; res_d, res_n, res_mv are held stable
// while they are read.  The picture memories are outside: for every pixel
// request (pix_req, pix_x, pix_y, cand_mv, in the clk_ada domain) the caller
// returns pix_a (current picture, M-Blk pixel (pix_x, pix_y)) and pix_b
// (reference picture displaced by cand_mv) combinationally in the same clk_ada
// cycle.  Requests: mb_start with mb_x, mb_y while ready; mb_done pulses with
// result.  vd_mv reports the supply the DC/DC converter gives the ADA.
// The structure (controller -> PLL / DC/DC -> ADA -> controller) follows the
// processor block diagram; the clock-domain handshake and the external pixel
// interface are this design's own.
module me_processor
  import me_pkg::*;
#(
  parameter int MB_COLS_P = MB_COLS,
  parameter int MB_ROWS_P = MB_ROWS
) (
  input  logic            clk_ctl,
  input  logic            rst_n,
  input  logic            mb_start,
  input  logic [4:0]      mb_x,
  input  logic [4:0]      mb_y,
  output logic            ready,
  output logic            mb_done,
  output me_result_t      result,
  output logic [2:0]      stop_cause,
  output logic            ctl_clk_on,   // controller clock not gated this cycle
  // ADA side
  output logic            clk_ada,
  output logic            pix_req,
  output logic [3:0]      pix_x,
  output logic [3:0]      pix_y,
  output mvec_t           cand_mv,
  input  logic [PIX_W-1:0] pix_a,
  input  logic [PIX_W-1:0] pix_b,
  // DVFS state
  output logic [K_W-1:0]  k,
  output logic [FC_W-1:0] fc_mhz,
  output logic [N_W-1:0]  np,
  output logic [N_W-1:0]  nq,
  output logic [VD_W-1:0] vd_mv,
  output logic [D_W-1:0]  d_ada
);
  dvfs_point_t    pt;
  logic           run, seq_busy, res_tgl, pix_first, pix_last, d_valid;
  logic [D_W-1:0] res_d;
  logic [N_W-1:0] res_n;
  mvec_t          res_mv;

  dvfs_controller #(.MB_COLS_P(MB_COLS_P), .MB_ROWS_P(MB_ROWS_P)) u_ctl (
    .clk(clk_ctl), .rst_n(rst_n),
    .mb_start(mb_start), .mb_x(mb_x), .mb_y(mb_y), .ready(ready),
    .mb_done(mb_done), .result(result), .stop_cause(stop_cause),
    .k_out(k), .pt(pt), .nq_out(nq), .clk_on(ctl_clk_on),
    .run(run), .seq_busy(seq_busy), .res_d(res_d), .res_n(res_n), .res_mv(res_mv), .res_tgl(res_tgl)
  );

  pll_clock_driver u_pll (.rst_n(rst_n), .k(k), .clk_out(clk_ada));

  dcdc_converter u_dcdc (.sw_n(pt.sw_n), .vd_mv(vd_mv));

  bm_sequencer u_seq (
    .clk(clk_ada), .rst_n(rst_n), .run(run), .busy(seq_busy),
    .pix_req(pix_req), .pix_first(pix_first), .pix_last(pix_last),
    .pix_x(pix_x), .pix_y(pix_y), .cand_mv(cand_mv),
    .d(d_ada), .d_valid(d_valid),
    .res_d(res_d), .res_n(res_n), .res_mv(res_mv), .res_tgl(res_tgl)
  );

  ada u_ada (
    .clk(clk_ada), .rst_n(rst_n), .in_valid(pix_req), .in_first(pix_first), .in_last(pix_last),
    .a(pix_a), .b(pix_b), .d(d_ada), .d_valid(d_valid)
  );

  // exactly one supply switch is on, and the DC/DC converter delivers the
  // voltage of the selected operating point
  always_comb begin
    if (rst_n) begin
      assert ($countones(~pt.sw_n) == 1)
        else $error("me_processor: supply switches %b, not exactly one on", pt.sw_n);
      assert (vd_mv == pt.vd_mv)
        else $error("me_processor: supply %0d mV does not match operating point %0d mV", vd_mv, pt.vd_mv);
    end
  end

  assign fc_mhz = pt.fc_mhz;
  assign np     = pt.np;
endmodule
