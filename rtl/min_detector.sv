// min_detector: minimum data detector of the DVFS controller.
//
// Tracks d(n_m), the smallest absolute-difference accumulation seen so far in
// the current M-Blk, with its BM index n_m and candidate displacement.  clr
// starts a new M-Blk; on each cycle with en the pair (d, n) is compared.  The
// first value after clr is always taken.  A later value is taken only if it is
// strictly smaller, so on a tie the candidate nearer the window centre (the
// earlier one) wins.  new_min is combinational and tells, in the cycle of en,
// whether this d(n) lowers the minimum (it restarts the n_r counter).
module min_detector
  import me_pkg::*;
#(
  parameter int D_W_P = D_W,
  parameter int N_W_P = N_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             en,
  input  logic [D_W_P-1:0] d,
  input  logic [N_W_P-1:0] n,
  input  mvec_t            mv,
  output logic             new_min,
  output logic [D_W_P-1:0] d_min,
  output logic [N_W_P-1:0] n_m,
  output mvec_t            mv_m
);
  logic empty;

  assign new_min = en && (empty || d < d_min);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      empty <= 1'b1; d_min <= '1; n_m <= '0; mv_m <= '0;
    end else if (clr) begin
      empty <= 1'b1; d_min <= '1; n_m <= '0; mv_m <= '0;
    end else if (new_min) begin
      empty <= 1'b0; d_min <= d; n_m <= n; mv_m <= mv;
    end
  end
endmodule
