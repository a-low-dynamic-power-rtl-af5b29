// bm_sequencer: block-match sequencer in the ADA clock domain.
//
// While the controller holds run high, it issues the 16 x 16 pixel pairs of
// one candidate after another to the ADA, one pair per ADA clock, with no gap
// between block matches.  Candidates come from spiral_gen (centre outward) and
// are numbered n = 1, 2, ...  For each pair it presents the pixel position
// (pix_x, pix_y) inside the M-Blk and the candidate displacement cand_mv; the
// picture memory outside returns Input A (current picture) and Input B
// (reference picture at the displacement) in the same cycle.  Each finished
// d(n) is latched with its n and displacement into res_*, and res_tgl flips;
// res_* then stay stable for at least one block match (256 ADA clocks), long
// enough for the controller to pick them up through a synchronizer.
// When run falls, issuing stops at once (a partly issued block match is
// dropped); busy falls once the ADA pipeline has drained.  After N_CAND
// candidates issuing stops by itself.  run is synchronized here.
// The handshake and this whole block are this design's own choice: the
// processor description gives the search order and the back-to-back block
// matches, not the address generation.
module bm_sequencer
  import me_pkg::*;
#(
  parameter int MB_P     = MB,
  parameter int N_CAND_P = N_CAND
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,        // from the controller domain
  output logic             busy,
  // pixel requests / ADA control
  output logic             pix_req,
  output logic             pix_first,
  output logic             pix_last,
  output logic [$clog2(MB_P)-1:0] pix_x,
  output logic [$clog2(MB_P)-1:0] pix_y,
  output mvec_t            cand_mv,
  // ADA result
  input  logic [D_W-1:0]   d,
  input  logic             d_valid,
  // result towards the controller
  output logic [D_W-1:0]   res_d,
  output logic [N_W-1:0]   res_n,
  output mvec_t            res_mv,
  output logic             res_tgl
);
  localparam int C_W = $clog2(MB_P);
  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_DRAIN} state_t;

  state_t          state;
  logic            run_s;
  logic [N_W-1:0]  n_issue, pend_n;
  mvec_t           pend_mv;
  logic [2:0]      drain;
  logic            sp_restart, sp_next;

  sync_2ff u_sync_run (.clk(clk), .rst_n(rst_n), .d(run), .q(run_s));

  spiral_gen u_spiral (.clk(clk), .rst_n(rst_n), .restart(sp_restart), .next(sp_next), .mv(cand_mv));

  assign pix_req    = (state == S_ISSUE) && run_s;
  assign pix_first  = (pix_x == '0) && (pix_y == '0);
  assign pix_last   = (pix_x == C_W'(MB_P-1)) && (pix_y == C_W'(MB_P-1));
  assign sp_restart = (state == S_IDLE);
  assign sp_next    = pix_req && pix_last;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; pix_x <= '0; pix_y <= '0; n_issue <= '0; drain <= '0;
      pend_n <= '0; pend_mv <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          pix_x <= '0; pix_y <= '0; n_issue <= N_W'(1);
          if (run_s) state <= S_ISSUE;
        end
        S_ISSUE: begin
          if (!run_s) begin
            state <= S_DRAIN; drain <= '0;
          end else begin
            pix_x <= pix_x + 1'b1;
            if (pix_x == C_W'(MB_P-1)) pix_y <= pix_y + 1'b1;
            if (pix_last) begin
              pend_n  <= n_issue;
              pend_mv <= cand_mv;
              n_issue <= n_issue + 1'b1;
              if (n_issue == N_W'(N_CAND_P)) begin
                state <= S_DRAIN; drain <= '0;
              end
            end
          end
        end
        S_DRAIN: begin
          // three pipeline stages in the ADA plus one for the result latch
          if (drain != 3'd4) drain <= drain + 1'b1;
          else if (!run_s)   state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_d <= '0; res_n <= '0; res_mv <= '0; res_tgl <= 1'b0;
    end else if (d_valid) begin
      res_d <= d; res_n <= pend_n; res_mv <= pend_mv; res_tgl <= ~res_tgl;
    end
  end
endmodule
