// dvfs_controller: DVFS controller of the motion-estimation processor.
//
// For each M-Blk it first predicts how much searching is needed, then sets the
// clock and supply accordingly, and finally watches the block-match results to
// break the search off (adaptively assigned breaking-off condition search).
//
//  1. Prediction (8 controller clocks, 11.8 ns at 680 MHz): the n_m values
//     of the co-located M-Blk of the reference frame and of the top, left and
//     upper-left M-Blks are read from nm_sram one by one into max_detector
//     (neighbours outside the picture are skipped).  nq_quantizer turns
//     Max. n_m into k and n_q = 2^k (k >= K), and dvfs_table gives the optimum
//     fc, VD, n_p and the DC/DC switch controls, all registered on k.
//  2. Search: run is raised for bm_sequencer in the ADA clock domain.  Each
//     d(n) it reports (res_tgl flips, synchronized here) goes to min_detector
//     and bm_counter.  breakoff_comparator stops the search when n_r reaches
//     n_q, or n reaches n_p or 441.
//  3. Completion: run is lowered; once the sequencer is idle mb_done pulses
//     with the result and n_m is written back to nm_sram at the M-Blk's position.
// After reset every n_m entry is set to 441, the full-search count
// (MB_COLS*MB_ROWS clocks, ready low), so the first frame after reset is
// searched at the highest operating point (k = 8) and later frames adapt.
// Interface: mb_start (one clock, while ready) with the M-Blk position mb_x,
// mb_y; result and stop_cause are valid with mb_done and held until the next
// M-Blk completes.  k, pt (operating point) change only while the ADA is idle.
// Clock gating: only the request register, the synchronizers and the edge
// detector of res_tgl run on clk; everything else runs on gclk from
// clock_gate, which passes an edge only when there is work: in the short
// prediction and completion states, on a captured request, on the clock that
// takes a d(n), on the clock after it (break-off decision) and while waiting
// for the sequencer to go idle after a stop.
// clk_on shows the gate's enable.  The state sequence and handshakes are this
// design's own; stopping the controller clock follows the description.
module dvfs_controller
  import me_pkg::*;
#(
  parameter int MB_COLS_P = MB_COLS,
  parameter int MB_ROWS_P = MB_ROWS,
  parameter int K         = K_MIN
) (
  input  logic             clk,
  input  logic             rst_n,
  // macro-block requests
  input  logic             mb_start,
  input  logic [4:0]       mb_x,
  input  logic [4:0]       mb_y,
  output logic             ready,
  output logic             mb_done,
  output me_result_t       result,
  output logic [2:0]       stop_cause,   // {all searched, n_p reached, n_q reached}
  // control signal k and the operating point it selects
  output logic [K_W-1:0]   k_out,
  output dvfs_point_t      pt,
  output logic [N_W-1:0]   nq_out,
  output logic             clk_on,       // controller clock enabled this cycle
  // ADA-domain sequencer
  output logic             run,
  input  logic             seq_busy,
  input  logic [D_W-1:0]   res_d,
  input  logic [N_W-1:0]   res_n,
  input  mvec_t            res_mv,
  input  logic             res_tgl
);
  localparam int DEPTH = MB_COLS_P * MB_ROWS_P;
  localparam int A_W   = $clog2(DEPTH);

  typedef enum logic [2:0] {S_CLEAR, S_IDLE, S_READ, S_QUANT, S_ARM, S_RUN, S_STOP, S_DONE} state_t;
  state_t state;

  // M-Blk position
  logic [4:0]     bx, by;
  logic [1:0]     rd_idx;
  logic           rd_ok, rd_ok_d;
  logic [A_W-1:0] clr_addr;

  // synchronizers from the ADA domain
  logic busy_s, tgl_s, tgl_seen, evt;
  sync_2ff u_sync_busy (.clk(clk), .rst_n(rst_n), .d(seq_busy), .q(busy_s));
  sync_2ff u_sync_tgl  (.clk(clk), .rst_n(rst_n), .d(res_tgl),  .q(tgl_s));
  assign evt = (tgl_s != tgl_seen);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tgl_seen <= 1'b0;
    else        tgl_seen <= tgl_s;
  end

  // M-Blk request, captured on the free-running clock so that it can open
  // the clock gate
  logic       req_q;
  logic [4:0] req_x, req_y;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q <= 1'b0; req_x <= '0; req_y <= '0;
    end else if (mb_start && ready) begin
      req_q <= 1'b1; req_x <= mb_x; req_y <= mb_y;
    end else if (state == S_READ) begin
      req_q <= 1'b0;
    end
  end

  // gated controller clock
  logic gclk, chk;
  clock_gate u_cg (.clk(clk), .rst_n(rst_n), .en(clk_on), .gclk(gclk));

  // SRAM access
  logic           sram_we;
  logic [A_W-1:0] sram_addr;
  logic [N_W-1:0] sram_wdata, sram_rdata;
  logic [4:0]     rx, ry;

  nm_sram #(.DEPTH(DEPTH), .W(N_W)) u_sram (
    .clk(gclk), .we(sram_we), .addr(sram_addr), .wdata(sram_wdata), .rdata(sram_rdata)
  );

  // neighbour to read: 0 co-located (reference frame), 1 top, 2 left, 3 upper-left
  always_comb begin
    rx = bx; ry = by; rd_ok = 1'b1;
    unique case (rd_idx)
      2'd0: ;
      2'd1: begin ry = by - 1'b1; rd_ok = (by != 0); end
      2'd2: begin rx = bx - 1'b1; rd_ok = (bx != 0); end
      2'd3: begin rx = bx - 1'b1; ry = by - 1'b1; rd_ok = (bx != 0) && (by != 0); end
    endcase
  end

  // detectors, quantizer, table, counters, comparator
  logic [N_W-1:0] max_nm, nq_c, n, n_r;
  logic [K_W-1:0] k_c;
  dvfs_point_t    pt_c;
  logic           new_min, step, hit_nq, hit_np, hit_all, stop;
  logic [D_W-1:0] d_min;
  logic [N_W-1:0] n_m;
  mvec_t          mv_m;
  logic           det_clr;

  max_detector #(.W(N_W)) u_max (
    .clk(gclk), .rst_n(rst_n), .clr(state == S_IDLE), .en(rd_ok_d), .x(sram_rdata), .max(max_nm)
  );

  nq_quantizer #(.N_W(N_W), .K(K), .K_MAX(K_MAX), .K_W(K_W)) u_quant (
    .max_nm(max_nm), .k(k_c), .nq(nq_c)
  );

  dvfs_table u_table (.k(k_c), .pt(pt_c));

  assign det_clr = (state == S_QUANT);
  assign step    = (state == S_RUN) && evt && !(stop && n != '0);


  min_detector u_min (
    .clk(gclk), .rst_n(rst_n), .clr(det_clr), .en(step), .d(res_d), .n(res_n), .mv(res_mv),
    .new_min(new_min), .d_min(d_min), .n_m(n_m), .mv_m(mv_m)
  );

  bm_counter #(.N_W(N_W)) u_cnt (
    .clk(gclk), .rst_n(rst_n), .clr(det_clr), .step(step), .new_min(new_min), .n(n), .n_r(n_r)
  );

  breakoff_comparator #(.N_W(N_W), .N_MAX(N_CAND)) u_cmp (
    .n(n), .n_r(n_r), .nq(nq_out), .np(pt.np),
    .hit_nq(hit_nq), .hit_np(hit_np), .hit_all(hit_all), .stop(stop)
  );

  always_comb begin
    sram_we    = 1'b0;
    sram_addr  = A_W'(ry) * A_W'(MB_COLS_P) + A_W'(rx);
    sram_wdata = n_m;
    if (state == S_CLEAR) begin
      sram_we = 1'b1; sram_addr = clr_addr; sram_wdata = N_W'(N_CAND);
    end else if (state == S_DONE) begin
      sram_we = 1'b1; sram_addr = A_W'(by) * A_W'(MB_COLS_P) + A_W'(bx);
    end
  end

  assign ready = (state == S_IDLE) && !req_q;

  // clock enable: work to do on the coming edge
  always_comb begin
    unique case (state)
      S_IDLE:  clk_on = req_q;
      S_RUN:   clk_on = evt || chk;
      S_STOP:  clk_on = !busy_s;
      default: clk_on = 1'b1;
    endcase
  end

  always_ff @(posedge gclk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_CLEAR; chk <= 1'b0; clr_addr <= '0; bx <= '0; by <= '0; rd_idx <= '0; rd_ok_d <= 1'b0;
      run <= 1'b0; mb_done <= 1'b0; result <= '0; stop_cause <= '0;
      k_out <= K_W'(K_MAX); pt <= '{fc_mhz: FC_W'(680), vd_mv: VD_W'(1000), np: N_W'(450), sw_n: 5'b11110};
      nq_out <= N_W'(256);
    end else begin
      mb_done  <= 1'b0;
      chk      <= step;   // evaluate the break-off condition on the next clock
      rd_ok_d  <= (state == S_READ) && rd_ok;
      unique case (state)
        S_CLEAR: begin
          clr_addr <= clr_addr + 1'b1;
          if (clr_addr == A_W'(DEPTH-1)) state <= S_IDLE;
        end
        S_IDLE: begin
          rd_idx <= '0;
          if (req_q) begin
            bx <= req_x; by <= req_y; state <= S_READ;
          end
        end
        S_READ: begin
          rd_idx <= rd_idx + 1'b1;
          if (rd_idx == 2'd3) state <= S_QUANT;
        end
        S_QUANT: state <= S_ARM;   // last SRAM word folds into max_detector
        S_ARM: begin
          k_out  <= k_c;
          nq_out <= nq_c;
          pt     <= pt_c;
          if (!busy_s) begin
            run   <= 1'b1;
            state <= S_RUN;
          end
        end
        S_RUN: begin
          if (stop && n != '0) begin
            run        <= 1'b0;
            stop_cause <= {hit_all, hit_np, hit_nq};
            state      <= S_STOP;
          end
        end
        S_STOP: begin
          if (!busy_s) begin
            result  <= '{mv: mv_m, d_min: d_min, n_m: n_m, n_s: n, k: k_out};
            mb_done <= 1'b1;
            state   <= S_DONE;
          end
        end
        S_DONE: state <= S_IDLE;   // n_m is written back to nm_sram here
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
