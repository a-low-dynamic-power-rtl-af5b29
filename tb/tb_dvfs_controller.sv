// tb_dvfs_controller: the controller on a 3 x 2 M-Blk picture for four frames,
// with a model of the ADA clock domain that returns a programmed d(n) profile
// for each M-Blk: d(n) falls strictly up to a chosen n* and stays higher
// afterwards.  A software model of the prediction (maximum n_m of co-located,
// top, left and upper-left M-Blks, quantized to 2^k, k >= 4, table lookup)
// and of the break-off rule gives the expected k, operating point, n_m, d_min,
// n_s and stop cause of every M-Blk.  Also checks that the prediction takes
// at most 10 controller clocks (about 15 ns at 680 MHz).
module tb_dvfs_controller;
  import me_pkg::*;
  localparam int COLS = 3, ROWS = 2, FRAMES = 4;

  logic clk = 0, clk_a = 0, rst_n = 0;
  logic mb_start = 0, ready, mb_done, run, busy = 0, res_tgl = 0;
  logic [4:0] mb_x = 0, mb_y = 0;
  me_result_t result;
  logic [2:0] stop_cause;
  logic [3:0] k_out;
  dvfs_point_t pt;
  logic [8:0] nq_out, res_n = 0;
  logic clk_on;
  int gated_edges = 0;
  logic [15:0] res_d = 0;
  mvec_t res_mv = '0;
  int checks = 0, failures = 0;
  int nstar = 1;
  int nm_model[COLS*ROWS];
  int cause_seen[3] = '{0, 0, 0};
  int k_seen[9];

  dvfs_controller #(.MB_COLS_P(COLS), .MB_ROWS_P(ROWS), .K(4)) dut (
    .clk(clk), .rst_n(rst_n), .mb_start(mb_start), .mb_x(mb_x), .mb_y(mb_y), .ready(ready),
    .mb_done(mb_done), .result(result), .stop_cause(stop_cause), .k_out(k_out), .pt(pt), .nq_out(nq_out), .clk_on(clk_on),
    .run(run), .seq_busy(busy), .res_d(res_d), .res_n(res_n), .res_mv(res_mv), .res_tgl(res_tgl));

  always #5 clk = ~clk;
  always @(negedge clk) if (rst_n && !clk_on) gated_edges++;
  always #18.5 clk_a = ~clk_a;

  function automatic int prof(int n, int ns);
    return (n <= ns) ? 20000 - 40 * n : 20000 - 40 * ns + 1 + (n * 37) % 50;
  endfunction

  // model of the ADA clock domain: one result every 8 of its clocks
  logic r1 = 0, r2 = 0;
  int cnt = 0;
  always @(posedge clk_a) begin
    r1 <= run; r2 <= r1;
    if (r2) begin
      busy <= 1;
      cnt  <= cnt + 1;
      if (cnt % 8 == 7 && int'(res_n) < 441) begin
        res_n   <= res_n + 1;
        res_d   <= 16'(prof(int'(res_n) + 1, nstar));
        res_mv  <= '{x: MV_W'((int'(res_n) + 1) % 11), y: MV_W'(-((int'(res_n) + 1) % 7))};
        res_tgl <= ~res_tgl;
      end
    end else begin
      busy <= 0; cnt <= 0; res_n <= 0;
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int choices[8] = '{3, 9, 20, 40, 90, 150, 300, 430};
    for (int i = 0; i < COLS * ROWS; i++) nm_model[i] = 441;
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int f = 0; f < FRAMES; f++)
      for (int by = 0; by < ROWS; by++)
        for (int bx = 0; bx < COLS; bx++) begin
          int mx, ek, enq, enp, efc, evd, n, nr, dmin, nm, cause, t0;
          // expected prediction
          mx = nm_model[by * COLS + bx];
          if (by > 0 && nm_model[(by - 1) * COLS + bx] > mx) mx = nm_model[(by - 1) * COLS + bx];
          if (bx > 0 && nm_model[by * COLS + bx - 1] > mx) mx = nm_model[by * COLS + bx - 1];
          if (bx > 0 && by > 0 && nm_model[(by - 1) * COLS + bx - 1] > mx) mx = nm_model[(by - 1) * COLS + bx - 1];
          ek = 4;
          for (int j = 5; j <= 8; j++) if (mx >= (1 << j)) ek = j;
          enq = 1 << ek;
          case (ek)
            8: begin efc = 680; evd = 1000; enp = 450; end
            7: begin efc = 340; evd = 600;  enp = 225; end
            6: begin efc = 170; evd = 500;  enp = 112; end
            5: begin efc = 85;  evd = 450;  enp = 56;  end
            default: begin efc = 43; evd = 400; enp = 28; end
          endcase
          // profile of this M-Blk, then expected search
          nstar = choices[(f * 5 + by * 3 + bx * 7) % 8];
          n = 0; nr = 0; dmin = 1 << 30; nm = 0;
          forever begin
            n++;
            if (prof(n, nstar) < dmin) begin dmin = prof(n, nstar); nm = n; nr = 0; end else nr++;
            if (nr >= enq || n >= enp || n >= 441) break;
          end
          cause = (nr >= enq ? 1 : 0) | (n >= enp ? 2 : 0) | (n >= 441 ? 4 : 0);
          // run it
          @(negedge clk);
          mb_start = 1; mb_x = 5'(bx); mb_y = 5'(by);
          t0 = 0;
          @(negedge clk); mb_start = 0;
          while (!run) begin @(negedge clk); t0++; end
          checks++;
          if (t0 > 9) begin failures++; $display("prediction took %0d clocks", t0 + 1); end
          checks++;
          if (int'(k_out) != ek || int'(nq_out) != enq || int'(pt.fc_mhz) != efc || int'(pt.vd_mv) != evd || int'(pt.np) != enp) begin
            failures++;
            $display("f%0d (%0d,%0d): k=%0d nq=%0d fc=%0d vd=%0d np=%0d expected k=%0d", f, bx, by, k_out, nq_out, pt.fc_mhz, pt.vd_mv, pt.np, ek);
          end
          wait (mb_done);
          @(negedge clk);
          checks++;
          if (int'(result.n_m) != nm || int'(result.d_min) != dmin || int'(result.n_s) != n ||
              int'(result.k) != ek || int'(stop_cause) != cause ||
              int'(result.mv.x) != nm % 11 || int'(result.mv.y) != -(nm % 7)) begin
            failures++;
            $display("f%0d (%0d,%0d) n*=%0d: n_m=%0d d=%0d n_s=%0d cause=%b, expected %0d %0d %0d %b",
                     f, bx, by, nstar, result.n_m, result.d_min, result.n_s, stop_cause, nm, dmin, n, 3'(cause));
          end
          for (int c = 0; c < 3; c++) if (cause[c]) cause_seen[c]++;
          k_seen[ek]++;
          nm_model[by * COLS + bx] = nm;
          wait (ready);
        end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (cause_seen[c] == 0) begin failures++; $display("stop cause %0d never seen", c); end
    end
    checks++;
    if (gated_edges == 0) begin failures++; $display("controller clock never gated"); end
    for (int kk = 4; kk <= 8; kk++) if (k_seen[kk] == 0) $display("note: k=%0d not used", kk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
