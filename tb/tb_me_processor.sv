// tb_me_processor: end-to-end test of the DVFS motion-estimation processor on a
// 3 x 2 M-Blk picture for three frames.
//
// The picture memories are modelled here.  The current picture is a fixed
// texture; the reference picture is synthetic: for the candidate that is n-th
// in the centre-outward search order, the reference block differs from the
// current block by a programmed amount, so that d(n) falls strictly until a
// chosen n* and stays higher afterwards (n* is set per M-Blk and frame).  A
// software model recomputes every d(n) from the same pixel functions, walks an
// independently written spiral, applies the prediction (maximum n_m of the
// co-located, top, left and upper-left M-Blks, quantized to 2^k, k >= 4) and
// the break-off rule, and gives the expected displacement, d_min, n_m, n_s, k
// and stop cause of every M-Blk.  Also checked: the ADA clock frequency and
// the DC/DC supply of each operating point, and that every M-Blk finishes
// within its 170 us slot.  Counted, and a failure if never seen: each of the
// five operating points, break-off by n_q, stop by n_p, stop after the whole
// window, and a change of clock frequency between M-Blks.
module tb_me_processor;
  import me_pkg::*;
  localparam int COLS = 3, ROWS = 2, FRAMES = 3;

  logic clk = 0, rst_n = 0, mb_start = 0;
  logic [4:0] mb_x = 0, mb_y = 0;
  logic ready, mb_done, clk_ada, pix_req;
  me_result_t result;
  logic [2:0] stop_cause;
  logic ctl_clk_on;
  longint ctl_cycles = 0, ctl_on_cycles = 0;
  logic [3:0] pix_x, pix_y, k;
  mvec_t cand_mv;
  logic [7:0] pix_a, pix_b;
  logic [9:0] fc_mhz;
  logic [8:0] np, nq;
  logic [10:0] vd_mv;
  logic [15:0] d_ada;

  int checks = 0, failures = 0;
  int ex[441], ey[441];
  int idx_of[21][21];
  int cur_mb = 0, cur_frame = 0, nstar = 1;
  int nm_model[COLS*ROWS];
  int k_seen[9];
  int cause_seen[3] = '{0, 0, 0};
  int fc_changes = 0, prev_fc = -1;
  // n* per frame, M-Blks in raster order
  int nstar_tab[FRAMES][COLS*ROWS] = '{'{20, 40, 70, 150, 300, 10},
                                       '{25, 10, 50, 100, 300, 5},
                                       '{12, 30, 8, 200, 60, 90}};

  me_processor #(.MB_COLS_P(COLS), .MB_ROWS_P(ROWS)) dut (
    .clk_ctl(clk), .rst_n(rst_n), .mb_start(mb_start), .mb_x(mb_x), .mb_y(mb_y),
    .ready(ready), .mb_done(mb_done), .result(result), .stop_cause(stop_cause), .ctl_clk_on(ctl_clk_on),
    .clk_ada(clk_ada), .pix_req(pix_req), .pix_x(pix_x), .pix_y(pix_y), .cand_mv(cand_mv),
    .pix_a(pix_a), .pix_b(pix_b), .k(k), .fc_mhz(fc_mhz), .np(np), .nq(nq), .vd_mv(vd_mv), .d_ada(d_ada));

  // 680 MHz controller clock
  always #0.735ns clk = ~clk;

  // ---- picture model -------------------------------------------------------
  function automatic int d_target(int n, int ns);
    return (n <= ns) ? (ns - n + 1) * 20 : 21 + (n * 37) % 50;
  endfunction
  function automatic int cur_pix(int mb, int x, int y);
    return 100 + (x * 5 + y * 3 + mb * 7) % 40;
  endfunction
  function automatic int ref_pix(int mb, int ns, int mx, int my, int x, int y);
    int dd, q, r;
    dd = d_target(idx_of[mx + 10][my + 10], ns);
    q = dd / 256; r = dd % 256;
    return cur_pix(mb, x, y) + q + ((y * 16 + x) < r ? 1 : 0);
  endfunction
  function automatic int sad(int mb, int ns, int mx, int my);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int v = cur_pix(mb, x, y) - ref_pix(mb, ns, mx, my, x, y);
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction

  assign pix_a = 8'(cur_pix(cur_mb, int'(pix_x), int'(pix_y)));
  assign pix_b = 8'(ref_pix(cur_mb, nstar, int'(cand_mv.x), int'(cand_mv.y), int'(pix_x), int'(pix_y)));

  // controller clock gating: share of clk_ctl edges that reach the controller
  // (the gate samples its enable on the falling edge)
  always @(negedge clk) if (rst_n) begin
    ctl_cycles++;
    if (ctl_clk_on) ctl_on_cycles++;
  end

  // ---- clock measurement ---------------------------------------------------
  realtime last_edge = 0, period = 0;
  always @(posedge clk_ada) begin
    period = $realtime - last_edge;
    last_edge = $realtime;
  end

  initial begin
    #20ms;
    failures++;
    checks++;
    $display("controller clock enabled on %0d of %0d clk_ctl edges (%0.2f %%)", ctl_on_cycles, ctl_cycles, 100.0 * ctl_on_cycles / ctl_cycles);
    if (ctl_on_cycles * 20 > ctl_cycles || ctl_on_cycles == ctl_cycles) begin
      failures++; $display("controller clock gated too little");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, idx, len, dir;
    int dx[4] = '{1, 0, -1, 0};
    int dy[4] = '{0, 1, 0, -1};
    // independent search-order model
    x = 0; y = 0; idx = 0; len = 1; dir = 0; ex[0] = 0; ey[0] = 0;
    while (idx < 440) begin
      for (int rep = 0; rep < 2 && idx < 440; rep++) begin
        for (int s = 0; s < len && idx < 440; s++) begin
          x += dx[dir]; y += dy[dir]; idx++; ex[idx] = x; ey[idx] = y;
        end
        dir = (dir + 1) % 4;
      end
      len++;
    end
    for (int i = 0; i < 441; i++) idx_of[ex[i] + 10][ey[i] + 10] = i + 1;
    for (int i = 0; i < COLS * ROWS; i++) nm_model[i] = 441;

    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int f = 0; f < FRAMES; f++)
      for (int by = 0; by < ROWS; by++)
        for (int bx = 0; bx < COLS; bx++) begin
          int mx, ek, enq, enp, efc, evd, n, nr, dmin, nm, cause, mb;
          realtime t0, dt;
          mb = by * COLS + bx;
          // expected prediction
          mx = nm_model[mb];
          if (by > 0 && nm_model[mb - COLS] > mx) mx = nm_model[mb - COLS];
          if (bx > 0 && nm_model[mb - 1] > mx) mx = nm_model[mb - 1];
          if (bx > 0 && by > 0 && nm_model[mb - COLS - 1] > mx) mx = nm_model[mb - COLS - 1];
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
          // expected search, d(n) recomputed from the pixels
          n = 0; nr = 0; dmin = 1 << 30; nm = 0;
          forever begin
            int dn;
            n++;
            dn = sad(mb, nstar_tab[f][mb], ex[n-1], ey[n-1]);
            if (dn < dmin) begin dmin = dn; nm = n; nr = 0; end else nr++;
            if (nr >= enq || n >= enp || n >= 441) break;
          end
          cause = (nr >= enq ? 1 : 0) | (n >= enp ? 2 : 0) | (n >= 441 ? 4 : 0);
          // run the M-Blk
          @(negedge clk);
          cur_mb = mb; cur_frame = f; nstar = nstar_tab[f][mb];
          mb_start = 1; mb_x = 5'(bx); mb_y = 5'(by);
          t0 = $realtime;
          @(negedge clk); mb_start = 0;
          wait (pix_req);
          repeat (4) @(posedge clk_ada);
          checks++;
          if (int'(k) != ek || int'(fc_mhz) != efc || int'(vd_mv) != evd || int'(np) != enp || int'(nq) != enq) begin
            failures++;
            $display("f%0d mb%0d: k=%0d fc=%0d vd=%0d np=%0d nq=%0d, expected k=%0d", f, mb, k, fc_mhz, vd_mv, np, nq, ek);
          end
          checks++;
          if (period < 1us / (efc * 1.005) || period > 1us / (efc * 0.995)) begin
            failures++; $display("f%0d mb%0d: ADA clock period %t for %0d MHz", f, mb, period, efc);
          end
          if (prev_fc >= 0 && prev_fc != efc) fc_changes++;
          prev_fc = efc;
          wait (mb_done);
          dt = $realtime - t0;
          @(negedge clk);
          checks++;
          if (int'(result.n_m) != nm || int'(result.d_min) != dmin || int'(result.n_s) != n || int'(result.k) != ek ||
              int'(stop_cause) != cause || int'(result.mv.x) != ex[nm-1] || int'(result.mv.y) != ey[nm-1]) begin
            failures++;
            $display("f%0d mb%0d n*=%0d: mv=(%0d,%0d) n_m=%0d d=%0d n_s=%0d cause=%b, expected (%0d,%0d) %0d %0d %0d %b",
                     f, mb, nstar, result.mv.x, result.mv.y, result.n_m, result.d_min, result.n_s, stop_cause,
                     ex[nm-1], ey[nm-1], nm, dmin, n, 3'(cause));
          end
          checks++;
          if (dt > 170.5us) begin failures++; $display("f%0d mb%0d took %t, over the 170 us slot", f, mb, dt); end
          $display("frame %0d M-Blk (%0d,%0d): k=%0d fc=%0d MHz VD=%0d mV n_m=%0d n_s=%0d d_min=%0d mv=(%0d,%0d) %0.1f us",
                   f, bx, by, k, fc_mhz, vd_mv, result.n_m, result.n_s, result.d_min, int'(result.mv.x), int'(result.mv.y), dt / 1us);
          for (int c = 0; c < 3; c++) if (cause[c]) cause_seen[c]++;
          k_seen[ek]++;
          nm_model[mb] = nm;
          wait (ready);
        end
    for (int kk = 4; kk <= 8; kk++) begin
      checks++;
      if (k_seen[kk] == 0) begin failures++; $display("operating point k=%0d never used", kk); end
    end
    for (int c = 0; c < 3; c++) begin
      checks++;
      if (cause_seen[c] == 0) begin failures++; $display("stop cause %0d never seen", c); end
    end
    checks++;
    if (fc_changes == 0) begin failures++; $display("clock frequency never changed"); end
    $display("operating points used k4..k8: %0d %0d %0d %0d %0d; stops by n_q/n_p/window: %0d %0d %0d; fc changes: %0d",
             k_seen[4], k_seen[5], k_seen[6], k_seen[7], k_seen[8], cause_seen[0], cause_seen[1], cause_seen[2], fc_changes);
    checks++;
    $display("controller clock enabled on %0d of %0d clk_ctl edges (%0.2f %%)", ctl_on_cycles, ctl_cycles, 100.0 * ctl_on_cycles / ctl_cycles);
    if (ctl_on_cycles * 20 > ctl_cycles || ctl_on_cycles == ctl_cycles) begin
      failures++; $display("controller clock gated too little");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
