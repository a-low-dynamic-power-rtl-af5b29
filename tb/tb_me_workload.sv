// tb_me_workload: the processor at its full CIF size (22 x 18 M-Blks, default
// parameters) on a generated video sequence with known motion, to see the
// search behave as it does on camera pictures rather than on programmed d(n)
// curves.
//
// Sequence: a value-noise texture (random levels on an 8-pixel grid,
// bilinearly interpolated, plus fine detail) that pans right by one pixel per
// frame, a 96 x 80 object with its own texture moving by (+3, -2) per frame, a
// 64 x 64 object moving by (-6, +4), and a little independent noise in every
// frame.  Candidate pixels outside the picture repeat the nearest edge pixel.
// Frames 1 and 2 are coded against frames 0 and 1; frame 1 is the first after
// reset and so runs at the 680 MHz point, frame 2 runs on the operating points
// predicted from frame 1.
//
// Checks, per M-Blk: operating point and ADA clock, and displacement, d_min,
// n_m, n_s, k and stop cause against a model of the adaptive search, with every
// d(n) computed from the pictures; the 170 us slot.  Per frame, against a full
// search over all 441 positions: the prediction PSNR of the adaptive search
// must be within 1 dB of the full search's, and in the predicted frame the
// adaptive search must do at most a third of the full search's block matches
// and, charging each M-Blk the tabulated ADA power of its operating point, use
// under a quarter of the power of the frame after reset.
//
// Results on this sequence: frame 1 (k = 8 throughout) finds the full-search
// optimum in every M-Blk with 1.6x fewer block matches.  Frame 2 needs 14.7x
// fewer block matches than full search and finds the optimum in 380 of 396
// M-Blks, losing 0.74 dB of PSNR.  The 16 misses are M-Blks into which the
// fast object has just moved: their neighbours in the previous frame were
// background with small n_m, so the predicted n_p (28) lies before the
// object's best match, displacement (+6, -4) at position 123 of the spiral.  The
// 1 dB bound guards against regressions on this sequence; it is not a
// statement about camera sequences.
module tb_me_workload;
  import me_pkg::*;
  localparam int COLS = MB_COLS, ROWS = MB_ROWS;
  localparam int W = COLS * MB, H = ROWS * MB;
  localparam int DX[4] = '{1, 0, -1, 0};
  localparam int DY[4] = '{0, 1, 0, -1};

  logic clk = 0, rst_n = 0, mb_start = 0;
  logic [4:0] mb_x = 0, mb_y = 0;
  logic ready, mb_done, clk_ada, pix_req;
  me_result_t result;
  logic [2:0] stop_cause;
  logic ctl_clk_on;
  logic [3:0] pix_x, pix_y, k;
  mvec_t cand_mv;
  logic [7:0] pix_a, pix_b;
  logic [9:0] fc_mhz;
  logic [8:0] np, nq;
  logic [10:0] vd_mv;
  logic [15:0] d_ada;

  int checks = 0, failures = 0;
  int ex[441], ey[441];
  int nm_model[COLS*ROWS];
  byte unsigned frm[3][H][W];
  int cur_f = 1, cur_bx = 0, cur_by = 0;
  real p_first = 0.0;

  me_processor dut (
    .clk_ctl(clk), .rst_n(rst_n), .mb_start(mb_start), .mb_x(mb_x), .mb_y(mb_y),
    .ready(ready), .mb_done(mb_done), .result(result), .stop_cause(stop_cause), .ctl_clk_on(ctl_clk_on),
    .clk_ada(clk_ada), .pix_req(pix_req), .pix_x(pix_x), .pix_y(pix_y), .cand_mv(cand_mv),
    .pix_a(pix_a), .pix_b(pix_b), .k(k), .fc_mhz(fc_mhz), .np(np), .nq(nq), .vd_mv(vd_mv), .d_ada(d_ada));

  // 680 MHz controller clock
  always #0.735ns clk = ~clk;

  // ---- sequence generator --------------------------------------------------
  function automatic int unsigned hash3(int a, int b, int c);
    int unsigned h;
    h = int'(a) * 32'd374761393 + int'(b) * 32'd668265263 + int'(c) * 32'd2246822519;
    h = (h ^ (h >> 13)) * 32'd1274126177;
    return h ^ (h >> 16);
  endfunction
  function automatic int texture(int x, int y, int seed);
    int gx, gy, fx, fy, v00, v10, v01, v11, coarse, fine;
    gx = x >>> 3; gy = y >>> 3; fx = x & 7; fy = y & 7;
    v00 = int'(hash3(gx, gy, seed) & 255);
    v10 = int'(hash3(gx + 1, gy, seed) & 255);
    v01 = int'(hash3(gx, gy + 1, seed) & 255);
    v11 = int'(hash3(gx + 1, gy + 1, seed) & 255);
    coarse = ((v00 * (8 - fx) + v10 * fx) * (8 - fy) + (v01 * (8 - fx) + v11 * fx) * fy) / 64;
    fine = int'(hash3(x, y, seed + 7) & 31) - 16;
    return 32 + coarse * 3 / 4 + fine;
  endfunction
  function automatic int scene(int f, int x, int y);
    int v;
    if (x >= 250 - 6 * f && x < 314 - 6 * f && y >= 170 + 4 * f && y < 234 + 4 * f)
      v = texture(x + 6 * f, y - 4 * f, 3);
    else if (x >= 120 + 3 * f && x < 216 + 3 * f && y >= 96 - 2 * f && y < 176 - 2 * f)
      v = texture(x - 3 * f, y + 2 * f, 2);
    else
      v = texture(x - f, y, 1);
    v += int'(hash3(x, y, 100 + f) % 5) - 2;
    return v < 0 ? 0 : v > 255 ? 255 : v;
  endfunction
  // ADA power with its converter at each operating point, in uW, as tabulated
  // with the operating points (a figure measured on silicon, not simulated)
  function automatic real p_at(int kk);
    case (kk)
      8: return 1111.0;
      7: return 344.1;
      6: return 146.1;
      5: return 65.15;
      default: return 26.12;
    endcase
  endfunction
  function automatic int clampi(int v, int lo, int hi);
    return v < lo ? lo : v > hi ? hi : v;
  endfunction
  function automatic int ref_at(int f, int x, int y);
    return int'(frm[f - 1][clampi(y, 0, H - 1)][clampi(x, 0, W - 1)]);
  endfunction
  function automatic int sad(int f, int bx, int by, int mx, int my);
    int s = 0;
    for (int y = 0; y < MB; y++)
      for (int x = 0; x < MB; x++) begin
        int v = int'(frm[f][by * MB + y][bx * MB + x]) - ref_at(f, bx * MB + x + mx, by * MB + y + my);
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction
  function automatic longint sse(int f, int bx, int by, int mx, int my);
    longint s = 0;
    for (int y = 0; y < MB; y++)
      for (int x = 0; x < MB; x++) begin
        int v = int'(frm[f][by * MB + y][bx * MB + x]) - ref_at(f, bx * MB + x + mx, by * MB + y + my);
        s += longint'(v * v);
      end
    return s;
  endfunction

  // picture memory: current block pixel and candidate pixel, same cycle
  always_comb begin
    pix_a = frm[cur_f][cur_by * MB + int'(pix_y)][cur_bx * MB + int'(pix_x)];
    pix_b = 8'(ref_at(cur_f, cur_bx * MB + int'(pix_x) + int'(cand_mv.x), cur_by * MB + int'(pix_y) + int'(cand_mv.y)));
  end

  realtime last_edge = 0, period = 0;
  always @(posedge clk_ada) begin
    period = $realtime - last_edge;
    last_edge = $realtime;
  end

  initial begin
    #250ms;
    failures++;
    checks++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, idx, len, dir;
    x = 0; y = 0; idx = 0; len = 1; dir = 0; ex[0] = 0; ey[0] = 0;
    while (idx < 440) begin
      for (int rep = 0; rep < 2 && idx < 440; rep++) begin
        for (int s = 0; s < len && idx < 440; s++) begin
          x += DX[dir]; y += DY[dir]; idx++; ex[idx] = x; ey[idx] = y;
        end
        dir = (dir + 1) % 4;
      end
      len++;
    end
    for (int i = 0; i < COLS * ROWS; i++) nm_model[i] = 441;
    for (int f = 0; f < 3; f++)
      for (int yy = 0; yy < H; yy++)
        for (int xx = 0; xx < W; xx++) frm[f][yy][xx] = 8'(scene(f, xx, yy));

    repeat (5) @(posedge clk);
    rst_n = 1;
    wait (ready);
    for (int f = 1; f < 3; f++) begin
      longint sse_a, sse_fs, ns_total;
      int same_d, same_mv, nm_below_np;
      int k_seen[9];
      real psnr_a, psnr_fs, p_sum;
      sse_a = 0; sse_fs = 0; ns_total = 0; same_d = 0; same_mv = 0; nm_below_np = 0;
      k_seen = '{0, 0, 0, 0, 0, 0, 0, 0, 0};
      p_sum = 0.0;
      for (int by = 0; by < ROWS; by++)
        for (int bx = 0; bx < COLS; bx++) begin
          int mx, ek, enq, enp, efc, evd, n, nr, dmin, nm, cause, mb, dfs, nfs;
          int d[441];
          realtime t0, dt;
          mb = by * COLS + bx;
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
          // full search: every d(n), first minimum in search order
          dfs = 1 << 30; nfs = 0;
          for (int i = 0; i < 441; i++) begin
            d[i] = sad(f, bx, by, ex[i], ey[i]);
            if (d[i] < dfs) begin dfs = d[i]; nfs = i + 1; end
          end
          // adaptive search
          n = 0; nr = 0; dmin = 1 << 30; nm = 0;
          forever begin
            n++;
            if (d[n-1] < dmin) begin dmin = d[n-1]; nm = n; nr = 0; end else nr++;
            if (nr >= enq || n >= enp || n >= 441) break;
          end
          cause = (nr >= enq ? 1 : 0) | (n >= enp ? 2 : 0) | (n >= 441 ? 4 : 0);

          @(negedge clk);
          cur_f = f; cur_bx = bx; cur_by = by;
          mb_start = 1; mb_x = 5'(bx); mb_y = 5'(by);
          t0 = $realtime;
          @(negedge clk); mb_start = 0;
          wait (pix_req);
          repeat (4) @(posedge clk_ada);
          checks++;
          if (int'(k) != ek || int'(fc_mhz) != efc || int'(vd_mv) != evd || int'(np) != enp || int'(nq) != enq ||
              period < 1us / (efc * 1.005) || period > 1us / (efc * 0.995)) begin
            failures++;
            $display("f%0d mb(%0d,%0d): k=%0d fc=%0d vd=%0d np=%0d nq=%0d period %t, expected k=%0d", f, bx, by,
                     k, fc_mhz, vd_mv, np, nq, period, ek);
          end
          wait (mb_done);
          dt = $realtime - t0;
          @(negedge clk);
          checks++;
          if (int'(result.n_m) != nm || int'(result.d_min) != dmin || int'(result.n_s) != n || int'(result.k) != ek ||
              int'(stop_cause) != cause || int'(result.mv.x) != ex[nm-1] || int'(result.mv.y) != ey[nm-1]) begin
            failures++;
            $display("f%0d mb(%0d,%0d): mv=(%0d,%0d) n_m=%0d d=%0d n_s=%0d cause=%b, expected (%0d,%0d) %0d %0d %0d %b",
                     f, bx, by, result.mv.x, result.mv.y, result.n_m, result.d_min, result.n_s, stop_cause,
                     ex[nm-1], ey[nm-1], nm, dmin, n, 3'(cause));
          end
          checks++;
          if (dt > 170.5us) begin failures++; $display("f%0d mb(%0d,%0d) took %t, over the 170 us slot", f, bx, by, dt); end
          sse_a += sse(f, bx, by, ex[nm-1], ey[nm-1]);
          sse_fs += sse(f, bx, by, ex[nfs-1], ey[nfs-1]);
          ns_total += longint'(n);
          if (dmin == dfs) same_d++;
          if (nm == nfs) same_mv++;
          if (nfs < enp) nm_below_np++;
          k_seen[ek]++;
          p_sum += p_at(ek);
          nm_model[mb] = nm;
          wait (ready);
        end
      psnr_a = 10.0 * $log10(255.0 * 255.0 * W * H / real'(sse_a));
      psnr_fs = 10.0 * $log10(255.0 * 255.0 * W * H / real'(sse_fs));
      $display("frame %0d: PSNR %0.3f dB (full search %0.3f dB); block matches %0d of %0d (%0.1fx fewer)",
               f, psnr_a, psnr_fs, ns_total, 441 * COLS * ROWS, 441.0 * COLS * ROWS / ns_total);
      $display("frame %0d: same d_min as full search %0d of %0d M-Blks, same displacement %0d; full-search best before n_p %0d",
               f, same_d, COLS * ROWS, same_mv, nm_below_np);
      $display("frame %0d: operating points k4..k8: %0d %0d %0d %0d %0d", f,
               k_seen[4], k_seen[5], k_seen[6], k_seen[7], k_seen[8]);
      $display("frame %0d: ADA power from the operating points: mean %0.1f uW, %0d of %0d M-Blks at 65.15 uW or less",
               f, p_sum / (COLS * ROWS), k_seen[4] + k_seen[5], COLS * ROWS);
      if (f == 1) p_first = p_sum;
      checks++;
      if (psnr_a < psnr_fs - 1.0) begin failures++; $display("frame %0d: PSNR loss over 1 dB", f); end
      if (f == 2) begin
        checks++;
        if (ns_total * 3 > 441 * COLS * ROWS) begin failures++; $display("frame %0d: search not fast enough", f); end
        checks++;
        if (p_sum * 4 > p_first) begin failures++; $display("frame %0d: operating points not lowered", f); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
