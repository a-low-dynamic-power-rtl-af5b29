// tb_bm_sequencer: runs the sequencer with the ADA on a synthetic picture
// model.  Checks each reported d(n) against a software sum of absolute
// differences for the n-th candidate of an independently generated spiral,
// that results arrive every 256 clocks, that a full run stops after 441
// candidates, that dropping run stops the requests and lets busy fall, and
// that a new run restarts from the window centre.
module tb_bm_sequencer;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, run = 0;
  logic busy, pix_req, pix_first, pix_last, d_valid, res_tgl;
  logic [3:0] pix_x, pix_y;
  mvec_t cand_mv, res_mv;
  logic [15:0] d, res_d;
  logic [8:0] res_n;
  logic [7:0] pa, pb;
  int checks = 0, failures = 0;
  int ex[441], ey[441];
  int n_results = 0, n_req = 0, last_res_cyc = -1, cyc = 0, gaps_ok = 0;
  logic tgl_q = 0;

  bm_sequencer dut (.clk(clk), .rst_n(rst_n), .run(run), .busy(busy),
    .pix_req(pix_req), .pix_first(pix_first), .pix_last(pix_last), .pix_x(pix_x), .pix_y(pix_y),
    .cand_mv(cand_mv), .d(d), .d_valid(d_valid),
    .res_d(res_d), .res_n(res_n), .res_mv(res_mv), .res_tgl(res_tgl));

  ada u_ada (.clk(clk), .rst_n(rst_n), .in_valid(pix_req), .in_first(pix_first), .in_last(pix_last),
             .a(pa), .b(pb), .d(d), .d_valid(d_valid));

  function automatic int pix_a(int x, int y);
    return (x * 13 + y * 7 + 5) % 256;
  endfunction
  function automatic int pix_b(int x, int y, int mx, int my);
    return (pix_a(x, y) + mx * 3 + my * 5 + (x ^ y) + 320) % 256;
  endfunction
  function automatic int sad(int mx, int my);
    int s = 0;
    for (int y = 0; y < 16; y++)
      for (int x = 0; x < 16; x++) begin
        int v = pix_a(x, y) - pix_b(x, y, mx, my);
        s += v < 0 ? -v : v;
      end
    return s;
  endfunction

  assign pa = 8'(pix_a(int'(pix_x), int'(pix_y)));
  assign pb = 8'(pix_b(int'(pix_x), int'(pix_y), int'(cand_mv.x), int'(cand_mv.y)));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (pix_req) n_req <= n_req + 1;
  end

  // result checker
  always @(posedge clk) begin
    tgl_q <= res_tgl;
    if (rst_n && res_tgl != tgl_q) begin
      int i;
      i = int'(res_n) - 1;
      n_results++;
      checks++;
      if (i < 0 || i > 440 || int'(res_mv.x) != ex[i] || int'(res_mv.y) != ey[i] || int'(res_d) != sad(ex[i], ey[i])) begin
        failures++;
        if (failures < 10) $display("n=%0d mv=(%0d,%0d) d=%0d", res_n, res_mv.x, res_mv.y, res_d);
      end
      if (last_res_cyc >= 0 && cyc - last_res_cyc == 256) gaps_ok++;
      last_res_cyc = cyc;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, idx, len, dir, first_n;
    int dx[4] = '{1, 0, -1, 0};
    int dy[4] = '{0, 1, 0, -1};
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

    repeat (3) @(posedge clk);
    rst_n = 1;
    // 1: partial run, stopped by dropping run
    @(negedge clk); run = 1;
    wait (n_results == 5);
    repeat (100) @(negedge clk);
    run = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (busy || pix_req) begin failures++; $display("still busy after run fell"); end
    checks++;
    if (n_results != 5) begin failures++; $display("%0d results after stop, expected 5", n_results); end
    // 2: full run of all 441 candidates, restarting from the centre
    n_results = 0; n_req = 0; gaps_ok = 0; last_res_cyc = -1;
    @(negedge clk); run = 1;
    repeat (441 * 256 + 300) @(negedge clk);
    checks++;
    if (n_results != 441 || n_req != 441 * 256) begin
      failures++; $display("full run: %0d results, %0d requests", n_results, n_req);
    end
    checks++;
    if (gaps_ok != 440) begin failures++; $display("only %0d results 256 clocks apart", gaps_ok); end
    run = 0;
    repeat (20) @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after full run"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
