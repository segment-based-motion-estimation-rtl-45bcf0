// tb_sbme_engine: end-to-end test of segment-based motion estimation over a small frame,
// with every parameter at its default.
//
// The current frame is 3x2 macro-blocks (48x32 pixels) cut into 8 segments of irregular
// shape (nearest of 8 seed points); each segment is a copy of a random reference frame
// displaced by its own true motion. The test does the system side's work: for every
// macro-block it keeps the four largest segments as sub-segments and gives the pixels
// of any other segment weight 0 (the segmentation refinement), loads the search area
// around the block, the block, its sub-segment map and the candidates of its segments,
// and runs the engine. After each pass over the frame it runs the selection and checks,
// against penalties computed here directly from the frames, the best candidate, its
// penalty and the total of every segment, and the convergence flag.
//
// Iteration 1 offers candidates without the true motion (some out of range, so they are
// clamped); iteration 2 adds the true motion, which must win with penalty 0 (improved,
// not converged); iteration 3 repeats iteration 2 (no improvement: converged).
// Mechanisms counted, each must occur: several sub-segments per block, a block with more
// than four segments, clamped vectors, an improving and a converged iteration.
// Each macro-block must take 22 cycles per candidate vector.
module tb_sbme_engine;
  import sbme_pkg::*;
  localparam int N = MB_N, X0 = (L0_W - N) / 2, Y0 = (L0_H - N) / 2;
  localparam int BX = 3, BY = 2, FW = BX * N, FH = BY * N, RWID = FW + 2 * X0, RHGT = FH + 2 * Y0;
  localparam int NSEG = 8, NCAND = 6;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                    rst_n = 0;
  logic                    mb_wr_en = 0, wc_wr_en = 0, l0_wr_en = 0;
  logic [3:0]              mb_wr_row = 0, wc_wr_row = 0;
  logic [N-1:0][PIX_W-1:0] mb_wr_data = '0, l0_wr_data = '0;
  logic [N-1:0][1:0]       wc_wr_ssid = '0;
  logic [N-1:0]            wc_wr_wgt = '0;
  logic [4:0]              l0_wr_row = 0;
  logic [1:0]              l0_wr_col = 0;
  logic                    cand_wr_en = 0, cand_cnt_en = 0;
  logic [1:0]              cand_wr_ss = 0;
  logic [2:0]              cand_wr_idx = 0;
  mv_t                     cand_wr_mv = '0;
  logic [3:0]              cand_cnt_val = 0;
  logic                    map_wr_en = 0;
  logic [1:0]              map_ss = 0;
  logic [9:0]              map_seg = 0;
  logic                    start = 0;
  logic [2:0]              nss = 0;
  logic                    busy, done, clamped, res_pending;
  logic                    clear = 0, select = 0;
  logic [10:0]             nseg = 0;
  logic                    busy_acc, select_done, converged;
  logic [31:0]             total_mp;
  logic                    best_valid, best_found;
  logic [9:0]              best_seg;
  logic [2:0]              best_idx;
  mv_t                     best_mv;
  logic [31:0]             best_mp;

  sbme_engine dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_multi = 0, n_over4 = 0, n_clamp = 0, n_improve = 0, n_conv = 0, n_true = 0;

  logic [PIX_W-1:0] refr [RHGT][RWID];
  logic [PIX_W-1:0] cur  [FH][FW];
  int               seg  [FH][FW];
  bit               wgt  [FH][FW];
  int               tmx [NSEG], tmy [NSEG];
  int               cmx [NSEG][8], cmy [NSEG][8];
  longint           mp  [NSEG][8];
  bit               has [NSEG];
  int               sel_cnt = 0;

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n && clamped) n_clamp++;

  function automatic int clampi(int v, int lim);
    return (v < -lim) ? -lim : (v > lim) ? lim : v;
  endfunction

  // Selection checker: compares with the penalties computed from the frames.
  always @(posedge clk) if (rst_n && best_valid) begin
    int s, bi;
    longint bm;
    bit f;
    s = int'(best_seg);
    f = 0; bi = 0; bm = 0;
    if (has[s])
      for (int v = 0; v < NCAND; v++) if (!f || mp[s][v] < bm) begin f = 1; bi = v; bm = mp[s][v]; end
    checks++;
    if (best_found != f || (f && (int'(best_idx) != bi || longint'(best_mp) != bm ||
        int'(best_mv.x) != clampi(cmx[s][bi], X0) || int'(best_mv.y) != clampi(cmy[s][bi], Y0)))) begin
      failures++;
      $display("FAIL segment %0d: found %0d idx %0d mp %0d, exp %0d %0d %0d", s, best_found, best_idx, best_mp, f, bi, bm);
    end
    if (f && bm == 0 && int'(best_mv.x) == tmx[s] && int'(best_mv.y) == tmy[s]) n_true++;
    sel_cnt++;
  end

  task automatic make_frame();
    int sx [NSEG], sy [NSEG];
    for (int y = 0; y < RHGT; y++) for (int x = 0; x < RWID; x++) refr[y][x] = PIX_W'($urandom);
    for (int s = 0; s < NSEG; s++) begin
      sx[s] = int'($urandom_range(0, FW - 1)); sy[s] = int'($urandom_range(0, FH - 1));
      tmx[s] = int'($urandom_range(0, 2 * X0)) - X0; tmy[s] = int'($urandom_range(0, 2 * Y0)) - Y0;
    end
    // Eight seeds packed into the first block, so that it holds more than four segments
    sx[0] = 2; sy[0] = 2; sx[1] = 12; sy[1] = 2; sx[2] = 2; sy[2] = 12; sx[3] = 12; sy[3] = 12;
    sx[4] = 7; sy[4] = 7;
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int bd, d;
        bd = 1 << 20;
        for (int s = 0; s < NSEG; s++) begin
          d = (x - sx[s]) * (x - sx[s]) + (y - sy[s]) * (y - sy[s]);
          if (d < bd) begin bd = d; seg[y][x] = s; end
        end
        cur[y][x] = refr[Y0 + y + tmy[seg[y][x]]][X0 + x + tmx[seg[y][x]]];
      end
  endtask

  // Candidates of iteration 1: random, never the true motion, some out of range.
  task automatic make_candidates();
    for (int s = 0; s < NSEG; s++)
      for (int v = 0; v < NCAND; v++) begin
        do begin
          if (v == 0) begin cmx[s][v] = 20 + int'($urandom_range(0, 8)); cmy[s][v] = -12; end
          else begin cmx[s][v] = int'($urandom_range(0, 2 * X0)) - X0; cmy[s][v] = int'($urandom_range(0, 2 * Y0)) - Y0; end
        end while (clampi(cmx[s][v], X0) == tmx[s] && clampi(cmy[s][v], Y0) == tmy[s]);
      end
  endtask

  // Segmentation refinement for block (bx, by): the four largest segments become
  // sub-segments 0..3; other pixels get weight 0. Returns the number of sub-segments.
  function automatic int refine(int bx, int by, output int ss_seg [4], output int ss_of [N][N]);
    int cnt [NSEG];
    int n, present;
    bit taken [NSEG];
    for (int s = 0; s < NSEG; s++) begin cnt[s] = 0; taken[s] = 0; end
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) cnt[seg[by * N + y][bx * N + x]]++;
    present = 0;
    for (int s = 0; s < NSEG; s++) if (cnt[s] > 0) present++;
    if (present > 4) n_over4++;
    n = 0;
    for (int k = 0; k < 4; k++) begin
      int best, bc;
      best = -1; bc = 0;
      for (int s = 0; s < NSEG; s++) if (!taken[s] && cnt[s] > bc) begin best = s; bc = cnt[s]; end
      if (best >= 0) begin taken[best] = 1; ss_seg[n] = best; n++; end
    end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int s;
        s = seg[by * N + y][bx * N + x];
        ss_of[y][x] = -1;
        for (int k = 0; k < n; k++) if (ss_seg[k] == s) ss_of[y][x] = k;
        wgt[by * N + y][bx * N + x] = (ss_of[y][x] >= 0);
      end
    return n;
  endfunction

  task automatic run_block(int bx, int by);
    int ss_seg [4];
    int ss_of [N][N];
    int n, nv, t0;
    n = refine(bx, by, ss_seg, ss_of);
    if (n > 1) n_multi++;
    // search area: reference pixels (bx*N .. bx*N+47, by*N .. by*N+31)
    for (int y = 0; y < L0_H; y++)
      for (int c = 0; c < L0_W / N; c++) begin
        @(negedge clk);
        l0_wr_en = 1; l0_wr_row = 5'(y); l0_wr_col = 2'(c);
        for (int i = 0; i < N; i++) l0_wr_data[i] = refr[by * N + y][bx * N + c * N + i];
      end
    for (int y = 0; y < N; y++) begin
      @(negedge clk);
      l0_wr_en = 0; mb_wr_en = 1; wc_wr_en = 1; mb_wr_row = 4'(y); wc_wr_row = 4'(y);
      for (int i = 0; i < N; i++) begin
        mb_wr_data[i] = cur[by * N + y][bx * N + i];
        wc_wr_ssid[i] = (ss_of[y][i] >= 0) ? 2'(ss_of[y][i]) : 2'(0);
        wc_wr_wgt[i]  = (ss_of[y][i] >= 0);
      end
    end
    @(negedge clk); mb_wr_en = 0; wc_wr_en = 0;
    for (int k = 0; k < n; k++) begin
      for (int v = 0; v < NCAND; v++) begin
        @(negedge clk);
        cand_wr_en = 1; cand_wr_ss = 2'(k); cand_wr_idx = 3'(v);
        cand_wr_mv.x = MV_W'(cmx[ss_seg[k]][v]); cand_wr_mv.y = MV_W'(cmy[ss_seg[k]][v]);
      end
      @(negedge clk);
      cand_wr_en = 0; cand_cnt_en = 1; cand_cnt_val = 4'(NCAND);
      map_wr_en = 1; map_ss = 2'(k); map_seg = 10'(ss_seg[k]);
    end
    @(negedge clk); cand_cnt_en = 0; map_wr_en = 0;
    nv = n * NCAND;
    @(negedge clk); start = 1; nss = 3'(n); t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != 22 * nv + 1) begin failures++; $display("FAIL block took %0d cycles for %0d vectors", cycle - t0, nv); end
    while (res_pending) @(negedge clk);
  endtask

  task automatic reference_penalties();
    for (int s = 0; s < NSEG; s++) begin
      has[s] = 0;
      for (int v = 0; v < 8; v++) mp[s][v] = 0;
    end
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++)
        if (wgt[y][x]) begin
          int s;
          s = seg[y][x];
          has[s] = 1;
          for (int v = 0; v < NCAND; v++) begin
            int a, b;
            a = int'(cur[y][x]);
            b = int'(refr[Y0 + y + clampi(cmy[s][v], Y0)][X0 + x + clampi(cmx[s][v], X0)]);
            mp[s][v] += (a > b) ? a - b : b - a;
          end
        end
  endtask

  task automatic iteration(int exp_conv);
    longint tot;
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (busy_acc) @(negedge clk);
    for (int by = 0; by < BY; by++) for (int bx = 0; bx < BX; bx++) run_block(bx, by);
    reference_penalties();
    tot = 0;
    for (int s = 0; s < NSEG; s++) if (has[s]) begin
      longint bm;
      bm = mp[s][0];
      for (int v = 1; v < NCAND; v++) if (mp[s][v] < bm) bm = mp[s][v];
      tot += bm;
    end
    sel_cnt = 0;
    @(negedge clk); select = 1; nseg = 11'(NSEG);
    @(negedge clk); select = 0;
    while (!select_done) @(negedge clk);
    checks += 3;
    if (sel_cnt != NSEG) begin failures++; $display("FAIL %0d segments selected", sel_cnt); end
    if (longint'(total_mp) != tot) begin failures++; $display("FAIL total %0d exp %0d", total_mp, tot); end
    if (int'(converged) != exp_conv) begin failures++; $display("FAIL converged %0d exp %0d", converged, exp_conv); end
    if (converged) n_conv++;
    $display("iteration: total match penalty %0d, converged %0d", total_mp, converged);
  endtask

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_frame();
    make_candidates();
    iteration(0);
    // Offer the true motion at a random index.
    for (int s = 0; s < NSEG; s++) begin
      int k;
      k = int'($urandom_range(0, NCAND - 1));
      cmx[s][k] = tmx[s]; cmy[s][k] = tmy[s];
    end
    n_true = 0;
    iteration(0);
    if (total_mp == 0) n_improve++;
    iteration(1);
    checks += 6;
    if (n_multi == 0)   begin failures++; $display("FAIL no block with several sub-segments"); end
    if (n_over4 == 0)   begin failures++; $display("FAIL no block with more than four segments"); end
    if (n_clamp == 0)   begin failures++; $display("FAIL no clamped vector"); end
    if (n_improve == 0) begin failures++; $display("FAIL the true motion did not bring the penalty to 0"); end
    if (n_conv == 0)    begin failures++; $display("FAIL convergence never detected"); end
    if (n_true < NSEG)  begin failures++; $display("FAIL true motion selected for only %0d segments", n_true); end
    $display("multi=%0d over4=%0d clamped=%0d improved=%0d converged=%0d true_motion=%0d",
             n_multi, n_over4, n_clamp, n_improve, n_conv, n_true);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
