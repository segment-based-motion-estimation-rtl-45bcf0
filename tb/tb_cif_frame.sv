// tb_cif_frame: the CIF workload. Segment-based motion estimation of one 352x288 frame
// (22x18 macro-blocks) with the iterative algorithm, at most 12 iterations, on the
// top level at its default parameters.
//
// The testbench acts as the host. It builds a random reference frame and a current
// frame of about 300 irregular segments (nearest of random seed points). The segments
// belong to four moving objects, each a translated copy of the reference. Per iteration
// it chooses each segment's candidates as the algorithm prescribes:
//   - the segment's current vector;
//   - that vector with a small random update;
//   - the previous-iteration vectors of up to five neighbouring segments, those with the
//     closest mean luminance first, every second one randomly updated;
//   - in the first iteration also the zero vector.
// It keeps the four largest segments of each block and gives other pixels weight 0,
// runs every block through the engine, then selects.
//
// Checked:
//   - each segment's selected candidate, penalty and vector, and the total, against
//     penalties computed here from the frames;
//   - the total never increases, since a segment's current vector is always a
//     candidate;
//   - convergence is flagged exactly when the total stops decreasing;
//   - the final total is below the first.
//   - 12 iterations of the slowest one fit the 55 ms frame time reported for the
//     original design at 100 MHz (5.5 million cycles).
// The cycles of each iteration and the number of segments found at their true motion
// are printed.
module tb_cif_frame;
  import sbme_pkg::*;
  localparam int N = MB_N, X0 = (L0_W - N) / 2, Y0 = (L0_H - N) / 2;
  localparam int BX = 22, BY = 18, FW = BX * N, FH = BY * N, RWID = FW + 2 * X0, RHGT = FH + 2 * Y0;
  localparam int NSEG = 300, MAX_IT = 12, NOBJ = 4;
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

  logic [PIX_W-1:0] refr [RHGT][RWID];
  logic [PIX_W-1:0] cur  [FH][FW];
  logic [9:0]       seg  [FH][FW];
  bit               wgt  [FH][FW];
  int               tmx [NOBJ], tmy [NOBJ], obj [NSEG];
  int               vx [NSEG], vy [NSEG];          // current vector per segment
  int               ncand [NSEG];
  int               cmx [NSEG][8], cmy [NSEG][8];
  longint           mp  [NSEG][8];
  bit               has [NSEG];
  bit               adj [NSEG][NSEG];
  longint           lsum [NSEG];
  int               lcnt [NSEG];
  int               sel_cnt = 0;
  int               new_vx [NSEG], new_vy [NSEG];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic int clampi(int v, int lo, int hi);
    return (v < lo) ? lo : (v > hi) ? hi : v;
  endfunction

  function automatic int upd();
    return int'($urandom_range(0, 4)) - 2;
  endfunction

  // Selection checker
  always @(posedge clk) if (rst_n && best_valid) begin
    int s, bi;
    longint bm;
    bit f;
    s = int'(best_seg);
    f = 0; bi = 0; bm = 0;
    if (has[s])
      for (int v = 0; v < ncand[s]; v++) if (!f || mp[s][v] < bm) begin f = 1; bi = v; bm = mp[s][v]; end
    checks++;
    if (best_found != f || (f && (int'(best_idx) != bi || longint'(best_mp) != bm ||
        int'(best_mv.x) != cmx[s][bi] || int'(best_mv.y) != cmy[s][bi]))) begin
      failures++;
      if (failures < 10)
        $display("FAIL segment %0d: found %0d idx %0d mp %0d, exp %0d %0d %0d", s, best_found, best_idx, best_mp, f, bi, bm);
    end
    new_vx[s] = f ? int'(best_mv.x) : vx[s];
    new_vy[s] = f ? int'(best_mv.y) : vy[s];
    sel_cnt++;
  end

  task automatic make_frame();
    int sx [NSEG], sy [NSEG];
    // Smooth texture: a coarse random grid (every 8 pixels), bilinearly interpolated,
    // plus a little noise, so that penalties fall off gradually around the true motion.
    int g [RHGT / 8 + 2][RWID / 8 + 2];
    for (int j = 0; j < RHGT / 8 + 2; j++) for (int i = 0; i < RWID / 8 + 2; i++) g[j][i] = int'($urandom_range(16, 239));
    for (int y = 0; y < RHGT; y++)
      for (int x = 0; x < RWID; x++) begin
        int i, j, fx, fy, v;
        i = x / 8; j = y / 8; fx = x % 8; fy = y % 8;
        v = (g[j][i] * (8 - fx) * (8 - fy) + g[j][i + 1] * fx * (8 - fy) +
             g[j + 1][i] * (8 - fx) * fy + g[j + 1][i + 1] * fx * fy) / 64;
        refr[y][x] = PIX_W'(clampi(v + int'($urandom_range(0, 8)) - 4, 0, 255));
      end
    for (int o = 0; o < NOBJ; o++) begin
      tmx[o] = int'($urandom_range(0, 12)) - 6;
      tmy[o] = int'($urandom_range(0, 8)) - 4;
    end
    for (int s = 0; s < NSEG; s++) begin
      sx[s] = int'($urandom_range(0, FW - 1)); sy[s] = int'($urandom_range(0, FH - 1));
      // background plus three rectangular objects
      obj[s] = 0;
      if (sx[s] < FW / 2 && sy[s] < FH / 2) obj[s] = 1;
      else if (sx[s] >= FW / 2 && sy[s] >= FH / 2 && sx[s] < 3 * FW / 4) obj[s] = 2;
      else if (sx[s] > 7 * FW / 8) obj[s] = 3;
    end
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int bd, d, o;
        bd = 1 << 30;
        for (int s = 0; s < NSEG; s++) begin
          d = (x - sx[s]) * (x - sx[s]) + (y - sy[s]) * (y - sy[s]);
          if (d < bd) begin bd = d; seg[y][x] = 10'(s); end
        end
        o = obj[seg[y][x]];
        cur[y][x] = refr[Y0 + y + tmy[o]][X0 + x + tmx[o]];
      end
    // Neighbours (4-connected) and mean luminance of every segment
    for (int s = 0; s < NSEG; s++) begin
      lsum[s] = 0; lcnt[s] = 0;
      for (int t = 0; t < NSEG; t++) adj[s][t] = 0;
    end
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        lsum[seg[y][x]] += longint'(cur[y][x]);
        lcnt[seg[y][x]]++;
        if (x + 1 < FW && seg[y][x + 1] != seg[y][x]) begin adj[seg[y][x]][seg[y][x + 1]] = 1; adj[seg[y][x + 1]][seg[y][x]] = 1; end
        if (y + 1 < FH && seg[y + 1][x] != seg[y][x]) begin adj[seg[y][x]][seg[y + 1][x]] = 1; adj[seg[y + 1][x]][seg[y][x]] = 1; end
      end
  endtask

  // Candidates of one iteration (step 1 of the algorithm), all inside the search range.
  task automatic choose_candidates(bit first);
    for (int s = 0; s < NSEG; s++) begin
      int n;
      bit used [NSEG];
      n = 0;
      cmx[s][n] = vx[s]; cmy[s][n] = vy[s]; n++;
      cmx[s][n] = clampi(vx[s] + upd(), -X0, X0); cmy[s][n] = clampi(vy[s] + upd(), -Y0, Y0); n++;
      for (int t = 0; t < NSEG; t++) used[t] = 0;
      for (int k = 0; k < 5; k++) begin
        int bt;
        longint bd, d, ms, mt;
        bt = -1; bd = 0;
        ms = lsum[s] / longint'(lcnt[s] > 0 ? lcnt[s] : 1);
        for (int t = 0; t < NSEG; t++)
          if (adj[s][t] && !used[t]) begin
            mt = lsum[t] / longint'(lcnt[t] > 0 ? lcnt[t] : 1);
            d = (ms > mt) ? ms - mt : mt - ms;
            if (bt < 0 || d < bd) begin bt = t; bd = d; end
          end
        if (bt >= 0) begin
          used[bt] = 1;
          if (k % 2 == 1) begin
            cmx[s][n] = clampi(vx[bt] + upd(), -X0, X0); cmy[s][n] = clampi(vy[bt] + upd(), -Y0, Y0);
          end else begin
            cmx[s][n] = vx[bt]; cmy[s][n] = vy[bt];
          end
          n++;
        end
      end
      if (first) begin cmx[s][n] = 0; cmy[s][n] = 0; n++; end
      ncand[s] = n;
    end
  endtask

  function automatic int refine(int bx, int by, output int ss_seg [4], output int ss_of [N][N]);
    int cnt [NSEG];
    int n;
    bit taken [NSEG];
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) cnt[seg[by * N + y][bx * N + x]] = 0;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
      cnt[seg[by * N + y][bx * N + x]]++;
      taken[seg[by * N + y][bx * N + x]] = 0;
    end
    n = 0;
    for (int k = 0; k < 4; k++) begin
      int best, bc;
      best = -1; bc = 0;
      for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) begin
        int s;
        s = seg[by * N + y][bx * N + x];
        if (!taken[s] && (cnt[s] > bc || (cnt[s] == bc && s < best))) begin best = s; bc = cnt[s]; end
      end
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
    int n;
    n = refine(bx, by, ss_seg, ss_of);
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
      int s;
      s = ss_seg[k];
      for (int v = 0; v < ncand[s]; v++) begin
        @(negedge clk);
        cand_wr_en = 1; cand_wr_ss = 2'(k); cand_wr_idx = 3'(v);
        cand_wr_mv.x = MV_W'(cmx[s][v]); cand_wr_mv.y = MV_W'(cmy[s][v]);
      end
      @(negedge clk);
      cand_wr_en = 0; cand_cnt_en = 1; cand_cnt_val = 4'(ncand[s]);
      map_wr_en = 1; map_ss = 2'(k); map_seg = 10'(s);
    end
    @(negedge clk); cand_cnt_en = 0; map_wr_en = 0;
    @(negedge clk); start = 1; nss = 3'(n);
    @(negedge clk); start = 0;
    while (!done) @(negedge clk);
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
          s = int'(seg[y][x]);
          has[s] = 1;
          for (int v = 0; v < ncand[s]; v++) begin
            int a, b;
            a = int'(cur[y][x]);
            b = int'(refr[Y0 + y + cmy[s][v]][X0 + x + cmx[s][v]]);
            mp[s][v] += (a > b) ? a - b : b - a;
          end
        end
  endtask

  initial begin
    repeat (80_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint first_total, prev_total, tot;
    int it, t0, worst, right;
    repeat (3) @(negedge clk);
    rst_n = 1;
    make_frame();
    for (int s = 0; s < NSEG; s++) begin vx[s] = 0; vy[s] = 0; end
    first_total = -1; prev_total = -1; worst = 0;
    for (it = 0; it < MAX_IT; it++) begin
      choose_candidates(it == 0);
      t0 = cycle;
      @(negedge clk); clear = 1;
      @(negedge clk); clear = 0;
      while (busy_acc) @(negedge clk);
      for (int by = 0; by < BY; by++) for (int bx = 0; bx < BX; bx++) run_block(bx, by);
      reference_penalties();
      tot = 0;
      for (int s = 0; s < NSEG; s++) if (has[s]) begin
        longint bm;
        bm = mp[s][0];
        for (int v = 1; v < ncand[s]; v++) if (mp[s][v] < bm) bm = mp[s][v];
        tot += bm;
      end
      sel_cnt = 0;
      @(negedge clk); select = 1; nseg = 11'(NSEG);
      @(negedge clk); select = 0;
      while (!select_done) @(negedge clk);
      if (cycle - t0 > worst) worst = cycle - t0;
      checks += 3;
      if (sel_cnt != NSEG) begin failures++; $display("FAIL %0d segments selected", sel_cnt); end
      if (longint'(total_mp) != tot) begin failures++; $display("FAIL total %0d exp %0d", total_mp, tot); end
      if (converged != (prev_total >= 0 && tot >= prev_total)) begin failures++; $display("FAIL converged flag"); end
      if (prev_total >= 0) begin
        checks++;
        if (tot > prev_total) begin failures++; $display("FAIL total rose from %0d to %0d", prev_total, tot); end
      end
      $display("iteration %0d: %0d cycles, total match penalty %0d, converged %0d", it + 1, cycle - t0, total_mp, converged);
      if (first_total < 0) first_total = tot;
      prev_total = tot;
      for (int s = 0; s < NSEG; s++) begin vx[s] = new_vx[s]; vy[s] = new_vy[s]; end
      if (converged) break;
    end
    right = 0;
    for (int s = 0; s < NSEG; s++) if (vx[s] == tmx[obj[s]] && vy[s] == tmy[obj[s]]) right++;
    // 55 ms per frame at 100 MHz with 12 iterations is the reference budget.
    checks += 2;
    if (longint'(worst) * MAX_IT > 64'd5_500_000) begin failures++; $display("FAIL over the 55 ms frame budget"); end
    if (!(prev_total < first_total)) begin failures++; $display("FAIL the penalty never improved"); end
    $display("%0d iterations; %0d of %0d segments at their true motion", it < MAX_IT ? it + 1 : MAX_IT, right, NSEG);
    $display("worst iteration %0d cycles: 12 iterations = %0d us at 100 MHz", worst, worst * 12 / 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
