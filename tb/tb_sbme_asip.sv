// tb_sbme_asip: end-to-end test of the motion-estimation engine at its default sizes
// (16x16 macro-block, 48x32 search area, 4 sub-segments, 8 candidates).
//
// Plays the system controller for a sequence of macro-blocks. For each one it builds a
// random search area, a sub-segment map of up to four regions (nearest of four seed
// points) with a few pixels dropped at weight 0, and a current block whose every region
// is a copy of the search area displaced by that region's own true motion. It loads the
// caches and the candidates (the true motion among them, plus random and out-of-range
// vectors), starts the engine and checks every result against a SAD computed here from
// the same data. It also integrates the sub-segment SADs like the system controller:
// the best candidate of each region must be its true motion (SAD 0).
//
// Mechanisms counted, each of which must occur: several sub-segments in one block,
// pixels excluded by weight 0, plain block matching (one sub-segment, all weights 1),
// vectors clamped to the search area, and the sequencer stalled by a full result buffer.
// The time from start to done must be 22 cycles per vector when nothing stalls.
module tb_sbme_asip;
  import sbme_pkg::*;
  localparam int N = MB_N, W = L0_W, H = L0_H, X0 = (W - N) / 2, Y0 = (H - N) / 2;
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
  logic                    start = 0;
  logic [2:0]              nss = 0;
  logic                    busy, done, clamped;
  logic                    res_valid, res_ready = 0;
  result_t                 res_data;

  sbme_asip dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int stalled_cycles = 0;
  int n_multi = 0, n_excl = 0, n_block = 0, n_clamp = 0, n_stall = 0, n_best = 0;

  logic [PIX_W-1:0] area [H][W];
  logic [PIX_W-1:0] cur  [N][N];
  int               ssid [N][N];
  bit               wgt  [N][N];
  int               cnts [4];
  int               cmx [4][8], cmy [4][8];
  result_t          exp_q [$];
  int               best_sad [4], best_mx [4], best_my [4], true_mx [4], true_my [4];

  always @(posedge clk) cycle <= cycle + 1;
  always @(posedge clk) if (rst_n) begin
    if (clamped) n_clamp++;
  end

  // Result checker and the controller's best-candidate selection per sub-segment
  always @(posedge clk) if (rst_n && res_valid && res_ready) begin
    checks++;
    if (exp_q.size() == 0 || res_data != exp_q[0]) begin
      failures++;
      if (exp_q.size() != 0)
        $display("FAIL ss %0d v %0d: sad %0d wsum %0d mv (%0d,%0d), exp sad %0d wsum %0d mv (%0d,%0d)",
                 res_data.ssid, res_data.vidx, res_data.sad, res_data.wsum, res_data.mv.x, res_data.mv.y,
                 exp_q[0].sad, exp_q[0].wsum, exp_q[0].mv.x, exp_q[0].mv.y);
      else $display("FAIL unexpected result");
    end else void'(exp_q.pop_front());
    if (int'(res_data.sad) < best_sad[res_data.ssid]) begin
      best_sad[res_data.ssid] = int'(res_data.sad);
      best_mx[res_data.ssid]  = int'(res_data.mv.x);
      best_my[res_data.ssid]  = int'(res_data.mv.y);
    end
  end

  function automatic int clampi(int v, int lim);
    return (v < -lim) ? -lim : (v > lim) ? lim : v;
  endfunction

  // Build one macro-block's data. block_mode: one sub-segment, every weight 1.
  task automatic make_mb(int n_ss, bit block_mode);
    int sx [4], sy [4];
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) area[y][x] = PIX_W'($urandom);
    for (int s = 0; s < 4; s++) begin
      sx[s] = int'($urandom_range(0, N - 1));
      sy[s] = int'($urandom_range(0, N - 1));
      true_mx[s] = int'($urandom_range(0, 2 * X0)) - X0;
      true_my[s] = int'($urandom_range(0, 2 * Y0)) - Y0;
    end
    for (int y = 0; y < N; y++)
      for (int x = 0; x < N; x++) begin
        int bd, d;
        ssid[y][x] = 0;
        bd = 1000;
        for (int s = 0; s < n_ss; s++) begin
          d = (x > sx[s] ? x - sx[s] : sx[s] - x) + (y > sy[s] ? y - sy[s] : sy[s] - y);
          if (d < bd) begin bd = d; ssid[y][x] = s; end
        end
        wgt[y][x] = block_mode ? 1'b1 : ($urandom_range(0, 49) != 0);
        cur[y][x] = area[Y0 + y + true_my[ssid[y][x]]][X0 + x + true_mx[ssid[y][x]]];
      end
    // Candidates: the true motion at a random index, the rest random, some out of range.
    for (int s = 0; s < 4; s++) begin
      int ti;
      cnts[s] = int'($urandom_range(2, 8));
      ti = int'($urandom_range(0, cnts[s] - 1));
      for (int v = 0; v < 8; v++) begin
        if (v == ti) begin cmx[s][v] = true_mx[s]; cmy[s][v] = true_my[s]; end
        else if ($urandom_range(0, 4) == 0) begin
          cmx[s][v] = int'($urandom_range(0, 60)) - 30; cmy[s][v] = int'($urandom_range(0, 60)) - 30;
        end else begin
          cmx[s][v] = int'($urandom_range(0, 2 * X0)) - X0; cmy[s][v] = int'($urandom_range(0, 2 * Y0)) - Y0;
        end
      end
    end
  endtask

  task automatic load_mb();
    for (int y = 0; y < H; y++)
      for (int c = 0; c < W / N; c++) begin
        @(negedge clk);
        l0_wr_en = 1; l0_wr_row = 5'(y); l0_wr_col = 2'(c);
        for (int i = 0; i < N; i++) l0_wr_data[i] = area[y][c * N + i];
      end
    for (int y = 0; y < N; y++) begin
      @(negedge clk);
      l0_wr_en = 0; mb_wr_en = 1; wc_wr_en = 1; mb_wr_row = 4'(y); wc_wr_row = 4'(y);
      for (int i = 0; i < N; i++) begin
        mb_wr_data[i] = cur[y][i];
        wc_wr_ssid[i] = 2'(ssid[y][i]);
        wc_wr_wgt[i]  = wgt[y][i];
      end
    end
    @(negedge clk); mb_wr_en = 0; wc_wr_en = 0;
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 8; v++) begin
        @(negedge clk);
        cand_wr_en = 1; cand_wr_ss = 2'(s); cand_wr_idx = 3'(v);
        cand_wr_mv.x = MV_W'(cmx[s][v]); cand_wr_mv.y = MV_W'(cmy[s][v]);
      end
      @(negedge clk);
      cand_wr_en = 0; cand_cnt_en = 1; cand_cnt_val = 4'(cnts[s]);
    end
    @(negedge clk); cand_cnt_en = 0;
  endtask

  // Expected results, computed from the data in the order the engine produces them.
  function automatic int expect_mb(int n_ss);
    int nv = 0;
    for (int s = 0; s < n_ss; s++) begin
      for (int v = 0; v < cnts[s]; v++) begin
        result_t r;
        int mx, my, sum, w;
        mx = clampi(cmx[s][v], X0);
        my = clampi(cmy[s][v], Y0);
        sum = 0; w = 0;
        for (int y = 0; y < N; y++)
          for (int x = 0; x < N; x++)
            if (ssid[y][x] == s && wgt[y][x]) begin
              int a, b;
              a = int'(cur[y][x]);
              b = int'(area[Y0 + y + my][X0 + x + mx]);
              sum += (a > b) ? a - b : b - a;
              w++;
            end
        r.ssid = 2'(s); r.vidx = 3'(v); r.mv.x = MV_W'(mx); r.mv.y = MV_W'(my);
        r.sad = SAD_W'(sum); r.wsum = WSUM_W'(w);
        exp_q.push_back(r);
        nv++;
      end
    end
    return nv;
  endfunction

  // Run one macro-block. hold_results: keep res_ready low while it runs, until the
  // sequencer has been stalled for a while; keep: leave the results in the buffer.
  task automatic run_mb(int n_ss, bit block_mode, bit hold_results, bit check_time, bit keep = 0);
    int nv, t0, excl;
    make_mb(n_ss, block_mode);
    // Held blocks use all 8 candidates, so that two of them overfill the 32 entries.
    if (hold_results) for (int s = 0; s < 4; s++) cnts[s] = 8;
    load_mb();
    nv = expect_mb(n_ss);
    excl = 0;
    for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) if (!wgt[y][x]) excl++;
    if (n_ss > 1) n_multi++;
    if (excl > 0) n_excl++;
    if (block_mode) n_block++;
    for (int s = 0; s < 4; s++) best_sad[s] = 1 << 30;
    res_ready = !hold_results;
    @(negedge clk); start = 1; nss = 3'(n_ss); t0 = cycle;
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      // Nobody reads for 100 cycles more than the block needs.
      if (cycle - t0 > 22 * nv + 100) res_ready = 1;
    end
    if (hold_results && !keep) begin
      // With the buffer still full of the previous block's results the sequencer must
      // have waited for room: the run took longer than 22 cycles per vector.
      checks++;
      stalled_cycles = cycle - t0 - (22 * nv + 1);
      if (stalled_cycles > 0) n_stall += stalled_cycles;
      else begin failures++; $display("FAIL no time lost to a full result buffer"); end
    end
    if (check_time) begin
      checks++;
      if (cycle - t0 != 22 * nv + 1) begin
        failures++; $display("FAIL %0d vectors took %0d cycles", nv, cycle - t0);
      end
    end
    if (keep) begin
      res_ready = 0;
      return;
    end
    res_ready = 1;
    while (exp_q.size() != 0 && res_valid) @(negedge clk);
    @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); exp_q.delete(); end
    // The true motion, which gives SAD 0, must win in every region that has pixels.
    for (int s = 0; s < n_ss; s++) begin
      checks++;
      if (best_sad[s] != 0 || best_mx[s] != true_mx[s] || best_my[s] != true_my[s]) begin
        bit any = 0;
        for (int y = 0; y < N; y++) for (int x = 0; x < N; x++) if (ssid[y][x] == s && wgt[y][x]) any = 1;
        if (any && best_sad[s] != 0) begin
          failures++; $display("FAIL region %0d best sad %0d", s, best_sad[s]);
        end
      end else n_best++;
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_mb(4, 0, 0, 1);
    run_mb(1, 1, 0, 1);     // plain block matching
    run_mb(3, 0, 0, 1);
    run_mb(4, 0, 1, 0, 1);  // results held back and left in the buffer ...
    run_mb(4, 0, 1, 0);     // ... so this block finds the buffer full and stalls
    run_mb(4, 0, 0, 1);
    checks += 6;
    if (n_multi == 0) begin failures++; $display("FAIL no block with several sub-segments"); end
    if (n_excl == 0)  begin failures++; $display("FAIL no excluded pixels"); end
    if (n_block == 0) begin failures++; $display("FAIL no plain block matching"); end
    if (n_clamp == 0) begin failures++; $display("FAIL no clamped vector"); end
    if (n_stall == 0) begin failures++; $display("FAIL result buffer never stalled the kernel"); end
    if (n_best == 0)  begin failures++; $display("FAIL true motion never selected"); end
    $display("multi=%0d excluded=%0d block=%0d clamped=%0d stall_cycles=%0d true_motion_found=%0d",
             n_multi, n_excl, n_block, n_clamp, n_stall, n_best);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
