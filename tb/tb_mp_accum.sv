// tb_mp_accum: self-checking test of the match-penalty accumulation buffer.
// Three iterations over 20 segments. In each, random "macro-blocks" map their four
// sub-segments to random segments and deliver random SADs for random candidates; the
// sums per (segment, candidate) and the best candidate of each segment are computed
// here and compared with the block's selection output, as is the total. Iteration 2
// repeats iteration 1 exactly (no improvement: converged must be 1), iteration 3 lowers
// every SAD (improvement: converged must be 0). Also checks that in_ready is low while
// clearing and that the clear empties every entry.
module tb_mp_accum;
  import sbme_pkg::*;
  localparam int MAX_SEG = 1024, NSEG = 20, NMB = 30;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 0, clear = 0, select = 0;
  logic [10:0] nseg = 0;
  logic        busy, done, converged;
  logic [31:0] total_mp;
  logic        map_wr_en = 0;
  logic [1:0]  map_ss = 0;
  logic [9:0]  map_seg = 0;
  logic        in_valid = 0, in_ready;
  result_t     in_res = '0;
  logic        best_valid, best_found;
  logic [9:0]  best_seg;
  logic [2:0]  best_idx;
  mv_t         best_mv;
  logic [31:0] best_mp;

  mp_accum dut (.*);

  int checks = 0, failures = 0;
  longint sums [NSEG][8];
  bit     seen [NSEG][8];
  mv_t    mvs  [NSEG][8];
  // Recorded stimulus of iteration 1, replayed in iterations 2 and 3
  int rec_map [NMB][4];
  result_t rec_res [NMB][$];
  int n_sel = 0, n_ready_low = 0;

  // Selection checker
  always @(posedge clk) if (rst_n && best_valid) begin
    int s, bi;
    longint bm;
    bit f;
    s = int'(best_seg);
    f = 0; bi = 0; bm = 0;
    for (int v = 0; v < 8; v++)
      if (seen[s][v] && (!f || sums[s][v] < bm)) begin f = 1; bi = v; bm = sums[s][v]; end
    checks++;
    if (s != n_sel || best_found != f || (f && (int'(best_idx) != bi || longint'(best_mp) != bm ||
        best_mv != mvs[s][bi]))) begin
      failures++;
      $display("FAIL seg %0d (exp %0d): found %0d idx %0d mp %0d, exp %0d %0d %0d",
               s, n_sel, best_found, best_idx, best_mp, f, bi, bm);
    end
    n_sel++;
  end

  always @(posedge clk) if (rst_n && busy && !in_ready) n_ready_low++;

  task automatic do_clear();
    @(negedge clk); clear = 1;
    @(negedge clk); clear = 0;
    while (busy) @(negedge clk);
    for (int s = 0; s < NSEG; s++) for (int v = 0; v < 8; v++) begin sums[s][v] = 0; seen[s][v] = 0; end
  endtask

  task automatic do_select(int exp_conv);
    longint tot;
    tot = 0;
    for (int s = 0; s < NSEG; s++) begin
      bit f; longint bm;
      f = 0; bm = 0;
      for (int v = 0; v < 8; v++) if (seen[s][v] && (!f || sums[s][v] < bm)) begin f = 1; bm = sums[s][v]; end
      tot += bm;
    end
    n_sel = 0;
    @(negedge clk); select = 1; nseg = 11'(NSEG);
    @(negedge clk); select = 0;
    while (!done) @(negedge clk);
    checks += 3;
    if (n_sel != NSEG) begin failures++; $display("FAIL %0d selections", n_sel); end
    if (longint'(total_mp) != tot) begin failures++; $display("FAIL total %0d exp %0d", total_mp, tot); end
    if (int'(converged) != exp_conv) begin failures++; $display("FAIL converged %0d exp %0d", converged, exp_conv); end
  endtask

  // mode 0: new random stimulus; 1: replay; 2: replay with every SAD reduced
  task automatic iteration(int mode);
    do_clear();
    for (int m = 0; m < NMB; m++) begin
      for (int ss = 0; ss < 4; ss++) begin
        if (mode == 0) rec_map[m][ss] = int'($urandom_range(0, NSEG - 1));
        @(negedge clk); map_wr_en = 1; map_ss = 2'(ss); map_seg = 10'(rec_map[m][ss]);
      end
      @(negedge clk); map_wr_en = 0;
      if (mode == 0) begin
        rec_res[m].delete();
        for (int k = 0; k < int'($urandom_range(1, 32)); k++) begin
          result_t r;
          r.ssid = 2'($urandom); r.vidx = 3'($urandom);
          // The vector of a candidate index is a property of the segment.
          r.mv.x = MV_W'(rec_map[m][r.ssid] + int'(r.vidx));
          r.mv.y = MV_W'(int'(r.vidx) - rec_map[m][r.ssid]);
          r.sad = 16'($urandom_range(0, 20000)); r.wsum = 9'($urandom);
          rec_res[m].push_back(r);
        end
      end
      foreach (rec_res[m][k]) begin
        result_t r;
        int s;
        r = rec_res[m][k];
        if (mode == 2) r.sad = r.sad / 2;
        s = rec_map[m][r.ssid];
        @(negedge clk); in_valid = 1; in_res = r;
        while (!in_ready) @(negedge clk);
        sums[s][r.vidx] += longint'(r.sad);
        seen[s][r.vidx] = 1;
        mvs[s][r.vidx]  = r.mv;
      end
      @(negedge clk); in_valid = 0;
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    iteration(0);
    do_select(0);        // first selection: nothing to compare with
    iteration(1);
    do_select(1);        // same penalties: no improvement
    iteration(2);
    do_select(0);        // lower penalties: improved
    checks++;
    if (n_ready_low < MAX_SEG) begin failures++; $display("FAIL in_ready not low while clearing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
