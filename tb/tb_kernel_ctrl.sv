// tb_kernel_ctrl: self-checking test of the kernel sequencer on its own.
// The candidate buffer and the SAD unit are modelled here: the SAD model checks the
// first/last flags of each 16-line block and answers 3 cycles after the last line with
// a tag as SAD. Every cache read is checked against the address the candidate vector
// implies (row, x = 16+mx, y = 8+my+row, cssid = sub-segment), every result against the
// expected (sub-segment, index, clamped vector, tag), and the time between results must
// be 22 cycles when the result side never stalls. Runs include out-of-range vectors
// (clamping), a sub-segment without candidates, and a result side that stalls at random.
module tb_kernel_ctrl;
  import sbme_pkg::*;
  localparam int N = 16, W = 48, H = 32, X0 = 16, Y0 = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n = 0, start = 0;
  logic [2:0]  nss = 0;
  logic        busy, done, clamped;
  logic [1:0]  cand_ss, cssid;
  logic [2:0]  cand_idx;
  mv_t         cand_mv;
  logic [3:0]  cand_cnt;
  logic        rd_en;
  logic [3:0]  rd_row;
  logic [5:0]  l0_x;
  logic [4:0]  l0_y;
  logic        sad_valid, sad_first, sad_last, sad_done;
  logic [15:0] sad;
  logic [8:0]  wsum;
  logic        res_valid, res_ready = 1;
  result_t     res_data;

  kernel_ctrl #(.N(N), .W(W), .H(H), .MAX_SS(4), .MAX_VEC(8)) dut (.*);

  // Candidate buffer model
  mv_t mvs [4][8];
  int  cnts [4];
  assign cand_mv  = mvs[cand_ss][cand_idx];
  assign cand_cnt = 4'(cnts[cand_ss]);

  int checks = 0, failures = 0, cycle = 0;
  int n_clamped = 0, n_stall = 0, n_skip_ss = 0;
  result_t exp_q [$];
  int exp_x [$], exp_y [$], exp_ss [$];
  int line_cnt = 0, tag = 0, last_acc = -1;
  bit check_period = 0;
  int done_pulses = 0;

  function automatic int clampi(int v, int lim);
    return (v < -lim) ? -lim : (v > lim) ? lim : v;
  endfunction

  always @(posedge clk) cycle <= cycle + 1;

  // Read-address checker
  always @(posedge clk) if (rst_n && rd_en) begin
    checks++;
    if (exp_x.size() == 0) begin failures++; $display("FAIL unexpected read"); end
    else if (int'(rd_row) != line_cnt || int'(l0_x) != exp_x[0] ||
             int'(l0_y) != exp_y[0] + line_cnt || int'(cssid) != exp_ss[0]) begin
      failures++;
      $display("FAIL read row %0d x %0d y %0d ss %0d, exp row %0d x %0d y %0d ss %0d",
               rd_row, l0_x, l0_y, cssid, line_cnt, exp_x[0], exp_y[0] + line_cnt, exp_ss[0]);
    end
    line_cnt++;
    if (line_cnt == N) begin
      line_cnt = 0;
      void'(exp_x.pop_front()); void'(exp_y.pop_front()); void'(exp_ss.pop_front());
    end
  end

  // SAD unit model: checks flags, answers 3 cycles after the last line
  int sline = 0;
  logic [2:0] done_pipe = 0;
  always @(posedge clk) if (!rst_n) begin
    done_pipe <= 0;
  end else begin
    done_pipe <= {done_pipe[1:0], sad_valid && sad_last};
    if (sad_valid) begin
      checks++;
      if (sad_first != (sline == 0) || sad_last != (sline == N - 1)) begin
        failures++; $display("FAIL sad flags at line %0d", sline);
      end
      sline = (sline == N - 1) ? 0 : sline + 1;
    end
    if (done_pipe[2]) tag <= tag + 1;
  end
  assign sad_done = done_pipe[2];
  assign sad  = 16'(tag);
  assign wsum = 9'(tag + 1);

  // Result checker
  always @(posedge clk) if (rst_n) begin
    if (clamped) n_clamped++;
    if (done) done_pulses++;
    if (res_valid && !res_ready) n_stall++;
    if (res_valid && res_ready) begin
      checks++;
      if (exp_q.size() == 0 || res_data != exp_q[0]) begin
        failures++;
        $display("FAIL result ss %0d v %0d mv (%0d,%0d) sad %0d", res_data.ssid, res_data.vidx,
                 res_data.mv.x, res_data.mv.y, res_data.sad);
      end else void'(exp_q.pop_front());
      if (check_period && last_acc >= 0) begin
        checks++;
        if (cycle - last_acc != N + 6) begin
          failures++; $display("FAIL period %0d", cycle - last_acc);
        end
      end
      last_acc = cycle;
    end
  end

  task automatic run_mb(int n_ss, bit with_range_errors, bit with_empty, bit stall);
    int t;
    t = tag;
    for (int s = 0; s < 4; s++) begin
      cnts[s] = (with_empty && s == 1) ? 0 : int'($urandom_range(1, 8));
      for (int v = 0; v < 8; v++) begin
        int mx, my;
        mx = with_range_errors ? int'($urandom_range(0, 63)) - 32 : int'($urandom_range(0, 32)) - 16;
        my = with_range_errors ? int'($urandom_range(0, 63)) - 32 : int'($urandom_range(0, 16)) - 8;
        mvs[s][v].x = MV_W'(mx);
        mvs[s][v].y = MV_W'(my);
      end
    end
    for (int s = 0; s < n_ss; s++) begin
      if (cnts[s] == 0) n_skip_ss++;
      for (int v = 0; v < cnts[s]; v++) begin
        result_t r;
        int cx, cy;
        cx = clampi(int'(mvs[s][v].x), X0);
        cy = clampi(int'(mvs[s][v].y), Y0);
        r.ssid = 2'(s); r.vidx = 3'(v);
        r.mv.x = MV_W'(cx); r.mv.y = MV_W'(cy);
        r.sad = 16'(t); r.wsum = 9'(t + 1);
        t++;
        exp_q.push_back(r);
        exp_x.push_back(X0 + cx); exp_y.push_back(Y0 + cy); exp_ss.push_back(s);
      end
    end
    check_period = !stall;
    last_acc = -1;
    @(negedge clk); start = 1; nss = 3'(n_ss);
    @(negedge clk); start = 0;
    while (!done) begin
      @(negedge clk);
      if (stall) res_ready = ($urandom_range(0, 2) == 0);
    end
    res_ready = 1;
    @(negedge clk);
    checks += 2;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); exp_q.delete(); end
    if (busy) begin failures++; $display("FAIL still busy"); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_mb(4, 0, 0, 0);
    run_mb(1, 0, 0, 0);
    run_mb(3, 1, 0, 0);
    run_mb(4, 0, 1, 1);
    run_mb(4, 1, 0, 1);
    checks += 4;
    if (done_pulses != 5) begin failures++; $display("FAIL done pulses %0d", done_pulses); end
    if (n_clamped == 0)   begin failures++; $display("FAIL clamping never happened"); end
    if (n_stall == 0)     begin failures++; $display("FAIL no stall happened"); end
    if (n_skip_ss == 0)   begin failures++; $display("FAIL no empty sub-segment"); end
    $display("clamped=%0d stall_cycles=%0d empty_subsegments=%0d", n_clamped, n_stall, n_skip_ss);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
