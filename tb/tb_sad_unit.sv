// tb_sad_unit: self-checking test of the masked SAD unit.
// Sends 40 blocks of 16 random lines with random masks, some back to back and some with
// idle cycles in between, plus a block with the largest possible SAD. For every block the
// expected SAD and pixel count are computed here and compared with the unit's result,
// and out_valid must come exactly 3 cycles after the last line was accepted.
module tb_sad_unit;
  localparam int N = 16, PIX_W = 8, ROWS = 16, NBLK = 40;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                    rst_n = 0;
  logic                    in_valid = 0, in_first = 0, in_last = 0;
  logic [N-1:0][PIX_W-1:0] cur = '0, refl = '0;
  logic [N-1:0]            mask = '0;
  logic                    out_valid;
  logic [15:0]             sad;
  logic [8:0]              wsum;
  int checks = 0, failures = 0;
  int exp_sad [$], exp_w [$], exp_t [$];
  int cycle = 0;

  sad_unit #(.N(N), .PIX_W(PIX_W), .ROWS(ROWS)) dut (.*);

  always @(posedge clk) cycle <= cycle + 1;

  // Scoreboard
  always @(posedge clk) if (rst_n && out_valid) begin
    checks += 3;
    if (exp_sad.size() == 0) begin
      failures++;
      $display("FAIL unexpected out_valid");
    end else begin
      int es, ew, et;
      es = exp_sad.pop_front(); ew = exp_w.pop_front(); et = exp_t.pop_front();
      if (int'(sad) != es)  begin failures++; $display("FAIL sad %0d exp %0d", sad, es); end
      if (int'(wsum) != ew) begin failures++; $display("FAIL wsum %0d exp %0d", wsum, ew); end
      if (cycle - et != 3)  begin failures++; $display("FAIL latency %0d", cycle - et); end
    end
  end

  task automatic send_block(bit worst);
    int s = 0, w = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk);
      in_valid = 1; in_first = (r == 0); in_last = (r == ROWS - 1);
      for (int i = 0; i < N; i++) begin
        cur[i]  = worst ? 8'hFF : PIX_W'($urandom);
        refl[i] = worst ? 8'h00 : PIX_W'($urandom);
        mask[i] = worst ? 1'b1 : ($urandom_range(0, 2) != 0);
        if (mask[i]) begin
          s += (cur[i] > refl[i]) ? int'(cur[i]) - int'(refl[i]) : int'(refl[i]) - int'(cur[i]);
          w++;
        end
      end
      if (r == ROWS - 1) begin
        exp_sad.push_back(s); exp_w.push_back(w); exp_t.push_back(cycle);
      end
    end
  endtask

  task automatic idle(int n);
    repeat (n) begin
      @(negedge clk);
      in_valid = 0; in_first = 0; in_last = 0;
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < NBLK; b++) begin
      send_block(0);
      // Half of the blocks follow the previous one without a gap.
      if ($urandom_range(0, 1) == 0) idle(int'($urandom_range(1, 4)));
    end
    send_block(1);
    idle(1);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_sad.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_sad.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
