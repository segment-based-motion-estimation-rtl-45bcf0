// tb_cand_buf: self-checking test of the candidate-vector buffer.
// Checks the counts are cleared by reset, writes random vectors and counts for all four
// sub-segments, reads every entry back, and checks that a count above 8 is limited to 8.
module tb_cand_buf;
  import sbme_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic       rst_n = 0;
  logic       wr_en = 0, cnt_en = 0;
  logic [1:0] wr_ss = 0, rd_ss = 0;
  logic [2:0] wr_idx = 0, rd_idx = 0;
  mv_t        wr_mv = '0, rd_mv;
  logic [3:0] cnt_val = 0, rd_cnt;
  mv_t        model [4][8];
  int         mcnt [4];
  int checks = 0, failures = 0;

  cand_buf #(.MAX_SS(4), .MAX_VEC(8)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 4; s++) begin
      @(negedge clk); rd_ss = 2'(s); #1;
      checks++;
      if (rd_cnt != 0) begin failures++; $display("FAIL count %0d not cleared", s); end
    end
    for (int s = 0; s < 4; s++) begin
      for (int v = 0; v < 8; v++) begin
        model[s][v].x = MV_W'($urandom_range(0, 63));
        model[s][v].y = MV_W'($urandom_range(0, 63));
        @(negedge clk); wr_en = 1; wr_ss = 2'(s); wr_idx = 3'(v); wr_mv = model[s][v];
      end
      mcnt[s] = int'($urandom_range(1, 8));
      @(negedge clk); wr_en = 0; cnt_en = 1; cnt_val = 4'(mcnt[s]);
      @(negedge clk); cnt_en = 0;
    end
    for (int s = 0; s < 4; s++)
      for (int v = 0; v < 8; v++) begin
        @(negedge clk); rd_ss = 2'(s); rd_idx = 3'(v); #1;
        checks += 2;
        if (rd_mv != model[s][v]) begin failures++; $display("FAIL mv %0d/%0d", s, v); end
        if (int'(rd_cnt) != mcnt[s]) begin failures++; $display("FAIL cnt %0d", s); end
      end
    @(negedge clk); cnt_en = 1; wr_ss = 2; cnt_val = 4'd13;
    @(negedge clk); cnt_en = 0; rd_ss = 2; #1;
    checks++;
    if (rd_cnt != 4'd8) begin failures++; $display("FAIL count limit %0d", rd_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
