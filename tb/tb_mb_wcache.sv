// tb_mb_wcache: self-checking test of the macro-block weight cache.
// Loads random sub-segment IDs and weights, then reads every line for every cssid and
// compares the mask with one computed here: a pixel is in the mask when its ID equals
// cssid and its weight is non-zero. Also checks that the weights pass through.
module tb_mb_wcache;
  localparam int N = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                wr_en = 0, rd_en = 0;
  logic [3:0]          wr_row = 0, rd_row = 0;
  logic [N-1:0][1:0]   wr_ssid = '0;
  logic [N-1:0][0:0]   wr_wgt = '0, rd_wgt;
  logic [1:0]          cssid = 0;
  logic [N-1:0]        rd_mask;
  logic [1:0]          m_ssid [N][N];
  logic                m_wgt  [N][N];
  int checks = 0, failures = 0;

  mb_wcache #(.N(N), .SSID_W(2), .WGT_W(1)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) begin
      for (int i = 0; i < N; i++) begin
        m_ssid[r][i] = 2'($urandom);
        m_wgt[r][i]  = ($urandom_range(0, 7) != 0);
        wr_ssid[i] = m_ssid[r][i];
        wr_wgt[i]  = m_wgt[r][i];
      end
      @(negedge clk); wr_en = 1; wr_row = 4'(r);
      @(negedge clk); wr_en = 0;
    end
    for (int s = 0; s < 4; s++) begin
      for (int r = 0; r < N; r++) begin
        logic [N-1:0] exp_mask;
        @(negedge clk); rd_en = 1; rd_row = 4'(r); cssid = 2'(s);
        @(negedge clk); rd_en = 0; cssid = 2'(s + 1);  // must be sampled with rd_en
        for (int i = 0; i < N; i++) exp_mask[i] = (m_ssid[r][i] == 2'(s)) && m_wgt[r][i];
        checks++;
        if (rd_mask !== exp_mask) begin
          failures++;
          $display("FAIL ss %0d row %0d: mask %h exp %h", s, r, rd_mask, exp_mask);
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (rd_wgt[i][0] !== m_wgt[r][i]) failures++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
