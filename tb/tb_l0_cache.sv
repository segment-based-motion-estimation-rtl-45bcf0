// tb_l0_cache: self-checking test of the level-0 search-area cache.
// Fills the 48x32 area with random pixels through the 16-pixel write port, then reads
// lines at every x offset 0..32 of random rows and at random positions, comparing each
// pixel with the model, and checks the one-cycle read latency.
module tb_l0_cache;
  localparam int W = 48, H = 32, N = 16, PIX_W = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                    wr_en = 0, rd_en = 0;
  logic [4:0]              wr_row = 0, rd_y = 0;
  logic [1:0]              wr_col = 0;
  logic [5:0]              rd_x = 0;
  logic [N-1:0][PIX_W-1:0] wr_data = '0, rd_data;
  logic [PIX_W-1:0]        area [H][W];
  int checks = 0, failures = 0;

  l0_cache #(.W(W), .H(H), .N(N), .PIX_W(PIX_W)) dut (.*);

  task automatic check_at(int x, int y);
    @(negedge clk); rd_en = 1; rd_x = 6'(x); rd_y = 5'(y);
    @(negedge clk); rd_en = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (rd_data[i] !== area[y][x + i]) begin
        failures++;
        if (failures < 10) $display("FAIL (%0d,%0d) pixel %0d: %h exp %h", x, y, i, rd_data[i], area[y][x + i]);
      end
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = 0; y < H; y++)
      for (int c = 0; c < W / N; c++) begin
        for (int i = 0; i < N; i++) begin
          area[y][c * N + i] = PIX_W'($urandom);
          wr_data[i] = area[y][c * N + i];
        end
        @(negedge clk); wr_en = 1; wr_row = 5'(y); wr_col = 2'(c);
        @(negedge clk); wr_en = 0;
      end
    for (int x = 0; x <= W - N; x++) check_at(x, int'($urandom_range(0, H - 1)));
    for (int k = 0; k < 100; k++) check_at(int'($urandom_range(0, W - N)), int'($urandom_range(0, H - 1)));
    check_at(W - N, H - 1);
    check_at(0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
