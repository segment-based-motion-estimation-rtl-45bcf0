// tb_mb_cache: self-checking test of the macro-block cache.
// Writes 16 random lines, reads them back in a random order and checks every pixel and
// the one-cycle read latency; then overwrites lines and checks that only they changed.
module tb_mb_cache;
  localparam int N = 16, PIX_W = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                    wr_en = 0, rd_en = 0;
  logic [3:0]              wr_row = 0, rd_row = 0;
  logic [N-1:0][PIX_W-1:0] wr_data = '0, rd_data;
  logic [N-1:0][PIX_W-1:0] model [N];
  int checks = 0, failures = 0;

  mb_cache #(.N(N), .PIX_W(PIX_W)) dut (.*);

  task automatic write_line(int r);
    for (int i = 0; i < N; i++) model[r][i] = PIX_W'($urandom);
    @(negedge clk); wr_en = 1; wr_row = 4'(r); wr_data = model[r];
    @(negedge clk); wr_en = 0;
  endtask

  task automatic check_line(int r);
    @(negedge clk); rd_en = 1; rd_row = 4'(r);
    @(negedge clk); rd_en = 0;
    checks++;
    if (rd_data !== model[r]) begin
      failures++;
      $display("FAIL row %0d: got %h exp %h", r, rd_data, model[r]);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < N; r++) write_line(r);
    for (int k = 0; k < 64; k++) check_line(int'($urandom_range(0, N - 1)));
    for (int k = 0; k < 4; k++) write_line(int'($urandom_range(0, N - 1)));
    for (int r = 0; r < N; r++) check_line(r);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
