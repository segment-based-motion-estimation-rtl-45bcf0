// tb_result_buf: self-checking test of the result FIFO.
// Pushes and pops random words with random valid and ready patterns against a queue
// model, fills it completely to check that in_ready drops at DEPTH entries and that
// nothing is lost, then drains it and checks that out_valid drops when empty.
module tb_result_buf;
  localparam int DEPTH = 32, DW = 42;
  logic clk = 0;
  always #5 clk = ~clk;

  logic          rst_n = 0;
  logic          in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [DW-1:0] in_data = '0, out_data;
  logic [5:0]    level;
  logic [DW-1:0] q [$];
  int checks = 0, failures = 0;
  bit full_seen = 0;

  result_buf #(.DEPTH(DEPTH), .DW(DW)) dut (.*);

  always @(posedge clk) if (rst_n) begin
    checks++;
    if (int'(level) != q.size()) begin failures++; $display("FAIL level %0d model %0d", level, q.size()); end
    if (in_ready != (q.size() < DEPTH)) begin failures++; $display("FAIL in_ready"); end
    if (q.size() == DEPTH) full_seen = 1;
    if (out_valid && out_ready) begin
      checks++;
      if (q.size() == 0 || out_data != q[0]) begin failures++; $display("FAIL data"); end
      else void'(q.pop_front());
    end
    if (in_valid && in_ready) q.push_back(in_data);
  end

  task automatic run(int cycles, int p_in, int p_out);
    repeat (cycles) begin
      @(negedge clk);
      in_valid  = ($urandom_range(0, 99) < p_in);
      in_data   = {$urandom, $urandom};
      out_ready = ($urandom_range(0, 99) < p_out);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(300, 50, 50);
    run(100, 90, 10);   // fill up
    run(200, 10, 90);   // drain
    run(50, 0, 100);
    @(negedge clk); in_valid = 0; out_ready = 0;
    @(negedge clk);
    checks += 2;
    if (!full_seen) begin failures++; $display("FAIL never full"); end
    if (out_valid)  begin failures++; $display("FAIL not empty"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
