// result_buf: first-in first-out buffer carrying block-SAD results from the kernel to
// the system controller, which integrates the sub-segment SADs into segment match
// penalties.
//
// Valid/ready on both sides: a word is pushed when in_valid and in_ready are both 1 and
// popped when out_valid and out_ready are both 1; a push and a pop may happen in the
// same cycle. out_data shows the oldest word whenever out_valid is 1. level counts the
// stored words. DEPTH must be a power of two.
//
// The published design says only that results are written into buffers for the system
// controller; the FIFO organisation and its depth (one macro-block's worth of results,
// 4 sub-segments x 8 vectors) are this design's choices.
module result_buf #(
  parameter int DEPTH = 32,
  parameter int DW    = 42,
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  output logic          in_ready,
  input  logic [DW-1:0] in_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic [DW-1:0] out_data,
  output logic [AW:0]   level
);

  logic [DW-1:0] mem [DEPTH];
  logic [AW:0]   wp, rp;
  logic          push, pop;

  assign level     = wp - rp;
  assign in_ready  = (level != (AW+1)'(DEPTH));
  assign out_valid = (level != '0);
  assign push      = in_valid & in_ready;
  assign pop       = out_valid & out_ready;
  assign out_data  = mem[rp[AW-1:0]];

  always_ff @(posedge clk) begin
    if (push) mem[wp[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop)  rp <= rp + 1'b1;
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) level <= (AW+1)'(DEPTH));

endmodule
