// mb_cache: macro-block cache holding the N x N pixels of the current macro-block of
// the current frame.
//
// The macro-block is loaded one N-pixel line per write and read back one line per
// cycle, which feeds the SAD unit at its full rate of N pixels per cycle. Storage is a
// plain array of N lines; the read is registered, so rd_data holds line rd_row one
// cycle after rd_en and keeps it until the next read. The storage has no reset: it is
// always filled before it is read.
//
// Follows the published design: 16x16 macro-block, 16 pixels per access. This design's own
// choices: the 8-bit pixel, the line-wide write port and the one-cycle read latency.
module mb_cache #(
  parameter int N     = 16,
  parameter int PIX_W = 8
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [$clog2(N)-1:0]         wr_row,
  input  logic [N-1:0][PIX_W-1:0]      wr_data,
  input  logic                         rd_en,
  input  logic [$clog2(N)-1:0]         rd_row,
  output logic [N-1:0][PIX_W-1:0]      rd_data
);

  logic [N-1:0][PIX_W-1:0] mem [N];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row] <= wr_data;
    if (rd_en) rd_data <= mem[rd_row];
  end

endmodule
