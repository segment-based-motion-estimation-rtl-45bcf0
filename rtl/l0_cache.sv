// l0_cache: level-0 cache holding the whole W x H search area of the reference frame.
//
// Any line of N consecutive pixels whose left pixel lies at column 0..W-N of any row can
// be read in a single access, which lets the kernel fetch the reference line for an
// arbitrary motion vector at N pixels per cycle without touching the data memory.
// Storage is H rows of W pixels. A read takes row rd_y and shifts it right by rd_x
// pixels; the result is registered, so rd_data follows rd_en by one cycle. Writes load
// N pixels into column group wr_col (pixels wr_col*N .. wr_col*N+N-1) of row wr_row.
//
// Follows the published design: 48x32 search area, 16-pixel lines at arbitrary positions,
// integer-pel positions (interpolation is not part of this design). This design's own
// choices: the row-wide organisation with a shifter, the aligned write port and the
// one-cycle read latency. The storage has no reset.
module l0_cache #(
  parameter int W     = 48,
  parameter int H     = 32,
  parameter int N     = 16,
  parameter int PIX_W = 8,
  localparam int XW   = $clog2(W),
  localparam int YW   = $clog2(H),
  localparam int CG   = W / N,
  localparam int CW   = (CG > 1) ? $clog2(CG) : 1
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [YW-1:0]                wr_row,
  input  logic [CW-1:0]                wr_col,
  input  logic [N-1:0][PIX_W-1:0]      wr_data,
  input  logic                         rd_en,
  input  logic [XW-1:0]                rd_x,
  input  logic [YW-1:0]                rd_y,
  output logic [N-1:0][PIX_W-1:0]      rd_data
);

  // Pixel 0 of a row is the leftmost one.
  logic [CG-1:0][N-1:0][PIX_W-1:0] mem [H];
  logic [W-1:0][PIX_W-1:0]         row;
  logic [N-1:0][PIX_W-1:0]         line;

  always_comb begin
    row = mem[rd_y];
    for (int i = 0; i < N; i++)
      line[i] = (int'(rd_x) + i < W) ? row[int'(rd_x) + i] : '0;
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_row][wr_col] <= wr_data;
    if (rd_en) rd_data <= line;
  end

  // A line must lie inside the search area.
  a_rd_in_range: assert property (@(posedge clk) rd_en |-> (int'(rd_x) <= W - N) && (int'(rd_y) < H));

endmodule
