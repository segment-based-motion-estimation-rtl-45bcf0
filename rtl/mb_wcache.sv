// mb_wcache: macro-block weight cache. For each pixel of the current macro-block it
// holds the 2-bit ID of the sub-segment the pixel belongs to and the pixel's weight.
//
// A read returns one line: rd_mask[i] is 1 when pixel i of the line belongs to the
// current sub-segment cssid and has a non-zero weight, which is the binary mask w_mask
// the SAD unit applies. Pixels of segments dropped because a block may hold at most
// four sub-segments are stored with weight 0 and so never count. The weights are also
// passed on unchanged (rd_wgt) for a future weighted SAD. Reads are registered: the
// outputs follow rd_en by one cycle, and cssid is sampled with rd_en.
//
// Follows the published design: 2 bits of sub-segment ID per pixel, up to 4 sub-segments, the
// mask generated from cssid. This design's own choices: a 1-bit weight, the line-wide
// write port, the one-cycle read latency.
module mb_wcache #(
  parameter int N      = 16,
  parameter int SSID_W = 2,
  parameter int WGT_W  = 1
) (
  input  logic                         clk,
  input  logic                         wr_en,
  input  logic [$clog2(N)-1:0]         wr_row,
  input  logic [N-1:0][SSID_W-1:0]     wr_ssid,
  input  logic [N-1:0][WGT_W-1:0]      wr_wgt,
  input  logic                         rd_en,
  input  logic [$clog2(N)-1:0]         rd_row,
  input  logic [SSID_W-1:0]            cssid,
  output logic [N-1:0]                 rd_mask,
  output logic [N-1:0][WGT_W-1:0]      rd_wgt
);

  logic [N-1:0][SSID_W-1:0] ssid_mem [N];
  logic [N-1:0][WGT_W-1:0]  wgt_mem  [N];
  logic [N-1:0]             mask_d;

  always_comb begin
    for (int i = 0; i < N; i++)
      mask_d[i] = (ssid_mem[rd_row][i] == cssid) && (wgt_mem[rd_row][i] != '0);
  end

  always_ff @(posedge clk) begin
    if (wr_en) begin
      ssid_mem[wr_row] <= wr_ssid;
      wgt_mem[wr_row]  <= wr_wgt;
    end
    if (rd_en) begin
      rd_mask <= mask_d;
      rd_wgt  <= wgt_mem[rd_row];
    end
  end

endmodule
