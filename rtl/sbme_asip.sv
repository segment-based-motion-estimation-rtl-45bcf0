// sbme_asip: block-based engine for segment-based motion estimation.
//
// Segments of arbitrary shape are matched with block-regular memory traffic: the frame
// is processed in 16x16 macro-blocks, each holding parts ("sub-segments") of at most
// four segments. For every sub-segment of the macro-block and every candidate vector of
// it, the engine computes the SAD over the pixels of that sub-segment only, using a
// per-pixel sub-segment map to mask out the other pixels. The system controller adds
// the sub-segment SADs of a segment over all macro-blocks it covers into the segment's
// match penalty and picks the best vector; that is outside this module.
//
// Data flow per cycle (one 16-pixel line): the MB cache gives a line of the current
// block, the MB wcache the mask of that line for the current sub-segment, the L0 cache
// the reference line displaced by the candidate vector; the SAD unit masks, sums and
// accumulates; kernel_ctrl sequences the loops and pushes one result per vector into
// the result buffer.
//
// Use: fill the three caches (mb_wr_*, wc_wr_*, l0_wr_*) and the candidates
// (cand_wr_*, cand_cnt_*), pulse start with nss = number of sub-segments (1..4), then
// read results from res_* (valid/ready) until done. busy is high from start to done.
// The caches may only be rewritten while busy is low. Each vector takes 22 cycles when
// the result stream is not stalled. Ordinary block-based motion estimation is the case
// nss = 1 with all pixels in sub-segment 0 at weight 1.
//
// Follows the published design: the four application-specific units, their sizes and the data
// flow between them. This design's own choices: a hardwired sequencer in place of the
// VLIW processor that runs the loops in the published design, plain write ports for filling the
// caches, and the result FIFO.
module sbme_asip
  import sbme_pkg::*;
#(
  parameter int N       = MB_N,
  parameter int W       = L0_W,
  parameter int H       = L0_H,
  parameter int MAX_VEC_P = MAX_VEC,
  parameter int RES_DEPTH = 32,
  localparam int RW  = $clog2(N),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int CW  = ((W / N) > 1) ? $clog2(W / N) : 1,
  localparam int IW  = $clog2(MAX_VEC_P),
  localparam int NW  = $clog2(MAX_VEC_P + 1),
  localparam int NSW = $clog2(MAX_SS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // MB cache fill
  input  logic                        mb_wr_en,
  input  logic [RW-1:0]               mb_wr_row,
  input  logic [N-1:0][PIX_W-1:0]     mb_wr_data,
  // MB wcache fill
  input  logic                        wc_wr_en,
  input  logic [RW-1:0]               wc_wr_row,
  input  logic [N-1:0][SSID_W-1:0]    wc_wr_ssid,
  input  logic [N-1:0]                wc_wr_wgt,
  // L0 cache fill
  input  logic                        l0_wr_en,
  input  logic [YW-1:0]               l0_wr_row,
  input  logic [CW-1:0]               l0_wr_col,
  input  logic [N-1:0][PIX_W-1:0]     l0_wr_data,
  // candidate buffer fill
  input  logic                        cand_wr_en,
  input  logic [SSID_W-1:0]           cand_wr_ss,
  input  logic [IW-1:0]               cand_wr_idx,
  input  mv_t                         cand_wr_mv,
  input  logic                        cand_cnt_en,
  input  logic [NW-1:0]               cand_cnt_val,
  // control
  input  logic                        start,
  input  logic [NSW-1:0]              nss,
  output logic                        busy,
  output logic                        done,
  output logic                        clamped,
  // results
  output logic                        res_valid,
  input  logic                        res_ready,
  output result_t                     res_data
);

  localparam int SAD_BITS  = 8 + $clog2(N * N);
  localparam int WSUM_BITS = $clog2(N * N + 1);

  logic [SSID_W-1:0]          cand_ss, cssid;
  logic [IW-1:0]              cand_idx;
  mv_t                        cand_mv;
  logic [NW-1:0]              cand_cnt;
  logic                       rd_en;
  logic [RW-1:0]              rd_row;
  logic [XW-1:0]              l0_x;
  logic [YW-1:0]              l0_y;
  logic [N-1:0][PIX_W-1:0]    cur_line, ref_line;
  logic [N-1:0]               mask_line;
  logic [N-1:0][0:0]          wgt_line;
  logic                       sad_valid, sad_first, sad_last, sad_done;
  logic [SAD_BITS-1:0]        sad;
  logic [WSUM_BITS-1:0]       wsum;
  logic                       k_res_valid, k_res_ready;
  result_t                    k_res_data;
  logic [$clog2(RES_DEPTH):0] res_level;

  mb_cache #(.N(N), .PIX_W(PIX_W)) u_mb_cache (
    .clk, .wr_en(mb_wr_en), .wr_row(mb_wr_row), .wr_data(mb_wr_data),
    .rd_en, .rd_row, .rd_data(cur_line)
  );

  mb_wcache #(.N(N), .SSID_W(SSID_W), .WGT_W(1)) u_mb_wcache (
    .clk, .wr_en(wc_wr_en), .wr_row(wc_wr_row), .wr_ssid(wc_wr_ssid), .wr_wgt(wc_wr_wgt),
    .rd_en, .rd_row, .cssid, .rd_mask(mask_line), .rd_wgt(wgt_line)
  );

  l0_cache #(.W(W), .H(H), .N(N), .PIX_W(PIX_W)) u_l0_cache (
    .clk, .wr_en(l0_wr_en), .wr_row(l0_wr_row), .wr_col(l0_wr_col), .wr_data(l0_wr_data),
    .rd_en, .rd_x(l0_x), .rd_y(l0_y), .rd_data(ref_line)
  );

  sad_unit #(.N(N), .PIX_W(PIX_W), .ROWS(N)) u_sad (
    .clk, .rst_n, .in_valid(sad_valid), .in_first(sad_first), .in_last(sad_last),
    .cur(cur_line), .refl(ref_line), .mask(mask_line),
    .out_valid(sad_done), .sad, .wsum
  );

  cand_buf #(.MAX_SS(MAX_SS), .MAX_VEC(MAX_VEC_P)) u_cand_buf (
    .clk, .rst_n, .wr_en(cand_wr_en), .wr_ss(cand_wr_ss), .wr_idx(cand_wr_idx),
    .wr_mv(cand_wr_mv), .cnt_en(cand_cnt_en), .cnt_val(cand_cnt_val),
    .rd_ss(cand_ss), .rd_idx(cand_idx), .rd_mv(cand_mv), .rd_cnt(cand_cnt)
  );

  kernel_ctrl #(.N(N), .W(W), .H(H), .MAX_SS(MAX_SS), .MAX_VEC(MAX_VEC_P)) u_ctrl (
    .clk, .rst_n, .start, .nss, .busy, .done, .clamped,
    .cand_ss, .cand_idx, .cand_mv, .cand_cnt,
    .rd_en, .rd_row, .l0_x, .l0_y, .cssid,
    .sad_valid, .sad_first, .sad_last, .sad_done, .sad, .wsum,
    .res_valid(k_res_valid), .res_ready(k_res_ready), .res_data(k_res_data)
  );

  result_buf #(.DEPTH(RES_DEPTH), .DW(RESULT_W)) u_result_buf (
    .clk, .rst_n,
    .in_valid(k_res_valid), .in_ready(k_res_ready), .in_data(k_res_data),
    .out_valid(res_valid), .out_ready(res_ready), .out_data(res_data),
    .level(res_level)
  );

endmodule
