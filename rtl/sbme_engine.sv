// sbme_engine: segment-based motion estimation built on a block-based engine.
//
// The top level joins the macro-block engine (sbme_asip), which computes masked SADs of
// the sub-segments of one 16x16 macro-block at a time, with the match-penalty
// accumulation buffer (mp_accum), which sums those SADs over every macro-block a segment
// covers and picks each segment's best candidate vector at the end of an iteration.
// Memory traffic stays block-regular (one macro-block and its 48x32 search area at a
// time) while the vectors are found per segment of arbitrary shape.
//
// One iteration over a frame:
//   clear (pulse) and wait for busy_acc low;
//   for each macro-block: fill the three caches and the candidates, write the segment
//     number of each sub-segment (map_*), pulse start with nss, wait for done;
//   wait until the engine's result buffer has drained (res_pending low);
//   pulse select with nseg; best_* gives one segment per cycle; at select_done,
//   converged says whether the total match penalty failed to improve.
// The segment map may be rewritten for the next macro-block only once res_pending is
// low, since results still in the buffer are mapped when they leave it.
//
// Follows the published design: the caches, SAD unit and data flow of the engine, and the
// accumulation of sub-segment penalties per segment and candidate followed by the best-
// candidate selection and a convergence test. In the published design the sequencing and the
// accumulation run as software (on the VLIW core and the system controller); here they
// are hardware, which is this design's own choice, as are the fill ports.
module sbme_engine
  import sbme_pkg::*;
#(
  parameter int MAX_SEG = 1024,
  localparam int SEG_W  = $clog2(MAX_SEG),
  localparam int N   = MB_N,
  localparam int RW  = $clog2(N),
  localparam int YW  = $clog2(L0_H),
  localparam int CW  = $clog2(L0_W / N),
  localparam int IW  = $clog2(MAX_VEC),
  localparam int NW  = $clog2(MAX_VEC + 1),
  localparam int NSW = $clog2(MAX_SS + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // macro-block data
  input  logic                        mb_wr_en,
  input  logic [RW-1:0]               mb_wr_row,
  input  logic [N-1:0][PIX_W-1:0]     mb_wr_data,
  input  logic                        wc_wr_en,
  input  logic [RW-1:0]               wc_wr_row,
  input  logic [N-1:0][SSID_W-1:0]    wc_wr_ssid,
  input  logic [N-1:0]                wc_wr_wgt,
  input  logic                        l0_wr_en,
  input  logic [YW-1:0]               l0_wr_row,
  input  logic [CW-1:0]               l0_wr_col,
  input  logic [N-1:0][PIX_W-1:0]     l0_wr_data,
  input  logic                        cand_wr_en,
  input  logic [SSID_W-1:0]           cand_wr_ss,
  input  logic [IW-1:0]               cand_wr_idx,
  input  mv_t                         cand_wr_mv,
  input  logic                        cand_cnt_en,
  input  logic [NW-1:0]               cand_cnt_val,
  input  logic                        map_wr_en,
  input  logic [SSID_W-1:0]           map_ss,
  input  logic [SEG_W-1:0]            map_seg,
  // macro-block control
  input  logic                        start,
  input  logic [NSW-1:0]              nss,
  output logic                        busy,
  output logic                        done,
  output logic                        clamped,
  output logic                        res_pending,
  // iteration control
  input  logic                        clear,
  input  logic                        select,
  input  logic [SEG_W:0]              nseg,
  output logic                        busy_acc,
  output logic                        select_done,
  output logic                        converged,
  output logic [31:0]                 total_mp,
  // best candidate per segment
  output logic                        best_valid,
  output logic [SEG_W-1:0]            best_seg,
  output logic                        best_found,
  output logic [VIDX_W-1:0]           best_idx,
  output mv_t                         best_mv,
  output logic [31:0]                 best_mp
);

  logic    res_valid, res_ready;
  result_t res_data;

  assign res_pending = res_valid;

  sbme_asip u_asip (
    .clk, .rst_n,
    .mb_wr_en, .mb_wr_row, .mb_wr_data,
    .wc_wr_en, .wc_wr_row, .wc_wr_ssid, .wc_wr_wgt,
    .l0_wr_en, .l0_wr_row, .l0_wr_col, .l0_wr_data,
    .cand_wr_en, .cand_wr_ss, .cand_wr_idx, .cand_wr_mv, .cand_cnt_en, .cand_cnt_val,
    .start, .nss, .busy, .done, .clamped,
    .res_valid, .res_ready, .res_data
  );

  mp_accum #(.MAX_SEG(MAX_SEG), .MAX_VEC(MAX_VEC), .MP_W(32)) u_acc (
    .clk, .rst_n, .clear, .select, .nseg,
    .busy(busy_acc), .done(select_done), .converged, .total_mp,
    .map_wr_en, .map_ss, .map_seg,
    .in_valid(res_valid), .in_ready(res_ready), .in_res(res_data),
    .best_valid, .best_seg, .best_found, .best_idx, .best_mv, .best_mp
  );

endmodule
