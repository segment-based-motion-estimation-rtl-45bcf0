// mp_accum: match-penalty accumulation buffer and best-candidate selection for whole
// segments.
//
// The engine produces one SAD per (sub-segment of a macro-block, candidate). A segment
// usually spreads over many macro-blocks, so its match penalty for a candidate is the
// sum of the SADs of all its sub-segments for that candidate. This block keeps that sum
// for every segment of the frame and every candidate index, and at the end of an
// iteration picks for each segment the candidate with the smallest total.
//
// Use, once per iteration over the frame:
//   1. clear  : one pulse; empties the buffer (one segment row per cycle, MAX_SEG cycles).
//   2. for each macro-block: write the segment number of each of its sub-segments
//      (map_wr_en, map_ss, map_seg), then feed the engine's results (in_valid/in_ready,
//      in_res). A result adds its SAD to entry (map[in_res.ssid], in_res.vidx) and records
//      the vector of that entry. One result is taken per cycle while the block is idle.
//   3. select : one pulse with nseg = number of segments; the block scans segments
//      0..nseg-1, one per cycle, and emits for each (best_valid) the candidate with the
//      lowest total (lowest index on a tie; best_found = 0 if the segment got no result,
//      and best_idx and best_mv then mean nothing).
//      It adds the winning totals into total_mp. When the scan ends, done pulses and
//      converged tells whether total_mp failed to improve on the previous iteration's
//      (never true after the first selection following reset).
//
// Follows the published design: penalties accumulated per segment and candidate, selection of
// the best candidate per segment from the accumulated penalties, and convergence as
// "the average match penalty over all segments no longer improves" (the total is
// compared, which is the same test for a fixed number of segments). In the published design
// this runs on the system controller; doing it in hardware, the segment count, the
// widths and the scan order are this design's own choices.
module mp_accum
  import sbme_pkg::mv_t, sbme_pkg::result_t, sbme_pkg::SSID_W, sbme_pkg::VIDX_W;
#(
  parameter int MAX_SEG = 1024,
  parameter int MAX_VEC = 8,
  parameter int MP_W    = 32,
  localparam int SEG_W  = $clog2(MAX_SEG),
  localparam int NSS    = 1 << SSID_W
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              select,
  input  logic [SEG_W:0]    nseg,
  output logic              busy,
  output logic              done,
  output logic              converged,
  output logic [MP_W-1:0]   total_mp,
  // sub-segment to segment map of the current macro-block
  input  logic              map_wr_en,
  input  logic [SSID_W-1:0] map_ss,
  input  logic [SEG_W-1:0]  map_seg,
  // results from the engine
  input  logic              in_valid,
  output logic              in_ready,
  input  result_t           in_res,
  // best candidate per segment
  output logic              best_valid,
  output logic [SEG_W-1:0]  best_seg,
  output logic              best_found,
  output logic [VIDX_W-1:0] best_idx,
  output mv_t               best_mv,
  output logic [MP_W-1:0]   best_mp
);

  typedef enum logic [1:0] {S_IDLE, S_CLEAR, S_SELECT} state_t;
  state_t state;

  logic [MAX_VEC-1:0][MP_W-1:0] mp_mem [MAX_SEG];
  mv_t  [MAX_VEC-1:0]           mv_mem [MAX_SEG];
  logic [MAX_VEC-1:0]           vld    [MAX_SEG];
  logic [SEG_W-1:0]             seg_map [NSS];

  logic [SEG_W:0]   cnt;
  logic [SEG_W:0]   nseg_q;
  logic [MP_W-1:0]  prev_total;
  logic             have_prev;

  logic [SEG_W-1:0] acc_seg;
  logic [SEG_W-1:0] scan_seg;
  assign acc_seg  = seg_map[in_res.ssid];
  assign scan_seg = cnt[SEG_W-1:0];

  // Arg-min over the valid entries of the segment being scanned.
  logic              min_found;
  logic [VIDX_W-1:0] min_idx;
  logic [MP_W-1:0]   min_mp;
  always_comb begin
    min_found = 1'b0;
    min_idx   = '0;
    min_mp    = '1;
    for (int v = 0; v < MAX_VEC; v++) begin
      if (vld[scan_seg][v] && (!min_found || mp_mem[scan_seg][v] < min_mp)) begin
        min_found = 1'b1;
        min_idx   = VIDX_W'(v);
        min_mp    = mp_mem[scan_seg][v];
      end
    end
  end

  assign busy     = (state != S_IDLE);
  assign in_ready = (state == S_IDLE) && !clear && !select;

  always_ff @(posedge clk) begin
    if (map_wr_en) seg_map[map_ss] <= map_seg;
  end

  // Buffer storage: cleared a row at a time, accumulated an entry at a time.
  always_ff @(posedge clk) begin
    if (state == S_CLEAR) begin
      vld[scan_seg]    <= '0;
      mp_mem[scan_seg] <= '0;
    end else if (in_valid && in_ready) begin
      vld[acc_seg][in_res.vidx]    <= 1'b1;
      mp_mem[acc_seg][in_res.vidx] <= mp_mem[acc_seg][in_res.vidx] + MP_W'(in_res.sad);
      mv_mem[acc_seg][in_res.vidx] <= in_res.mv;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cnt        <= '0;
      nseg_q     <= '0;
      done       <= 1'b0;
      converged  <= 1'b0;
      total_mp   <= '0;
      prev_total <= '0;
      have_prev  <= 1'b0;
      best_valid <= 1'b0;
      best_seg   <= '0;
      best_found <= 1'b0;
      best_idx   <= '0;
      best_mv    <= '0;
      best_mp    <= '0;
    end else begin
      done       <= 1'b0;
      best_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (clear) state <= S_CLEAR;
          else if (select) begin
            nseg_q   <= (nseg > (SEG_W+1)'(MAX_SEG)) ? (SEG_W+1)'(MAX_SEG) : nseg;
            total_mp <= '0;
            state    <= S_SELECT;
          end
        end
        S_CLEAR: begin
          cnt <= cnt + 1'b1;
          if (cnt == (SEG_W+1)'(MAX_SEG - 1)) state <= S_IDLE;
        end
        S_SELECT: begin
          if (cnt >= nseg_q) begin
            converged  <= have_prev && (total_mp >= prev_total);
            prev_total <= total_mp;
            have_prev  <= 1'b1;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else begin
            best_valid <= 1'b1;
            best_seg   <= scan_seg;
            best_found <= min_found;
            best_idx   <= min_idx;
            best_mv    <= mv_mem[scan_seg][min_idx];
            best_mp    <= min_found ? min_mp : '0;
            if (min_found) total_mp <= total_mp + min_mp;
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_in_map: assert property (@(posedge clk) disable iff (!rst_n)
                             in_valid && in_ready |-> int'(acc_seg) < MAX_SEG);

endmodule
