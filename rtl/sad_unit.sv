// sad_unit: masked sum of absolute differences over a macro-block, N pixel pairs per
// cycle.
//
// Each cycle a line of the current block (cur), the matching line of the reference
// search area (refl) and the sub-segment mask of the line are accepted. Pixels whose
// mask bit is 0 contribute nothing, so the sum covers only the pixels of the current
// sub-segment:  SAD = sum over the block of |cur - ref| * mask.  Besides the SAD the
// unit counts the masked-in pixels (wsum), the accumulated weight of the sub-segment.
//
// Pipeline (3 stages, one line per cycle, no bubbles needed between blocks):
//   1. per-pixel absolute difference, masked, and mask bits registered;
//   2. adder tree over the N differences and popcount of the mask, registered;
//   3. accumulation; in_first restarts the sums, in_last marks the block's end.
// out_valid pulses for one cycle three cycles after the line flagged in_last was
// accepted; sad and wsum then hold the block result until the next block ends.
//
// Follows the published design: 16 pixels in parallel, a third (mask) input, accumulation over
// the 16 lines of the block. This design's own choices: the pipeline depth, the first/
// last flags and the pixel count as accumulated weight.
module sad_unit #(
  parameter int N      = 16,
  parameter int PIX_W  = 8,
  parameter int ROWS   = 16,
  localparam int LSUM_W = PIX_W + $clog2(N) + 1,
  localparam int SAD_W  = PIX_W + $clog2(N * ROWS),
  localparam int CNT_W  = $clog2(N + 1),
  localparam int WSUM_W = $clog2(N * ROWS + 1)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic                    in_first,
  input  logic                    in_last,
  input  logic [N-1:0][PIX_W-1:0] cur,
  input  logic [N-1:0][PIX_W-1:0] refl,
  input  logic [N-1:0]            mask,
  output logic                    out_valid,
  output logic [SAD_W-1:0]        sad,
  output logic [WSUM_W-1:0]       wsum
);

  // Stage 1
  logic [N-1:0][PIX_W-1:0] ad_q;
  logic [N-1:0]            m_q;
  logic                    v1, f1, l1;
  // Stage 2
  logic [LSUM_W-1:0]       lsum_d, lsum_q;
  logic [CNT_W-1:0]        cnt_d, cnt_q;
  logic                    v2, f2, l2;

  always_ff @(posedge clk) begin
    for (int i = 0; i < N; i++) begin
      if (!mask[i])            ad_q[i] <= '0;
      else if (cur[i] >= refl[i]) ad_q[i] <= cur[i] - refl[i];
      else                     ad_q[i] <= refl[i] - cur[i];
    end
    m_q <= mask;
  end

  always_comb begin
    lsum_d = '0;
    cnt_d  = '0;
    for (int i = 0; i < N; i++) begin
      lsum_d = lsum_d + LSUM_W'(ad_q[i]);
      cnt_d  = cnt_d + CNT_W'(m_q[i]);
    end
  end

  always_ff @(posedge clk) begin
    lsum_q <= lsum_d;
    cnt_q  <= cnt_d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {v1, f1, l1} <= '0;
      {v2, f2, l2} <= '0;
      out_valid    <= 1'b0;
      sad          <= '0;
      wsum         <= '0;
    end else begin
      v1 <= in_valid;
      f1 <= in_valid & in_first;
      l1 <= in_valid & in_last;
      v2 <= v1;
      f2 <= f1;
      l2 <= l1;
      out_valid <= v2 & l2;
      if (v2) begin
        if (f2) begin
          sad  <= SAD_W'(lsum_q);
          wsum <= WSUM_W'(cnt_q);
        end else begin
          sad  <= sad + SAD_W'(lsum_q);
          wsum <= wsum + WSUM_W'(cnt_q);
        end
      end
    end
  end

endmodule
