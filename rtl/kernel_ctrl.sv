// kernel_ctrl: sequencer of the motion-estimation kernel for one macro-block.
//
// With the current macro-block, its sub-segment map and its search area loaded in the
// caches and the candidates in the candidate buffer, a start pulse runs the loops
//   for each sub-segment ss < nss:
//     for each candidate vector v of ss:
//       read the vector; for each of the N lines of the block read the current line,
//       the mask line for cssid = ss and the reference line displaced by the vector;
//       let the SAD unit accumulate; store (ss, v, vector, SAD, weight) as a result.
// The macro-block sits in the centre of the search area, at (X0, Y0) = ((W-N)/2,
// (H-N)/2), so a vector (mx, my) reads reference lines at x = X0+mx, y = Y0+my+row.
// A vector that would leave the search area is clamped to its border; the clamped
// vector is the one reported, and the clamped output pulses.
//
// Timing: one cycle to read a vector, N cycles of line reads, the 1-cycle cache and
// 3-cycle SAD latency, one cycle to hand the result over: N + 6 cycles per vector
// (22 for N = 16) when the result buffer has room. When it is full (res_ready low) the
// sequencer holds the result and waits. done pulses one cycle after the last result is
// accepted. sad_valid/first/last are delayed by one cycle to line up with the cache
// outputs. A sub-segment with zero candidates is skipped.
//
// Follows the published design: the loop nest over sub-segments, vectors and block lines, and
// the use of the sub-segment ID as cssid. In the published design a program on a VLIW core runs
// these loops; this hardwired sequencer, the centred placement, the clamping and the
// one-vector-at-a-time schedule are this design's own choices.
module kernel_ctrl
  import sbme_pkg::mv_t, sbme_pkg::result_t, sbme_pkg::MV_W, sbme_pkg::SSID_W, sbme_pkg::VIDX_W, sbme_pkg::SAD_W, sbme_pkg::WSUM_W;
#(
  parameter int N       = 16,
  parameter int W       = 48,
  parameter int H       = 32,
  parameter int MAX_SS  = 4,
  parameter int MAX_VEC = 8,
  localparam int RW  = $clog2(N),
  localparam int XW  = $clog2(W),
  localparam int YW  = $clog2(H),
  localparam int SW  = $clog2(MAX_SS),
  localparam int IW  = $clog2(MAX_VEC),
  localparam int NW  = $clog2(MAX_VEC + 1),
  localparam int NSW = $clog2(MAX_SS + 1),
  localparam int SAD_BITS  = 8 + $clog2(N * N),
  localparam int WSUM_BITS = $clog2(N * N + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [NSW-1:0]       nss,
  output logic                 busy,
  output logic                 done,
  output logic                 clamped,
  // candidate buffer
  output logic [SW-1:0]        cand_ss,
  output logic [IW-1:0]        cand_idx,
  input  mv_t                  cand_mv,
  input  logic [NW-1:0]        cand_cnt,
  // cache reads
  output logic                 rd_en,
  output logic [RW-1:0]        rd_row,
  output logic [XW-1:0]        l0_x,
  output logic [YW-1:0]        l0_y,
  output logic [SW-1:0]        cssid,
  // SAD unit
  output logic                 sad_valid,
  output logic                 sad_first,
  output logic                 sad_last,
  input  logic                 sad_done,
  input  logic [SAD_BITS-1:0]  sad,
  input  logic [WSUM_BITS-1:0] wsum,
  // result buffer
  output logic                 res_valid,
  input  logic                 res_ready,
  output result_t              res_data
);

  localparam int X0 = (W - N) / 2;
  localparam int Y0 = (H - N) / 2;

  typedef enum logic [2:0] {S_IDLE, S_VEC, S_LINES, S_WAIT, S_PUSH, S_DONE} state_t;
  state_t state;

  logic [NSW-1:0] nss_q;
  logic [SW-1:0]  ss;
  logic [IW-1:0]  vi;
  logic [RW-1:0]  row;
  logic [XW-1:0]  x0_q;
  logic [YW-1:0]  y0_q;
  mv_t            mv_q;
  result_t        res_q;

  // Clamp the candidate to the search area.
  int  mx, my;
  logic clip;
  always_comb begin
    mx = int'(cand_mv.x);
    my = int'(cand_mv.y);
    clip = 1'b0;
    if (mx < -X0) begin mx = -X0; clip = 1'b1; end
    if (mx >  X0) begin mx =  X0; clip = 1'b1; end
    if (my < -Y0) begin my = -Y0; clip = 1'b1; end
    if (my >  Y0) begin my =  Y0; clip = 1'b1; end
  end

  logic last_vec, last_ss;
  assign last_ss  = (int'(ss) + 1 >= int'(nss_q));
  assign last_vec = (int'(vi) + 1 >= int'(cand_cnt));

  assign cand_ss  = ss;
  assign cand_idx = vi;
  assign busy     = (state != S_IDLE);
  assign done     = (state == S_DONE);
  assign rd_en    = (state == S_LINES);
  assign rd_row   = row;
  assign l0_x     = x0_q;
  assign l0_y     = y0_q + YW'(row);
  assign cssid    = ss;
  assign res_valid = (state == S_PUSH);
  assign res_data  = res_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      nss_q     <= '0;
      ss        <= '0;
      vi        <= '0;
      row       <= '0;
      x0_q      <= '0;
      y0_q      <= '0;
      mv_q      <= '0;
      res_q     <= '0;
      clamped   <= 1'b0;
      sad_valid <= 1'b0;
      sad_first <= 1'b0;
      sad_last  <= 1'b0;
    end else begin
      clamped   <= 1'b0;
      // Flags travel one cycle behind the read, like the cache data.
      sad_valid <= rd_en;
      sad_first <= rd_en && (row == '0);
      sad_last  <= rd_en && (row == RW'(N - 1));
      unique case (state)
        S_IDLE: if (start) begin
          nss_q <= (nss == '0) ? NSW'(1) : ((int'(nss) > MAX_SS) ? NSW'(MAX_SS) : nss);
          ss    <= '0;
          vi    <= '0;
          state <= S_VEC;
        end
        S_VEC: begin
          if (int'(vi) >= int'(cand_cnt)) begin
            // No (more) candidates for this sub-segment.
            vi <= '0;
            if (last_ss) state <= S_DONE;
            else ss <= ss + 1'b1;
          end else begin
            mv_q.x  <= MV_W'(mx);
            mv_q.y  <= MV_W'(my);
            x0_q    <= XW'(X0 + mx);
            y0_q    <= YW'(Y0 + my);
            clamped <= clip;
            row     <= '0;
            state   <= S_LINES;
          end
        end
        S_LINES: begin
          row <= row + 1'b1;
          if (row == RW'(N - 1)) state <= S_WAIT;
        end
        S_WAIT: if (sad_done) begin
          res_q.ssid <= SSID_W'(ss);
          res_q.vidx <= VIDX_W'(vi);
          res_q.mv   <= mv_q;
          res_q.sad  <= SAD_W'(sad);
          res_q.wsum <= WSUM_W'(wsum);
          state      <= S_PUSH;
        end
        S_PUSH: if (res_ready) begin
          if (last_vec) begin
            vi <= '0;
            if (last_ss) state <= S_DONE;
            else begin
              ss    <= ss + 1'b1;
              state <= S_VEC;
            end
          end else begin
            vi    <= vi + 1'b1;
            state <= S_VEC;
          end
        end
        S_DONE: state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_result_held: assert property (@(posedge clk) disable iff (!rst_n)
                                  res_valid && !res_ready |=> res_valid && $stable(res_data));

endmodule
