// cand_buf: candidate-vector buffer of the current macro-block.
//
// Holds up to MAX_VEC candidate motion vectors for each of up to MAX_SS sub-segments,
// plus the number of candidates of each sub-segment. The system side writes vectors
// (wr_en, wr_ss, wr_idx, wr_mv) and counts (cnt_en, wr_ss, cnt_val) before it starts
// the kernel; the kernel reads them combinationally (rd_ss, rd_idx -> rd_mv, rd_cnt).
// Reset clears the counts; vectors are not reset since only counted ones are read.
//
// Follows the published design: up to 8 candidates per sub-segment, up to 4 sub-segments.
// This design's own choice: that the candidates are held in a small register file.
module cand_buf
  import sbme_pkg::mv_t;
#(
  parameter int MAX_SS  = 4,
  parameter int MAX_VEC = 8,
  localparam int SW = $clog2(MAX_SS),
  localparam int IW = $clog2(MAX_VEC),
  localparam int NW = $clog2(MAX_VEC + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          wr_en,
  input  logic [SW-1:0] wr_ss,
  input  logic [IW-1:0] wr_idx,
  input  mv_t           wr_mv,
  input  logic          cnt_en,
  input  logic [NW-1:0] cnt_val,
  input  logic [SW-1:0] rd_ss,
  input  logic [IW-1:0] rd_idx,
  output mv_t           rd_mv,
  output logic [NW-1:0] rd_cnt
);

  mv_t           vec [MAX_SS][MAX_VEC];
  logic [NW-1:0] cnt [MAX_SS];

  always_ff @(posedge clk) begin
    if (wr_en) vec[wr_ss][wr_idx] <= wr_mv;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MAX_SS; s++) cnt[s] <= '0;
    end else if (cnt_en) begin
      cnt[wr_ss] <= (cnt_val > NW'(MAX_VEC)) ? NW'(MAX_VEC) : cnt_val;
    end
  end

  assign rd_mv  = vec[rd_ss][rd_idx];
  assign rd_cnt = cnt[rd_ss];

endmodule
