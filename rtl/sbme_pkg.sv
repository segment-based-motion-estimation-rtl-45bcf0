// sbme_pkg: types and constants shared by the segment-based motion-estimation engine.
//
// The engine evaluates candidate motion vectors for the sub-segments of one 16x16
// macro-block. The sizes below are the ones of the main configuration: 16x16 macro-
// blocks, a 48x32-pixel search area, up to 4 sub-segments per macro-block (2-bit
// sub-segment IDs) and up to 8 candidate vectors per sub-segment. The pixel width
// (8 bits), the motion-vector encoding (6-bit two's complement per component) and the
// layout of a result word are this design's own choices.
package sbme_pkg;

  localparam int PIX_W   = 8;   // bits per luminance pixel
  localparam int MB_N    = 16;  // macro-block side and line length in pixels
  localparam int L0_W    = 48;  // search area width
  localparam int L0_H    = 32;  // search area height
  localparam int MAX_SS  = 4;   // sub-segments per macro-block
  localparam int MAX_VEC = 8;   // candidate vectors per sub-segment
  localparam int SSID_W  = 2;
  localparam int VIDX_W  = 3;
  localparam int MV_W    = 6;   // bits per motion-vector component
  localparam int SAD_W   = 16;  // holds 256 * 255
  localparam int WSUM_W  = 9;   // holds 256

  typedef logic [PIX_W-1:0] pixel_t;

  // Integer-pel motion vector.
  typedef struct packed {
    logic signed [MV_W-1:0] x;
    logic signed [MV_W-1:0] y;
  } mv_t;

  // One block-SAD result as sent back to the system controller.
  typedef struct packed {
    logic [SSID_W-1:0] ssid;     // sub-segment of the macro-block
    logic [VIDX_W-1:0] vidx;     // index of the candidate
    mv_t               mv;       // vector actually evaluated (after clamping)
    logic [SAD_W-1:0]  sad;      // masked SAD over the macro-block
    logic [WSUM_W-1:0] wsum;     // number of pixels of the sub-segment
  } result_t;

  localparam int RESULT_W = $bits(result_t);

endpackage
