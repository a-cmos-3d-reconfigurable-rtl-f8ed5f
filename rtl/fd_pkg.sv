// fd_pkg: sizes, types and encodings shared by the two-tier feature-detector stack.
//
// The image sensor has 320 x 240 photodiodes. Four photodiodes (a 2 x 2 block) share one
// analog processor ("cell"), so the processor array and the frame buffer below it are
// 160 x 120. Within a cell the four pixels are called P1..P4 and sit at (i,j), (i,j+1),
// (i+1,j) and (i+1,j+1). Pixels are digitised with an 8-bit single-slope converter.
// The frame buffer is read in strings of 20 pixels of one row: 16 pixels that are processed
// plus 2 on each side for the neighbourhood operators. Results leave the stack in 128-bit
// beats of 16 bytes. The beat kinds, the Harris codes and the flags byte layout are this
// design's choices; the Harris codes 00/01/1X follow the original description.
package fd_pkg;

  localparam int unsigned PIX_W      = 8;    // ADC resolution
  localparam int unsigned IMG_COLS   = 320;  // photodiodes per row
  localparam int unsigned IMG_ROWS   = 240;  // photodiode rows
  localparam int unsigned CELL_COLS  = 160;  // analog processors / register sets per row
  localparam int unsigned CELL_ROWS  = 120;
  localparam int unsigned STR_W      = 16;   // pixels processed per string
  localparam int unsigned HALO       = 2;    // extra pixels on each side of a string
  localparam int unsigned WIN_W      = STR_W + 2 * HALO;  // 20 registers read per row
  localparam int unsigned WIN_ROWS   = 5;    // rows kept by the feature unit
  localparam int unsigned MAX_SCALES = 8;    // scale slots in the configuration
  localparam int unsigned BEAT_W     = 128;  // DRAM write granule, 16 x 8 bit

  typedef logic [PIX_W-1:0] pix_t;

  // Data held by the feature window: a scale (0..255) or a DoG (-255..255).
  localparam int unsigned WD_W = PIX_W + 1;
  typedef logic signed [WD_W-1:0] wdat_t;
  // First derivatives of window data.
  localparam int unsigned GR_W = WD_W + 1;
  typedef logic signed [GR_W-1:0] grad_t;

  // Harris classes.
  localparam logic [1:0] HARRIS_CORNER = 2'b00;
  localparam logic [1:0] HARRIS_EDGE   = 2'b01;
  localparam logic [1:0] HARRIS_FLAT   = 2'b10;

  // Widths of the detector responses and thresholds.
  localparam int unsigned HARRIS_W  = 48;
  localparam int unsigned HESSIAN_W = 30;

  typedef enum logic [2:0] {
    BEAT_SCALE = 3'd0,  // S(k), 16 unsigned bytes
    BEAT_DOG   = 3'd1,  // S(k) - S(k-1), 16 signed bytes, saturated
    BEAT_DX    = 3'd2,  // first derivative along x (or x'), signed, saturated
    BEAT_DY    = 3'd3,  // first derivative along y (or y'), signed, saturated
    BEAT_FLAGS = 3'd4   // per pixel {valid_harris, valid_grad, 3'b0, hessian, harris[1:0]}
  } beat_kind_e;

  // Where a beat belongs: octave, scale, plane (P1..P4 as 0..3), row and strip of the plane.
  typedef struct packed {
    beat_kind_e  kind;
    logic [1:0]  octave;
    logic [2:0]  scale;
    logic [1:0]  plane;
    logic [7:0]  row;
    logic [3:0]  strip;
  } beat_tag_t;

  // Tag of a string read from the frame buffer.
  typedef struct packed {
    logic [1:0]  octave;
    logic [2:0]  scale;
    logic [1:0]  plane;
    logic [7:0]  row;
    logic [3:0]  strip;
    logic        first_scale;  // no scale k-1 exists: no DoG
    logic        last_row;     // last row of the plane in this strip
  } str_tag_t;

  function automatic logic [7:0] sat8(input logic signed [15:0] v);
    if (v > 16'sd127) return 8'h7f;
    if (v < -16'sd128) return 8'h80;
    return v[7:0];
  endfunction

endpackage
