// frame_buffer: the array of register sets in the bottom tier and the multiplexers that read
// it one 20-pixel string at a time.
//
// There is one fb_register_set under each analog processor (COLS x ROWS, 160 x 120 by
// default), pitch-matched with the top tier, so the whole 320 x 240 image of scale k-1 and
// the pixels of scale k being converted are held below the sensor. Each cell gets its own
// comparator bit through its via and shares the global counter code and the conversion and
// copy strobes.
//
// Reading: a read request names a plane (P1..P4), a row of that plane and a strip of 16
// columns. One cycle later str_valid presents, for columns 16*strip-2 .. 16*strip+17 of that
// row, the scale-k values (from R13 for P1/P3, from R24 for P2/P4) and the scale-k-1 values
// (from R1..R4). Columns outside the plane read as zero. In the first two octaves a plane is
// the whole COLS x ROWS array. In the third octave only every other cell, in every other
// row, still holds a pixel, so the plane is COLS/2 x ROWS/2 and the multiplexers step by two
// cells. The register sets, the 20-register strings and the separate third-octave selection
// follow the original design; the request interface and the one-cycle read latency are this
// design's choices.
module frame_buffer
  import fd_pkg::*;
#(
  parameter int unsigned COLS = CELL_COLS,
  parameter int unsigned ROWS = CELL_ROWS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tsv_comp [ROWS][COLS],
  input  pix_t       code,
  input  logic       conv13,
  input  logic       conv24,
  input  logic [3:0] we,
  input  logic       rd_valid,
  input  str_tag_t   rd_tag,
  output logic       str_valid,
  output str_tag_t   str_tag,
  output pix_t       str_cur  [WIN_W],
  output pix_t       str_prev [WIN_W]
);
  pix_t r13_a   [ROWS][COLS];
  pix_t r24_a   [ROWS][COLS];
  pix_t rprev_a [ROWS][COLS][4];

  for (genvar r = 0; r < int'(ROWS); r++) begin : g_row
    for (genvar c = 0; c < int'(COLS); c++) begin : g_col
      fb_register_set u_set (
        .clk, .rst_n,
        .tsv_comp(tsv_comp[r][c]),
        .code, .conv13, .conv24, .we,
        .r13(r13_a[r][c]), .r24(r24_a[r][c]), .rprev(rprev_a[r][c])
      );
    end
  end

  // Row multiplexers: select the row, then the 20 columns of the string.
  logic         third;
  int unsigned  step, pw, ph, crow;
  pix_t         row_cur  [COLS];
  pix_t         row_prev [COLS];
  pix_t         mux_cur  [WIN_W];
  pix_t         mux_prev [WIN_W];

  always_comb begin
    third = (rd_tag.octave == 2'd2);
    step  = third ? 2 : 1;
    pw    = COLS / step;
    ph    = ROWS / step;
    crow  = int'(rd_tag.row) * step;
    if (crow >= ROWS) crow = 0;
    for (int c = 0; c < int'(COLS); c++) begin
      row_cur[c]  = rd_tag.plane[0] ? r24_a[crow][c] : r13_a[crow][c];
      row_prev[c] = rprev_a[crow][c][rd_tag.plane];
    end
    for (int i = 0; i < int'(WIN_W); i++) begin
      int x;
      x = int'(rd_tag.strip) * int'(STR_W) - int'(HALO) + i;
      if (x >= 0 && x < int'(pw) && int'(rd_tag.row) < int'(ph)) begin
        mux_cur[i]  = row_cur[x * int'(step)];
        mux_prev[i] = row_prev[x * int'(step)];
      end else begin
        mux_cur[i]  = '0;
        mux_prev[i] = '0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      str_valid <= 1'b0;
      str_tag   <= '0;
      str_cur   <= '{default: '0};
      str_prev  <= '{default: '0};
    end else begin
      str_valid <= rd_valid;
      if (rd_valid) begin
        str_tag  <= rd_tag;
        str_cur  <= mux_cur;
        str_prev <= mux_prev;
      end
    end
  end
endmodule
