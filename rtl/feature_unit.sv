// feature_unit: serial gradient, Hessian and Harris processing of the strings read from the
// frame buffer.
//
// The frame buffer is read one 20-pixel string per read period: 16 pixels plus 2 on each side,
// row after row down a 16-column strip of the current plane. This unit keeps the last five
// strings (rows r-4..r) and, after each new string, works out the results for the 16 centre
// pixels of row r-2, one pixel per clock cycle, so the processing clock runs 16 times the read
// rate (160 MHz against 10 MHz in the original design). For each pixel it forms the gradient
// (gradient_unit), the Hessian flag (hessian_detector) and the Harris class (harris_detector,
// which needs the gradients of the 3 x 3 pixels around it, hence the 5 x 5 window).
//
// Points whose neighbourhood leaves the plane cannot be computed: their derivatives are given
// as zero, Hessian 0 and Harris "flat", and the flags byte says so. Within a strip, rows 0 and
// 1 produce no output (the window is not yet full) and the last two rows of the plane are
// never centre rows; all of them are border rows.
//
// Interface: str_valid with str_tag and the 20 window values (a scale or a DoG). res_valid
// pulses 17 cycles after str_valid with the tag of the centre row and 16 bytes each of dx, dy
// and flags. str_valid may come every 16 cycles; an earlier one is an overrun, flagged by
// the assertion. The one-pixel-per-cycle serial structure follows the original design; the
// window handling and the byte formats are this design's choices.
module feature_unit
  import fd_pkg::*;
#(
  parameter int unsigned PLANE_COLS = CELL_COLS,  // width of a plane in octaves 1 and 2
  parameter int unsigned PLANE_ROWS = CELL_ROWS
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        str_valid,
  input  str_tag_t                    str_tag,
  input  wdat_t                       str_data [WIN_W],
  input  logic signed [HESSIAN_W-1:0] thr_hessian,
  input  logic signed [HARRIS_W-1:0]  thr_corner,
  input  logic signed [HARRIS_W-1:0]  thr_edge,
  output logic                        res_valid,
  output str_tag_t                    res_tag,    // row = centre row
  output logic [7:0]                  dx8   [STR_W],
  output logic [7:0]                  dy8   [STR_W],
  output logic [7:0]                  flags [STR_W]
);
  wdat_t    win [WIN_ROWS][WIN_W];
  logic     active;
  logic [3:0] cnt;
  str_tag_t cur_tag;

  // Neighbourhood of the pixel in work: 5 x 5 centred on window column cnt + 2.
  wdat_t nb [5][5];
  always_comb
    for (int r = 0; r < 5; r++)
      for (int c = 0; c < 5; c++)
        nb[r][c] = win[r][int'(cnt) + c];

  logic rotated;
  assign rotated = (cur_tag.octave == 2'd0);

  // Gradients on the 3 x 3 pixels around the centre.
  grad_t gx [3][3];
  grad_t gy [3][3];
  for (genvar gr = 0; gr < 3; gr++) begin : g_row
    for (genvar gc = 0; gc < 3; gc++) begin : g_col
      wdat_t sub [3][3];
      always_comb
        for (int r = 0; r < 3; r++)
          for (int c = 0; c < 3; c++)
            sub[r][c] = nb[gr + r][gc + c];
      gradient_unit u_grad (.n(sub), .rotated(rotated), .dx(gx[gr][gc]), .dy(gy[gr][gc]));
    end
  end

  wdat_t centre3 [3][3];
  always_comb
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        centre3[r][c] = nb[r + 1][c + 1];

  logic signed [11:0]          h_dxx, h_dyy, h_dxy;
  logic signed [HESSIAN_W-1:0] h_det;
  logic                        h_flag;
  hessian_detector u_hess (
    .n(centre3), .interp(rotated), .thr(thr_hessian),
    .dxx(h_dxx), .dyy(h_dyy), .dxy(h_dxy), .det(h_det), .flag(h_flag)
  );

  logic signed [HARRIS_W-1:0] hr_resp;
  logic [1:0]                 hr_cls;
  harris_detector u_harris (
    .gx(gx), .gy(gy), .thr_corner(thr_corner), .thr_edge(thr_edge),
    .resp(hr_resp), .cls(hr_cls)
  );

  // Which results of the current pixel can be computed inside the plane.
  int unsigned pw, ph, col, rowc;
  logic v_grad, v_harris;
  always_comb begin
    pw   = (cur_tag.octave == 2'd2) ? PLANE_COLS / 2 : PLANE_COLS;
    ph   = (cur_tag.octave == 2'd2) ? PLANE_ROWS / 2 : PLANE_ROWS;
    col  = int'(cur_tag.strip) * STR_W + int'(cnt);
    rowc = int'(cur_tag.row);
    v_grad   = (rowc >= 1) && (rowc + 2 <= ph) && (col >= 1) && (col + 2 <= pw);
    v_harris = (rowc >= 2) && (rowc + 3 <= ph) && (col >= 2) && (col + 3 <= pw);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      win       <= '{default: '0};
      active    <= 1'b0;
      cnt       <= '0;
      cur_tag   <= '0;
      res_valid <= 1'b0;
      res_tag   <= '0;
      dx8       <= '{default: '0};
      dy8       <= '{default: '0};
      flags     <= '{default: '0};
    end else begin
      res_valid <= 1'b0;
      if (active) begin
        dx8[cnt]   <= v_grad ? sat8(16'(gx[1][1])) : 8'h00;
        dy8[cnt]   <= v_grad ? sat8(16'(gy[1][1])) : 8'h00;
        flags[cnt] <= {v_harris, v_grad, 3'b000, v_grad & h_flag,
                       v_harris ? hr_cls : HARRIS_FLAT};
        cnt <= cnt + 1'b1;
        if (cnt == 4'(STR_W - 1)) begin
          active    <= 1'b0;
          res_valid <= 1'b1;
          res_tag   <= cur_tag;
        end
      end
      if (str_valid) begin
        for (int r = 0; r < int'(WIN_ROWS) - 1; r++) win[r] <= win[r + 1];
        win[WIN_ROWS-1] <= str_data;
        if (str_tag.row >= 8'd2) begin
          active      <= 1'b1;
          cnt         <= '0;
          cur_tag     <= str_tag;
          cur_tag.row <= str_tag.row - 8'd2;
        end
      end
    end
  end

  // A new string may only arrive once the previous row has been processed.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    str_valid |-> !active || cnt == 4'(STR_W - 1))
    else $error("feature_unit: string arrived while a row was still in work");
endmodule
