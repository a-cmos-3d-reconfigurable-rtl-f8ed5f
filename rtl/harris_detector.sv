// harris_detector: second-moment matrix and corner / edge / flat class of one pixel.
//
// Inputs are the first derivatives on the 3 x 3 pixels around the pixel of interest. The
// second-moment (auto-correlation) matrix is summed over that window,
//   A = sum dx^2,  B = sum dy^2,  C = sum dx dy,
// and the Harris response is R = A B - C^2 - k (A + B)^2 with k = 1/16, a shift. The class is
// 00 "corner" when R > thr_corner, 01 "edge" when R < -thr_edge, and 10 "flat" otherwise.
// Purely combinational. The 2-bit result and its codes follow the original design; the window,
// k and the two thresholds are this design's choices, as the original gives none of them.
module harris_detector
  import fd_pkg::*;
(
  input  grad_t                       gx [3][3],
  input  grad_t                       gy [3][3],
  input  logic signed [HARRIS_W-1:0]  thr_corner,
  input  logic signed [HARRIS_W-1:0]  thr_edge,
  output logic signed [HARRIS_W-1:0]  resp,
  output logic [1:0]                  cls
);
  logic signed [HARRIS_W-1:0] a, b, c, tr;
  always_comb begin
    a = '0;
    b = '0;
    c = '0;
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 3; q++) begin
        a += HARRIS_W'(gx[r][q]) * HARRIS_W'(gx[r][q]);
        b += HARRIS_W'(gy[r][q]) * HARRIS_W'(gy[r][q]);
        c += HARRIS_W'(gx[r][q]) * HARRIS_W'(gy[r][q]);
      end
    tr   = a + b;
    resp = a * b - c * c - ((tr * tr) >>> 4);
    if (resp > thr_corner)      cls = HARRIS_CORNER;
    else if (resp < -thr_edge)  cls = HARRIS_EDGE;
    else                        cls = HARRIS_FLAT;
  end
endmodule
