// hessian_detector: second derivatives and the Hessian keypoint flag of one pixel.
//
// From the 3 x 3 neighbourhood n[r][c] (row i-1+r, column j-1+c):
//   dxx = I(i,j+1) + I(i,j-1) - 2 I(i,j)
//   dyy = I(i+1,j) + I(i-1,j) - 2 I(i,j)
//   dxy = I(i+1,j+1) - I(i+1,j-1) - I(i-1,j+1) + I(i-1,j-1)   (4 times the mixed derivative)
// In the first octave the window holds one pixel plane, so these neighbours lie two pixels
// apart. The one-pixel neighbour is then taken as the mean of the pixel and the pixel two
// apart, which halves dxx and dyy (interp = 1). The response is the Hessian determinant
// scaled by 16 so that it stays an integer:  det = 16 dxx dyy - dxy^2, and the flag is
// det > thr ("1" marks a point of interest, "0" one without significant information).
// Purely combinational. The neighbour interpolation and the 1-bit result follow the original
// design; the signs of dxy, the determinant test and the threshold are this design's choices.
module hessian_detector
  import fd_pkg::*;
(
  input  wdat_t                        n [3][3],
  input  logic                         interp,
  input  logic signed [HESSIAN_W-1:0]  thr,
  output logic signed [11:0]           dxx,
  output logic signed [11:0]           dyy,
  output logic signed [11:0]           dxy,
  output logic signed [HESSIAN_W-1:0]  det,
  output logic                         flag
);
  logic signed [11:0] sxx, syy;
  always_comb begin
    sxx = 12'(n[1][2]) + 12'(n[1][0]) - 12'(n[1][1]) - 12'(n[1][1]);
    syy = 12'(n[2][1]) + 12'(n[0][1]) - 12'(n[1][1]) - 12'(n[1][1]);
    dxx = interp ? (sxx >>> 1) : sxx;
    dyy = interp ? (syy >>> 1) : syy;
    dxy = 12'(n[2][2]) - 12'(n[2][0]) - 12'(n[0][2]) + 12'(n[0][0]);
    det = (HESSIAN_W'(dxx) * HESSIAN_W'(dyy) <<< 4) - HESSIAN_W'(dxy) * HESSIAN_W'(dxy);
    flag = det > thr;
  end
endmodule
