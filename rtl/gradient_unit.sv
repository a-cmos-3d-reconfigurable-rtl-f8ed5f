// gradient_unit: first derivatives at the centre of a 3 x 3 neighbourhood.
//
// In the first octave a cell's four pixels are read one plane at a time, so the neighbours
// along x and y of a pixel are not in the same read. The gradient is then taken along axes
// rotated by 45 degrees:  dx' = I(i+1,j+1) - I(i-1,j-1),  dy' = I(i+1,j-1) - I(i-1,j+1).
// From the second octave on every pixel has its horizontal and vertical neighbours, and the
// conventional central differences are used: dx = I(i,j+1) - I(i,j-1), dy = I(i+1,j) - I(i-1,j).
// n[r][c] is row i-1+r, column j-1+c. Purely combinational. Both formulas follow the original
// design; the plain central difference for the later octaves is this design's reading of it.
module gradient_unit
  import fd_pkg::*;
(
  input  wdat_t n [3][3],
  input  logic  rotated,   // 1 in the first octave
  output grad_t dx,
  output grad_t dy
);
  always_comb begin
    if (rotated) begin
      dx = GR_W'(n[2][2]) - GR_W'(n[0][0]);
      dy = GR_W'(n[2][0]) - GR_W'(n[0][2]);
    end else begin
      dx = GR_W'(n[1][2]) - GR_W'(n[1][0]);
      dy = GR_W'(n[2][1]) - GR_W'(n[0][1]);
    end
  end
endmodule
