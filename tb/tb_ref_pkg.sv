// tb_ref_pkg: reference arithmetic for the testbenches, written from the formulas of the
// design independently of the RTL: first derivatives, the Hessian determinant and the Harris
// response, on plain integers.
package tb_ref_pkg;

  typedef int nb3_t [3][3];

  // n[r][c] = I(i-1+r, j-1+c)
  function automatic void grad(input nb3_t n, input bit rotated, output int dx, output int dy);
    if (rotated) begin
      dx = n[2][2] - n[0][0];
      dy = n[2][0] - n[0][2];
    end else begin
      dx = n[1][2] - n[1][0];
      dy = n[2][1] - n[0][1];
    end
  endfunction

  function automatic longint hess_det(input nb3_t n, input bit interp);
    int dxx, dyy, dxy;
    dxx = n[1][2] + n[1][0] - 2 * n[1][1];
    dyy = n[2][1] + n[0][1] - 2 * n[1][1];
    if (interp) begin
      dxx = dxx >>> 1;
      dyy = dyy >>> 1;
    end
    dxy = n[2][2] - n[2][0] - n[0][2] + n[0][0];
    return 16 * longint'(dxx) * longint'(dyy) - longint'(dxy) * longint'(dxy);
  endfunction

  function automatic longint harris_resp(input nb3_t gx, input nb3_t gy);
    longint a, b, c, tr;
    a = 0; b = 0; c = 0;
    for (int r = 0; r < 3; r++)
      for (int q = 0; q < 3; q++) begin
        a += longint'(gx[r][q]) * gx[r][q];
        b += longint'(gy[r][q]) * gy[r][q];
        c += longint'(gx[r][q]) * gy[r][q];
      end
    tr = a + b;
    return a * b - c * c - ((tr * tr) >>> 4);
  endfunction

  function automatic logic [1:0] harris_cls(input longint r, input longint tc, input longint te);
    if (r > tc) return 2'b00;
    if (r < -te) return 2'b01;
    return 2'b10;
  endfunction

  function automatic logic [7:0] sat8(input int v);
    if (v > 127) return 8'h7f;
    if (v < -128) return 8'h80;
    return 8'(v);
  endfunction

endpackage
