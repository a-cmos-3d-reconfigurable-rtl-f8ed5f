// tb_hessian_detector: random and hand-made neighbourhoods (flat, blob, saddle) through the
// Hessian detector in both octave modes; checks the determinant and the flag against the
// reference, and that a bright blob is flagged while flat and saddle areas are not.
module tb_hessian_detector;
  import fd_pkg::*;
  import tb_ref_pkg::*;
  wdat_t n [3][3];
  logic interp;
  logic signed [HESSIAN_W-1:0] thr, det;
  logic signed [11:0] dxx, dyy, dxy;
  logic flag;
  int checks = 0, failures = 0;

  hessian_detector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input nb3_t v, input bit ip, input int th, input int expect_flag);
    nb3_t r;
    longint d;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) n[a][b] = WD_W'(v[a][b]);
    interp = ip;
    thr = HESSIAN_W'(th);
    #1;
    d = hess_det(v, ip);
    checks += 2;
    if (longint'(det) != d) begin failures++; $display("FAIL det %0d vs %0d", det, d); end
    if (flag != (d > th)) begin failures++; $display("FAIL flag"); end
    if (expect_flag >= 0) begin
      checks++;
      if (flag != 1'(expect_flag)) begin failures++; $display("FAIL expected flag %0d", expect_flag); end
    end
  endtask

  initial begin
    nb3_t v;
    // flat: nothing
    v = '{'{50, 50, 50}, '{50, 50, 50}, '{50, 50, 50}};
    apply(v, 0, 100, 0);
    // dark spot (minimum of intensity): both curvatures positive
    v = '{'{90, 90, 90}, '{90, 10, 90}, '{90, 90, 90}};
    apply(v, 0, 100, 1);
    apply(v, 1, 100, 1);
    // saddle: negative determinant
    v = '{'{50, 90, 50}, '{10, 50, 10}, '{50, 90, 50}};
    apply(v, 0, 100, 0);
    for (int t = 0; t < 2000; t++) begin
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) v[a][b] = int'($urandom % 511) - 255;
      apply(v, 1'(t), int'($urandom % 200000) - 100000, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
