// tb_harris_detector: gradient windows of a corner, an edge and a flat area, then random
// windows, through the Harris detector; checks the response against the reference and the
// three classes 00 (corner), 01 (edge) and 1X (flat).
module tb_harris_detector;
  import fd_pkg::*;
  import tb_ref_pkg::*;
  grad_t gx [3][3], gy [3][3];
  logic signed [HARRIS_W-1:0] thr_corner, thr_edge, resp;
  logic [1:0] cls;
  int checks = 0, failures = 0;

  harris_detector dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input nb3_t x, input nb3_t y, input longint tc, input longint te, input int expect_cls);
    longint r;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) begin
        gx[a][b] = GR_W'(x[a][b]);
        gy[a][b] = GR_W'(y[a][b]);
      end
    thr_corner = HARRIS_W'(tc);
    thr_edge = HARRIS_W'(te);
    #1;
    r = harris_resp(x, y);
    checks += 2;
    if (longint'(resp) != r) begin failures++; $display("FAIL resp %0d vs %0d", resp, r); end
    if (cls != harris_cls(r, tc, te)) begin failures++; $display("FAIL cls %b", cls); end
    if (expect_cls >= 0) begin
      checks++;
      if (cls != 2'(expect_cls)) begin failures++; $display("FAIL expected class %0d got %b", expect_cls, cls); end
    end
  endtask

  initial begin
    nb3_t x, y, z;
    z = '{default: 0};
    // corner: gradients in both directions
    x = '{'{100, 100, 0}, '{100, 100, 0}, '{0, 0, 0}};
    y = '{'{0, 0, 0}, '{0, 100, 100}, '{0, 100, 100}};
    apply(x, y, 1000, 1000, 0);
    // edge: gradient along one direction only
    x = '{'{100, 100, 100}, '{100, 100, 100}, '{100, 100, 100}};
    apply(x, z, 1000, 1000, 1);
    // flat
    apply(z, z, 1000, 1000, 2);
    for (int t = 0; t < 2000; t++) begin
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          x[a][b] = int'($urandom % 1021) - 510;
          y[a][b] = int'($urandom % 1021) - 510;
        end
      apply(x, y, longint'($urandom) << 8, longint'($urandom) << 8, -1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
