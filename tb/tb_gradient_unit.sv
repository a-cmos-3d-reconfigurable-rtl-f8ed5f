// tb_gradient_unit: random 3 x 3 neighbourhoods; checks the rotated (first octave) and the
// conventional (later octaves) first derivatives against their formulas.
module tb_gradient_unit;
  import fd_pkg::*;
  wdat_t n [3][3];
  logic rotated;
  grad_t dx, dy;
  int checks = 0, failures = 0;

  gradient_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // I(i+a, j+b) with a, b in -1..1
  function automatic int px(int a, int b);
    return int'(n[a + 1][b + 1]);
  endfunction

  initial begin
    for (int t = 0; t < 1000; t++) begin
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++) n[r][c] = WD_W'(int'($urandom % 511) - 255);
      rotated = 1'(t);
      #1;
      checks += 2;
      if (rotated) begin
        if (int'(dx) != px(1, 1) - px(-1, -1)) begin failures++; $display("FAIL dx' t=%0d", t); end
        if (int'(dy) != px(1, -1) - px(-1, 1)) begin failures++; $display("FAIL dy' t=%0d", t); end
      end else begin
        if (int'(dx) != px(0, 1) - px(0, -1)) begin failures++; $display("FAIL dx t=%0d", t); end
        if (int'(dy) != px(1, 0) - px(-1, 0)) begin failures++; $display("FAIL dy t=%0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
