// tb_frame_buffer: a 40 x 8 frame buffer. Runs single-slope conversions of known planes
// (comparator high while the plane value is at or above the counter code) into R13 and R24,
// copies them into R1..R4 with the copy strobes, converts a new scale, and reads strings of
// every plane, including the third-octave reading of every other cell, checking all 20
// values of scale k and k-1 and the zero padding outside the plane.
module tb_frame_buffer;
  import fd_pkg::*;
  localparam int C = 40, R = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tsv_comp [R][C];
  pix_t code = '0;
  logic conv13 = 1'b0, conv24 = 1'b0;
  logic [3:0] we = '0;
  logic rd_valid = 1'b0;
  str_tag_t rd_tag = '0;
  logic str_valid;
  str_tag_t str_tag;
  pix_t str_cur [WIN_W], str_prev [WIN_W];
  int checks = 0, failures = 0;
  int val [R][C];              // value being converted
  int cur [4][R][C];           // expected scale k per plane
  int prv [4][R][C];           // expected scale k-1 per plane

  frame_buffer #(.COLS(C), .ROWS(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always_comb
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) tsv_comp[r][c] = (val[r][c] >= int'(code));

  task automatic convert(input int p);
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) val[r][c] = int'($urandom % 256);
    conv13 = (p % 2 == 0);
    conv24 = (p % 2 == 1);
    for (int k = 0; k < 256; k++) begin
      code = 8'(k);
      @(negedge clk);
    end
    conv13 = 1'b0; conv24 = 1'b0;
    code = '0;
    for (int q = p % 2; q < 4; q += 2)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) cur[q][r][c] = val[r][c];
  endtask

  task automatic copy(input int p);
    we = 4'(1 << p);
    @(negedge clk) we = '0;
    for (int r = 0; r < R; r++)
      for (int c = 0; c < C; c++) prv[p][r][c] = cur[p][r][c];
  endtask

  task automatic read(input int oct, input int p, input int row, input int strip);
    int step;
    step = (oct == 2) ? 2 : 1;
    rd_valid = 1'b1;
    rd_tag = '0;
    rd_tag.octave = 2'(oct);
    rd_tag.plane = 2'(p);
    rd_tag.row = 8'(row);
    rd_tag.strip = 4'(strip);
    @(negedge clk) rd_valid = 1'b0;
    checks++;
    if (!str_valid || str_tag != rd_tag) begin failures++; $display("FAIL valid/tag"); end
    for (int i = 0; i < int'(WIN_W); i++) begin
      int x, ec, ep;
      x = strip * 16 - 2 + i;
      if (x < 0 || x >= C / step) begin ec = 0; ep = 0; end
      else begin ec = cur[p][row * step][x * step]; ep = prv[p][row * step][x * step]; end
      checks += 2;
      if (int'(str_cur[i]) != ec) begin failures++; $display("FAIL cur p%0d r%0d x%0d: %0d vs %0d", p, row, x, str_cur[i], ec); end
      if (int'(str_prev[i]) != ep) begin failures++; $display("FAIL prev p%0d r%0d x%0d", p, row, x); end
    end
  endtask

  initial begin
    for (int r = 0; r < R; r++) for (int c = 0; c < C; c++) val[r][c] = 0;
    cur = '{default: 0};
    prv = '{default: 0};
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // scale k-1: P1..P4, each copied after the next conversion started (as in the stack)
    convert(0); convert(1); copy(0); convert(2); copy(1); convert(3); copy(2); copy(3);
    // scale k
    convert(0); convert(1);
    for (int p = 0; p < 4; p++)
      for (int row = 0; row < R; row++)
        for (int s = 0; s < 3; s++) read(0, p, row, s);
    // third-octave reading
    for (int row = 0; row < R / 2; row++)
      for (int s = 0; s < 2; s++) read(2, 0, row, s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
