// tb_feature_unit: streams random planes (32 x 8, and 16 x 4 in the third octave) into the
// feature unit the way the frame buffer reads them, one 20-pixel string every 16 cycles down
// each strip, and checks every dx, dy and flags byte against the reference arithmetic,
// including the border rules, the rotated gradient in the first octave and the latency of
// 17 cycles from string to result.
module tb_feature_unit;
  import fd_pkg::*;
  import tb_ref_pkg::*;
  localparam int PC = 32, PR = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic str_valid = 1'b0;
  str_tag_t str_tag = '0;
  wdat_t str_data [WIN_W];
  logic signed [HESSIAN_W-1:0] thr_hessian;
  logic signed [HARRIS_W-1:0] thr_corner, thr_edge;
  logic res_valid;
  str_tag_t res_tag;
  logic [7:0] dx8 [STR_W], dy8 [STR_W], flags [STR_W];
  int checks = 0, failures = 0;
  int img [PR][PC];
  int pw, ph;
  int n_corner = 0, n_edge = 0, n_hess = 0, n_results = 0;
  longint t_q [$];

  feature_unit #(.PLANE_COLS(PC), .PLANE_ROWS(PR)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int at(int r, int c);
    if (r < 0 || c < 0 || r >= ph || c >= pw) return 0;
    return img[r][c];
  endfunction

  function automatic nb3_t nb(int r, int c);
    nb3_t n;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) n[a][b] = at(r - 1 + a, c - 1 + b);
    return n;
  endfunction

  task automatic check_row(input str_tag_t tag);
    bit rot;
    rot = (tag.octave == 0);
    for (int c = 0; c < int'(STR_W); c++) begin
      int col, rc, dx, dy;
      bit vg, vh, hf;
      logic [1:0] hc;
      nb3_t gx, gy;
      col = int'(tag.strip) * 16 + c;
      rc = int'(tag.row);
      vg = rc >= 1 && rc + 2 <= ph && col >= 1 && col + 2 <= pw;
      vh = rc >= 2 && rc + 3 <= ph && col >= 2 && col + 3 <= pw;
      grad(nb(rc, col), rot, dx, dy);
      for (int a = 0; a < 3; a++)
        for (int b = 0; b < 3; b++) begin
          int ex, ey;
          grad(nb(rc - 1 + a, col - 1 + b), rot, ex, ey);
          gx[a][b] = ex; gy[a][b] = ey;
        end
      hf = vg && (hess_det(nb(rc, col), rot) > longint'(thr_hessian));
      hc = vh ? harris_cls(harris_resp(gx, gy), thr_corner, thr_edge) : 2'b10;
      checks += 3;
      if (dx8[c] != (vg ? sat8(dx) : 8'h00)) begin failures++; $display("FAIL dx row %0d col %0d", rc, col); end
      if (dy8[c] != (vg ? sat8(dy) : 8'h00)) begin failures++; $display("FAIL dy row %0d col %0d", rc, col); end
      if (flags[c] != {vh, vg, 3'b000, hf, hc}) begin
        failures++; $display("FAIL flags row %0d col %0d: %b vs %b", rc, col, flags[c], {vh, vg, 3'b000, hf, hc});
      end
      if (vh && hc == 2'b00) n_corner++;
      if (vh && hc == 2'b01) n_edge++;
      if (hf) n_hess++;
    end
  endtask

  always @(posedge clk) begin
    if (str_valid && str_tag.row >= 2) t_q.push_back($time);
    if (res_valid) begin
      longint t0;
      n_results++;
      checks++;
      t0 = (t_q.size() > 0) ? t_q.pop_front() : 0;
      if ($time - t0 != 170) begin failures++; $display("FAIL latency %0d", $time - t0); end
      check_row(res_tag);
    end
  end

  initial begin
    thr_hessian = 30'sd5000;
    thr_corner  = 48'sd2000000;
    thr_edge    = 48'sd2000000;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int oct = 0; oct < 3; oct++) begin
      pw = (oct == 2) ? PC / 2 : PC;
      ph = (oct == 2) ? PR / 2 : PR;
      // a smooth image with a bright square and random noise
      for (int r = 0; r < PR; r++)
        for (int c = 0; c < PC; c++)
          img[r][c] = ((r >= 2 && r < 5 && c >= 6 && c < 12) ? 200 : 40) + int'($urandom % 16)
                      - ((oct == 1) ? 128 : 0);
      for (int s = 0; s < (pw + 15) / 16; s++)
        for (int r = 0; r < ph; r++) begin
          @(negedge clk);
          str_valid = 1'b1;
          str_tag = '0;
          str_tag.octave = 2'(oct);
          str_tag.row = 8'(r);
          str_tag.strip = 4'(s);
          for (int i = 0; i < int'(WIN_W); i++) str_data[i] = WD_W'(at(r, s * 16 - 2 + i));
          @(negedge clk) str_valid = 1'b0;
          repeat (14) @(negedge clk);
        end
      repeat (30) @(negedge clk);
    end
    checks++;
    if (n_results != 2 * (PR - 2) * 2 + 1 * (PR / 2 - 2)) begin failures++; $display("FAIL result count %0d", n_results); end
    checks++;
    if (n_corner == 0 || n_edge == 0 || n_hess == 0) begin
      failures++; $display("FAIL classes not all seen: corner %0d edge %0d hessian %0d", n_corner, n_edge, n_hess);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
