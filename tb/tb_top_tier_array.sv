// tb_top_tier_array: a 16 x 8 pixel top tier. Acquires a random image, then digitises the
// state capacitors through the comparators with a swept ramp (as the stack does) after
// diffusion cycles, after the 1/4 merge and after the 1/16 merge, and compares the codes with
// a reference model of the charge-sharing equations. Also checks that diffusion conserves the
// image mean and that a merged cell gives the same value on all four capacitors.
module tb_top_tier_array;
  localparam int C = 16, R = 8;
  localparam real ALPHA = 0.1 / 1.4;
  logic clk = 1'b0;
  logic [7:0] light [R][C];
  logic phi_acq = 1'b0, phi_diff = 1'b0, phi_quarter = 1'b0, phi_sixteenth = 1'b0;
  logic [1:0] conv_sel = '0;
  real vramp;
  logic comp [R/2][C/2];
  int checks = 0, failures = 0;
  real ref_v [R][C];
  int stride;

  top_tier_array #(.COLS(C), .ROWS(R)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1'b1;
    @(negedge clk) s = 1'b0;
  endtask

  function automatic int code_of(real v);
    int k;
    k = 0;
    for (int c = 0; c < 256; c++) if (v >= (real'(c) - 0.5) / 256.0) k = c;
    return k;
  endfunction

  task automatic ref_diffuse();
    real nv [R][C];
    for (int y = 0; y < R; y += stride)
      for (int x = 0; x < C; x += stride) begin
        real a;
        a = 0.0;
        if (y >= stride)    a += ref_v[y - stride][x] - ref_v[y][x];
        if (y + stride < R) a += ref_v[y + stride][x] - ref_v[y][x];
        if (x >= stride)    a += ref_v[y][x - stride] - ref_v[y][x];
        if (x + stride < C) a += ref_v[y][x + stride] - ref_v[y][x];
        nv[y][x] = ref_v[y][x] + ALPHA * a;
      end
    for (int y = 0; y < R; y++)
      for (int x = 0; x < C; x++) ref_v[y][x] = nv[y - y % stride][x - x % stride];
  endtask

  task automatic ref_merge(int s);
    stride = s;
    for (int y = 0; y < R; y += s)
      for (int x = 0; x < C; x += s) begin
        real m;
        m = (ref_v[y][x] + ref_v[y][x + s/2] + ref_v[y + s/2][x] + ref_v[y + s/2][x + s/2]) / 4.0;
        for (int a = 0; a < s; a++) for (int b = 0; b < s; b++) ref_v[y + a][x + b] = m;
      end
  endtask

  // Convert all four state capacitors with a swept ramp and compare with the reference.
  task automatic convert_and_check(string what);
    for (int p = 0; p < 4; p++) begin
      int got [R/2][C/2];
      conv_sel = 2'(p);
      for (int cy = 0; cy < R / 2; cy++) for (int cx = 0; cx < C / 2; cx++) got[cy][cx] = 0;
      for (int c = 0; c < 256; c++) begin
        vramp = (real'(c) - 0.5) / 256.0;
        #1;
        for (int cy = 0; cy < R / 2; cy++)
          for (int cx = 0; cx < C / 2; cx++) if (comp[cy][cx]) got[cy][cx] = c;
      end
      for (int cy = 0; cy < R / 2; cy++)
        for (int cx = 0; cx < C / 2; cx++) begin
          int e;
          e = code_of(ref_v[2 * cy + p / 2][2 * cx + p % 2]);
          checks++;
          if (got[cy][cx] != e) begin
            failures++; $display("FAIL %s P%0d cell %0d,%0d: %0d vs %0d", what, p + 1, cy, cx, got[cy][cx], e);
          end
        end
    end
    vramp = 2.0;
  endtask

  function automatic real mean();
    real s;
    s = 0.0;
    for (int y = 0; y < R; y++) for (int x = 0; x < C; x++) s += ref_v[y][x];
    return s / real'(R * C);
  endfunction

  initial begin
    real m0;
    vramp = 2.0;
    stride = 1;
    for (int y = 0; y < R; y++)
      for (int x = 0; x < C; x++) begin
        light[y][x] = 8'($urandom);
        ref_v[y][x] = real'(light[y][x]) / 256.0;
      end
    pulse(phi_acq);
    convert_and_check("acquired");
    m0 = mean();
    repeat (3) begin pulse(phi_diff); ref_diffuse(); end
    convert_and_check("diffused");
    checks++;
    if (mean() - m0 > 1e-9 || m0 - mean() > 1e-9) begin failures++; $display("FAIL mean not conserved"); end
    pulse(phi_quarter); ref_merge(2);
    convert_and_check("merged 1/4");
    repeat (2) begin pulse(phi_diff); ref_diffuse(); end
    convert_and_check("octave 2 diffused");
    pulse(phi_sixteenth); ref_merge(4);
    repeat (2) begin pulse(phi_diff); ref_diffuse(); end
    convert_and_check("octave 3 diffused");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
