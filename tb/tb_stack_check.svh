// tb_stack_check.svh: the body shared by the end-to-end testbenches of cmos3d_stack_top.
// The including module defines TIC, TIR (image size), TSTEP (counter step cycles), the
// frame configurations (N_FRAMES, f_oct[], f_sc[], f_src[]) and instantiates the stack as
// `dut` on the signals declared here.
//
// For each frame it drives a test image (a bright rectangle, a dark spot and noise), waits
// for frame_done, collects every DRAM beat by its tag and then recomputes the whole frame
// independently: the charge-sharing model of the top tier, the single-slope codes, the
// planes read per octave, DoG, gradients, Hessian and Harris. Every expected beat must have
// arrived with the right data and no other beat may arrive. It counts the mechanisms of the
// design and fails if one never happened: the four serial conversions into R13/R24, the
// copies into R1..R4, both merges, DoG beats, the P4 read overlapped with the
// next P1 conversion, detectors on scales and on DoGs, rotated and
// conventional gradients, border points, corners, edges and Hessian points.

  import fd_pkg::*;
  import tb_ref_pkg::*;
  localparam int TCC = TIC / 2, TCR = TIR / 2;
  localparam real ALPHA = 0.1 / 1.4;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [7:0] light [TIR][TIC];
  logic [1:0] cfg_octaves;
  logic [3:0] cfg_scales;
  logic [7:0] cfg_diff [MAX_SCALES];
  logic cfg_det_src;
  logic signed [HESSIAN_W-1:0] thr_hessian = 30'sd5000;
  logic signed [HARRIS_W-1:0] thr_corner = 48'sd2000000, thr_edge = 48'sd2000000;
  logic busy, frame_done, dram_valid, overflow;
  logic [BEAT_W-1:0] dram_data;
  beat_tag_t dram_tag;

  int checks = 0, failures = 0;
  logic [BEAT_W-1:0] got [beat_tag_t];
  int n_dup = 0;
  // mechanism counters
  int m_conv13 = 0, m_conv24 = 0, m_we = 0, m_quarter = 0, m_sixteenth = 0;
  int m_dog = 0, m_src_scale = 0, m_src_dog = 0;
  int m_rot = 0, m_conv_grad = 0, m_border = 0, m_corner = 0, m_edge = 0, m_hess = 0;

  real rv [TIR][TIC];
  int  stride;
  int  pl [4][TCR][TCC];      // planes of the current scale
  int  pp [4][TCR][TCC];      // planes of the previous scale

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int m_overlap = 0;

  always @(posedge clk) if (rst_n) begin
    if (dut.u_seq.cnt_start && dut.conv_sel == 2'd0 && dut.u_seq.read_run && dut.u_seq.rd_plane == 2'd3)
      m_overlap++;
    if (dram_valid) begin
      if (got.exists(dram_tag)) n_dup++;
      got[dram_tag] = dram_data;
    end
    if (dut.u_seq.cnt_start && !dut.conv_sel[0]) m_conv13++;
    if (dut.u_seq.cnt_start && dut.conv_sel[0]) m_conv24++;
    if (dut.we != 0) m_we++;
    if (dut.phi_quarter) m_quarter++;
    if (dut.phi_sixteenth) m_sixteenth++;
  end

  function automatic int code_of(real v);
    int k;
    k = 0;
    for (int c = 0; c < 256; c++) if (v >= (real'(c) - 0.5) / 256.0) k = c;
    return k;
  endfunction

  task automatic ref_diffuse();
    real nv [TIR][TIC];
    for (int y = 0; y < TIR; y += stride)
      for (int x = 0; x < TIC; x += stride) begin
        real a;
        a = 0.0;
        if (y >= stride)      a += rv[y - stride][x] - rv[y][x];
        if (y + stride < TIR) a += rv[y + stride][x] - rv[y][x];
        if (x >= stride)      a += rv[y][x - stride] - rv[y][x];
        if (x + stride < TIC) a += rv[y][x + stride] - rv[y][x];
        nv[y][x] = rv[y][x] + ALPHA * a;
      end
    for (int y = 0; y < TIR; y++)
      for (int x = 0; x < TIC; x++) rv[y][x] = nv[y - y % stride][x - x % stride];
  endtask

  task automatic ref_merge(int s);
    stride = s;
    for (int y = 0; y < TIR; y += s)
      for (int x = 0; x < TIC; x += s) begin
        real m;
        m = (rv[y][x] + rv[y][x + s/2] + rv[y + s/2][x] + rv[y + s/2][x + s/2]) / 4.0;
        for (int a = 0; a < s; a++) for (int b = 0; b < s; b++) rv[y + a][x + b] = m;
      end
  endtask

  // Value of the detector source of plane p at (r, c) of an octave, zero outside.
  function automatic int src_at(int p, int r, int c, int pw, int ph, bit use_dog);
    if (r < 0 || c < 0 || r >= ph || c >= pw) return 0;
    return use_dog ? pl[p][r][c] - pp[p][r][c] : pl[p][r][c];
  endfunction

  function automatic nb3_t nbh(int p, int r, int c, int pw, int ph, bit use_dog);
    nb3_t n;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) n[a][b] = src_at(p, r - 1 + a, c - 1 + b, pw, ph, use_dog);
    return n;
  endfunction

  function automatic beat_tag_t mk(beat_kind_e k, int o, int s, int p, int r, int st);
    beat_tag_t t;
    t = '{kind: k, octave: 2'(o), scale: 3'(s), plane: 2'(p), row: 8'(r), strip: 4'(st)};
    return t;
  endfunction

  task automatic expect_beat(beat_tag_t t, logic [BEAT_W-1:0] d);
    checks++;
    if (!got.exists(t)) begin
      failures++;
      if (failures < 20) $display("FAIL missing beat kind %0d o%0d s%0d p%0d r%0d st%0d", t.kind, t.octave, t.scale, t.plane, t.row, t.strip);
    end else begin
      if (got[t] != d) begin
        failures++;
        if (failures < 20) $display("FAIL beat kind %0d o%0d s%0d p%0d r%0d st%0d", t.kind, t.octave, t.scale, t.plane, t.row, t.strip);
      end
      got.delete(t);
    end
  endtask

  // Expected beats of one plane of one scale.
  task automatic check_plane(int o, int s, int p, bit det_dog);
    int pw, ph, ns;
    bit use_dog, rot;
    pw = (o == 2) ? TCC / 2 : TCC;
    ph = (o == 2) ? TCR / 2 : TCR;
    ns = (pw + 15) / 16;
    use_dog = det_dog && s > 0;
    rot = (o == 0);
    if (use_dog) m_src_dog++; else m_src_scale++;
    for (int st = 0; st < ns; st++)
      for (int r = 0; r < ph; r++) begin
        logic [BEAT_W-1:0] ds, dd, bx, by, bf;
        for (int i = 0; i < 16; i++) begin
          int x;
          x = st * 16 + i;
          ds[8*i +: 8] = (x < pw) ? 8'(pl[p][r][x]) : 8'h00;
          dd[8*i +: 8] = (x < pw) ? sat8(pl[p][r][x] - pp[p][r][x]) : 8'h00;
        end
        expect_beat(mk(BEAT_SCALE, o, s, p, r, st), ds);
        if (s > 0) begin expect_beat(mk(BEAT_DOG, o, s, p, r, st), dd); m_dog++; end
        if (r + 2 < ph) begin
          for (int i = 0; i < 16; i++) begin
            int col, dx, dy;
            bit vg, vh, hf;
            logic [1:0] hc;
            nb3_t gx, gy;
            col = st * 16 + i;
            vg = r >= 1 && r + 2 <= ph && col >= 1 && col + 2 <= pw;
            vh = r >= 2 && r + 3 <= ph && col >= 2 && col + 3 <= pw;
            grad(nbh(p, r, col, pw, ph, use_dog), rot, dx, dy);
            for (int a = 0; a < 3; a++)
              for (int b = 0; b < 3; b++) begin
                int ex, ey;
                grad(nbh(p, r - 1 + a, col - 1 + b, pw, ph, use_dog), rot, ex, ey);
                gx[a][b] = ex; gy[a][b] = ey;
              end
            hf = vg && (hess_det(nbh(p, r, col, pw, ph, use_dog), rot) > longint'(thr_hessian));
            hc = vh ? harris_cls(harris_resp(gx, gy), thr_corner, thr_edge) : 2'b10;
            bx[8*i +: 8] = vg ? sat8(dx) : 8'h00;
            by[8*i +: 8] = vg ? sat8(dy) : 8'h00;
            bf[8*i +: 8] = {vh, vg, 3'b000, hf, hc};
            if (!vh) m_border++;
            if (vh && hc == 2'b00) m_corner++;
            if (vh && hc == 2'b01) m_edge++;
            if (hf) m_hess++;
            if (vg && rot) m_rot++;
            if (vg && !rot) m_conv_grad++;
          end
          expect_beat(mk(BEAT_DX, o, s, p, r, st), bx);
          expect_beat(mk(BEAT_DY, o, s, p, r, st), by);
          expect_beat(mk(BEAT_FLAGS, o, s, p, r, st), bf);
        end
      end
  endtask

  task automatic run_frame(int oc, int sc, bit det_dog);
    longint t0;
    cfg_octaves = 2'(oc);
    cfg_scales = 4'(sc);
    cfg_det_src = det_dog;
    for (int k = 0; k < int'(MAX_SCALES); k++) cfg_diff[k] = (k == 0) ? 8'd0 : 8'(2 + k % 3);
    for (int y = 0; y < TIR; y++)
      for (int x = 0; x < TIC; x++) begin
        int v;
        v = 40 + int'($urandom % 12);
        if (y >= TIR / 4 && y < TIR / 2 + 2 && x >= TIC / 8 && x < TIC / 3) v += 150;
        if (y >= TIR / 2 && y < TIR / 2 + 4 && x >= TIC / 2 && x < TIC / 2 + 4) v = 5;
        light[y][x] = 8'(v);
      end
    got.delete();
    n_dup = 0;
    @(negedge clk) start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = $time;
    @(posedge frame_done);
    repeat (5) @(negedge clk);
    $display("frame: %0d octaves, %0d scales, detectors on %s: %0d cycles, %0d beats",
             oc, sc, det_dog ? "DoG" : "scale", ($time - t0) / 10, got.size());
    // reference
    stride = 1;
    for (int y = 0; y < TIR; y++)
      for (int x = 0; x < TIC; x++) rv[y][x] = real'(light[y][x]) / 256.0;
    for (int o = 0; o < oc; o++) begin
      if (o == 1) ref_merge(2);
      if (o == 2) ref_merge(4);
      for (int s = 0; s < sc; s++) begin
        repeat (int'(cfg_diff[s])) ref_diffuse();
        pp = pl;
        for (int p = 0; p < ((o == 0) ? 4 : 1); p++)
          for (int r = 0; r < TCR; r++)
            for (int c = 0; c < TCC; c++) begin
              int y, x;
              if (o < 2) begin y = 2 * r + p / 2; x = 2 * c + p % 2; end
              else begin y = 4 * r; x = 4 * c; end
              if (o < 2 || (r < TCR / 2 && c < TCC / 2)) pl[p][r][c] = code_of(rv[y][x]);
            end
        for (int p = 0; p < ((o == 0) ? 4 : 1); p++) check_plane(o, s, p, det_dog);
      end
    end
    check(got.size() == 0, $sformatf("%0d unexpected beats", got.size()));
    check(n_dup == 0, "no beat sent twice");
    check(!overflow, "no result overflow");
  endtask

  task automatic report_mechanisms();
    check(m_conv13 > 0 && m_conv24 > 0, $sformatf("conversions R13 %0d R24 %0d", m_conv13, m_conv24));
    check(m_we > 0, "copies into R1..R4");
    check(m_quarter > 0, "1/4 merge");
    check(m_sixteenth > 0, "1/16 merge");
    check(m_dog > 0, "DoG beats");
    check(m_overlap > 0, "P4 read overlapped with the next P1 conversion");
    check(m_src_scale > 0 && m_src_dog > 0, "detectors on scales and on DoGs");
    check(m_rot > 0 && m_conv_grad > 0, "rotated and conventional gradients");
    check(m_border > 0, "border points");
    check(m_corner > 0, "Harris corners");
    check(m_edge > 0, "Harris edges");
    check(m_hess > 0, "Hessian points");
    $display("mechanisms: conv13 %0d conv24 %0d copies %0d merge1/4 %0d merge1/16 %0d dog-beats %0d overlapped-P4-reads %0d",
             m_conv13, m_conv24, m_we, m_quarter, m_sixteenth, m_dog, m_overlap);
    $display("            planes on scale %0d on DoG %0d, rotated grads %0d conventional %0d, border %0d, corners %0d edges %0d hessian %0d",
             m_src_scale, m_src_dog, m_rot, m_conv_grad, m_border, m_corner, m_edge, m_hess);
  endtask
