// tb_stack_sequencer: runs frames of the sequencer with a real code_counter on a small plane
// (32 x 4 cells, 4-cycle counter steps) and counts what it does: acquisition, diffusion
// cycles per scale, merges, conversions per octave (four planes in the first octave, one
// after), string reads per plane, the copy strobe after each read (and that it copies the plane just read), the order P1..P4 of
// conversion and reading, the overlap of each first-octave P4 read with the next P1
// conversion, and the frame length between its bounds.
module tb_stack_sequencer;
  import fd_pkg::*;
  localparam int PC = 32, PR = 4, RP = 16, DR = 24, STEP = 4;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [1:0] cfg_octaves;
  logic [3:0] cfg_scales;
  logic [7:0] cfg_diff [MAX_SCALES];
  logic phi_acq, phi_diff, phi_quarter, phi_sixteenth;
  logic [1:0] conv_sel;
  logic cnt_start, cnt_busy, cnt_done;
  logic conv13, conv24;
  logic [3:0] we;
  logic rd_valid;
  str_tag_t rd_tag;
  logic busy, frame_done;
  pix_t code;
  int checks = 0, failures = 0;
  int n_acq, n_diff, n_q, n_s, n_conv, n_rd, n_we, n_first;
  int conv_order [$], read_order [$];
  int n_overlap;
  logic [1:0] last_rd_plane = 2'd0;

  stack_sequencer #(.PLANE_COLS(PC), .PLANE_ROWS(PR), .READ_PERIOD(RP), .DRAIN(DR)) dut (.*);
  code_counter #(.W(8), .STEP_CYCLES(STEP)) u_cnt (.clk, .rst_n, .start(cnt_start), .code, .busy(cnt_busy), .done(cnt_done));
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(posedge clk) begin
    if (phi_acq) n_acq++;
    if (phi_diff) n_diff++;
    if (phi_quarter) n_q++;
    if (phi_sixteenth) n_s++;
    if (cnt_start && conv_sel == 0 && dut.read_run && dut.rd_plane == 2'd3) n_overlap++;
    if (cnt_start) begin n_conv++; conv_order.push_back(int'(conv_sel)); end
    if (rd_valid) begin
      n_rd++;
      if (rd_tag.row == 0 && rd_tag.strip == 0) read_order.push_back(int'(rd_tag.plane));
      if (rd_tag.first_scale) n_first++;
      last_rd_plane <= rd_tag.plane;
    end
    if (rst_n && we != 0) begin
      n_we++;
      if (we != 4'(1) << last_rd_plane) begin
        failures++;
        $display("FAIL copy strobe %b after a read of plane %0d", we, last_rd_plane);
      end
    end
    if (conv13 && conv_sel[0]) begin failures++; $display("FAIL conv13 for P2/P4"); end
    if (conv24 && !conv_sel[0]) begin failures++; $display("FAIL conv24 for P1/P3"); end
  end

  initial begin
    longint t0, cycles, expect_cycles;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      int oc, sc, dsum;
      oc = run == 0 ? 3 : 1;
      sc = run == 0 ? 3 : 2;
      cfg_octaves = 2'(oc);
      cfg_scales = 4'(sc);
      dsum = 0;
      for (int k = 0; k < int'(MAX_SCALES); k++) begin
        cfg_diff[k] = 8'(k + 2);
        if (k < sc) dsum += k + 2;
      end
      n_acq = 0; n_diff = 0; n_q = 0; n_s = 0; n_conv = 0; n_rd = 0; n_we = 0; n_first = 0; n_overlap = 0;
      conv_order.delete(); read_order.delete();
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      t0 = $time;
      @(posedge frame_done);
      cycles = ($time - t0) / 10;
      begin
        int convs, reads, strings, steps_conv;
        longint conv_t, read1_t, read3_t, e;
        convs = sc * 4 + (oc > 1 ? sc : 0) + (oc > 2 ? sc : 0);
        strings = sc * (4 * 2 * PR + (oc > 1 ? 2 * PR : 0) + (oc > 2 ? 1 * PR / 2 : 0));
        check(n_acq == 1, "one acquisition");
        check(n_diff == oc * dsum, $sformatf("diffusion cycles %0d", n_diff));
        check(n_q == (oc > 1) && n_s == (oc > 2), "merges");
        check(n_conv == convs, $sformatf("conversions %0d vs %0d", n_conv, convs));
        check(n_rd == strings, $sformatf("string reads %0d vs %0d", n_rd, strings));
        check(n_we == convs, $sformatf("copy strobes %0d", n_we));
        for (int k = 0; k < n_conv; k++)
          check(conv_order[k] == ((k < 4 * sc) ? k % 4 : 0), "conversion order");
        for (int k = 0; k < read_order.size(); k++)
          check(read_order[k] == ((k < 4 * sc) ? k % 4 : 0), "read order");
        // frame length: every conversion runs in series; reads only add time where they
        // are not hidden behind a conversion
        conv_t = 256 * STEP;
        read1_t = 2 * PR * RP + DR;
        read3_t = 1 * (PR / 2) * RP + DR;
        check(n_overlap == sc - 1 + (oc > 1 ? 1 : 0), $sformatf("P4 reads overlapped with P1 conversions: %0d", n_overlap));
        e = longint'(convs) * (conv_t + 3) + (oc > 1 ? sc * (read1_t + 3) : read1_t + 3)
            + (oc > 2 ? sc * (read3_t + 3) : 0) + oc * dsum + 20;
        check(cycles >= longint'(convs) * conv_t, $sformatf("frame length %0d below the conversion time", cycles));
        check(cycles <= e, $sformatf("frame length %0d cycles, bound %0d", cycles, e));
        $display("frame %0d x %0d: %0d cycles (bound %0d)", oc, sc, cycles, e);
      end
      repeat (5) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
