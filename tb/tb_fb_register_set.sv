// tb_fb_register_set: drives one frame-buffer cell with random comparator bits, counter
// codes, conversion strobes and copy strobes, and compares its six registers every cycle
// with a reference model. It also runs a full single-slope conversion of a value into R13
// and copies it into R1.
module tb_fb_register_set;
  import fd_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic tsv_comp = 1'b0, conv13 = 1'b0, conv24 = 1'b0;
  pix_t code = '0;
  logic [3:0] we = '0;
  pix_t r13, r24;
  pix_t rprev [4];
  pix_t m13 = '0, m24 = '0;
  pix_t mprev [4] = '{default: '0};
  int checks = 0, failures = 0;

  fb_register_set dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      tsv_comp = 1'($urandom);
      conv13 = 1'($urandom);
      conv24 = 1'($urandom);
      code = 8'($urandom);
      we = 4'($urandom);
      @(posedge clk);
      // reference, using the values before the edge
      begin
        pix_t o13, o24;
        o13 = m13; o24 = m24;
        if (tsv_comp && conv13) m13 = code;
        if (tsv_comp && conv24) m24 = code;
        if (we[0]) mprev[0] = o13;
        if (we[1]) mprev[1] = o24;
        if (we[2]) mprev[2] = o13;
        if (we[3]) mprev[3] = o24;
      end
      @(negedge clk);
      check(r13 == m13 && r24 == m24, $sformatf("t=%0d r13 %0d/%0d r24 %0d/%0d", t, r13, m13, r24, m24));
      for (int k = 0; k < 4; k++) check(rprev[k] == mprev[k], $sformatf("t=%0d R%0d", t, k + 1));
    end
    // Single-slope conversion of the value 173: comparator high while value >= code.
    we = '0; conv24 = 1'b0; conv13 = 1'b1;
    for (int c = 0; c < 256; c++) begin
      code = 8'(c);
      tsv_comp = (173 >= c);
      @(negedge clk);
    end
    conv13 = 1'b0; tsv_comp = 1'b0;
    check(r13 == 8'd173, $sformatf("converted value %0d", r13));
    we = 4'b0001;
    @(negedge clk) we = '0;
    check(rprev[0] == 8'd173, "copy of R13 into R1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
