// tb_ramp_generator: checks the ramp level for every code and that a disabled ramp sits
// above full scale.
module tb_ramp_generator;
  logic [7:0] code;
  logic enable;
  real vramp;
  int checks = 0, failures = 0;

  ramp_generator dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    enable = 1'b1;
    for (int c = 0; c < 256; c++) begin
      real e;
      code = 8'(c);
      #1;
      e = (real'(c) - 0.5) / 256.0;
      checks++;
      if (vramp > e + 1e-9 || vramp < e - 1e-9) begin failures++; $display("FAIL code %0d: %f", c, vramp); end
    end
    enable = 1'b0;
    #1;
    checks++;
    if (vramp <= 1.0) begin failures++; $display("FAIL disabled ramp %f", vramp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
