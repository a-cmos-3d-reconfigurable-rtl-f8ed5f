// tb_dog_unit: random scale pairs through the DoG unit; checks the exact 9-bit differences
// and the saturated bytes of the 16 centre pixels, including the saturation limits.
module tb_dog_unit;
  import fd_pkg::*;
  pix_t cur [WIN_W], prev [WIN_W];
  wdat_t dog [WIN_W];
  logic [7:0] dog8 [STR_W];
  int checks = 0, failures = 0;

  dog_unit dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 500; t++) begin
      for (int i = 0; i < int'(WIN_W); i++) begin
        cur[i]  = (t < 2) ? ((t == 0) ? 8'd255 : 8'd0) : 8'($urandom);
        prev[i] = (t < 2) ? ((t == 0) ? 8'd0 : 8'd255) : 8'($urandom);
      end
      #1;
      for (int i = 0; i < int'(WIN_W); i++) begin
        int d, s;
        d = int'(cur[i]) - int'(prev[i]);
        checks++;
        if (int'(dog[i]) != d) begin failures++; $display("FAIL dog[%0d] %0d vs %0d", i, dog[i], d); end
        if (i >= int'(HALO) && i < int'(HALO + STR_W)) begin
          s = d > 127 ? 127 : (d < -128 ? -128 : d);
          checks++;
          if ($signed(dog8[i - HALO]) != 8'(s)) begin failures++; $display("FAIL dog8[%0d]", i); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
