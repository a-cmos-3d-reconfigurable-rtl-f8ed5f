// tb_code_counter: checks that the global ADC counter runs every code, holds each for
// STEP_CYCLES cycles, then raises done once and returns to idle, and that a conversion takes
// 2^W * STEP_CYCLES cycles.
module tb_code_counter;
  localparam int unsigned W = 4;
  localparam int unsigned STEP = 3;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [W-1:0] code;
  logic busy, done;
  int checks = 0, failures = 0;

  code_counter #(.W(W), .STEP_CYCLES(STEP)) dut (.*);

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
    int cyc;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 2; run++) begin
      @(negedge clk) start = 1'b1;
      @(negedge clk) start = 1'b0;
      cyc = 1;
      for (int c = 0; c < (1 << W); c++)
        for (int s = 0; s < int'(STEP); s++) begin
          check(busy && code == W'(c) && !done, $sformatf("code %0d step %0d got %0d busy %0d", c, s, code, busy));
          @(negedge clk); cyc++;
        end
      check(done && !busy, "done after the last code");
      check(cyc == (1 << W) * STEP + 1, $sformatf("conversion time %0d cycles", cyc));
      @(negedge clk);
      check(!done && !busy, "idle after done");
      repeat (4) @(negedge clk);
      check(!busy, "stays idle without start");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
