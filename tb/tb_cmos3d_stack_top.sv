// tb_cmos3d_stack_top: end-to-end test of the stack on a 64 x 16 image (32 x 8 cells, two
// strips) with a fast counter (2 cycles per code). Runs a frame of 3 octaves x 3 scales with
// the detectors on the scales, then one of 3 octaves x 2 scales with the detectors on the
// DoGs, and checks every beat written to memory against an independent recomputation (see
// tb_stack_check.svh), and the counts of each mechanism.
module tb_cmos3d_stack_top;
  localparam int TIC = 64, TIR = 16, TSTEP = 2;
  `include "tb_stack_check.svh"

  cmos3d_stack_top #(.IMG_C(TIC), .IMG_R(TIR), .STEP_CYCLES(TSTEP)) dut (.*);

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    run_frame(3, 3, 1'b0);
    run_frame(3, 2, 1'b1);
    report_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
