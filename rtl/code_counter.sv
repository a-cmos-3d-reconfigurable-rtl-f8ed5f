// code_counter: the global digital code generator of the single-slope A/D converter.
//
// The converter is split over the two tiers: the ramp and one comparator per cell sit in the
// top tier, the counter and one register per cell in the bottom tier. A start pulse runs the
// code 0, 1, ..., 2^W-1; each code is held STEP_CYCLES clock cycles so that the whole ramp
// spans one conversion time. busy is high while the code runs and done pulses for one cycle
// after the last code. The ramp generator turns the same code into the analog ramp, and each
// cell register loads the code while its comparator still says "input above ramp", so it ends
// holding the code where the ramp crossed the pixel value.
//
// Timing: a conversion takes 2^W * STEP_CYCLES cycles after the start pulse. The 8-bit width
// and the 120 us conversion time come from the original design; STEP_CYCLES = 75 is that time
// at the 160 MHz processing clock (19200 cycles / 256 codes). Counting upward from zero and
// the start/done handshake are this design's choices.
module code_counter #(
  parameter int unsigned W           = 8,
  parameter int unsigned STEP_CYCLES = 75
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  output logic [W-1:0] code,
  output logic         busy,
  output logic         done
);
  localparam int unsigned DW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;
  logic [DW-1:0] div;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code <= '0;
      busy <= 1'b0;
      done <= 1'b0;
      div  <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy <= 1'b1;
        code <= '0;
        div  <= '0;
      end else if (busy) begin
        if (div == DW'(STEP_CYCLES - 1)) begin
          div <= '0;
          if (code == {W{1'b1}}) begin
            busy <= 1'b0;
            done <= 1'b1;
          end else begin
            code <= code + 1'b1;
          end
        end else begin
          div <= div + 1'b1;
        end
      end
    end
  end
endmodule
