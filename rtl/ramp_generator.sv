// ramp_generator: behavioural model of the global analog ramp of the single-slope A/D
// converter. It is not synthesizable logic: the real part is an analog circuit shared by all
// cells of the top tier.
//
// The ramp follows the global counter code so that the comparator of a cell changes state
// when the ramp passes the cell value: vramp = VREF + (code - 0.5) * VFS / 2^W while `enable`
// is high, and above full scale otherwise, which keeps every comparator low. The half-LSB
// offset makes the final code of a cell the nearest code to its value. The single global
// ramp follows the original design; the levels and the offset are this design's choices.
module ramp_generator #(
  parameter int unsigned W    = 8,
  parameter real         VREF = 0.0,
  parameter real         VFS  = 1.0
) (
  input  logic [W-1:0] code,
  input  logic         enable,
  output real          vramp
);
  always_comb begin
    if (enable) vramp = VREF + (real'(code) - 0.5) * VFS / real'(2 ** W);
    else        vramp = VREF + 2.0 * VFS;
  end
endmodule
