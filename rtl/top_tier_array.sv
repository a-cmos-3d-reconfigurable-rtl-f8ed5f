// top_tier_array: behavioural model of the analog top tier: 3T photodiodes with correlated
// double sampling, the state capacitors used as analog memories, the switched-capacitor
// diffusion network that builds the Gaussian pyramid, the merging switches, and one
// comparator per 4-pixel cell. It is not synthesizable logic: every value is an analog
// voltage, held here as a real number.
//
// Acquisition (phi_acq): each pixel's state capacitor takes
//   V = VREF + (C / CS) * (VS(t0) - VS(t1)),
// the CDS result with the inverter offset cancelled; `light` gives VS(t0) - VS(t1) of each
// photodiode in units of one ADC step (VFS / 256).
// Diffusion (phi_diff, one network cycle per clock with phi_diff high): every active node
// exchanges charge with its four cardinal neighbours,
//   V(n) = V(n-1) + a * (sum of neighbours - count * V(n-1)),  a = (CE/C) / (1 + 4 CE/C),
// which is one pass of a Gaussian of sigma0 fixed by C/CE; repeated passes widen it.
// Merging: phi_quarter averages the four state capacitors of each cell (second octave, one
// node per cell); phi_sixteenth averages four cells into one (third octave, one active cell
// in four). Nodes at the array edge have fewer neighbours and exchange only with those.
// Comparator: comp[cell] is high while the value of the state capacitor selected by conv_sel
// (s1..s4 = P1..P4 as 0..3) is at or above the ramp; it drives the cell's via to the bottom
// tier.
//
// The equations, the merging and the sharing of one comparator by four photodiodes follow
// the original design, with C = 100 fF and CE = 10 fF. Capacitor mismatch, charge injection
// and feedthrough are not modelled; the edge rule and the signal scaling are this design's
// choices.
module top_tier_array #(
  parameter int unsigned COLS  = 320,
  parameter int unsigned ROWS  = 240,
  parameter real         C_FF  = 100.0,  // state capacitor
  parameter real         CE_FF = 10.0,   // exchange capacitor
  parameter real         CS_FF = 100.0,  // CDS capacitor C over state capacitor
  parameter real         VREF  = 0.0,
  parameter real         VFS   = 1.0
) (
  input  logic       clk,
  input  logic [7:0] light [ROWS][COLS],
  input  logic       phi_acq,
  input  logic       phi_diff,
  input  logic       phi_quarter,
  input  logic       phi_sixteenth,
  input  logic [1:0] conv_sel,
  input  real        vramp,
  output logic       comp [ROWS/2][COLS/2]
);
  localparam real LSB   = VFS / 256.0;
  localparam real RATIO = CE_FF / C_FF;
  localparam real ALPHA = RATIO / (1.0 + 4.0 * RATIO);

  real v   [ROWS][COLS];
  real nv  [ROWS][COLS];
  int  stride;  // node spacing in pixels: 1, 2 or 4

  initial begin
    stride = 1;
    for (int y = 0; y < int'(ROWS); y++)
      for (int x = 0; x < int'(COLS); x++) v[y][x] = VREF;
  end

  always @(posedge clk) begin
    if (phi_acq) begin
      stride = 1;
      for (int y = 0; y < int'(ROWS); y++)
        for (int x = 0; x < int'(COLS); x++)
          v[y][x] = VREF + (CS_FF / C_FF) * real'(light[y][x]) * LSB;
    end else if (phi_quarter || phi_sixteenth) begin
      int s;
      s = phi_quarter ? 2 : 4;
      stride = s;
      for (int y = 0; y < int'(ROWS); y += s)
        for (int x = 0; x < int'(COLS); x += s) begin
          real m;
          m = (v[y][x] + v[y][x + s/2] + v[y + s/2][x] + v[y + s/2][x + s/2]) / 4.0;
          for (int dy = 0; dy < s; dy++)
            for (int dx = 0; dx < s; dx++) v[y + dy][x + dx] = m;
        end
    end else if (phi_diff) begin
      for (int y = 0; y < int'(ROWS); y += stride)
        for (int x = 0; x < int'(COLS); x += stride) begin
          real acc;
          acc = 0.0;
          if (y >= stride)              acc += v[y - stride][x] - v[y][x];
          if (y + stride < int'(ROWS))  acc += v[y + stride][x] - v[y][x];
          if (x >= stride)              acc += v[y][x - stride] - v[y][x];
          if (x + stride < int'(COLS))  acc += v[y][x + stride] - v[y][x];
          nv[y][x] = v[y][x] + ALPHA * acc;
        end
      for (int y = 0; y < int'(ROWS); y++)
        for (int x = 0; x < int'(COLS); x++)
          v[y][x] = nv[y - (y % stride)][x - (x % stride)];
    end
  end

  always_comb
    for (int cy = 0; cy < int'(ROWS / 2); cy++)
      for (int cx = 0; cx < int'(COLS / 2); cx++)
        comp[cy][cx] = v[2 * cy + int'(conv_sel[1])][2 * cx + int'(conv_sel[0])] >= vramp;
endmodule
