// dog_unit: difference of Gaussians for one string of the frame buffer.
//
// For the 16 centre pixels of a 20-pixel string it forms S(k) - S(k-1) between the scale
// just converted and the previous scale held in the same register set, all 16 in parallel
// and combinationally. Two results are given: the exact 9-bit difference, which can feed the
// detectors, and a byte saturated to -128..127 for the 8-bit words sent to memory. The
// parallel difference follows the original design; the saturation is this design's choice.
module dog_unit
  import fd_pkg::*;
(
  input  pix_t        cur  [WIN_W],   // scale k
  input  pix_t        prev [WIN_W],   // scale k-1
  output wdat_t       dog  [WIN_W],   // exact difference, whole string
  output logic [7:0]  dog8 [STR_W]    // saturated difference, centre 16 pixels
);
  always_comb begin
    for (int i = 0; i < int'(WIN_W); i++)
      dog[i] = $signed({1'b0, cur[i]}) - $signed({1'b0, prev[i]});
    for (int i = 0; i < int'(STR_W); i++)
      dog8[i] = sat8(16'(dog[i + HALO]));
  end
endmodule
