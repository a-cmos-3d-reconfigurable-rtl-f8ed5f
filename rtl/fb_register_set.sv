// fb_register_set: the six 8-bit registers of one frame-buffer cell in the bottom tier.
//
// Each cell of the bottom tier sits under one 4-pixel analog processor. Its single
// through-silicon via carries the cell comparator output (tsv_comp). ANDed with the two
// global conversion strobes it enables the two "scale k" registers: R13 takes pixels P1 and
// P3, R24 pixels P2 and P4, by loading the global counter code every cycle while enabled.
// Four further registers R1..R4 keep P1..P4 of scale k-1. we[p] copies the scale-k value of
// plane p into R(p+1): R13 for P1/P3, R24 for P2/P4. Both scales are visible at the outputs
// for the difference of Gaussians.
//
// In the second and third octaves only the P1 path (R13, R1) is used. The register structure,
// the AND gating and the copy strobes follow the original design; the reset to zero is this
// design's choice.
module fb_register_set
  import fd_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tsv_comp,  // comparator output of the cell above
  input  pix_t       code,      // global counter code
  input  logic       conv13,    // phi_conv13
  input  logic       conv24,    // phi_conv24
  input  logic [3:0] we,        // phi_WE1..phi_WE4
  output pix_t       r13,
  output pix_t       r24,
  output pix_t       rprev [4]  // R1_K-1 .. R4_K-1
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r13   <= '0;
      r24   <= '0;
      rprev <= '{default: '0};
    end else begin
      if (tsv_comp && conv13) r13 <= code;
      if (tsv_comp && conv24) r24 <= code;
      if (we[0]) rprev[0] <= r13;
      if (we[1]) rprev[1] <= r24;
      if (we[2]) rprev[2] <= r13;
      if (we[3]) rprev[3] <= r24;
    end
  end
endmodule
