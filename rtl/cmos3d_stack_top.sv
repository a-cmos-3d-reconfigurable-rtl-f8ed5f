// cmos3d_stack_top: the two-tier vision stack: sensor and analog processors on top, frame
// buffer and digital processing below, results out to the DRAM of the stack.
//
// The top tier (top_tier_array, behavioural) acquires the image, builds each scale of the
// Gaussian pyramid by charge diffusion and compares the selected state capacitor of every
// cell with the global ramp (ramp_generator, behavioural) driven by the global counter
// (code_counter). Each cell's comparator bit crosses to the frame buffer (frame_buffer of
// fb_register_set) below it, where it gates the loading of the counter code. The sequencer
// (stack_sequencer) runs the frame: acquisition, diffusion, merging, conversion of P1..P4 and
// reading of the previous plane in parallel, and the copies to the scale-k-1 registers.
// Every string read is turned into 16 DoG values (dog_unit) and fed, as scale or as DoG
// (cfg_det_src), to the serial feature unit (gradient, Hessian, Harris). The result packer
// sends scale, DoG, dx, dy and flags beats of 128 bits to the DRAM write port.
//
// Configuration comes from the external coprocessor: octaves (1..3), scales per octave,
// diffusion cycles before each scale (which set each scale's sigma) and detector thresholds.
// start begins a frame; frame_done pulses at its end. The DRAM and the coprocessor are
// outside this module.
module cmos3d_stack_top
  import fd_pkg::*;
#(
  parameter int unsigned IMG_C       = IMG_COLS,
  parameter int unsigned IMG_R       = IMG_ROWS,
  parameter int unsigned STEP_CYCLES = 75,     // 120 us conversion at 160 MHz over 256 codes
  parameter int unsigned READ_PERIOD = STR_W   // processing clock / read clock
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic [7:0]                  light [IMG_R][IMG_C],
  input  logic                        start,
  input  logic [1:0]                  cfg_octaves,
  input  logic [3:0]                  cfg_scales,
  input  logic [7:0]                  cfg_diff [MAX_SCALES],
  input  logic                        cfg_det_src,   // 0: detectors on S(k), 1: on DoG(k)
  input  logic signed [HESSIAN_W-1:0] thr_hessian,
  input  logic signed [HARRIS_W-1:0]  thr_corner,
  input  logic signed [HARRIS_W-1:0]  thr_edge,
  output logic                        busy,
  output logic                        frame_done,
  output logic                        dram_valid,
  output logic [BEAT_W-1:0]           dram_data,
  output beat_tag_t                   dram_tag,
  output logic                        overflow
);
  localparam int unsigned CC = IMG_C / 2;
  localparam int unsigned CR = IMG_R / 2;

  // Sequencer outputs
  logic       phi_acq, phi_diff, phi_quarter, phi_sixteenth;
  logic [1:0] conv_sel;
  logic       cnt_start, cnt_busy, cnt_done;
  logic       conv13, conv24;
  logic [3:0] we;
  logic       rd_valid;
  str_tag_t   rd_tag;

  stack_sequencer #(
    .PLANE_COLS(CC), .PLANE_ROWS(CR), .READ_PERIOD(READ_PERIOD)
  ) u_seq (
    .clk, .rst_n, .start, .cfg_octaves, .cfg_scales, .cfg_diff,
    .phi_acq, .phi_diff, .phi_quarter, .phi_sixteenth, .conv_sel,
    .cnt_start, .cnt_busy, .cnt_done,
    .conv13, .conv24, .we, .rd_valid, .rd_tag,
    .busy, .frame_done
  );

  // Single-slope converter: counter (bottom tier), ramp and comparators (top tier).
  pix_t code;
  code_counter #(.W(PIX_W), .STEP_CYCLES(STEP_CYCLES)) u_cnt (
    .clk, .rst_n, .start(cnt_start), .code, .busy(cnt_busy), .done(cnt_done)
  );

  real vramp;
  ramp_generator #(.W(PIX_W)) u_ramp (.code, .enable(cnt_busy), .vramp);

  logic comp [CR][CC];   // one via per cell
  top_tier_array #(.COLS(IMG_C), .ROWS(IMG_R)) u_top (
    .clk, .light, .phi_acq, .phi_diff, .phi_quarter, .phi_sixteenth,
    .conv_sel, .vramp, .comp
  );

  // Bottom tier.
  logic     str_valid;
  str_tag_t str_tag;
  pix_t     str_cur  [WIN_W];
  pix_t     str_prev [WIN_W];
  frame_buffer #(.COLS(CC), .ROWS(CR)) u_fb (
    .clk, .rst_n, .tsv_comp(comp), .code, .conv13, .conv24, .we,
    .rd_valid, .rd_tag, .str_valid, .str_tag, .str_cur, .str_prev
  );

  wdat_t      dog  [WIN_W];
  logic [7:0] dog8 [STR_W];
  dog_unit u_dog (.cur(str_cur), .prev(str_prev), .dog, .dog8);

  wdat_t src [WIN_W];
  pix_t  scale16 [STR_W];
  always_comb begin
    for (int i = 0; i < int'(WIN_W); i++)
      src[i] = (cfg_det_src && !str_tag.first_scale) ? dog[i] : WD_W'(str_cur[i]);
    for (int i = 0; i < int'(STR_W); i++)
      scale16[i] = str_cur[i + HALO];
  end

  logic       res_valid;
  str_tag_t   res_tag;
  logic [7:0] dx8 [STR_W];
  logic [7:0] dy8 [STR_W];
  logic [7:0] flags [STR_W];
  feature_unit #(.PLANE_COLS(CC), .PLANE_ROWS(CR)) u_feat (
    .clk, .rst_n, .str_valid, .str_tag, .str_data(src),
    .thr_hessian, .thr_corner, .thr_edge,
    .res_valid, .res_tag, .dx8, .dy8, .flags
  );

  result_packer u_pack (
    .clk, .rst_n, .str_valid, .str_tag, .scale(scale16), .dog8,
    .res_valid, .res_tag, .dx8, .dy8, .flags,
    .dram_valid, .dram_data, .dram_tag, .overflow
  );
endmodule
