// result_packer: sorts the results of the bottom tier into 128-bit beats for the DRAM.
//
// Each read of the frame buffer yields 16 pixels of scale S(k) and, from the second scale of
// an octave on, their 16 DoG values; 17 cycles later the feature unit yields 16 bytes each of
// dx, dy and detector flags for a centre row. Each group of 16 bytes is one 128-bit beat
// (byte i, bits 8i+7..8i, is pixel i of the string). The packer holds one beat of each kind
// and sends one beat per cycle, lowest kind first, with a tag telling what and where it is.
//
// Interface: a write-only, always-ready port (dram_valid, dram_data, dram_tag); the DRAM of
// the stack accepts 256 bits per cycle at 1 GHz per port, far more than the one beat per
// processing cycle offered here, so no back-pressure is modelled. Five beats arrive at most
// every 16 cycles, so a slot is always empty again before it is reloaded; should it not be,
// `overflow` sticks high and an assertion fires. The 128-bit grouping of 16 bytes follows the
// original design; the beat order, the tag and the slot structure are this design's choices.
module result_packer
  import fd_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              str_valid,
  input  str_tag_t          str_tag,
  input  pix_t              scale [STR_W],
  input  logic [7:0]        dog8  [STR_W],
  input  logic              res_valid,
  input  str_tag_t          res_tag,
  input  logic [7:0]        dx8   [STR_W],
  input  logic [7:0]        dy8   [STR_W],
  input  logic [7:0]        flags [STR_W],
  output logic              dram_valid,
  output logic [BEAT_W-1:0] dram_data,
  output beat_tag_t         dram_tag,
  output logic              overflow
);
  localparam int unsigned NK = 5;

  logic [NK-1:0]     pend;
  logic [BEAT_W-1:0] data [NK];
  beat_tag_t         tag  [NK];

  function automatic logic [BEAT_W-1:0] pack(input logic [7:0] b [STR_W]);
    logic [BEAT_W-1:0] w;
    for (int i = 0; i < int'(STR_W); i++) w[8*i +: 8] = b[i];
    return w;
  endfunction

  function automatic beat_tag_t mk_tag(input beat_kind_e k, input str_tag_t t);
    beat_tag_t b;
    b.kind   = k;
    b.octave = t.octave;
    b.scale  = t.scale;
    b.plane  = t.plane;
    b.row    = t.row;
    b.strip  = t.strip;
    return b;
  endfunction

  // Slot sent this cycle: the lowest pending one.
  logic [NK-1:0] send;
  always_comb begin
    send = '0;
    for (int k = 0; k < int'(NK); k++)
      if (pend[k] && send == '0) send[k] = 1'b1;
  end

  logic [NK-1:0] load;
  always_comb begin
    load = '0;
    load[BEAT_SCALE] = str_valid;
    load[BEAT_DOG]   = str_valid && !str_tag.first_scale;
    load[BEAT_DX]    = res_valid;
    load[BEAT_DY]    = res_valid;
    load[BEAT_FLAGS] = res_valid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      data       <= '{default: '0};
      tag        <= '{default: beat_tag_t'('0)};
      dram_valid <= 1'b0;
      dram_data  <= '0;
      dram_tag   <= '0;
      overflow   <= 1'b0;
    end else begin
      dram_valid <= 1'b0;
      for (int k = 0; k < int'(NK); k++)
        if (send[k]) begin
          dram_valid <= 1'b1;
          dram_data  <= data[k];
          dram_tag   <= tag[k];
        end
      pend <= (pend & ~send) | load;
      if ((load & pend & ~send) != '0) overflow <= 1'b1;
      if (load[BEAT_SCALE]) begin
        data[BEAT_SCALE] <= pack(scale);
        tag[BEAT_SCALE]  <= mk_tag(BEAT_SCALE, str_tag);
      end
      if (load[BEAT_DOG]) begin
        data[BEAT_DOG] <= pack(dog8);
        tag[BEAT_DOG]  <= mk_tag(BEAT_DOG, str_tag);
      end
      if (res_valid) begin
        data[BEAT_DX]    <= pack(dx8);
        tag[BEAT_DX]     <= mk_tag(BEAT_DX, res_tag);
        data[BEAT_DY]    <= pack(dy8);
        tag[BEAT_DY]     <= mk_tag(BEAT_DY, res_tag);
        data[BEAT_FLAGS] <= pack(flags);
        tag[BEAT_FLAGS]  <= mk_tag(BEAT_FLAGS, res_tag);
      end
    end
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) (load & pend & ~send) == '0)
    else $error("result_packer: a result beat was overwritten before it was sent");
endmodule
