// stack_sequencer: the control unit of the two-tier stack for one frame.
//
// One frame runs as follows. The image is acquired with correlated double sampling
// (phi_acq). Then, for each octave, the pixels are merged (phi_quarter before the second
// octave, phi_sixteenth before the third) and, for each scale, the switched-capacitor
// network gets cfg_diff[scale] diffusion cycles (phi_diff), each widening the Gaussian. The
// scale is then converted plane by plane: four planes P1..P4 in series in the first octave,
// where four photodiodes share one comparator, and one plane in the later octaves. A plane
// is converted into R13 (P1, P3) or R24 (P2, P4) while the plane converted before it is read
// out for the DoG, gradient and detectors; a step ends when both are done.
//
// The read engine issues one string read every READ_PERIOD cycles, row by row down each
// 16-column strip, waits DRAIN cycles so the serial feature unit and the result packer can
// finish, then copies the plane just read into its scale-k-1 register (we). The last plane
// of a first-octave scale is P4, held in R24; its read overlaps the diffusion and the P1
// conversion (into R13) of the next scale, so a first-octave scale costs four conversion
// times. In the later octaves the single plane lives in R13, which the next conversion
// overwrites, so its read is waited for.
//
// The order of operations follows the original design (diffusion, conversion of P1..P4 in
// series with reading of the previous plane, the copy into R1..R4, merging for octaves 2 and
// 3). The step structure, the one-diffusion-cycle-per-clock rate, the configuration inputs
// and the drain time are this design's choices.
module stack_sequencer
  import fd_pkg::*;
#(
  parameter int unsigned PLANE_COLS  = CELL_COLS,
  parameter int unsigned PLANE_ROWS  = CELL_ROWS,
  parameter int unsigned READ_PERIOD = 16,
  parameter int unsigned DRAIN       = 24
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] cfg_octaves,             // 1..3
  input  logic [3:0] cfg_scales,              // 1..MAX_SCALES scales per octave
  input  logic [7:0] cfg_diff [MAX_SCALES],   // diffusion cycles before each scale
  // top tier
  output logic       phi_acq,
  output logic       phi_diff,
  output logic       phi_quarter,
  output logic       phi_sixteenth,
  output logic [1:0] conv_sel,                // state capacitor sent to the comparator
  // ADC counter
  output logic       cnt_start,
  input  logic       cnt_busy,
  input  logic       cnt_done,
  // frame buffer
  output logic       conv13,
  output logic       conv24,
  output logic [3:0] we,
  output logic       rd_valid,
  output str_tag_t   rd_tag,
  // status
  output logic       busy,
  output logic       frame_done
);
  typedef enum logic [2:0] {S_IDLE, S_ACQ, S_MERGE, S_DIFF, S_STEP_START, S_STEP, S_NEXT, S_LAST_READ} state_e;
  state_e state;

  logic [1:0] oct;
  logic [3:0] sc;
  logic [2:0] p;          // plane being converted
  logic [7:0] diff_left;
  logic       conv_run;
  // read engine
  logic       read_run, draining;
  logic [1:0] rd_plane, rd_oct;
  logic [2:0] rd_sc;
  logic [7:0] rd_row;
  logic [3:0] rd_strip;
  logic [$clog2(READ_PERIOD + DRAIN + 1)-1:0] timer;
  logic       rd_go;      // start a read of plane rd_go_plane of the current scale
  logic [1:0] rd_go_plane;

  logic [2:0] planes;
  assign planes = (oct == 2'd0) ? 3'd4 : 3'd1;

  int unsigned pw, ph, nstrips;
  always_comb begin
    pw      = (rd_oct == 2'd2) ? PLANE_COLS / 2 : PLANE_COLS;
    ph      = (rd_oct == 2'd2) ? PLANE_ROWS / 2 : PLANE_ROWS;
    nstrips = (pw + STR_W - 1) / STR_W;
  end

  assign conv13 = conv_run && cnt_busy && !conv_sel[0];
  assign conv24 = conv_run && cnt_busy &&  conv_sel[0];
  assign busy   = (state != S_IDLE);

  // Reads are started when a step begins (the plane converted before) and when the last
  // conversion of a scale is over (the last plane).
  always_comb begin
    rd_go       = (state == S_STEP_START && p != 0) || (state == S_NEXT && p + 1'b1 >= planes);
    rd_go_plane = (state == S_STEP_START) ? 2'(p - 1'b1) : p[1:0];
  end

  logic last_scale, last_octave;
  assign last_scale  = (sc + 1'b1 >= cfg_scales);
  assign last_octave = (oct + 1'b1 >= cfg_octaves);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      oct <= '0; sc <= '0; p <= '0; diff_left <= '0;
      conv_run <= 1'b0; read_run <= 1'b0; draining <= 1'b0;
      rd_plane <= '0; rd_oct <= '0; rd_sc <= '0; rd_row <= '0; rd_strip <= '0; timer <= '0;
      phi_acq <= 1'b0; phi_diff <= 1'b0; phi_quarter <= 1'b0; phi_sixteenth <= 1'b0;
      conv_sel <= '0; cnt_start <= 1'b0; we <= '0; rd_valid <= 1'b0; rd_tag <= '0;
      frame_done <= 1'b0;
    end else begin
      phi_acq <= 1'b0; phi_diff <= 1'b0; phi_quarter <= 1'b0; phi_sixteenth <= 1'b0;
      cnt_start <= 1'b0; we <= '0; rd_valid <= 1'b0; frame_done <= 1'b0;

      // Read engine: one string every READ_PERIOD cycles, then a drain, then the copy of
      // the plane read into its scale-k-1 register.
      if (read_run) begin
        if (draining) begin
          if (timer == ($bits(timer))'(DRAIN - 1)) begin
            read_run <= 1'b0;
            we[rd_plane] <= 1'b1;
          end else timer <= timer + 1'b1;
        end else if (timer == '0) begin
          rd_valid <= 1'b1;
          rd_tag.octave      <= rd_oct;
          rd_tag.scale       <= rd_sc;
          rd_tag.plane       <= rd_plane;
          rd_tag.row         <= rd_row;
          rd_tag.strip       <= rd_strip;
          rd_tag.first_scale <= (rd_sc == 0);
          rd_tag.last_row    <= (int'(rd_row) == int'(ph) - 1);
          timer <= timer + 1'b1;
        end else if (timer == ($bits(timer))'(READ_PERIOD - 1)) begin
          timer <= '0;
          if (int'(rd_row) == int'(ph) - 1) begin
            rd_row <= '0;
            if (int'(rd_strip) == int'(nstrips) - 1) draining <= 1'b1;
            else rd_strip <= rd_strip + 1'b1;
          end else begin
            rd_row <= rd_row + 1'b1;
          end
        end else begin
          timer <= timer + 1'b1;
        end
      end
      if (rd_go) begin
        read_run <= 1'b1;
        draining <= 1'b0;
        rd_plane <= rd_go_plane;
        rd_oct   <= oct;
        rd_sc    <= sc[2:0];
        rd_row   <= '0;
        rd_strip <= '0;
        timer    <= '0;
      end

      unique case (state)
        S_IDLE: if (start) begin
          oct <= '0; sc <= '0;
          state <= S_ACQ;
          phi_acq <= 1'b1;
        end
        S_ACQ: begin
          diff_left <= cfg_diff[0];
          state <= S_DIFF;
        end
        S_MERGE: begin
          // the 1/4 or 1/16 merge pulse was given on entry
          state <= S_DIFF;
        end
        S_DIFF: begin
          if (diff_left != 0) begin
            phi_diff  <= 1'b1;
            diff_left <= diff_left - 1'b1;
          end else begin
            p <= '0;
            state <= S_STEP_START;
          end
        end
        S_STEP_START: begin
          conv_sel  <= p[1:0];
          conv_run  <= 1'b1;
          cnt_start <= 1'b1;
          state <= S_STEP;
        end
        S_STEP: begin
          if (conv_run && cnt_done) conv_run <= 1'b0;
          if ((!conv_run || cnt_done) && !read_run && !rd_go) begin
            conv_run <= 1'b0;
            state <= S_NEXT;
          end
        end
        S_NEXT: begin
          if (p + 1'b1 < planes) begin
            // the plane just converted is read while the next one converts
            p     <= p + 1'b1;
            state <= S_STEP_START;
          end else if (planes == 3'd4 && !(last_scale && last_octave)) begin
            // P4 sits in R24: its read overlaps the next diffusion and the conversion of
            // P1 (into R13) of the next scale
            if (!last_scale) begin
              sc        <= sc + 1'b1;
              diff_left <= cfg_diff[3'(sc + 1'b1)];
              state     <= S_DIFF;
            end else if (!last_octave) begin
              oct       <= oct + 1'b1;
              sc        <= '0;
              diff_left <= cfg_diff[0];
              if (oct == 2'd0) phi_quarter <= 1'b1;
              else             phi_sixteenth <= 1'b1;
              state     <= S_MERGE;
            end else begin
              frame_done <= 1'b1;
              state      <= S_IDLE;
            end
          end else begin
            // the plane sits in R13, which the next conversion overwrites, or the frame
            // ends: wait for the read
            state <= S_LAST_READ;
          end
        end
        S_LAST_READ: begin
          if (!read_run) begin
            if (!last_scale) begin
              sc        <= sc + 1'b1;
              diff_left <= cfg_diff[3'(sc + 1'b1)];
              state     <= S_DIFF;
            end else if (!last_octave) begin
              oct       <= oct + 1'b1;
              sc        <= '0;
              diff_left <= cfg_diff[0];
              if (oct == 2'd0) phi_quarter <= 1'b1;
              else             phi_sixteenth <= 1'b1;
              state     <= S_MERGE;
            end else begin
              frame_done <= 1'b1;
              state      <= S_IDLE;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A conversion strobe only while the counter runs, and never both at once.
  a_conv_excl: assert property (@(posedge clk) disable iff (!rst_n) !(conv13 && conv24))
    else $error("stack_sequencer: both conversion strobes active");
endmodule
