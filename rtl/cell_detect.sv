// cell_detect: decides, frame by frame, whether a frame holds a cell and
// writes the frame into the frame FIFO so that only cell frames reach the
// analysis stages.
//
// For each pixel C with background pixel BG it forms the background-
// subtracted pixel B = |C - BG|, writes B and C into the FIFO slot that is
// being filled, adds B to a 256-bin histogram and binarises it against the
// current threshold. The binary image goes through a 3x3 erosion (a
// window3x3 with padding 1), and the surviving pixels are counted. After the
// frame's last pixel the histogram is scanned, one bin per cycle, while the
// input is held off: the threshold is the lowest grey level below which at
// least BG_FRAC/256 of the pixels lie (those lowest-intensity bins are taken
// as background), but never less than T_MIN. If at least MIN_PIX pixels
// survived the erosion the frame is committed to the FIFO (iscell),
// otherwise the slot is reused.
//
// Timing: one pixel per cycle, plus 256 cycles of histogram scan per
// frame (4096 + 256 cycles for a 64x64 frame). The threshold found on frame n is
// applied to frame n+1: the background is static, so consecutive frames
// give nearly the same threshold, and the frame never has to be read twice.
// This reuse, the percentile rule, T_MIN and MIN_PIX are this design's
// choices; subtraction, histogram-based grey level, erosion-only cleanup and
// the pixel count follow the design description.
module cell_detect #(
  parameter int unsigned W       = 64,
  parameter int unsigned H       = 64,
  parameter int unsigned BG_FRAC = 240,  // background share, /256
  parameter int unsigned T_MIN   = 20,   // lowest threshold allowed
  parameter int unsigned MIN_PIX = 16    // eroded pixels needed for a cell
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // pixel + background stream
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic [7:0]           s_pix,
  input  logic [7:0]           s_bg,
  input  logic [$clog2(W)-1:0] s_x,
  input  logic [$clog2(H)-1:0] s_y,
  input  logic                 s_last,
  input  logic [31:0]          s_frame,
  // frame FIFO write side
  input  logic                 wr_free,
  output logic                 wr_en,
  output logic [$clog2(W*H)-1:0] wr_addr,
  output logic [7:0]           wr_b,
  output logic [7:0]           wr_c,
  output logic                 wr_commit,
  output logic                 wr_discard,
  output logic [31:0]          wr_frame,
  output logic [7:0]           wr_thr,
  // status
  output logic                 det_done,    // pulse: decision made
  output logic                 det_iscell,
  output logic [$clog2(W*H+1)-1:0] det_count,
  output logic [7:0]           thr
);
  localparam int unsigned NPIX = W * H;
  localparam int unsigned CW   = $clog2(NPIX + 1);
  localparam int unsigned NEED = (NPIX * BG_FRAC + 255) / 256;

  typedef enum logic [1:0] {RUN, DRAIN, SCAN} state_t;
  state_t state;

  logic [CW-1:0] hist [256];
  logic [7:0]    b;
  logic          accept, in_frame;
  logic [31:0]   frame_q;
  logic [7:0]    thr_frame;      // threshold applied to the frame in flight

  assign b       = (s_pix >= s_bg) ? s_pix - s_bg : s_bg - s_pix;
  assign s_ready = (state == RUN) && !wr_commit && !wr_discard && (in_frame || wr_free);
  assign accept  = s_valid && s_ready;

  // FIFO write of B and C
  assign wr_en   = accept;
  assign wr_addr = ($clog2(NPIX))'(s_y * W + s_x);
  assign wr_b    = b;
  assign wr_c    = s_pix;

  // Binarise and erode.
  logic       ev, elast;
  logic       ewin [3][3];
  logic [$clog2(W)-1:0] ex;
  logic [$clog2(H)-1:0] ey;
  logic       bin;
  assign bin = (b > (in_frame ? thr_frame : thr));

  window3x3 #(.W(W), .H(H), .DW(1), .PAD(1'b1)) u_erode (
    .clk, .rst_n,
    .in_valid(accept), .in_data(bin), .in_x(s_x), .in_y(s_y), .in_last(s_last),
    .out_valid(ev), .out_win(ewin), .out_x(ex), .out_y(ey), .out_last(elast)
  );

  logic eroded;
  always_comb begin
    eroded = 1'b1;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++)
        eroded &= ewin[r][c];
  end

  // Histogram scan state
  logic [8:0]    bin_i;
  logic [CW-1:0] cum;
  logic          found;
  logic [7:0]    thr_new;
  logic [CW-1:0] count;

  always_ff @(posedge clk) begin
    if (accept) hist[b] <= hist[b] + 1'b1;
    else if (state == SCAN) hist[bin_i[7:0]] <= '0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= SCAN;        // first scan clears the histogram
      in_frame   <= 1'b0;
      thr        <= 8'(T_MIN);
      thr_frame  <= 8'(T_MIN);
      bin_i      <= '0;
      cum        <= '0;
      found      <= 1'b0;
      count      <= '0;
      wr_commit  <= 1'b0;
      wr_discard <= 1'b0;
      det_done   <= 1'b0;
      det_iscell <= 1'b0;
      det_count  <= '0;
      frame_q    <= '0;
      thr_new    <= 8'(T_MIN);
    end else begin
      wr_commit  <= 1'b0;
      wr_discard <= 1'b0;
      det_done   <= 1'b0;
      if (ev && eroded) count <= count + 1'b1;
      case (state)
        RUN: if (accept) begin
          if (!in_frame) begin
            in_frame  <= 1'b1;
            frame_q   <= s_frame;
            thr_frame <= thr;
          end
          if (s_last) state <= DRAIN;
        end
        DRAIN: if (elast) begin   // last eroded pixel counted next cycle
          state <= SCAN;
          bin_i <= '0;
          cum   <= '0;
          found <= 1'b0;
        end
        SCAN: begin
          if (!found && (cum + hist[bin_i[7:0]] >= CW'(NEED))) begin
            found   <= 1'b1;
            thr_new <= (32'(bin_i) < T_MIN) ? 8'(T_MIN) : bin_i[7:0];
          end
          cum   <= cum + hist[bin_i[7:0]];
          bin_i <= bin_i + 1'b1;
          if (bin_i == 9'd255) begin
            state    <= RUN;
            in_frame <= 1'b0;
            count    <= '0;
            if (in_frame) begin
              // threshold for the next frame
              thr <= found ? thr_new : 8'd255;
              det_done   <= 1'b1;
              det_iscell <= (count >= CW'(MIN_PIX));
              det_count  <= count;
              wr_commit  <= (count >= CW'(MIN_PIX));
              wr_discard <= (count <  CW'(MIN_PIX));
            end
          end
        end
        default: state <= RUN;
      endcase
    end
  end

  assign wr_frame = frame_q;
  assign wr_thr   = thr_frame;

  // Commit and discard are exclusive; neither happens while a frame is written.
  assert property (@(posedge clk) disable iff (!rst_n) !(wr_commit && wr_discard));
  assert property (@(posedge clk) disable iff (!rst_n) (wr_commit || wr_discard) |-> !wr_en);
endmodule
