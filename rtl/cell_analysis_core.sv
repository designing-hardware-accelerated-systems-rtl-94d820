// cell_analysis_core: real-time analysis of a high-frame-rate bright-field
// video of cells. Frames (IMG_W x IMG_H, 8-bit) stream in pixel by pixel;
// for every frame that holds a cell a result record leaves: the frame
// number, the cell location in the frame, the cell centre in the 5x
// resized image and the wall radius at each of 360 degrees.
//
// Front end (one pixel per cycle):
//   bg_average   - the first N_AVG frames build the background image;
//   cell_detect  - background subtraction, histogram threshold, erosion and
//                  pixel count decide "iscell"; the frame (B = |C - BG| and
//                  the raw C) is written into frame_fifo and kept only if
//                  it holds a cell.
// Analysis (one cell frame at a time, taken from the FIFO):
//   find_cell      - Gaussian, threshold, opening, averaging -> location;
//   crop           - 24x24 windows of B, C and the filtered E around it;
//   find_center_ch - three channels (B, C, E) each resize 5x, stretch,
//                    threshold and average; the centre is the mean of the
//                    channels that found white pixels;
//   trace_wall     - polar trace of the stretched C around the centre;
//   result stream  - 93 words of 32 bits, m_tlast on the last.
// When the FIFO is full the front end holds s_tready low (a stall); frames
// are never dropped silently. Empty frames produce no output.
//
// Result words: 0 frame number; 1 {iscell, 15'b0, loc_y[7:0], loc_x[7:0]};
// 2 {15'b0, centre_found, cy[7:0], cx[7:0]}; 3..92 four radii each, the
// lowest angle in the low byte. The stage order, the 256-frame background,
// the FIFO between detection and analysis and the record contents follow
// the design description; the word layout and the analysis sequencing
// (one frame at a time, the FIFO slot released after the crop) are this
// design's choices.
module cell_analysis_core
  import ifc_pkg::*;
#(
  parameter int unsigned IMG_W   = 64,
  parameter int unsigned IMG_H   = 64,
  parameter int unsigned N_AVG   = 256,
  parameter int unsigned NSLOT   = 2,
  parameter int unsigned BG_FRAC = 240,
  parameter int unsigned T_MIN   = 20,
  parameter int unsigned MIN_PIX = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  // pixel stream in
  input  logic        s_tvalid,
  output logic        s_tready,
  input  logic [7:0]  s_tdata,
  input  logic        s_tlast,
  // result stream out
  output logic        m_tvalid,
  input  logic        m_tready,
  output logic [31:0] m_tdata,
  output logic        m_tlast,
  // status
  output logic        bg_ready,
  output logic        det_done,
  output logic        det_iscell,
  output logic [$clog2(NSLOT+1)-1:0] fifo_occupancy
);
  localparam int unsigned NPIX = IMG_W * IMG_H;
  localparam int unsigned XW   = $clog2(IMG_W);
  localparam int unsigned YW   = $clog2(IMG_H);
  localparam int unsigned AW   = $clog2(NPIX);
  localparam int unsigned NWORDS = 3 + N_ANGLE / 4;

  // ---------------- front end ----------------
  logic          a_valid, a_ready, a_last;
  logic [7:0]    a_pix, a_bg;
  logic [XW-1:0] a_x;
  logic [YW-1:0] a_y;
  logic [31:0]   a_frame, frames_in;

  bg_average #(.W(IMG_W), .H(IMG_H), .N_AVG(N_AVG)) u_avg (
    .clk, .rst_n,
    .s_valid(s_tvalid), .s_ready(s_tready), .s_data(s_tdata), .s_last(s_tlast),
    .m_valid(a_valid), .m_ready(a_ready), .m_pix(a_pix), .m_bg(a_bg),
    .m_x(a_x), .m_y(a_y), .m_last(a_last), .m_frame(a_frame),
    .bg_ready, .frame_no(frames_in));

  logic          wr_free, wr_en, wr_commit, wr_discard;
  logic [AW-1:0] wr_addr;
  logic [7:0]    wr_b, wr_c, wr_thr, det_thr;
  logic [31:0]   wr_frame;
  logic [$clog2(NPIX+1)-1:0] det_count;

  cell_detect #(.W(IMG_W), .H(IMG_H), .BG_FRAC(BG_FRAC), .T_MIN(T_MIN), .MIN_PIX(MIN_PIX)) u_det (
    .clk, .rst_n,
    .s_valid(a_valid), .s_ready(a_ready), .s_pix(a_pix), .s_bg(a_bg),
    .s_x(a_x), .s_y(a_y), .s_last(a_last), .s_frame(a_frame),
    .wr_free, .wr_en, .wr_addr, .wr_b, .wr_c, .wr_commit, .wr_discard,
    .wr_frame, .wr_thr,
    .det_done, .det_iscell, .det_count, .thr(det_thr));

  logic          rd_valid, rd_release;
  logic [31:0]   rd_frame;
  logic [7:0]    rd_thr, rd_b, rd_c;
  logic [AW-1:0] rd_addr;

  frame_fifo #(.W(IMG_W), .H(IMG_H), .NSLOT(NSLOT)) u_fifo (
    .clk, .rst_n,
    .wr_free, .wr_en, .wr_addr, .wr_b, .wr_c, .wr_commit, .wr_discard, .wr_frame, .wr_thr,
    .rd_valid, .rd_frame, .rd_thr, .rd_addr, .rd_b, .rd_c, .rd_release,
    .occupancy(fifo_occupancy));

  // ---------------- analysis sequencer ----------------
  typedef enum logic [3:0] {S_IDLE, S_FEED, S_FCWAIT, S_CROP, S_CENTER, S_AVG,
                            S_TRACE, S_OUT} state_t;
  state_t state;

  logic [AW:0]   cnt;            // pixel / crop counter (one extra bit for the read latency)
  logic          feed_v, feed_last;
  logic [XW-1:0] feed_x;
  logic [YW-1:0] feed_y;
  logic [31:0]   cur_frame;

  // find cell
  logic          fc_done, fc_found;
  logic [XW-1:0] loc_x;
  logic [YW-1:0] loc_y;
  logic [$clog2(NPIX+1)-1:0] fc_n;
  logic [AW-1:0] e_addr;
  logic [7:0]    e_pix;

  find_cell #(.W(IMG_W), .H(IMG_H)) u_fc (
    .clk, .rst_n,
    .s_valid(feed_v), .s_pix(rd_b), .s_x(feed_x), .s_y(feed_y), .s_last(feed_last),
    .thr(rd_thr), .done(fc_done), .found(fc_found), .loc_x, .loc_y, .n_white(fc_n),
    .e_addr, .e_pix);

  // crop window origin, kept inside the filtered image (rows/cols 0..W-2)
  logic [XW-1:0] x0, y0;
  logic [XW-1:0] lx_q;
  logic [YW-1:0] ly_q;
  logic [4:0]    ci, cj;         // crop row / column being read
  logic          ld_we;
  logic [9:0]    ld_addr;

  function automatic int org(input int loc, input int edge_len);
    int v;
    v = loc - int'(CROP) / 2;
    if (v < 0) v = 0;
    if (v > edge_len - 1 - int'(CROP)) v = edge_len - 1 - int'(CROP);
    return v;
  endfunction

  // find center channels
  logic       ch_start;
  logic [2:0] ch_done_seen;
  logic       chb_done, chc_done, che_done, chb_busy, chc_busy, che_busy;
  logic       chb_f, chc_f, che_f;
  rcoord_t    chb_x, chb_y, chc_x, chc_y, che_x, che_y;
  logic [7:0] chb_lo, chc_lo, che_lo, chb_t, chc_t, che_t;
  logic [15:0] chb_s, chc_s, che_s;

  find_center_ch #(.BRIGHT(1'b1)) u_chb (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_pix(rd_b), .start(ch_start),
    .busy(chb_busy), .done(chb_done), .found(chb_f), .cx(chb_x), .cy(chb_y),
    .lo(chb_lo), .scale(chb_s), .otsu_t(chb_t));
  find_center_ch #(.BRIGHT(1'b0)) u_chc (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_pix(rd_c), .start(ch_start),
    .busy(chc_busy), .done(chc_done), .found(chc_f), .cx(chc_x), .cy(chc_y),
    .lo(chc_lo), .scale(chc_s), .otsu_t(chc_t));
  find_center_ch #(.BRIGHT(1'b1)) u_che (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_pix(e_pix), .start(ch_start),
    .busy(che_busy), .done(che_done), .found(che_f), .cx(che_x), .cy(che_y),
    .lo(che_lo), .scale(che_s), .otsu_t(che_t));

  // centre = mean over the channels that found white pixels
  rcoord_t cen_x, cen_y;
  logic    cen_found;
  rcoord_t avg_x, avg_y;
  always_comb begin
    int sx, sy, n;
    sx = 0; sy = 0; n = 0;
    if (chb_f) begin sx += int'(chb_x); sy += int'(chb_y); n++; end
    if (chc_f) begin sx += int'(chc_x); sy += int'(chc_y); n++; end
    if (che_f) begin sx += int'(che_x); sy += int'(che_y); n++; end
    case (n)
      1:       begin avg_x = rcoord_t'(sx);     avg_y = rcoord_t'(sy);     end
      2:       begin avg_x = rcoord_t'(sx / 2); avg_y = rcoord_t'(sy / 2); end
      3:       begin avg_x = rcoord_t'(sx / 3); avg_y = rcoord_t'(sy / 3); end
      default: begin avg_x = rcoord_t'(RS / 2); avg_y = rcoord_t'(RS / 2); end
    endcase
  end

  // trace
  logic        tr_start, tr_done, tr_busy;
  logic [6:0]  tr_word;
  logic [31:0] tr_radii;
  trace_wall u_tr (
    .clk, .rst_n, .ld_we, .ld_addr, .ld_pix(rd_c), .start(tr_start),
    .cx(cen_x), .cy(cen_y), .lo(chc_lo), .scale(chc_s),
    .busy(tr_busy), .done(tr_done), .rd_word(tr_word), .rd_radii(tr_radii));

  // output
  logic [6:0] widx;
  assign tr_word = 7'(32'(widx) - 3);
  assign m_tvalid = (state == S_OUT);
  assign m_tlast  = (state == S_OUT) && (32'(widx) == NWORDS - 1);
  always_comb begin
    case (widx)
      7'd0:    m_tdata = cur_frame;
      7'd1:    m_tdata = {1'b1, 15'b0, 8'(ly_q), 8'(lx_q)};
      7'd2:    m_tdata = {15'b0, cen_found, 8'(cen_y), 8'(cen_x)};
      default: m_tdata = tr_radii;
    endcase
  end

  // FIFO read address: raster feed, then crop reads
  always_comb begin
    if (state == S_CROP)
      rd_addr = AW'((32'(y0) + 32'(ci)) * IMG_W + 32'(x0) + 32'(cj));
    else
      rd_addr = cnt[AW-1:0];
  end
  assign e_addr = rd_addr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      cnt          <= '0;
      feed_v       <= 1'b0;
      feed_last    <= 1'b0;
      rd_release   <= 1'b0;
      ld_we        <= 1'b0;
      ch_start     <= 1'b0;
      tr_start     <= 1'b0;
      ch_done_seen <= '0;
      widx         <= '0;
      ci           <= '0;
      cj           <= '0;
      cen_found    <= 1'b0;
    end else begin
      rd_release <= 1'b0;
      ch_start   <= 1'b0;
      tr_start   <= 1'b0;
      feed_v     <= 1'b0;
      feed_last  <= 1'b0;
      ld_we      <= 1'b0;
      case (state)
        S_IDLE: if (rd_valid && !rd_release) begin
          state     <= S_FEED;
          cnt       <= '0;
          cur_frame <= rd_frame;
        end
        S_FEED: begin
          // the FIFO read takes one cycle: raise valid for the address just issued
          feed_v    <= 1'b1;
          feed_x    <= XW'(cnt % (AW+1)'(IMG_W));
          feed_y    <= YW'(cnt / (AW+1)'(IMG_W));
          feed_last <= (32'(cnt) == NPIX - 1);
          cnt       <= cnt + 1'b1;
          if (32'(cnt) == NPIX - 1) state <= S_FCWAIT;
        end
        S_FCWAIT: if (fc_done) begin
          state <= S_CROP;
          lx_q  <= loc_x;
          ly_q  <= loc_y;
          x0    <= XW'(org(int'(loc_x), int'(IMG_W)));
          y0    <= XW'(org(int'(loc_y), int'(IMG_H)));
          ci    <= '0;
          cj    <= '0;
          cnt   <= '0;
        end
        S_CROP: begin
          // address (ci, cj) issued now, written into the crops next cycle
          ld_we   <= (32'(cnt) < CROP * CROP);
          ld_addr <= 10'(32'(ci) * CROP + 32'(cj));
          cnt     <= cnt + 1'b1;
          if (32'(cj) == CROP - 1) begin
            cj <= '0;
            ci <= ci + 1'b1;
          end else begin
            cj <= cj + 1'b1;
          end
          if (32'(cnt) == CROP * CROP) begin
            state        <= S_CENTER;
            ch_start     <= 1'b1;
            ch_done_seen <= '0;
            rd_release   <= 1'b1;       // B and C are now held in the crops
          end
        end
        S_CENTER: begin
          ch_done_seen <= ch_done_seen | {che_done, chc_done, chb_done};
          if ((ch_done_seen | {che_done, chc_done, chb_done}) == 3'b111) state <= S_AVG;
        end
        S_AVG: begin
          cen_x     <= avg_x;
          cen_y     <= avg_y;
          cen_found <= chb_f | chc_f | che_f;
          tr_start  <= 1'b1;
          state     <= S_TRACE;
        end
        S_TRACE: if (tr_done) begin
          state <= S_OUT;
          widx  <= '0;
        end
        S_OUT: if (m_tready) begin
          widx <= widx + 1'b1;
          if (32'(widx) == NWORDS - 1) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Result stream: data holds while the consumer stalls.
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_tvalid && !m_tready |=> m_tvalid && $stable(m_tdata));
endmodule
