// find_center_ch: one image channel of the find-center stage. It enlarges a
// 24x24 crop 5x by bicubic interpolation (to 120x120), stretches its
// contrast, binarises it and returns the average position of the white
// pixels as this channel's estimate of the cell centre.
//
// The 120x120 image is never stored: the crop sits in registers, and each
// of the LANES = 4 lanes recomputes resized pixels of its own quadrant
// (60x60) on demand, so the channel takes two passes over the quadrants:
//   pass 1 (3600 cycles): per-lane 256-bin histograms and pixel sums;
//   scan   (256 cycles):  the four histograms are reduced bin by bin into
//          the 1 % / 99 % points (lo, hi) used by the contrast stretch and
//          into Otsu's threshold t (largest between-class variance, compared
//          by cross-multiplication so no division is needed);
//   scale  (16 cycles):   scale = 255*256 / (hi - lo), the stretch factor;
//   pass 2 (3600 cycles): per-lane white-pixel counts and x/y sums, then
//          reduced and divided into the centre (cx, cy).
// A pixel is white when it is brighter than t (BRIGHT = 1, for the
// background-subtracted images) or not brighter than t (BRIGHT = 0, for the
// raw image, whose cell wall is dark). The stretch is monotonic, so
// thresholding the raw resized pixel at t equals thresholding the stretched
// pixel at the stretched t, apart from pixels clipped to 0 or 255.
//
// Interface: ld_we/ld_addr/ld_pix fill the crop (row-major); start begins a
// run (accepted once the histograms have been cleared, 256 cycles after
// reset); done pulses with cx, cy (resized coordinates 0..119), found (some
// white pixel), and lo/scale/otsu_t for later use of the stretched image.
// Bicubic resize, quadrant partitioning with per-quadrant histograms reduced
// afterwards, contrast adjusting and row/column averaging follow the design
// description; the percentile points, Otsu's rule for the "adaptive"
// threshold and the recomputation instead of storage are this design's
// choices.
module find_center_ch
  import ifc_pkg::*;
#(
  parameter bit BRIGHT = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  logic [9:0]  ld_addr,
  input  logic [7:0]  ld_pix,
  input  logic        start,
  output logic        busy,
  output logic        done,
  output logic        found,
  output rcoord_t     cx,
  output rcoord_t     cy,
  output logic [7:0]  lo,
  output logic [15:0] scale,
  output logic [7:0]  otsu_t
);
  localparam int unsigned LANES = 4;
  localparam int unsigned Q     = RS / 2;        // quadrant edge, 60
  localparam int unsigned NQ    = Q * Q;         // pixels per lane, 3600
  localparam int unsigned NTOT  = RS * RS;       // 14400
  localparam int unsigned LO_N  = NTOT / 100;    // 1 %
  localparam int unsigned HI_N  = NTOT * 99 / 100;

  typedef enum logic [2:0] {IDLE, P1, SCAN, SCALE_DIV, P2, CDIV, FIN} state_t;
  state_t state;

  crop_t crop;
  always_ff @(posedge clk)
    if (ld_we) crop[ld_addr] <= ld_pix;

  logic [11:0] j;                 // position inside the quadrant
  logic [5:0]  jx, jy;
  logic [7:0]  lane_pix [LANES];
  rcoord_t     lane_x [LANES], lane_y [LANES];

  always_comb begin
    for (int q = 0; q < LANES; q++) begin
      lane_x[q]   = rcoord_t'((q % 2) * Q + 32'(jx));
      lane_y[q]   = rcoord_t'((q / 2) * Q + 32'(jy));
      lane_pix[q] = bicubic_px(crop, 32'(lane_x[q]), 32'(lane_y[q]));
    end
  end

  // Per-lane histograms and sums
  logic [11:0] hist [LANES][256];
  logic [21:0] psum [LANES];
  logic [11:0] wcnt [LANES];
  logic [18:0] wsx  [LANES], wsy [LANES];

  logic [8:0]  g;
  logic [13:0] h_red;
  always_comb begin
    h_red = '0;
    for (int q = 0; q < LANES; q++) h_red += 14'(hist[q][g[7:0]]);
  end

  always_ff @(posedge clk) begin
    for (int q = 0; q < LANES; q++) begin
      if (state == P1) hist[q][lane_pix[q]] <= hist[q][lane_pix[q]] + 1'b1;
      else if (state == SCAN || state == IDLE) hist[q][g[7:0]] <= '0;
    end
  end

  // Scan registers
  logic [14:0]  cum;
  logic [23:0]  s0;          // sum of g*h below the current bin
  logic [23:0]  sum_t;
  logic         clr_done;        // histograms cleared once since reset
  logic [127:0] best_num, best_den;
  logic         lo_found, hi_found;
  logic [7:0]   hi;

  logic [14:0]  cum_n;
  logic [23:0]  s0_n;
  logic signed [47:0] dev;
  logic [127:0] num, den;
  always_comb begin
    cum_n = cum + 15'(h_red);
    s0_n  = s0 + 24'(32'(g[7:0]) * 32'(h_red));
    dev   = $signed({24'b0, sum_t}) * $signed({33'b0, cum_n})
          - $signed(48'(NTOT)) * $signed({24'b0, s0_n});
    num   = 128'(dev * dev);
    den   = 128'(cum_n) * 128'(15'(NTOT) - cum_n);
  end

  // Serial dividers
  logic        dv_go, dv_done, dv_busy;
  logic [15:0] dv_q;
  logic [7:0]  dv_r;
  logic [7:0]  dv_den;
  seq_divider #(.NW(16), .DW(8)) u_dscale (
    .clk, .rst_n, .start(dv_go), .num(16'd65280), .den(dv_den),
    .busy(dv_busy), .done(dv_done), .quot(dv_q), .rem(dv_r));

  logic [20:0] tsx, tsy;
  logic [13:0] tcnt;
  logic        cd_go, cdx_done, cdy_done, cdx_busy, cdy_busy;
  logic [20:0] cqx, cqy;
  logic [13:0] crx, cry;
  seq_divider #(.NW(21), .DW(14)) u_dcx (
    .clk, .rst_n, .start(cd_go), .num(tsx), .den(tcnt),
    .busy(cdx_busy), .done(cdx_done), .quot(cqx), .rem(crx));
  seq_divider #(.NW(21), .DW(14)) u_dcy (
    .clk, .rst_n, .start(cd_go), .num(tsy), .den(tcnt),
    .busy(cdy_busy), .done(cdy_done), .quot(cqy), .rem(cry));

  always_comb begin
    sum_t = '0;
    for (int q = 0; q < LANES; q++) sum_t += 24'(psum[q]);
  end

  always_comb begin
    tsx = '0; tsy = '0; tcnt = '0;
    for (int q = 0; q < LANES; q++) begin
      tsx  += 21'(wsx[q]);
      tsy  += 21'(wsy[q]);
      tcnt += 14'(wcnt[q]);
    end
  end

  assign jx = 6'(j % 12'(Q));
  assign jy = 6'(j / 12'(Q));
  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state  <= IDLE;
      j      <= '0;
      g      <= '0;
      done   <= 1'b0;
      dv_go  <= 1'b0;
      cd_go  <= 1'b0;
      found  <= 1'b0;
      cx     <= '0;
      cy     <= '0;
      lo     <= '0;
      hi     <= '0;
      scale  <= 16'd256;
      otsu_t <= '0;
      dv_den <= '0;
      clr_done <= 1'b0;
    end else begin
      done  <= 1'b0;
      dv_go <= 1'b0;
      cd_go <= 1'b0;
      case (state)
        IDLE: begin
          g <= g + 1'b1;                 // keeps clearing the histograms
          if (g == 9'd255) clr_done <= 1'b1;
          if (start && clr_done) begin
            state <= P1;
            j     <= '0;
            for (int q = 0; q < LANES; q++) psum[q] <= '0;
          end
        end
        P1: begin
          for (int q = 0; q < LANES; q++) psum[q] <= psum[q] + 22'(lane_pix[q]);
          j <= j + 1'b1;
          if (32'(j) == NQ - 1) begin
            state    <= SCAN;
            g        <= '0;
            cum      <= '0;
            s0       <= '0;
            best_num <= '0;
            best_den <= 128'd1;
            lo_found <= 1'b0;
            hi_found <= 1'b0;
            otsu_t   <= '0;
          end
        end
        SCAN: begin
          cum <= cum_n;
          s0  <= s0_n;
          if (!lo_found && 32'(cum_n) > LO_N) begin lo_found <= 1'b1; lo <= g[7:0]; end
          if (!hi_found && 32'(cum_n) >= HI_N) begin hi_found <= 1'b1; hi <= g[7:0]; end
          if (den != 0 && (num * best_den > best_num * den)) begin
            best_num <= num;
            best_den <= den;
            otsu_t   <= g[7:0];
          end
          g <= g + 1'b1;
          if (g == 9'd255) begin
            state <= SCALE_DIV;
          end
        end
        SCALE_DIV: begin
          if (!dv_busy && !dv_go && !dv_done) begin
            if (hi > lo) begin
              dv_den <= hi - lo;
              dv_go  <= 1'b1;
            end else begin
              scale <= 16'd256;
              state <= P2;
              j     <= '0;
              for (int q = 0; q < LANES; q++) begin
                wcnt[q] <= '0; wsx[q] <= '0; wsy[q] <= '0;
              end
            end
          end
          if (dv_done) begin
            scale <= dv_q;
            state <= P2;
            j     <= '0;
            for (int q = 0; q < LANES; q++) begin
              wcnt[q] <= '0; wsx[q] <= '0; wsy[q] <= '0;
            end
          end
        end
        P2: begin
          for (int q = 0; q < LANES; q++) begin
            if (BRIGHT ? (lane_pix[q] > otsu_t) : (lane_pix[q] <= otsu_t)) begin
              wcnt[q] <= wcnt[q] + 1'b1;
              wsx[q]  <= wsx[q] + 19'(lane_x[q]);
              wsy[q]  <= wsy[q] + 19'(lane_y[q]);
            end
          end
          j <= j + 1'b1;
          if (32'(j) == NQ - 1) begin
            state <= CDIV;
            cd_go <= 1'b1;
          end
        end
        CDIV: if (cdx_done) begin
          state <= FIN;
          found <= (tcnt != 0);
          cx    <= (tcnt != 0) ? rcoord_t'(cqx) : rcoord_t'(RS / 2);
          cy    <= (tcnt != 0) ? rcoord_t'(cqy) : rcoord_t'(RS / 2);
        end
        FIN: begin
          done  <= 1'b1;
          state <= IDLE;
          g     <= '0;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The contrast stretch always has a positive scale.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> scale != 0);
  // Both centre dividers finish together.
  assert property (@(posedge clk) disable iff (!rst_n) cdx_done == cdy_done);
endmodule
