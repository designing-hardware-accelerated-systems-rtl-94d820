// trace_wall: traces the cellular wall around the centre point and returns
// one wall radius per degree (360 values), i.e. the cell outline in polar
// coordinates.
//
// The raw-image crop (24x24) is held in registers. For every angle a and
// radius r = 1..RMAX the module samples the contrast-stretched, 5x bicubic-
// resized image at (cx + r cos a, cy - r sin a) (angles counter-clockwise
// from the +x axis; offsets rounded to the nearest pixel), without ever
// storing the 120x120 image. Three wall estimates are formed along each ray:
//   m1  the radius of the darkest sample (first one on ties);
//   m2  the radius of the steepest fall in intensity from r-1 to r;
//   m3  the first radius whose sample is darker than WALL_LVL;
// and the median of the three is the wall radius. Samples outside the
// resized image end the ray; an estimate that never occurs falls back to m1.
// Four lanes run in parallel, one per quadrant of angles (0-89, 90-179, ...),
// each taking one sample per cycle: 90 * RMAX cycles per frame.
//
// Interface: ld_* fill the crop (row-major), start with cx/cy/lo/scale
// begins a run, done pulses when all 360 radii are in place; rd_word reads
// radii 4*rd_word .. 4*rd_word+3 combinationally, one per byte. Polar conversion around the centre, the darkest
// pixel as the wall and the median of several estimates follow the design
// description; the choice of the three estimates, WALL_LVL and the lane
// split are this design's own. The trigonometric tables are computed at
// elaboration (see ifc_pkg::sin_q14).
module trace_wall
  import ifc_pkg::*;
#(
  parameter int unsigned RMAX     = 59,
  parameter int unsigned WALL_LVL = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ld_we,
  input  logic [9:0]  ld_addr,
  input  logic [7:0]  ld_pix,
  input  logic        start,
  input  rcoord_t     cx,
  input  rcoord_t     cy,
  input  logic [7:0]  lo,
  input  logic [15:0] scale,
  output logic        busy,
  output logic        done,
  input  logic [6:0]  rd_word,
  output logic [31:0] rd_radii
);
  localparam int unsigned LANES = 4;
  localparam int unsigned NA    = N_ANGLE / LANES;   // 90 angles per lane

  typedef logic signed [15:0] trig_t [N_ANGLE];
  function automatic trig_t mk_sin();
    trig_t t;
    for (int i = 0; i < int'(N_ANGLE); i++) t[i] = sin_q14(i);
    return t;
  endfunction
  function automatic trig_t mk_cos();
    trig_t t;
    for (int i = 0; i < int'(N_ANGLE); i++) t[i] = cos_q14(i);
    return t;
  endfunction
  localparam trig_t SIN_T = mk_sin();
  localparam trig_t COS_T = mk_cos();

  crop_t crop;
  always_ff @(posedge clk)
    if (ld_we) crop[ld_addr] <= ld_pix;

  logic [7:0] rad [N_ANGLE];
  // Four consecutive radii per read word, lowest angle in the low byte.
  assign rd_radii = {rad[9'(32'(rd_word) * 4 + 3)], rad[9'(32'(rd_word) * 4 + 2)],
                     rad[9'(32'(rd_word) * 4 + 1)], rad[9'(32'(rd_word) * 4)]};

  logic        run;
  logic [6:0]  k;          // angle index inside the lane
  logic [6:0]  r;          // radius 1..RMAX
  rcoord_t     cx_q, cy_q;
  logic [7:0]  lo_q;
  logic [15:0] scale_q;

  // Per-lane ray state
  logic [7:0]  min_v  [LANES];
  logic [6:0]  m1     [LANES];
  logic [7:0]  prev_v [LANES];
  logic [8:0]  drop_v [LANES];
  logic [6:0]  m2     [LANES];
  logic [6:0]  m3     [LANES];
  logic        m2_ok  [LANES], m3_ok [LANES], alive [LANES];

  // Sample of each lane at (angle, r)
  logic [8:0]  ang   [LANES];
  int          sx    [LANES], sy [LANES];
  logic        inimg [LANES];
  logic [7:0]  gval  [LANES];
  always_comb begin
    for (int q = 0; q < LANES; q++) begin
      ang[q]   = 9'(q * NA + 32'(k));
      sx[q]    = int'(cx_q) + ((int'(r) * int'(COS_T[ang[q]]) + 8192) >>> 14);
      sy[q]    = int'(cy_q) - ((int'(r) * int'(SIN_T[ang[q]]) + 8192) >>> 14);
      inimg[q] = (sx[q] >= 0) && (sx[q] < int'(RS)) && (sy[q] >= 0) && (sy[q] < int'(RS));
      gval[q]  = adjust_px(bicubic_px(crop, inimg[q] ? 32'(sx[q]) : 0, inimg[q] ? 32'(sy[q]) : 0),
                           lo_q, scale_q);
    end
  end

  function automatic logic [6:0] med3(input logic [6:0] a, input logic [6:0] b, input logic [6:0] c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction

  assign busy = run;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run  <= 1'b0;
      done <= 1'b0;
      k    <= '0;
      r    <= 7'd1;
    end else begin
      done <= 1'b0;
      if (!run) begin
        if (start) begin
          run     <= 1'b1;
          k       <= '0;
          r       <= 7'd1;
          cx_q    <= cx;
          cy_q    <= cy;
          lo_q    <= lo;
          scale_q <= scale;
        end
      end else begin
        for (int q = 0; q < LANES; q++) begin
          logic live;
          logic [6:0] f1, f2, f3;
          live = (r == 1) ? 1'b1 : alive[q];
          live = live && inimg[q];
          if (r == 1) begin
            min_v[q]  <= 8'hff;
            m1[q]     <= 7'd1;
            m2_ok[q]  <= 1'b0;
            m3_ok[q]  <= 1'b0;
            drop_v[q] <= '0;
            m2[q]     <= 7'd1;
            m3[q]     <= 7'd1;
          end
          alive[q] <= live;
          if (live) begin
            prev_v[q] <= gval[q];
            if (r == 1 || gval[q] < min_v[q]) begin
              min_v[q] <= gval[q];
              m1[q]    <= r;
            end
            if (r != 1 && gval[q] < prev_v[q] &&
                (!m2_ok[q] || 9'(prev_v[q] - gval[q]) > drop_v[q])) begin
              drop_v[q] <= 9'(prev_v[q] - gval[q]);
              m2[q]     <= r;
              m2_ok[q]  <= 1'b1;
            end
            if ((r == 1 || !m3_ok[q]) && 32'(gval[q]) < WALL_LVL) begin
              m3[q]    <= r;
              m3_ok[q] <= 1'b1;
            end
          end
          // End of the ray: combine the three estimates, including this sample.
          if (32'(r) == RMAX) begin
            f1 = m1[q];
            if (live && (r == 1 || gval[q] < min_v[q])) f1 = r;
            f2 = m2_ok[q] ? m2[q] : f1;
            if (live && r != 1 && gval[q] < prev_v[q] &&
                (!m2_ok[q] || 9'(prev_v[q] - gval[q]) > drop_v[q])) f2 = r;
            f3 = m3_ok[q] ? m3[q] : f1;
            if (live && !m3_ok[q] && 32'(gval[q]) < WALL_LVL) f3 = r;
            rad[ang[q]] <= 8'(med3(f1, f2, f3));
          end
        end
        if (32'(r) == RMAX) begin
          r <= 7'd1;
          k <= k + 1'b1;
          if (32'(k) == NA - 1) begin
            run  <= 1'b0;
            done <= 1'b1;
          end
        end else begin
          r <= r + 1'b1;
        end
      end
    end
  end

  // Radii written stay within the sampled range.
  assert property (@(posedge clk) disable iff (!rst_n) done |-> !run);
endmodule
