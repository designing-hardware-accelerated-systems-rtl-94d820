// find_cell: locates the cell in a background-subtracted frame.
//
// The frame B streams in raster order (one pixel per cycle at most). A 3x3
// Gaussian filter (kernel [1 2 1; 2 4 2; 1 2 1] / 16) denoises it into E,
// which is kept in an internal buffer for the later crop. E is binarised
// against the frame's threshold, then cleaned by an opening: a 3x3 erosion
// followed by a 3x3 dilation. The white pixels left are summed per row and
// column on the fly; the cell location is the average white-pixel position
// (sum of x over white pixels / their count, likewise for y), computed with
// two serial dividers after the last pixel.
//
// Each 3x3 stage moves its output up-left by one pixel and drops the last
// row and column (see window3x3), so E covers rows/columns 0..W-2 and the
// opened image 0..W-4 in each direction; the cell sits well inside the frame.
// If no pixel survives, found is low and the location is the frame centre.
//
// Interface: s_valid/s_pix/s_x/s_y/s_last plus thr, sampled with the first
// pixel; done pulses with loc_x/loc_y/found about 30 cycles after the last
// pixel. e_addr/e_pix read E back with one cycle of latency.
// Stage order (Gaussian, threshold, erosion then dilation, averaging) follows
// the design description; the kernel, the reuse of the detection threshold
// and the edge handling are this design's choices.
module find_cell #(
  parameter int unsigned W = 64,
  parameter int unsigned H = 64
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   s_valid,
  input  logic [7:0]             s_pix,
  input  logic [$clog2(W)-1:0]   s_x,
  input  logic [$clog2(H)-1:0]   s_y,
  input  logic                   s_last,
  input  logic [7:0]             thr,
  output logic                   done,
  output logic                   found,
  output logic [$clog2(W)-1:0]   loc_x,
  output logic [$clog2(H)-1:0]   loc_y,
  output logic [$clog2(W*H+1)-1:0] n_white,
  input  logic [$clog2(W*H)-1:0] e_addr,
  output logic [7:0]             e_pix
);
  localparam int unsigned XW = $clog2(W);
  localparam int unsigned YW = $clog2(H);
  localparam int unsigned NW = $clog2(W*H+1);
  localparam int unsigned SW = NW + XW;     // sum width

  logic [7:0] ebuf [W*H];
  logic [7:0] thr_q;

  always_ff @(posedge clk)
    if (s_valid && s_x == 0 && s_y == 0) thr_q <= thr;

  // Stage 1: Gaussian
  logic          g_v, g_last;
  logic [7:0]    g_win [3][3];
  logic [XW-1:0] g_x;
  logic [YW-1:0] g_y;
  window3x3 #(.W(W), .H(H), .DW(8), .PAD(8'd0)) u_gauss (
    .clk, .rst_n, .in_valid(s_valid), .in_data(s_pix), .in_x(s_x), .in_y(s_y),
    .in_last(s_last), .out_valid(g_v), .out_win(g_win), .out_x(g_x), .out_y(g_y), .out_last(g_last));

  logic [11:0] gsum;
  always_comb begin
    gsum = 12'(g_win[0][0]) + 12'(g_win[0][2]) + 12'(g_win[2][0]) + 12'(g_win[2][2])
         + 12'({g_win[0][1], 1'b0}) + 12'({g_win[1][0], 1'b0})
         + 12'({g_win[1][2], 1'b0}) + 12'({g_win[2][1], 1'b0})
         + 12'({g_win[1][1], 2'b0});
  end

  logic          e_v, e_last, e_bin;
  logic [XW-1:0] e_x;
  logic [YW-1:0] e_y;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      e_v    <= 1'b0;
      e_last <= 1'b0;
    end else begin
      e_v    <= g_v;
      e_last <= g_last;
    end
    e_x   <= g_x;
    e_y   <= g_y;
    e_bin <= (gsum[11:4] > thr_q);
    if (g_v) ebuf[32'(g_y) * W + 32'(g_x)] <= gsum[11:4];
    e_pix <= ebuf[e_addr];
  end

  // Stage 2: erosion
  logic          r_v, r_last;
  logic          r_win [3][3];
  logic [XW-1:0] r_x;
  logic [YW-1:0] r_y;
  window3x3 #(.W(W), .H(H), .DW(1), .PAD(1'b1)) u_erode (
    .clk, .rst_n, .in_valid(e_v), .in_data(e_bin), .in_x(e_x), .in_y(e_y),
    .in_last(e_last), .out_valid(r_v), .out_win(r_win), .out_x(r_x), .out_y(r_y), .out_last(r_last));

  logic          o_v, o_last, o_bin;
  logic [XW-1:0] o_x;
  logic [YW-1:0] o_y;
  always_ff @(posedge clk) begin
    logic a;
    a = 1'b1;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) a &= r_win[r][c];
    if (!rst_n) begin
      o_v    <= 1'b0;
      o_last <= 1'b0;
    end else begin
      o_v    <= r_v;
      o_last <= r_last;
    end
    o_x   <= r_x;
    o_y   <= r_y;
    o_bin <= a;
  end

  // Stage 3: dilation
  logic          d_v, d_last;
  logic          d_win [3][3];
  logic [XW-1:0] d_x;
  logic [YW-1:0] d_y;
  window3x3 #(.W(W), .H(H), .DW(1), .PAD(1'b0)) u_dilate (
    .clk, .rst_n, .in_valid(o_v), .in_data(o_bin), .in_x(o_x), .in_y(o_y),
    .in_last(o_last), .out_valid(d_v), .out_win(d_win), .out_x(d_x), .out_y(d_y), .out_last(d_last));

  logic dil;
  always_comb begin
    dil = 1'b0;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) dil |= d_win[r][c];
  end

  // Row/column accumulation and averaging
  logic [SW-1:0] sum_x, sum_y;
  logic [NW-1:0] cnt;
  logic          div_go, dvx_done, dvy_done, dvx_busy, dvy_busy, wait_div;
  logic [SW-1:0] qx, qy;
  logic [NW-1:0] rx, ry;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_x    <= '0;
      sum_y    <= '0;
      cnt      <= '0;
      div_go   <= 1'b0;
      wait_div <= 1'b0;
      done     <= 1'b0;
      found    <= 1'b0;
      loc_x    <= '0;
      loc_y    <= '0;
      n_white  <= '0;
    end else begin
      div_go <= 1'b0;
      done   <= 1'b0;
      if (s_valid && s_x == 0 && s_y == 0) begin
        sum_x <= '0;
        sum_y <= '0;
        cnt   <= '0;
      end else if (d_v && dil) begin
        sum_x <= sum_x + SW'(d_x);
        sum_y <= sum_y + SW'(d_y);
        cnt   <= cnt + 1'b1;
      end
      if (d_last) begin
        div_go   <= 1'b1;
        wait_div <= 1'b1;
      end
      if (wait_div && dvx_done) begin
        wait_div <= 1'b0;
        done     <= 1'b1;
        n_white  <= cnt;
        found    <= (cnt != 0);
        loc_x    <= (cnt != 0) ? qx[XW-1:0] : XW'(W / 2);
        loc_y    <= (cnt != 0) ? qy[YW-1:0] : YW'(H / 2);
      end
    end
  end

  seq_divider #(.NW(SW), .DW(NW)) u_divx (
    .clk, .rst_n, .start(div_go), .num(sum_x), .den(cnt),
    .busy(dvx_busy), .done(dvx_done), .quot(qx), .rem(rx));
  seq_divider #(.NW(SW), .DW(NW)) u_divy (
    .clk, .rst_n, .start(div_go), .num(sum_y), .den(cnt),
    .busy(dvy_busy), .done(dvy_done), .quot(qy), .rem(ry));

  // Both dividers run in lock step.
  assert property (@(posedge clk) disable iff (!rst_n) dvx_done == dvy_done);
endmodule
