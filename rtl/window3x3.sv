// window3x3: streaming 3x3 sliding-window generator (two line buffers plus a
// 3x3 register window), the common building block of the Gaussian filter,
// erosion and dilation stages.
//
// Pixels arrive in raster order with their coordinates. Each accepted pixel
// (x, y) is written into the line buffers and shifted into the window; the
// window is then centred on (x-1, y-1). Neighbours that fall outside the
// image (row -1 or column -1) are replaced by PAD. A window is produced for
// every centre with x >= 1 and y >= 1, so the centres cover columns
// 0..W-2 and rows 0..H-2: the last row and column of the image never
// become a centre, and a downstream stage treats them as missing.
//
// Interface: in_valid/in_data/in_x/in_y/in_last, no back-pressure (one pixel
// per cycle at most). Timing: out_valid one cycle after the pixel that
// completes the window; out_last marks the window made by the frame's last
// pixel. The line-buffer + window-buffer structure follows the design
// description; padding and the dropped last row/column are this design's choice.
module window3x3 #(
  parameter int unsigned W   = 64,
  parameter int unsigned H   = 64,
  parameter int unsigned DW  = 8,
  parameter logic [DW-1:0] PAD = '0
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [DW-1:0]         in_data,
  input  logic [$clog2(W)-1:0]  in_x,
  input  logic [$clog2(H)-1:0]  in_y,
  input  logic                  in_last,
  output logic                  out_valid,
  output logic [DW-1:0]         out_win [3][3],   // [row][col], row 0 = top
  output logic [$clog2(W)-1:0]  out_x,
  output logic [$clog2(H)-1:0]  out_y,
  output logic                  out_last
);
  logic [DW-1:0] lb_mid [W];   // row y-1
  logic [DW-1:0] lb_top [W];   // row y-2
  logic [DW-1:0] win [3][3];   // columns x-2, x-1, x of rows y-2, y-1, y

  // New column at x: top, middle, bottom rows.
  logic [DW-1:0] col [3];
  always_comb begin
    col[0] = lb_top[in_x];
    col[1] = lb_mid[in_x];
    col[2] = in_data;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      lb_top[in_x] <= lb_mid[in_x];
      lb_mid[in_x] <= in_data;
      for (int r = 0; r < 3; r++) begin
        win[r][0] <= win[r][1];
        win[r][1] <= win[r][2];
        win[r][2] <= col[r];
      end
    end
  end

  // Registered window output, with padding applied for centres on row 0 or column 0.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid && (in_x != 0) && (in_y != 0);
      out_last  <= in_valid && in_last;
    end
    if (in_valid) begin
      out_x <= in_x - 1'b1;
      out_y <= in_y - 1'b1;
      for (int r = 0; r < 3; r++) begin
        // columns: x-2 (from win[.][1]), x-1 (win[.][2]), x (col)
        out_win[r][0] <= (in_x == 1 || (r == 0 && in_y == 1)) ? PAD : win[r][1];
        out_win[r][1] <= (r == 0 && in_y == 1) ? PAD : win[r][2];
        out_win[r][2] <= (r == 0 && in_y == 1) ? PAD : col[r];
      end
    end
  end

  // Coordinates stay inside the image the line buffers are sized for.
  assert property (@(posedge clk) disable iff (!rst_n)
                   in_valid |-> (32'(in_x) < W) && (32'(in_y) < H));
endmodule
