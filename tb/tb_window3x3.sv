// tb_window3x3: streams random frames (with idle gaps) through the 3x3
// window generator and checks every window against a window cut from a
// stored copy of the frame, with PAD outside the image.
module tb_window3x3;
  localparam int W = 8, H = 6;
  localparam logic [7:0] PAD = 8'hEE;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, in_last = 0, out_valid, out_last;
  logic [7:0] in_data = 0, out_win [3][3];
  logic [2:0] in_x = 0, out_x;
  logic [2:0] in_y = 0, out_y;
  logic [7:0] img [H][W];
  int nwin = 0, nlast = 0;

  window3x3 #(.W(W), .H(H), .DW(8), .PAD(PAD)) dut (.*);

  function automatic logic [7:0] ref_px(int x, int y);
    return (x < 0 || y < 0) ? PAD : img[y][x];
  endfunction

  always @(posedge clk) if (rst_n && out_valid) begin
    nwin++;
    for (int r = 0; r < 3; r++)
      for (int c = 0; c < 3; c++) begin
        checks++;
        if (out_win[r][c] !== ref_px(int'(out_x) + c - 1, int'(out_y) + r - 1)) begin
          failures++;
          $display("window mismatch at (%0d,%0d) [%0d][%0d]: %h vs %h", out_x, out_y, r, c,
                   out_win[r][c], ref_px(int'(out_x) + c - 1, int'(out_y) + r - 1));
        end
      end
  end
  always @(posedge clk) if (rst_n && out_last) nlast++;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < 3; f++) begin
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          while ($urandom_range(0, 3) == 0) begin
            in_valid <= 0;
            @(posedge clk);
          end
          // the frame copy must hold this pixel before its window is checked
          img[y][x] = 8'($urandom);
          in_valid <= 1;
          in_data  <= img[y][x];
          in_x <= 3'(x);
          in_y <= 3'(y);
          in_last <= (x == W-1 && y == H-1);
          @(posedge clk);
        end
      in_valid <= 0;
      in_last <= 0;
      repeat (3) @(posedge clk);
    end
    checks++;
    if (nwin != 3 * (W-1) * (H-1)) begin failures++; $display("windows %0d", nwin); end
    checks++;
    if (nlast != 3) begin failures++; $display("lasts %0d", nlast); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
