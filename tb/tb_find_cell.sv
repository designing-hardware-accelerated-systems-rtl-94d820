// tb_find_cell: streams background-subtracted frames holding a noisy disk
// (and one empty frame) into find_cell and compares with a behavioural
// model of the same chain: 3x3 Gaussian [1 2 1;2 4 2;1 2 1]/16 (zero
// outside the frame), threshold, 3x3 erosion (outside counts as white),
// 3x3 dilation (outside counts as black), then the mean white-pixel
// position. Each 3x3 stage gives no result for the last row and column,
// which the model reproduces. Checks location, white count, found,
// the stored Gaussian image and that the result comes within 64 cycles of
// the last pixel.
module tb_find_cell;
  localparam int W = 32, H = 32, NPIX = W * H;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid = 0, s_last = 0, done, found;
  logic [7:0] s_pix = 0, thr = 30, e_pix;
  logic [4:0] s_x = 0, s_y = 0, loc_x, loc_y;
  logic [10:0] n_white;
  logic [9:0] e_addr = 0;
  find_cell #(.W(W), .H(H)) dut (.*);

  int b [H][W], e [H][W];
  bit eb [H][W], er [H][W], op [H][W];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int bz(int x, int y);
    return (x < 0 || y < 0) ? 0 : b[y][x];
  endfunction

  task automatic run_frame(bit blob);
    int cx, cy, r, v, sx, sy, n, t0;
    cx = $urandom_range(8, 22); cy = $urandom_range(8, 22); r = $urandom_range(3, 6);
    v = $urandom_range(80, 200);
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        b[y][x] = (blob && (x - cx) * (x - cx) + (y - cy) * (y - cy) <= r * r)
                  ? v + $urandom_range(0, 20) : $urandom_range(0, 15);
    // model
    for (int y = 0; y < H - 1; y++)
      for (int x = 0; x < W - 1; x++) begin
        e[y][x] = (bz(x-1,y-1) + 2*bz(x,y-1) + bz(x+1,y-1) + 2*bz(x-1,y) + 4*bz(x,y) + 2*bz(x+1,y)
                   + bz(x-1,y+1) + 2*bz(x,y+1) + bz(x+1,y+1)) >> 4;
        eb[y][x] = e[y][x] > thr;
      end
    for (int y = 0; y < H - 2; y++)
      for (int x = 0; x < W - 2; x++) begin
        er[y][x] = 1;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (x + dx >= 0 && y + dy >= 0 && !eb[y+dy][x+dx]) er[y][x] = 0;
      end
    sx = 0; sy = 0; n = 0;
    for (int y = 0; y < H - 3; y++)
      for (int x = 0; x < W - 3; x++) begin
        op[y][x] = 0;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (x + dx >= 0 && y + dy >= 0 && er[y+dy][x+dx]) op[y][x] = 1;
        if (op[y][x]) begin sx += x; sy += y; n++; end
      end
    for (int a = 0; a < NPIX; a++) begin
      while ($urandom_range(0, 7) == 0) begin @(negedge clk); s_valid = 0; end
      @(negedge clk);
      s_valid = 1; s_pix = 8'(b[a / W][a % W]); s_x = 5'(a % W); s_y = 5'(a / W);
      s_last = (a == NPIX - 1);
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
    t0 = $time / 10;
    while (!done) @(posedge clk);
    checks++;
    if ($time / 10 - t0 > 64) begin failures++; $display("late result"); end
    check("n_white", n_white, n);
    check("found", found, n != 0);
    check("loc_x", loc_x, n ? sx / n : W / 2);
    check("loc_y", loc_y, n ? sy / n : H / 2);
    checks++;
    if (blob && n == 0) begin failures++; $display("blob vanished"); end
    if (blob) begin checks++; if ((loc_x - cx) * (loc_x - cx) > 4 || (loc_y - cy) * (loc_y - cy) > 4) begin
      failures++; $display("location (%0d,%0d) far from disk centre (%0d,%0d)", loc_x, loc_y, cx, cy); end end
    for (int y = 0; y < H - 1; y++)
      for (int x = 0; x < W - 1; x++) begin
        @(negedge clk); e_addr = 10'(y * W + x);
        @(negedge clk);
        check("E", e_pix, e[y][x]);
      end
  endtask

  initial begin repeat (60000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int f = 0; f < 5; f++) run_frame(f != 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
