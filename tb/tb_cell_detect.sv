// tb_cell_detect: streams 16x16 frames (pixel plus background) into the cell
// detector. Empty frames carry only small noise; cell frames carry a bright
// square blob. A behavioural model computes B = |C - BG|, the histogram
// threshold carried to the next frame, the binary image, the 3x3 erosion and
// the surviving pixel count. The test checks every FIFO write (address, B,
// C), the count, the iscell decision (commit or discard), the threshold,
// the per-frame cycle budget (NPIX pixels + 256 histogram-scan cycles) and
// that the input is held off while the FIFO has no free slot.
module tb_cell_detect;
  localparam int W = 16, H = 16, NPIX = W * H, BG_FRAC = 240, T_MIN = 20, MIN_PIX = 4;
  localparam int NEED = (NPIX * BG_FRAC + 255) / 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid = 0, s_ready, s_last = 0, wr_free = 1, wr_en, wr_commit, wr_discard, det_done, det_iscell;
  logic [7:0] s_pix = 0, s_bg = 0, wr_b, wr_c, wr_thr, thr;
  logic [3:0] s_x = 0, s_y = 0;
  logic [31:0] s_frame = 0, wr_frame;
  logic [7:0] wr_addr;
  logic [8:0] det_count;
  cell_detect #(.W(W), .H(H), .BG_FRAC(BG_FRAC), .T_MIN(T_MIN), .MIN_PIX(MIN_PIX)) dut (.*);

  int c_img [NPIX], bg_img [NPIX], b_img [NPIX];
  int thr_ref = 255;
  int n_commit = 0, n_discard = 0, n_wr = 0, n_cell_ref = 0;
  int exp_count, exp_cell;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (wr_en) begin
      check("wr_b", wr_b, b_img[wr_addr]);
      check("wr_c", wr_c, c_img[wr_addr]);
      n_wr++;
    end
    if (wr_commit) n_commit++;
    if (wr_discard) n_discard++;
  end

  // reference: count of eroded pixels and the next threshold
  task automatic model(input int t, output int cnt, output int tnext);
    int hist [256];
    int cum;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    for (int a = 0; a < NPIX; a++) hist[b_img[a]]++;
    cnt = 0;
    // the eroded image has a window centre at (x, y) for x < W-1, y < H-1
    for (int y = 0; y < H - 1; y++)
      for (int x = 0; x < W - 1; x++) begin
        bit all1;
        all1 = 1;
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (x + dx >= 0 && y + dy >= 0 && b_img[(y + dy) * W + x + dx] <= t) all1 = 0;
        if (all1) cnt++;
      end
    cum = 0; tnext = 255;
    for (int i = 0; i < 256; i++) begin
      cum += hist[i];
      if (cum >= NEED) begin tnext = i; break; end
    end
    if (tnext < T_MIN) tnext = T_MIN;
  endtask

  task automatic send_frame(int fno, bit want_cell, output int cycles);
    int cx, cy, t0;
    bit took;
    cx = $urandom_range(3, 9); cy = $urandom_range(3, 9);
    for (int a = 0; a < NPIX; a++) begin
      int x, y;
      x = a % W; y = a / W;
      bg_img[a] = $urandom_range(40, 200);
      c_img[a] = bg_img[a] + $urandom_range(0, 8) - 4;
      if (want_cell && x >= cx && x < cx + 5 && y >= cy && y < cy + 5)
        c_img[a] = (bg_img[a] > 120) ? bg_img[a] - 100 : bg_img[a] + 55;
      b_img[a] = (c_img[a] > bg_img[a]) ? c_img[a] - bg_img[a] : bg_img[a] - c_img[a];
    end
    model(thr_ref, exp_count, thr_ref);
    exp_cell = (exp_count >= MIN_PIX);
    t0 = $time / 10;
    for (int a = 0; a < NPIX; a++) begin
      @(negedge clk);
      s_valid = 1; s_pix = 8'(c_img[a]); s_bg = 8'(bg_img[a]);
      s_x = 4'(a % W); s_y = 4'(a / W); s_last = (a == NPIX - 1); s_frame = fno;
      #1 took = s_ready;
      @(posedge clk);
      while (!took) begin @(negedge clk); #1 took = s_ready; @(posedge clk); end
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
    while (!det_done) @(posedge clk);
    cycles = $time / 10 - t0;
    check("det_count", det_count, exp_count);
    check("det_iscell", det_iscell, exp_cell);
    check("wr_frame", wr_frame, fno);
    #1;
    check("thr", thr, thr_ref);
    if (exp_cell) n_cell_ref++;
  endtask

  initial begin repeat (40000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int cyc, held;
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (300) @(posedge clk);   // histogram cleared after reset
    send_frame(0, 0, cyc);          // first threshold comes from this frame
    for (int f = 1; f < 10; f++) begin
      send_frame(f, f % 2, cyc);
      checks++;
      if (cyc > NPIX + 256 + 8) begin failures++; $display("frame took %0d cycles", cyc); end
      checks++;
      if (exp_cell != (f % 2)) begin failures++; $display("stimulus did not give the intended frame type"); end
    end
    // no free slot: the next frame must wait
    @(negedge clk); wr_free = 0;
    s_valid = 1;
    held = 0;
    repeat (20) begin #1 if (!s_ready) held++; @(negedge clk); end
    check("held while FIFO full", held, 20);
    s_valid = 0; wr_free = 1;
    send_frame(10, 1, cyc);
    check("commits", n_commit, n_cell_ref);
    check("discards", n_discard, 11 - n_cell_ref);
    check("writes", n_wr, 11 * NPIX);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
