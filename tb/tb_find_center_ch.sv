// tb_find_center_ch: loads 24x24 crops of a synthetic cell (bright disk with
// a dark wall ring on a mid-grey background, plus noise) into two
// find-center channels, one looking for bright pixels and one for dark
// pixels, and compares their results with a behavioural model: the 120x120
// bicubic-resized image (taken from the shared ifc_pkg::bicubic_px), its
// histogram, the 1 % / 99 % points, the stretch scale, Otsu's threshold
// (computed here in floating point) and the mean white-pixel position.
// It also checks the channel's run time: two passes of 3600 cycles plus the
// 256-cycle histogram scan and the dividers, under 7600 cycles.
module tb_find_center_ch;
  import ifc_pkg::*;
  localparam int NTOT = RS * RS;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0, start = 0;
  logic [9:0] ld_addr = 0;
  logic [7:0] ld_pix = 0;
  logic busy [2], done [2], found [2];
  rcoord_t cx [2], cy [2];
  logic [7:0] lo [2], otsu_t [2];
  logic [15:0] scale [2];
  find_center_ch #(.BRIGHT(1'b1)) dut_b (.clk, .rst_n, .ld_we, .ld_addr, .ld_pix, .start,
    .busy(busy[0]), .done(done[0]), .found(found[0]), .cx(cx[0]), .cy(cy[0]),
    .lo(lo[0]), .scale(scale[0]), .otsu_t(otsu_t[0]));
  find_center_ch #(.BRIGHT(1'b0)) dut_d (.clk, .rst_n, .ld_we, .ld_addr, .ld_pix, .start,
    .busy(busy[1]), .done(done[1]), .found(found[1]), .cx(cx[1]), .cy(cy[1]),
    .lo(lo[1]), .scale(scale[1]), .otsu_t(otsu_t[1]));

  crop_t crop;
  int rimg [RS][RS];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic model(bit bright, output int e_lo, output int e_scale, output int e_t,
                       output int e_cx, output int e_cy, output bit e_found);
    int hist [256];
    longint cum, s0, sum_t, n, sx, sy;
    real best, v;
    int hi;
    bit lf, hf;
    for (int i = 0; i < 256; i++) hist[i] = 0;
    sum_t = 0;
    for (int y = 0; y < RS; y++) for (int x = 0; x < RS; x++) begin
      hist[rimg[y][x]]++; sum_t += rimg[y][x];
    end
    cum = 0; s0 = 0; best = 0.0; e_t = 0; lf = 0; hf = 0; e_lo = 0; hi = 0;
    for (int g = 0; g < 256; g++) begin
      cum += hist[g]; s0 += g * hist[g];
      if (!lf && cum > NTOT / 100) begin lf = 1; e_lo = g; end
      if (!hf && cum >= (NTOT * 99) / 100) begin hf = 1; hi = g; end
      if (cum > 0 && cum < NTOT) begin
        v = real'(sum_t * cum - NTOT * s0) ** 2 / (real'(cum) * real'(NTOT - cum));
        if (v > best) begin best = v; e_t = g; end
      end
    end
    e_scale = (hi > e_lo) ? 65280 / (hi - e_lo) : 256;
    n = 0; sx = 0; sy = 0;
    for (int y = 0; y < RS; y++) for (int x = 0; x < RS; x++)
      if (bright ? rimg[y][x] > e_t : rimg[y][x] <= e_t) begin n++; sx += x; sy += y; end
    e_found = (n != 0);
    e_cx = n ? int'(sx / n) : RS / 2;
    e_cy = n ? int'(sy / n) : RS / 2;
  endtask

  initial begin repeat (100000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (300) @(posedge clk);
    for (int run = 0; run < 4; run++) begin
      real ccx, ccy, rad;
      int t0, cyc;
      ccx = 8.0 + $urandom_range(0, 80) / 10.0; ccy = 8.0 + $urandom_range(0, 80) / 10.0;
      rad = 4.0 + $urandom_range(0, 30) / 10.0;
      for (int a = 0; a < CROP * CROP; a++) begin
        real d;
        int p;
        d = $sqrt((a % CROP - ccx) ** 2 + (a / CROP - ccy) ** 2);
        p = (d < rad) ? 200 : (d < rad + 1.5) ? 30 : 120;
        if (run == 3) p = 100;           // flat crop: degenerate histogram
        p += $urandom_range(0, 10);
        crop[a] = 8'(p);
        @(negedge clk); ld_we = 1; ld_addr = 10'(a); ld_pix = 8'(p);
      end
      @(negedge clk); ld_we = 0;
      for (int y = 0; y < RS; y++) for (int x = 0; x < RS; x++)
        rimg[y][x] = bicubic_px(crop, x, y);
      start = 1; @(negedge clk); start = 0;
      t0 = $time / 10; cyc = 0;
      while (!(done[0] && done[1])) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc > 7600 || cyc < 7456) begin failures++; $display("run time %0d cycles", cyc); end
      for (int c = 0; c < 2; c++) begin
        int e_lo, e_scale, e_t, e_cx, e_cy;
        bit e_found;
        model(c == 0, e_lo, e_scale, e_t, e_cx, e_cy, e_found);
        check($sformatf("ch%0d lo", c), lo[c], e_lo);
        check($sformatf("ch%0d scale", c), scale[c], e_scale);
        check($sformatf("ch%0d otsu", c), otsu_t[c], e_t);
        check($sformatf("ch%0d found", c), found[c], e_found);
        check($sformatf("ch%0d cx", c), cx[c], e_cx);
        check($sformatf("ch%0d cy", c), cy[c], e_cy);
      end
      if (run < 3) begin
        // the bright channel's centre lies within one crop pixel of the disk centre (5x scale)
        checks++;
        if ((real'(cx[0]) - (ccx * 5.0)) ** 2 > 25.0 || (real'(cy[0]) - (ccy * 5.0)) ** 2 > 25.0) begin
          failures++; $display("centre (%0d,%0d) vs disk (%f,%f)", cx[0], cy[0], ccx * 5, ccy * 5);
        end
      end
      $display("run %0d: %0d cycles, centre (%0d,%0d) (%0d,%0d)", run, cyc, cx[0], cy[0], cx[1], cy[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
