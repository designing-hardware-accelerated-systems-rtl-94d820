// tb_trace_wall: loads 24x24 crops of a synthetic cell (bright inside, a
// dark wall ring, grey outside, with noise), runs the wall tracer from
// several centres and contrast settings, and compares all 360 radii with a
// behavioural model of the three estimates along each ray (darkest sample,
// steepest fall, first sample below WALL_LVL) and their median. Samples are
// taken from the shared ifc_pkg bicubic/stretch/sine helpers. It also checks
// that a centred run finds the ring at its true radius for most angles and
// that a run takes 90 * RMAX cycles.
module tb_trace_wall;
  import ifc_pkg::*;
  localparam int RMAX = 59, WALL_LVL = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0, start = 0, busy, done;
  logic [9:0] ld_addr = 0;
  logic [7:0] ld_pix = 0, lo = 0;
  rcoord_t cx = 60, cy = 60;
  logic [15:0] scale = 256;
  logic [6:0] rd_word = 0;
  logic [31:0] rd_radii;
  trace_wall #(.RMAX(RMAX), .WALL_LVL(WALL_LVL)) dut (.*);

  crop_t crop;
  int erad [N_ANGLE];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic int med3(int a, int b, int c);
    if ((a <= b && b <= c) || (c <= b && b <= a)) return b;
    if ((b <= a && a <= c) || (c <= a && a <= b)) return a;
    return c;
  endfunction

  task automatic model(int mcx, int mcy, int mlo, int mscale);
    for (int a = 0; a < N_ANGLE; a++) begin
      int m1, m2, m3, minv, prev, drop;
      bit m2ok, m3ok, alive;
      m1 = 1; m2 = 1; m3 = 1; minv = 256; prev = 0; drop = -1; m2ok = 0; m3ok = 0; alive = 1;
      for (int r = 1; r <= RMAX; r++) begin
        int sx, sy, g;
        sx = mcx + ((r * int'(cos_q14(a)) + 8192) >>> 14);
        sy = mcy - ((r * int'(sin_q14(a)) + 8192) >>> 14);
        if (sx < 0 || sy < 0 || sx >= RS || sy >= RS) alive = 0;
        if (!alive) break;
        g = adjust_px(bicubic_px(crop, sx, sy), 8'(mlo), 16'(mscale));
        if (g < minv) begin minv = g; m1 = r; end
        if (r > 1 && g < prev && prev - g > drop) begin drop = prev - g; m2 = r; m2ok = 1; end
        if (!m3ok && g < WALL_LVL) begin m3 = r; m3ok = 1; end
        prev = g;
      end
      erad[a] = med3(m1, m2ok ? m2 : m1, m3ok ? m3 : m1);
    end
  endtask

  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (3) @(posedge clk);
    for (int run = 0; run < 4; run++) begin
      int cyc, good;
      for (int a = 0; a < CROP * CROP; a++) begin
        real d;
        int p;
        d = $sqrt((a % CROP - 12.0) ** 2 + (a / CROP - 12.0) ** 2);
        p = (d < 6.5) ? 180 : (d < 8.0) ? 20 : 130;
        p += $urandom_range(0, 12);
        crop[a] = 8'(p);
        @(negedge clk); ld_we = 1; ld_addr = 10'(a); ld_pix = 8'(p);
      end
      @(negedge clk); ld_we = 0;
      cx = (run == 0) ? 60 : rcoord_t'($urandom_range(20, 100));
      cy = (run == 0) ? 60 : rcoord_t'($urandom_range(20, 100));
      lo = (run < 2) ? 0 : 8'($urandom_range(0, 40));
      scale = (run < 2) ? 256 : 16'($urandom_range(256, 400));
      model(cx, cy, lo, scale);
      start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done) begin @(negedge clk); cyc++; end
      check("cycles", cyc, 90 * RMAX);
      good = 0;
      for (int w = 0; w < N_ANGLE / 4; w++) begin
        rd_word = 7'(w); #1;
        for (int b = 0; b < 4; b++) begin
          check($sformatf("radius %0d", 4 * w + b), rd_radii[8*b +: 8], erad[4 * w + b]);
          // ring between 6.5 and 8 crop pixels: 33..40 resized pixels
          if (rd_radii[8*b +: 8] >= 31 && rd_radii[8*b +: 8] <= 41) good++;
        end
      end
      if (run == 0) begin
        checks++;
        if (good < 324) begin failures++; $display("only %0d of 360 radii on the ring", good); end
      end
      $display("run %0d: centre (%0d,%0d), %0d radii on the ring", run, cx, cy, good);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
