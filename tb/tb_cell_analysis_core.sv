// tb_cell_analysis_core: end-to-end test of the cell analysis pipeline with
// the averaging shortened to 4 frames. It sends a static background (plus
// per-frame noise), then a mix of empty frames and frames holding a
// synthetic cell (bright inside, dark wall ring of radius about 7 pixels) at
// a random place, with bursts of cell frames that overrun the frame FIFO
// and random stalls on the result stream. It checks:
//   - nothing leaves while the background is averaged;
//   - only cell frames give results, each 93 words with tlast on the last;
//   - frame number, iscell flag and location (within 2 pixels of the cell);
//   - the centre (resized coordinates inside the crop) within 7 pixels of
//     the true centre and most wall radii on the ring;
//   - the input is held off when the FIFO is full (and no frame goes missing);
//   - an empty frame passes detection in NPIX + 256 + a few cycles and
//     a cell frame is analysed in under 18000 cycles.
module tb_cell_analysis_core;
  import ifc_pkg::*;
  localparam int W = 64, H = 64, NPIX = W * H, N_AVG = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_tvalid = 0, s_tready, s_tlast = 0, m_tvalid, m_tready = 1, m_tlast;
  logic [7:0] s_tdata = 0;
  logic [31:0] m_tdata;
  logic bg_ready, det_done, det_iscell;
  logic [1:0] fifo_occupancy;
  cell_analysis_core #(.IMG_W(W), .IMG_H(H), .N_AVG(N_AVG)) dut (.*);

  int bg [NPIX];
  typedef struct { int frame; int x; int y; } cellrec_t;
  cellrec_t expq [$];
  int n_res = 0, wcount = 0, n_good_rad = 0, stall_cycles = 0, out_stalls = 0;
  int n_empty_sent = 0, n_cell_sent = 0, n_det_cell = 0, n_det_empty = 0;
  bit rand_ready = 0;
  int t_first_out = -1, t_res_start, cur_lx, cur_ly, org_x, org_y;
  cellrec_t cur;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask
  task automatic check_near(string what, int got, int exp, int tol);
    checks++;
    if (got > exp + tol || got < exp - tol) begin
      failures++; $display("%s: got %0d expected %0d +- %0d", what, got, exp, tol);
    end
  endtask

  always @(negedge clk) m_tready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (m_tvalid && !m_tready) out_stalls++;
    if (s_tvalid && !s_tready) stall_cycles++;
    if (det_done) if (det_iscell) n_det_cell++; else n_det_empty++;
  end

  // result stream monitor
  always @(posedge clk) if (rst_n && m_tvalid && m_tready) begin
    if (wcount == 0) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else cur = expq.pop_front();
      check("frame number", m_tdata, cur.frame);
    end else if (wcount == 1) begin
      check("iscell flag", m_tdata[31], 1);
      cur_lx = m_tdata[7:0]; cur_ly = m_tdata[15:8];
      check_near("loc_x", cur_lx, cur.x, 2);
      check_near("loc_y", cur_ly, cur.y, 2);
      org_x = (cur_lx < 12) ? 0 : (cur_lx - 12 > W - 1 - CROP) ? W - 1 - CROP : cur_lx - 12;
      org_y = (cur_ly < 12) ? 0 : (cur_ly - 12 > H - 1 - CROP) ? H - 1 - CROP : cur_ly - 12;
    end else if (wcount == 2) begin
      check("centre found", m_tdata[16], 1);
      check_near("centre x", m_tdata[7:0], (cur.x - org_x) * SCALE, 7);
      check_near("centre y", m_tdata[15:8], (cur.y - org_y) * SCALE, 7);
    end else begin
      for (int b = 0; b < 4; b++)
        if (m_tdata[8*b +: 8] >= 25 && m_tdata[8*b +: 8] <= 45) n_good_rad++;
    end
    check("tlast", m_tlast, wcount == 92);
    wcount = (wcount == 92) ? 0 : wcount + 1;
    if (wcount == 0) n_res++;
  end

  task automatic send_frame(int fno, bit want_cell, output int px, output int py);
    bit took;
    px = $urandom_range(16, 47); py = $urandom_range(16, 47);
    if (want_cell) begin
      cellrec_t c;
      c.frame = fno; c.x = px; c.y = py;
      expq.push_back(c);
      n_cell_sent++;
    end else if (fno >= N_AVG) n_empty_sent++;
    for (int a = 0; a < NPIX; a++) begin
      real d;
      int p;
      d = $sqrt((a % W - px) ** 2 + (a / W - py) ** 2);
      p = bg[a] + $urandom_range(0, 4) - 2;
      if (want_cell) p = (d < 5.5) ? 190 : (d < 7.5) ? 25 : p;
      @(negedge clk);
      s_tvalid = 1; s_tdata = 8'(p); s_tlast = (a == NPIX - 1);
      #1 took = s_tready;
      @(posedge clk);
      while (!took) begin @(negedge clk); #1 took = s_tready; @(posedge clk); end
    end
    @(negedge clk);
    s_tvalid = 0; s_tlast = 0;
  endtask

  initial begin repeat (400000) @(posedge clk); failures++;
    $display("watchdog: results %0d", n_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int px, py, fno, t0, t1;
    for (int a = 0; a < NPIX; a++) bg[a] = 100 + ((a % W) + (a / W)) / 4 + $urandom_range(0, 10);
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (300) @(posedge clk);
    fno = 0;
    for (int f = 0; f < N_AVG; f++) begin send_frame(fno, 0, px, py); fno++; end
    repeat (10) @(posedge clk);
    check("bg_ready", bg_ready, 1);
    check("no output while averaging", n_res + wcount, 0);
    // empty frame: time through detection
    t0 = $time / 10;
    send_frame(fno, 0, px, py); fno++;
    while (!det_done) @(posedge clk);
    checks++;
    if ($time / 10 - t0 > NPIX + 256 + 12) begin failures++; $display("detection took %0d", $time / 10 - t0); end
    // single cell frame: analysis time from detection decision to last word
    send_frame(fno, 1, px, py); fno++;
    t0 = $time / 10;
    while (n_res < 1) @(posedge clk);
    t1 = $time / 10 - t0;
    $display("cell frame analysed and sent %0d cycles after its last pixel", t1);
    checks++;
    if (t1 > 18000) begin failures++; $display("analysis too slow"); end
    // burst of cell frames with random output stalls: FIFO overruns
    rand_ready = 1;
    for (int f = 0; f < 4; f++) begin send_frame(fno, 1, px, py); fno++; end
    send_frame(fno, 0, px, py); fno++;
    send_frame(fno, 1, px, py); fno++;
    send_frame(fno, 0, px, py); fno++;
    while (n_res < n_cell_sent) @(posedge clk);
    repeat (100) @(posedge clk);
    check("results", n_res, n_cell_sent);
    check("detected cells", n_det_cell, n_cell_sent);
    check("detected empty", n_det_empty, n_empty_sent);
    checks++;
    if (stall_cycles == 0) begin failures++; $display("FIFO-full stall never happened"); end
    checks++;
    if (out_stalls == 0) begin failures++; $display("output backpressure never happened"); end
    checks++;
    if (n_good_rad < n_res * 360 * 7 / 10) begin failures++; $display("radii on ring: %0d of %0d", n_good_rad, n_res * 360); end
    $display("input stall cycles %0d, output stalls %0d, radii on ring %0d/%0d",
             stall_cycles, out_stalls, n_good_rad, n_res * 360);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
