// tb_ifc_system: full-size test of the whole accelerator with every
// parameter at its default (64x64 frames, 256-frame background average,
// three subclustering modules of 128 three-dimensional centroids). Both
// cores run at the same time.
// Cell analysis: 256 background frames, then empty frames and bursts of
// frames holding a synthetic cell, with random stalls on the result stream.
// Results are checked as in the core test (frame number, location, centre,
// wall radii, 93-word records) and detection and analysis are timed.
// Clustering: seeds near four blobs, then a stream of 16,384 points (the
// size of the 3-D clouds data set) whose
// per-module nearest centroids are checked against a behavioural model;
// then a minimum-cost and a DBSCAN reduction, checked against the model.
// Every mechanism is counted and any that never happens is a failure:
// background averaging, empty frame discarded, cell frame analysed, input
// held off by a full FIFO, result backpressure, centroid updates in each
// module, minimum-cost reduction and DBSCAN reduction.
module tb_ifc_system;
  import ifc_pkg::*;
  localparam int W = 64, H = 64, NPIX = W * H, N_AVG = 256;
  localparam int M = 3, D = 3, K = 128, SHIFT0 = 3, EPS = 2048, MINPTS = 3, NL = M * K;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic cam_tvalid = 0, cam_tready, cam_tlast = 0, res_tvalid, res_tready = 1, res_tlast;
  logic [7:0] cam_tdata = 0;
  logic [31:0] res_tdata;
  logic bg_ready, det_done, det_iscell;
  logic [1:0] fifo_occupancy;
  logic cl_init_we = 0, cl_s_valid = 0, cl_s_first = 0, cl_clear = 0, cl_o_valid;
  logic [1:0] cl_init_m = 0, cl_init_d = 0, cl_sel, cl_lut_m = 0;
  logic [6:0] cl_init_k = 0, cl_lut_k = 0;
  logic [15:0] cl_init_val = 0, cl_s_data = 0;
  logic [6:0] cl_o_idx [3];
  logic cl_reduce_start = 0, cl_mode = 0, cl_reduce_busy, cl_reduce_done;
  logic [8:0] cl_n_clusters, cl_lut_id;
  ifc_system dut (.*);

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

  always @(negedge clk) res_tready = rand_ready ? ($urandom_range(0, 3) != 0) : 1'b1;
  always @(posedge clk) if (rst_n) begin
    if (res_tvalid && !res_tready) out_stalls++;
    if (cam_tvalid && !cam_tready) stall_cycles++;
    if (det_done) if (det_iscell) n_det_cell++; else n_det_empty++;
  end

  // result stream monitor
  always @(posedge clk) if (rst_n && res_tvalid && res_tready) begin
    if (wcount == 0) begin
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected result"); end
      else cur = expq.pop_front();
      check("frame number", res_tdata, cur.frame);
    end else if (wcount == 1) begin
      check("iscell flag", res_tdata[31], 1);
      cur_lx = res_tdata[7:0]; cur_ly = res_tdata[15:8];
      check_near("loc_x", cur_lx, cur.x, 2);
      check_near("loc_y", cur_ly, cur.y, 2);
      org_x = (cur_lx < 12) ? 0 : (cur_lx - 12 > W - 1 - CROP) ? W - 1 - CROP : cur_lx - 12;
      org_y = (cur_ly < 12) ? 0 : (cur_ly - 12 > H - 1 - CROP) ? H - 1 - CROP : cur_ly - 12;
    end else if (wcount == 2) begin
      check("centre found", res_tdata[16], 1);
      check_near("centre x", res_tdata[7:0], (cur.x - org_x) * SCALE, 7);
      check_near("centre y", res_tdata[15:8], (cur.y - org_y) * SCALE, 7);
    end else begin
      for (int b = 0; b < 4; b++)
        if (res_tdata[8*b +: 8] >= 25 && res_tdata[8*b +: 8] <= 45) n_good_rad++;
    end
    check("tlast", res_tlast, wcount == 92);
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
      cam_tvalid = 1; cam_tdata = 8'(p); cam_tlast = (a == NPIX - 1);
      #1 took = cam_tready;
      @(posedge clk);
      while (!took) begin @(negedge clk); #1 took = cam_tready; @(posedge clk); end
    end
    @(negedge clk);
    cam_tvalid = 0; cam_tlast = 0;
  endtask


  // ---------------- clustering model ----------------
  int cref [M][K][D];
  longint cost [M];
  int exp_idx [$];
  int pts [NL][D];
  int lab [NL];
  int n_upd [M];
  int cl_done_flag = 0, n_mc = 0, n_db = 0;

  always @(posedge clk) if (rst_n && cl_o_valid)
    for (int m = 0; m < M; m++) check("o_idx", cl_o_idx[m], exp_idx.pop_front());

  function automatic int l1(int a, int b);
    int s;
    s = 0;
    for (int d = 0; d < D; d++) s += (pts[a][d] > pts[b][d]) ? pts[a][d] - pts[b][d] : pts[b][d] - pts[a][d];
    return s;
  endfunction
  function automatic int ncount(int a);
    int c;
    c = 0;
    for (int j = 0; j < NL; j++) if (l1(a, j) <= EPS) c++;
    return c;
  endfunction
  function automatic int ref_dbscan();
    int cid, q [$];
    bit vis [NL], queued [NL];
    cid = 0;
    for (int i = 0; i < NL; i++) begin lab[i] = 0; vis[i] = 0; queued[i] = 0; end
    for (int i = 0; i < NL; i++) begin
      if (vis[i]) continue;
      vis[i] = 1;
      if (ncount(i) < MINPTS) continue;
      cid++;
      lab[i] = cid;
      for (int j = 0; j < NL; j++) if (l1(i, j) <= EPS && !queued[j] && lab[j] == 0 && j != i) begin queued[j] = 1; q.push_back(j); end
      while (q.size() > 0) begin
        int p;
        p = q.pop_front();
        lab[p] = cid;
        if (!vis[p]) begin
          vis[p] = 1;
          if (ncount(p) >= MINPTS)
            for (int j = 0; j < NL; j++) if (l1(p, j) <= EPS && !queued[j] && lab[j] == 0 && j != p) begin queued[j] = 1; q.push_back(j); end
        end
      end
    end
    return cid;
  endfunction

  task automatic run_clustering();
    int bc3 [4][D], best_m, cyc, ncl;
    longint bc;
    for (int b = 0; b < 4; b++) for (int d = 0; d < D; d++) bc3[b][d] = $urandom_range(8000, 57000);
    for (int k = 0; k < K; k++)
      for (int d = 0; d < D; d++) begin
        int v;
        v = bc3[k % 4][d] + $urandom_range(0, 6000) - 3000;
        for (int m = 0; m < M; m++) begin
          cref[m][k][d] = v;
          @(negedge clk); cl_init_we = 1; cl_init_m = 2'(m); cl_init_k = 7'(k); cl_init_d = 2'(d); cl_init_val = 16'(v);
        end
      end
    @(negedge clk); cl_init_we = 0;
    for (int m = 0; m < M; m++) begin cost[m] = 0; n_upd[m] = 0; end
    for (int p = 0; p < 16384; p++) begin
      int x [D], b;
      b = $urandom_range(0, 3);
      for (int d = 0; d < D; d++) x[d] = bc3[b][d] + $urandom_range(0, 3000) - 1500;
      for (int m = 0; m < M; m++) begin
        int best, bd;
        best = 0; bd = 1 << 30;
        for (int k = 0; k < K; k++) begin
          int s;
          s = 0;
          for (int d = 0; d < D; d++) s += (x[d] > cref[m][k][d]) ? x[d] - cref[m][k][d] : cref[m][k][d] - x[d];
          if (s < bd) begin bd = s; best = k; end
        end
        for (int d = 0; d < D; d++) begin
          if (((x[d] - cref[m][best][d]) >>> (SHIFT0 + m)) != 0) n_upd[m]++;
          cref[m][best][d] = cref[m][best][d] + ((x[d] - cref[m][best][d]) >>> (SHIFT0 + m));
        end
        cost[m] += bd;
        exp_idx.push_back(best);
      end
      for (int d = 0; d < D; d++) begin
        @(negedge clk); cl_s_valid = 1; cl_s_first = (d == 0); cl_s_data = 16'(x[d]);
      end
    end
    @(negedge clk); cl_s_valid = 0;
    repeat (3) @(negedge clk);
    check("cluster results", exp_idx.size(), 0);
    best_m = 0; bc = cost[0];
    for (int m = 1; m < M; m++) if (cost[m] < bc) begin bc = cost[m]; best_m = m; end
    cl_mode = 0; cl_reduce_start = 1; @(negedge clk); cl_reduce_start = 0;
    while (!cl_reduce_done) @(negedge clk);
    n_mc++;
    check("sel", cl_sel, best_m);
    for (int k = 0; k < K; k++) begin
      cl_lut_m = 2'(best_m); cl_lut_k = 7'(k); #1;
      check("lut min-cost", cl_lut_id, k + 1);
    end
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) for (int d = 0; d < D; d++)
      pts[m * K + k][d] = cref[m][k][d];
    ncl = ref_dbscan();
    @(negedge clk);
    cl_mode = 1; cl_reduce_start = 1; @(negedge clk); cl_reduce_start = 0;
    cyc = 0;
    while (!cl_reduce_done) begin @(negedge clk); cyc++; end
    n_db++;
    check("n_clusters dbscan", cl_n_clusters, ncl);
    for (int m = 0; m < M; m++) for (int k = 0; k < K; k++) begin
      cl_lut_m = 2'(m); cl_lut_k = 7'(k); #1;
      check("lut dbscan", cl_lut_id, lab[m * K + k]);
    end
    $display("clustering: min-cost module %0d, DBSCAN %0d clusters in %0d cycles", best_m, ncl, cyc);
    cl_done_flag = 1;
  endtask

  task automatic run_cells();
    int px, py, fno, t0, t1;
    for (int a = 0; a < NPIX; a++) bg[a] = 100 + ((a % W) + (a / W)) / 4 + $urandom_range(0, 10);
    fno = 0;
    for (int f = 0; f < N_AVG; f++) begin send_frame(fno, 0, px, py); fno++; end
    repeat (10) @(posedge clk);
    check("bg_ready", bg_ready, 1);
    check("no output while averaging", n_res + wcount, 0);
    t0 = $time / 10;
    send_frame(fno, 0, px, py); fno++;
    while (!det_done) @(posedge clk);
    t1 = $time / 10 - t0;
    $display("empty frame through detection in %0d cycles", t1);
    checks++;
    if (t1 > NPIX + 256 + 12) begin failures++; $display("detection too slow"); end
    send_frame(fno, 1, px, py); fno++;
    t0 = $time / 10;
    while (n_res < 1) @(posedge clk);
    t1 = $time / 10 - t0;
    $display("cell frame analysed and sent %0d cycles after its last pixel", t1);
    checks++;
    if (t1 > 18000) begin failures++; $display("analysis too slow"); end
    rand_ready = 1;
    for (int f = 0; f < 4; f++) begin send_frame(fno, 1, px, py); fno++; end
    send_frame(fno, 0, px, py); fno++;
    send_frame(fno, 1, px, py); fno++;
    send_frame(fno, 0, px, py); fno++;
    while (n_res < n_cell_sent) @(posedge clk);
    repeat (100) @(posedge clk);
  endtask

  initial begin repeat (3000000) @(posedge clk); failures++;
    $display("watchdog: results %0d", n_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    repeat (300) @(posedge clk);
    fork
      run_cells();
      run_clustering();
    join
    check("results", n_res, n_cell_sent);
    check("detected cells", n_det_cell, n_cell_sent);
    check("detected empty", n_det_empty, n_empty_sent);
    // mechanism counts
    checks++; if (n_empty_sent == 0 || n_det_empty == 0) begin failures++; $display("no empty frame discarded"); end
    checks++; if (n_res == 0) begin failures++; $display("no cell frame analysed"); end
    checks++; if (stall_cycles == 0) begin failures++; $display("FIFO-full stall never happened"); end
    checks++; if (out_stalls == 0) begin failures++; $display("output backpressure never happened"); end
    for (int m = 0; m < M; m++) begin
      checks++; if (n_upd[m] == 0) begin failures++; $display("module %0d never moved a centroid", m); end
    end
    checks++; if (n_mc == 0) begin failures++; $display("no min-cost reduction"); end
    checks++; if (n_db == 0) begin failures++; $display("no DBSCAN reduction"); end
    checks++;
    if (n_good_rad < n_res * 360 * 7 / 10) begin failures++; $display("radii on ring: %0d of %0d", n_good_rad, n_res * 360); end
    $display("mechanisms: averaged %0d frames, empty discarded %0d, cells analysed %0d, FIFO stall cycles %0d, output stalls %0d, updates %0d/%0d/%0d, min-cost %0d, DBSCAN %0d",
             N_AVG, n_det_empty, n_res, stall_cycles, out_stalls, n_upd[0], n_upd[1], n_upd[2], n_mc, n_db);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
