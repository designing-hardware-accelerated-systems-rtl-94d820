// tb_stream_cluster: three subclustering modules (learning rates 1/8, 1/16,
// 1/32) on a stream of two-dimensional points drawn from four blobs. A
// behavioural model of the three modules checks every per-module nearest
// centroid index. Then both reductions run: minimum cost pick (the module
// with the lowest summed distance; lookup table maps its centroid k to
// k + 1 and the rest to 0) and DBSCAN over all centroids (checked against a
// behavioural DBSCAN with the same visiting order). Each reduction is also
// timed against its bound.
module tb_stream_cluster;
  localparam int M = 3, D = 2, K = 6, DW = 16, SHIFT0 = 3, EPS = 3000, MINPTS = 2;
  localparam int NL = M * K, NPTS = 600;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_we = 0, s_valid = 0, s_first = 0, clear = 0, o_valid;
  logic [1:0] init_m = 0, sel, lut_m = 0;
  logic [2:0] init_k = 0, lut_k = 0;
  logic [0:0] init_d = 0;
  logic [15:0] init_val = 0, s_data = 0;
  logic [2:0] o_idx [M];
  logic reduce_start = 0, mode = 0, reduce_busy, reduce_done;
  logic [4:0] n_clusters, lut_id;
  stream_cluster #(.M(M), .D(D), .K(K), .DW(DW), .SHIFT0(SHIFT0), .EPS(EPS), .MINPTS(MINPTS)) dut (.*);

  int cref [M][K][D];
  longint cost [M];
  int exp_idx [$];
  int pts [NL][D];
  int lab [NL];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n && o_valid)
    for (int m = 0; m < M; m++) check($sformatf("o_idx[%0d]", m), o_idx[m], exp_idx.pop_front());

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

  initial begin repeat (200000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int bx [4], by [4], best_m, cyc, ncl;
    longint bc;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int b = 0; b < 4; b++) begin bx[b] = 8000 + 16000 * b; by[b] = 60000 - 15000 * b; end
    // seeds: the same random start points in every module
    for (int k = 0; k < K; k++)
      for (int d = 0; d < D; d++) begin
        int v;
        v = $urandom_range(0, 65535);
        for (int m = 0; m < M; m++) begin
          cref[m][k][d] = v;
          @(negedge clk); init_we = 1; init_m = 2'(m); init_k = 3'(k); init_d = 1'(d); init_val = 16'(v);
        end
      end
    @(negedge clk); init_we = 0;
    for (int m = 0; m < M; m++) cost[m] = 0;
    for (int p = 0; p < NPTS; p++) begin
      int x [D], b;
      b = $urandom_range(0, 3);
      x[0] = bx[b] + $urandom_range(0, 2000) - 1000;
      x[1] = by[b] + $urandom_range(0, 2000) - 1000;
      for (int m = 0; m < M; m++) begin
        int best, bd;
        best = 0; bd = 1 << 30;
        for (int k = 0; k < K; k++) begin
          int s;
          s = 0;
          for (int d = 0; d < D; d++) s += (x[d] > cref[m][k][d]) ? x[d] - cref[m][k][d] : cref[m][k][d] - x[d];
          if (s < bd) begin bd = s; best = k; end
        end
        for (int d = 0; d < D; d++)
          cref[m][best][d] = cref[m][best][d] + ((x[d] - cref[m][best][d]) >>> (SHIFT0 + m));
        cost[m] += bd;
        exp_idx.push_back(best);
      end
      for (int d = 0; d < D; d++) begin
        @(negedge clk); s_valid = 1; s_first = (d == 0); s_data = 16'(x[d]);
      end
    end
    @(negedge clk); s_valid = 0;
    repeat (3) @(negedge clk);
    check("all results seen", exp_idx.size(), 0);

    // minimum cost pick
    best_m = 0; bc = cost[0];
    for (int m = 1; m < M; m++) if (cost[m] < bc) begin bc = cost[m]; best_m = m; end
    mode = 0; reduce_start = 1; @(negedge clk); reduce_start = 0;
    cyc = 0;
    while (!reduce_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > M + 4) begin failures++; $display("min cost took %0d", cyc); end
    check("sel", sel, best_m);
    check("n_clusters min-cost", n_clusters, K);
    for (int m = 0; m < M; m++)
      for (int k = 0; k < K; k++) begin
        lut_m = 2'(m); lut_k = 3'(k); #1;
        check("lut min-cost", lut_id, (m == best_m) ? k + 1 : 0);
      end

    // DBSCAN over all centroids
    for (int m = 0; m < M; m++)
      for (int k = 0; k < K; k++)
        for (int d = 0; d < D; d++) pts[m * K + k][d] = cref[m][k][d];
    ncl = ref_dbscan();
    @(negedge clk);
    mode = 1; reduce_start = 1; @(negedge clk); reduce_start = 0;
    cyc = 0;
    while (!reduce_done) begin @(negedge clk); cyc++; end
    checks++;
    if (cyc > NL * D + 3 * NL * NL + 8) begin failures++; $display("dbscan took %0d", cyc); end
    check("n_clusters dbscan", n_clusters, ncl);
    checks++;
    if (ncl < 1) begin failures++; $display("DBSCAN found no cluster"); end
    for (int m = 0; m < M; m++)
      for (int k = 0; k < K; k++) begin
        lut_m = 2'(m); lut_k = 3'(k); #1;
        check("lut dbscan", lut_id, lab[m * K + k]);
      end
    $display("min cost module %0d, DBSCAN clusters %0d", best_m, ncl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
