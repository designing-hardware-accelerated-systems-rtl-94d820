// tb_dbscan_reduce: loads two-dimensional points made of a few dense groups
// plus scattered noise, runs the DBSCAN reduction and compares every label
// and the cluster count with a behavioural DBSCAN (same visiting order,
// L1 neighbourhood of radius EPS, MINPTS neighbours including the point
// itself). It also checks that the run ends inside the 3*N*N cycle bound.
module tb_dbscan_reduce;
  localparam int N = 40, D = 2, DW = 16, EPS = 300, MINPTS = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic ld_we = 0, start = 0, busy, done;
  logic [5:0] ld_idx = 0, n_clusters, rd_idx = 0, rd_label;
  logic [0:0] ld_d = 0;
  logic [15:0] ld_val = 0;
  dbscan_reduce #(.N(N), .D(D), .DW(DW), .EPS(EPS), .MINPTS(MINPTS)) dut (.*);

  int pts [N][D];
  int lab [N];
  bit vis [N];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  function automatic bit nb(int a, int b);
    int s;
    s = 0;
    for (int d = 0; d < D; d++) s += (pts[a][d] > pts[b][d]) ? pts[a][d] - pts[b][d] : pts[b][d] - pts[a][d];
    return s <= EPS;
  endfunction
  function automatic int ncount(int a);
    int c;
    c = 0;
    for (int j = 0; j < N; j++) if (nb(a, j)) c++;
    return c;
  endfunction

  function automatic int ref_dbscan();
    int cid, q [$];
    bit queued [N];
    cid = 0;
    for (int i = 0; i < N; i++) begin lab[i] = 0; vis[i] = 0; queued[i] = 0; end
    for (int i = 0; i < N; i++) begin
      if (vis[i]) continue;
      vis[i] = 1;
      if (ncount(i) < MINPTS) continue;
      cid++;
      lab[i] = cid;
      for (int j = 0; j < N; j++) if (nb(i, j) && !queued[j] && lab[j] == 0 && j != i) begin queued[j] = 1; q.push_back(j); end
      while (q.size() > 0) begin
        int p;
        p = q.pop_front();
        lab[p] = cid;
        if (!vis[p]) begin
          vis[p] = 1;
          if (ncount(p) >= MINPTS)
            for (int j = 0; j < N; j++) if (nb(p, j) && !queued[j] && lab[j] == 0 && j != p) begin queued[j] = 1; q.push_back(j); end
        end
      end
    end
    return cid;
  endfunction

  initial begin repeat (3 * N * N * 3) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int exp_n, cyc, nonnoise;
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int run = 0; run < 3; run++) begin
      for (int i = 0; i < N; i++) begin
        int g;
        g = $urandom_range(0, 4);  // groups 0..3, 4 = noise
        for (int d = 0; d < D; d++)
          pts[i][d] = (g < 4) ? 5000 + 12000 * ((g >> d) & 1) + $urandom_range(0, 300)
                              : $urandom_range(0, 65535);
      end
      for (int i = 0; i < N; i++)
        for (int d = 0; d < D; d++) begin
          ld_we <= 1; ld_idx <= 6'(i); ld_d <= 1'(d); ld_val <= 16'(pts[i][d]);
          @(posedge clk);
        end
      ld_we <= 0;
      exp_n = ref_dbscan();
      start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      check("n_clusters", n_clusters, exp_n);
      checks++;
      if (cyc > 3 * N * N) begin failures++; $display("run took %0d cycles", cyc); end
      nonnoise = 0;
      for (int i = 0; i < N; i++) begin
        rd_idx <= 6'(i); #1;
        check($sformatf("label %0d", i), rd_label, lab[i]);
        if (lab[i] != 0) nonnoise++;
        @(posedge clk);
      end
      checks++;
      if (exp_n < 2 || nonnoise == 0) begin failures++; $display("test data produced no clusters"); end
      $display("run %0d: %0d clusters, %0d cycles", run, exp_n, cyc);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
