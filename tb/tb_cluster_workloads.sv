// tb_cluster_workloads: runs the streaming clustering core in the two
// high-dimensional configurations it is evaluated with besides the default
// 3-D one: 9-D cell-image features (D = 9, K = 10, one window of 16,384
// samples) and 68-D census records (D = 68, K = 10, one window of 8,192
// samples). Each configuration has its own core instance, random
// clustered data and a behavioural model of the three subclustering
// modules. Checks: every per-module nearest-centroid index, the initiation
// interval of D cycles per sample (so 125 MHz / D samples/s), the minimum
// cost pick and its lookup table. The data is synthetic, of the stated
// sizes, since the real data sets are not part of this repository.
module tb_cluster_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int finished = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  for (genvar w = 0; w < 2; w++) begin : g_wl
    localparam int D = (w == 0) ? 9 : 68;
    localparam int NPTS = (w == 0) ? 16384 : 8192;
    localparam int M = 3, K = 10, SHIFT0 = 3;
    localparam int DDW = $clog2(D);
    logic init_we = 0, s_valid = 0, s_first = 0, clear = 0, o_valid;
    logic [1:0] init_m = 0, sel, lut_m = 0;
    logic [3:0] init_k = 0, lut_k = 0;
    logic [DDW-1:0] init_d = 0;
    logic [15:0] init_val = 0, s_data = 0;
    logic [3:0] o_idx [M];
    logic reduce_start = 0, mode = 0, reduce_busy, reduce_done;
    logic [4:0] n_clusters, lut_id;
    stream_cluster #(.M(M), .D(D), .K(K), .DW(16), .SHIFT0(SHIFT0), .EPS(4096), .MINPTS(3)) dut (
      .clk, .rst_n, .init_we, .init_m, .init_k, .init_d, .init_val, .s_valid, .s_first, .s_data, .clear,
      .o_valid, .o_idx, .reduce_start, .mode, .reduce_busy, .reduce_done, .sel, .n_clusters, .lut_m, .lut_k, .lut_id);

    int cref [M][K][D];
    int ctr [4][D];
    longint cost [M];
    int exp_idx [$];
    int n_out = 0, t_first = -1, t_last = 0, cyc = 0;

    always @(posedge clk) cyc++;
    always @(posedge clk) if (rst_n && o_valid) begin
      for (int m = 0; m < M; m++) check($sformatf("D=%0d o_idx", D), o_idx[m], exp_idx.pop_front());
      if (t_first < 0) t_first = cyc;
      t_last = cyc;
      n_out++;
    end

    initial begin
      int best_m;
      longint bc;
      @(posedge rst_n);
      for (int b = 0; b < 4; b++) for (int d = 0; d < D; d++) ctr[b][d] = $urandom_range(10000, 55000);
      for (int k = 0; k < K; k++)
        for (int d = 0; d < D; d++) begin
          int v;
          v = ctr[k % 4][d] + $urandom_range(0, 4000) - 2000;
          for (int m = 0; m < M; m++) begin
            cref[m][k][d] = v;
            @(negedge clk); init_we = 1; init_m = 2'(m); init_k = 4'(k); init_d = DDW'(d); init_val = 16'(v);
          end
        end
      @(negedge clk); init_we = 0;
      for (int m = 0; m < M; m++) cost[m] = 0;
      for (int p = 0; p < NPTS; p++) begin
        int x [D], b;
        b = $urandom_range(0, 3);
        for (int d = 0; d < D; d++) x[d] = ctr[b][d] + $urandom_range(0, 6000) - 3000;
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
      check($sformatf("D=%0d samples", D), n_out, NPTS);
      check($sformatf("D=%0d cycles for the window (II = D)", D), t_last - t_first, (NPTS - 1) * D);
      best_m = 0; bc = cost[0];
      for (int m = 1; m < M; m++) if (cost[m] < bc) begin bc = cost[m]; best_m = m; end
      reduce_start = 1; @(negedge clk); reduce_start = 0;
      while (!reduce_done) @(negedge clk);
      check($sformatf("D=%0d sel", D), sel, best_m);
      for (int k = 0; k < K; k++) begin
        lut_m = 2'(best_m); lut_k = 4'(k); #1;
        check($sformatf("D=%0d lut", D), lut_id, k + 1);
      end
      $display("D=%0d K=%0d: %0d samples in %0d cycles, %.2f M samples/s at 125 MHz, min-cost module %0d",
               D, K, NPTS, t_last - t_first + D, 125.0 * NPTS / (t_last - t_first + D), best_m);
      finished++;
    end
  end

  initial begin repeat (1500000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    wait (finished == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
