// tb_subcluster: seeds K centroids, streams random points back to back (one
// coordinate per cycle, so a new point every D cycles) and compares every
// nearest-centroid index and distance, the running cost and the final
// centroid values with a behavioural model of the one-pass update
// c <- c + (x - c) / 2^SHIFT. It also checks the initiation interval: one
// result per D input cycles with results one cycle after the last coordinate.
module tb_subcluster;
  localparam int D = 3, K = 8, DW = 16, SHIFT = 3, NPTS = 400;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic init_we = 0, s_valid = 0, s_first = 0, clear = 0, o_valid;
  logic [2:0] init_k = 0, o_idx, rd_k = 0;
  logic [1:0] init_d = 0, rd_d = 0;
  logic [15:0] init_val = 0, s_data = 0, rd_val;
  logic [17:0] o_dist;
  logic [47:0] cost_sum;
  logic [31:0] n_points;
  subcluster #(.D(D), .K(K), .DW(DW), .SHIFT(SHIFT)) dut (.*);

  int cref [K][D];
  int exp_idx [$], exp_dist [$];
  longint cost_ref = 0;
  int n_out = 0, first_out = -1, last_out = -1, cyc = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && o_valid) begin
    check("idx", o_idx, exp_idx.pop_front());
    check("dist", o_dist, exp_dist.pop_front());
    if (first_out < 0) first_out = cyc;
    last_out = cyc;
    n_out++;
  end

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1;
    for (int k = 0; k < K; k++)
      for (int d = 0; d < D; d++) begin
        cref[k][d] = $urandom_range(0, 65535);
        init_we <= 1; init_k <= 3'(k); init_d <= 2'(d); init_val <= 16'(cref[k][d]);
        @(posedge clk);
      end
    init_we <= 0;
    @(posedge clk);
    for (int p = 0; p < NPTS; p++) begin
      int x [D]; int best, bd;
      // points cluster around the seeds with a spread
      int c;
      c = $urandom_range(0, K-1);
      for (int d = 0; d < D; d++) begin
        x[d] = cref[c][d] + $urandom_range(0, 8000) - 4000;
        if (x[d] < 0) x[d] = 0;
        if (x[d] > 65535) x[d] = 65535;
      end
      best = 0; bd = 1 << 30;
      for (int k = 0; k < K; k++) begin
        int s;
        s = 0;
        for (int d = 0; d < D; d++) s += (x[d] > cref[k][d]) ? x[d] - cref[k][d] : cref[k][d] - x[d];
        if (s < bd) begin bd = s; best = k; end
      end
      for (int d = 0; d < D; d++) cref[best][d] = cref[best][d] + ((x[d] - cref[best][d]) >>> SHIFT);
      exp_idx.push_back(best); exp_dist.push_back(bd);
      cost_ref += bd;
      for (int d = 0; d < D; d++) begin
        s_valid <= 1; s_first <= (d == 0); s_data <= 16'(x[d]);
        @(posedge clk);
      end
    end
    s_valid <= 0;
    repeat (3) @(posedge clk);
    check("results", n_out, NPTS);
    // initiation interval D: NPTS results span (NPTS-1)*D cycles
    check("II span", last_out - first_out, (NPTS - 1) * D);
    check("n_points", n_points, NPTS);
    check("cost_sum", cost_sum, cost_ref);
    for (int k = 0; k < K; k++)
      for (int d = 0; d < D; d++) begin
        rd_k <= 3'(k); rd_d <= 2'(d); #1;
        check("centroid", rd_val, cref[k][d]);
        @(posedge clk);
      end
    clear <= 1; @(posedge clk); clear <= 0; @(posedge clk);
    check("clear", cost_sum + n_points, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
