// tb_min_cost_pick: drives random cost vectors (including ties) into the
// minimum-cost reduction and checks the selected module, the minimum cost
// and that the answer arrives after M compare cycles.
module tb_min_cost_pick;
  localparam int M = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic start = 0, busy, done;
  logic [47:0] costs [M];
  logic [2:0] sel;
  logic [47:0] min_cost;
  min_cost_pick #(.M(M), .CW(48)) dut (.*);

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  initial begin repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    for (int m = 0; m < M; m++) costs[m] = '0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int t = 0; t < 200; t++) begin
      int best; longint bc; int cyc;
      for (int m = 0; m < M; m++)
        costs[m] = (t % 4 == 0) ? 48'($urandom_range(0, 3)) : {16'($urandom), 32'($urandom)};
      best = 0; bc = costs[0];
      for (int m = 1; m < M; m++) if (costs[m] < bc) begin best = m; bc = costs[m]; end
      start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!done) begin @(posedge clk); cyc++; end
      check("sel", sel, best);
      check("min", min_cost, bc);
      check("latency", cyc, M + 1);
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
