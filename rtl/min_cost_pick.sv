// min_cost_pick: the "minimum cost pick" reduction of multilevel streaming
// clustering. Every subclustering module reports a cost (the sum of the
// distances from its points to their nearest centroids; all modules see the
// same points, so comparing sums compares the averaged costs). On start the
// module compares the M costs, one per cycle, and selects the module with
// the smallest one (lowest index on ties); its K centroids become the final
// clusters, cluster ID = centroid index.
//
// Interface: start, costs[M] (held stable until done); done pulses M cycles
// after start with sel (the chosen module) and min_cost. The rule follows
// the design description; the serial compare and the tie-break are this
// design's choices.
module min_cost_pick #(
  parameter int unsigned M  = 3,
  parameter int unsigned CW = 48,
  localparam int unsigned MW = (M > 1) ? $clog2(M) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] costs [M],
  output logic          busy,
  output logic          done,
  output logic [MW-1:0] sel,
  output logic [CW-1:0] min_cost
);
  logic [MW:0] i;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      done     <= 1'b0;
      sel      <= '0;
      min_cost <= '0;
      i        <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy     <= 1'b1;
          sel      <= '0;
          min_cost <= costs[0];
          i        <= (MW+1)'(1);
          if (M == 1) begin
            busy <= 1'b0;
            done <= 1'b1;
          end
        end
      end else begin
        if (costs[i[MW-1:0]] < min_cost) begin
          min_cost <= costs[i[MW-1:0]];
          sel      <= i[MW-1:0];
        end
        i <= i + 1'b1;
        if (32'(i) == M - 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
