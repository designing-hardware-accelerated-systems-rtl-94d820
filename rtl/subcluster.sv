// subcluster: streaming subclustering core, a one-pass vector quantiser.
//
// A d-dimensional data point arrives one coordinate per cycle (D cycles per
// point, the core's initiation interval). When its last coordinate arrives
// the core, in that same cycle, computes the L1 (Manhattan) distance from
// the point to all K centroids in parallel (sum of absolute differences),
// picks the nearest one (lowest index on ties), and moves that centroid
// towards the point:  c <- c + (x - c) * 2^-SHIFT, i.e. the update
// c <- (1 - alpha) c + alpha x with alpha = 2^-SHIFT done as an arithmetic
// right shift, so no multiplier is needed. The centroids live in registers
// so every one can be read each cycle.
//
// Per point the core reports, one cycle after its last coordinate, the
// nearest centroid index and its distance, and adds the distance to a cost
// sum; cost_sum / n_points is the module's cost (average distance from a
// point to its centroid), used by the minimum-cost reduction.
//
// Interface: init_* load a centroid coordinate (initial seeds from the
// host); s_valid/s_data stream coordinates, s_first marks coordinate 0 of a
// point (it resynchronises the coordinate counter); clear resets cost and
// count; rd_k/rd_d read a centroid coordinate combinationally.
// The algorithm, the L1 metric, fully partitioned centroid registers, the
// power-of-two learning rate and the II of D cycles follow the design
// description; unsigned DW-bit data, first-index tie-break and the port
// protocol are this design's choices.
module subcluster #(
  parameter int unsigned D     = 3,    // data dimension
  parameter int unsigned K     = 128,  // clusters
  parameter int unsigned DW    = 16,   // data width (unsigned)
  parameter int unsigned SHIFT = 3,    // learning rate alpha = 2^-SHIFT
  localparam int unsigned KW   = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DDW  = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned DIST_W = DW + $clog2(D + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              init_we,
  input  logic [KW-1:0]     init_k,
  input  logic [DDW-1:0]    init_d,
  input  logic [DW-1:0]     init_val,
  input  logic              s_valid,
  input  logic              s_first,
  input  logic [DW-1:0]     s_data,
  input  logic              clear,
  output logic              o_valid,
  output logic [KW-1:0]     o_idx,
  output logic [DIST_W-1:0] o_dist,
  output logic [47:0]       cost_sum,
  output logic [31:0]       n_points,
  input  logic [KW-1:0]     rd_k,
  input  logic [DDW-1:0]    rd_d,
  output logic [DW-1:0]     rd_val
);
  logic [DW-1:0]  cent [K][D];
  logic [DW-1:0]  xbuf [D];
  logic [DDW-1:0] dcnt;
  logic           complete;
  logic [DW-1:0]  x [D];

  assign rd_val = cent[rd_k][rd_d];

  // current point: buffered coordinates plus the one arriving now
  always_comb begin
    for (int d = 0; d < int'(D); d++)
      x[d] = (d == int'(D) - 1) ? s_data : xbuf[d];
  end
  assign complete = s_valid && ((D == 1) || (32'(s_first ? '0 : dcnt) == D - 1));

  // distances and nearest centroid
  logic [DIST_W-1:0] l1d [K];
  logic [KW-1:0]     best;
  logic [DIST_W-1:0] best_d;
  always_comb begin
    for (int k = 0; k < int'(K); k++) begin
      l1d[k] = '0;
      for (int d = 0; d < int'(D); d++)
        l1d[k] += DIST_W'(DW'((x[d] >= cent[k][d]) ? x[d] - cent[k][d] : cent[k][d] - x[d]));
    end
    best   = '0;
    best_d = l1d[0];
    for (int k = 1; k < int'(K); k++)
      if (l1d[k] < best_d) begin
        best   = KW'(k);
        best_d = l1d[k];
      end
  end

  always_ff @(posedge clk) begin
    if (init_we) cent[init_k][init_d] <= init_val;
    else if (complete) begin
      for (int d = 0; d < int'(D); d++) begin
        logic signed [DW+1:0] diff;
        diff = $signed({2'b00, x[d]}) - $signed({2'b00, cent[best][d]});
        cent[best][d] <= DW'($signed({2'b00, cent[best][d]}) + (diff >>> SHIFT));
      end
    end
    if (s_valid && !complete) xbuf[s_first ? '0 : dcnt] <= s_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dcnt     <= '0;
      o_valid  <= 1'b0;
      o_idx    <= '0;
      o_dist   <= '0;
      cost_sum <= '0;
      n_points <= '0;
    end else begin
      o_valid <= complete;
      if (s_valid) dcnt <= complete ? '0 : (s_first ? DDW'(1) : dcnt + 1'b1);
      if (complete) begin
        o_idx  <= best;
        o_dist <= best_d;
      end
      if (clear) begin
        cost_sum <= '0;
        n_points <= '0;
      end else if (complete) begin
        cost_sum <= cost_sum + 48'(best_d);
        n_points <= n_points + 1;
      end
    end
  end

  // Centroids are not loaded while points stream.
  assert property (@(posedge clk) disable iff (!rst_n) !(init_we && s_valid));
endmodule
