// dbscan_reduce: DBSCAN reduction of multilevel streaming clustering. It
// groups the N = M*K centroids produced by the subclustering modules into
// final clusters and so builds the lookup table centroid -> cluster ID.
//
// Two points are neighbours when their L1 distance is at most EPS (a point
// is its own neighbour); a point with at least MINPTS neighbours is a core
// point. The module visits the points in index order. An unvisited point is
// marked visited and its neighbours are counted in one pass over all
// points (N cycles). If it is not a core point it stays noise (label 0) for
// now; otherwise it opens a new cluster, and a second pass pushes its
// unlabelled, not yet queued neighbours into a FIFO of candidate indices.
// Candidates are then popped one at a time: each takes the cluster's label,
// and an unvisited one is visited the same way and, if it is a core point,
// pushes its own neighbours. When the FIFO is empty the cluster is
// complete and the outer visit continues. Every point is queued at most
// once, so a FIFO of N entries never overflows. Run time is at most about
// 3*N*N cycles.
//
// Interface: ld_we/ld_idx/ld_d/ld_val load point coordinates; start runs
// the algorithm; done pulses with n_clusters; rd_idx reads a label
// (0 = noise, 1.. = cluster ID) combinationally. DBSCAN with a FIFO of
// candidate points in place of a linked list follows the design
// description; the L1 neighbourhood (the metric of the subclustering
// stage) and the two-pass neighbour scan are this design's choices.
module dbscan_reduce #(
  parameter int unsigned N      = 384,   // points (M*K centroids)
  parameter int unsigned D      = 3,
  parameter int unsigned DW     = 16,
  parameter int unsigned EPS    = 2048,
  parameter int unsigned MINPTS = 3,
  localparam int unsigned NW    = $clog2(N + 1),
  localparam int unsigned DDW   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned DIST_W = DW + $clog2(D + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           ld_we,
  input  logic [NW-1:0]  ld_idx,
  input  logic [DDW-1:0] ld_d,
  input  logic [DW-1:0]  ld_val,
  input  logic           start,
  output logic           busy,
  output logic           done,
  output logic [NW-1:0]  n_clusters,
  input  logic [NW-1:0]  rd_idx,
  output logic [NW-1:0]  rd_label
);
  typedef enum logic [2:0] {IDLE, CLR, OUTER, COUNT, PUSH, POP} state_t;
  state_t state;

  logic [DW-1:0] pts [N][D];
  logic [NW-1:0] label [N];
  logic          visited [N];
  logic          queued [N];
  logic [NW-1:0] fifo [N];
  logic [NW-1:0] head, tail;
  logic [NW:0]   qcount;

  logic [NW-1:0] i;        // outer index
  logic [NW-1:0] cur;      // point whose neighbours are scanned
  logic [NW-1:0] j;        // scan index
  logic [NW-1:0] nbr;      // neighbour count
  logic [NW-1:0] cid;      // current cluster ID
  logic          in_expand; // scanning a popped candidate

  assign rd_label = label[rd_idx];

  logic [DIST_W-1:0] l1d;
  logic              is_nbr;
  always_comb begin
    l1d = '0;
    for (int d = 0; d < int'(D); d++)
      l1d += DIST_W'(DW'((pts[cur][d] >= pts[j][d]) ? pts[cur][d] - pts[j][d] : pts[j][d] - pts[cur][d]));
    is_nbr = (32'(l1d) <= EPS);
  end

  function automatic logic [NW-1:0] inc(input logic [NW-1:0] p);
    return (32'(p) == N - 1) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk)
    if (ld_we) pts[ld_idx][ld_d] <= ld_val;

  assign busy = (state != IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= IDLE;
      done       <= 1'b0;
      n_clusters <= '0;
      head       <= '0;
      tail       <= '0;
      qcount     <= '0;
      i          <= '0;
      j          <= '0;
      cur        <= '0;
      nbr        <= '0;
      cid        <= '0;
      in_expand  <= 1'b0;
    end else begin
      done <= 1'b0;
      case (state)
        IDLE: if (start) begin
          state <= CLR;
          j     <= '0;
        end
        CLR: begin
          label[j]   <= '0;
          visited[j] <= 1'b0;
          queued[j]  <= 1'b0;
          j          <= j + 1'b1;
          if (32'(j) == N - 1) begin
            state  <= OUTER;
            i      <= '0;
            cid    <= '0;
            head   <= '0;
            tail   <= '0;
            qcount <= '0;
          end
        end
        OUTER: begin
          if (32'(i) == N) begin
            state      <= IDLE;
            done       <= 1'b1;
            n_clusters <= cid;
          end else if (visited[i]) begin
            i <= i + 1'b1;
          end else begin
            visited[i] <= 1'b1;
            cur        <= i;
            j          <= '0;
            nbr        <= '0;
            in_expand  <= 1'b0;
            state      <= COUNT;
          end
        end
        COUNT: begin
          if (is_nbr) nbr <= nbr + 1'b1;
          j <= j + 1'b1;
          if (32'(j) == N - 1) begin
            j <= '0;
            if (32'(nbr) + (is_nbr ? 1 : 0) >= MINPTS) begin
              if (!in_expand) begin
                cid        <= cid + 1'b1;
                label[cur] <= cid + 1'b1;
              end
              state <= PUSH;
            end else begin
              state <= in_expand ? POP : OUTER;
              if (!in_expand) i <= i + 1'b1;
            end
          end
        end
        PUSH: begin
          if (is_nbr && !queued[j] && label[j] == 0 && j != cur) begin
            queued[j]  <= 1'b1;
            fifo[tail] <= j;
            tail       <= inc(tail);
            qcount     <= qcount + 1'b1;
          end
          j <= j + 1'b1;
          if (32'(j) == N - 1) state <= POP;
        end
        POP: begin
          if (qcount == 0) begin
            state <= OUTER;
            i     <= i + 1'b1;
          end else begin
            logic [NW-1:0] p;
            p = fifo[head];
            head   <= inc(head);
            qcount <= qcount - 1'b1;
            label[p] <= cid;
            if (!visited[p]) begin
              visited[p] <= 1'b1;
              cur        <= p;
              j          <= '0;
              nbr        <= '0;
              in_expand  <= 1'b1;
              state      <= COUNT;
            end
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // The candidate FIFO never overflows.
  assert property (@(posedge clk) disable iff (!rst_n) 32'(qcount) <= N);
endmodule
