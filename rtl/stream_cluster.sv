// stream_cluster: multilevel streaming clustering core. M subclustering
// modules see the same stream of d-dimensional points, each with its own
// learning rate alpha_m = 2^-(SHIFT0 + m), and each keeps K centroids; a
// reducing stage then turns the M*K centroids into the final lookup table
// that maps every centroid to a cluster ID.
//
// Reduction, chosen per run with mode:
//   mode 0, minimum cost pick: the module with the smallest cost wins; its
//           centroid k is cluster k + 1, the other modules' centroids map to
//           0 (unused);
//   mode 1, DBSCAN: all M*K centroids are copied (one coordinate per cycle)
//           into dbscan_reduce, whose labels are the table (0 = noise).
// The stream never waits for the reduction to be requested; reduce_start
// may be given whenever the host decides the stream (or a window of it) is
// complete, and the table stays readable until the next reduce_start.
//
// Interface: init_* seed centroid (init_m, init_k, init_d); s_valid/
// s_first/s_data stream coordinates (one per cycle); o_valid/o_idx give,
// per point, every module's nearest centroid; clear zeroes the costs;
// reduce_start/mode/reduce_done; lut_m/lut_k read the table.
// M parallel independent subclustering modules with different learning
// rates and a hardware reducing stage (minimum cost pick or DBSCAN) follow
// the design description; the seeding port, the label encoding and the
// centroid copy sequence are this design's choices.
module stream_cluster #(
  parameter int unsigned M      = 3,
  parameter int unsigned D      = 3,
  parameter int unsigned K      = 128,
  parameter int unsigned DW     = 16,
  parameter int unsigned SHIFT0 = 3,
  parameter int unsigned EPS    = 2048,
  parameter int unsigned MINPTS = 3,
  localparam int unsigned MW    = (M > 1) ? $clog2(M) : 1,
  localparam int unsigned KW    = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DDW   = (D > 1) ? $clog2(D) : 1,
  localparam int unsigned NL    = M * K,
  localparam int unsigned NW    = $clog2(NL + 1)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           init_we,
  input  logic [MW-1:0]  init_m,
  input  logic [KW-1:0]  init_k,
  input  logic [DDW-1:0] init_d,
  input  logic [DW-1:0]  init_val,
  input  logic           s_valid,
  input  logic           s_first,
  input  logic [DW-1:0]  s_data,
  input  logic           clear,
  output logic           o_valid,
  output logic [KW-1:0]  o_idx [M],
  input  logic           reduce_start,
  input  logic           mode,
  output logic           reduce_busy,
  output logic           reduce_done,
  output logic [MW-1:0]  sel,
  output logic [NW-1:0]  n_clusters,
  input  logic [MW-1:0]  lut_m,
  input  logic [KW-1:0]  lut_k,
  output logic [NW-1:0]  lut_id
);
  localparam int unsigned DIST_W = DW + $clog2(D + 1);

  logic [47:0]   cost [M];
  logic          ov [M];
  logic [KW-1:0] rd_k;
  logic [DDW-1:0] rd_d;
  logic [DW-1:0] rd_val [M];
  logic [DIST_W-1:0] odist [M];
  logic [31:0]   npts [M];

  for (genvar m = 0; m < int'(M); m++) begin : g_sub
    subcluster #(.D(D), .K(K), .DW(DW), .SHIFT(SHIFT0 + m)) u_sub (
      .clk, .rst_n,
      .init_we(init_we && (32'(init_m) == m)), .init_k, .init_d, .init_val,
      .s_valid, .s_first, .s_data, .clear,
      .o_valid(ov[m]), .o_idx(o_idx[m]), .o_dist(odist[m]),
      .cost_sum(cost[m]), .n_points(npts[m]),
      .rd_k, .rd_d, .rd_val(rd_val[m]));
  end
  assign o_valid = ov[0];

  // minimum cost pick
  logic mc_start, mc_busy, mc_done;
  logic [47:0] mc_min;
  min_cost_pick #(.M(M), .CW(48)) u_mc (
    .clk, .rst_n, .start(mc_start), .costs(cost),
    .busy(mc_busy), .done(mc_done), .sel, .min_cost(mc_min));

  // DBSCAN over all centroids
  logic           db_ld_we, db_start, db_busy, db_done;
  logic [NW-1:0]  db_ld_idx, db_rd_idx, db_label, db_ncl;
  logic [DDW-1:0] db_ld_d;
  logic [DW-1:0]  db_ld_val;
  dbscan_reduce #(.N(NL), .D(D), .DW(DW), .EPS(EPS), .MINPTS(MINPTS)) u_db (
    .clk, .rst_n, .ld_we(db_ld_we), .ld_idx(db_ld_idx), .ld_d(db_ld_d), .ld_val(db_ld_val),
    .start(db_start), .busy(db_busy), .done(db_done), .n_clusters(db_ncl),
    .rd_idx(db_rd_idx), .rd_label(db_label));

  typedef enum logic [2:0] {R_IDLE, R_MC, R_COPY, R_DB} rstate_t;
  rstate_t rs;
  logic          mode_q;
  logic [MW-1:0] cm;      // copy: module
  logic [KW:0]   ck;      // copy: centroid
  logic [DDW:0]  cd;      // copy: coordinate

  assign rd_k = ck[KW-1:0];
  assign rd_d = cd[DDW-1:0];
  assign db_rd_idx = NW'(32'(lut_m) * K + 32'(lut_k));
  assign lut_id = mode_q ? db_label
                         : ((lut_m == sel) ? NW'(32'(lut_k) + 1) : '0);
  assign reduce_busy = (rs != R_IDLE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rs          <= R_IDLE;
      mode_q      <= 1'b0;
      mc_start    <= 1'b0;
      db_start    <= 1'b0;
      db_ld_we    <= 1'b0;
      reduce_done <= 1'b0;
      n_clusters  <= '0;
      cm <= '0; ck <= '0; cd <= '0;
    end else begin
      mc_start    <= 1'b0;
      db_start    <= 1'b0;
      db_ld_we    <= 1'b0;
      reduce_done <= 1'b0;
      case (rs)
        R_IDLE: if (reduce_start) begin
          mode_q <= mode;
          if (mode) begin
            rs <= R_COPY;
            cm <= '0; ck <= '0; cd <= '0;
          end else begin
            rs       <= R_MC;
            mc_start <= 1'b1;
          end
        end
        R_MC: if (mc_done) begin
          rs          <= R_IDLE;
          reduce_done <= 1'b1;
          n_clusters  <= NW'(K);
        end
        R_COPY: begin
          db_ld_we  <= 1'b1;
          db_ld_idx <= NW'(32'(cm) * K + 32'(ck));
          db_ld_d   <= cd[DDW-1:0];
          db_ld_val <= rd_val[cm];
          if (32'(cd) == D - 1) begin
            cd <= '0;
            if (32'(ck) == K - 1) begin
              ck <= '0;
              if (32'(cm) == M - 1) begin
                rs       <= R_DB;
                db_start <= 1'b1;
              end else begin
                cm <= cm + 1'b1;
              end
            end else begin
              ck <= ck + 1'b1;
            end
          end else begin
            cd <= cd + 1'b1;
          end
        end
        R_DB: if (db_done) begin
          rs          <= R_IDLE;
          reduce_done <= 1'b1;
          n_clusters  <= db_ncl;
        end
        default: rs <= R_IDLE;
      endcase
    end
  end

  // The subclustering modules run in lock step.
  for (genvar m = 1; m < int'(M); m++) begin : g_chk
    assert property (@(posedge clk) disable iff (!rst_n) ov[m] == ov[0]);
  end
endmodule
