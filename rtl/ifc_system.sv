// ifc_system: the two accelerators of the imaging-flow-cytometry system,
// side by side under one clock and reset.
//
//  * cell_analysis_core - morphological analysis of a 64x64 bright-field
//    video: per cell frame, location, centre and 360 wall radii;
//  * stream_cluster     - multilevel streaming clustering (M vector-
//    quantisation cores plus a minimum-cost or DBSCAN reduction), used to
//    segment cell images by clustering pixel features.
// Each keeps its own stream ports; in the original system both sit behind a
// host PCIe link, which is outside this RTL. All parameters are the
// defaults of the two cores: 64x64 frames, 256 background frames; 3
// subclustering modules with d = 3, k = 128, 16-bit data.
module ifc_system (
  input  logic        clk,
  input  logic        rst_n,
  // cell analysis: pixel stream in
  input  logic        cam_tvalid,
  output logic        cam_tready,
  input  logic [7:0]  cam_tdata,
  input  logic        cam_tlast,
  // cell analysis: result stream out
  output logic        res_tvalid,
  input  logic        res_tready,
  output logic [31:0] res_tdata,
  output logic        res_tlast,
  output logic        bg_ready,
  output logic        det_done,
  output logic        det_iscell,
  output logic [1:0]  fifo_occupancy,
  // clustering: seeding, data stream and reduction
  input  logic        cl_init_we,
  input  logic [1:0]  cl_init_m,
  input  logic [6:0]  cl_init_k,
  input  logic [1:0]  cl_init_d,
  input  logic [15:0] cl_init_val,
  input  logic        cl_s_valid,
  input  logic        cl_s_first,
  input  logic [15:0] cl_s_data,
  input  logic        cl_clear,
  output logic        cl_o_valid,
  output logic [6:0]  cl_o_idx [3],
  input  logic        cl_reduce_start,
  input  logic        cl_mode,
  output logic        cl_reduce_busy,
  output logic        cl_reduce_done,
  output logic [1:0]  cl_sel,
  output logic [8:0]  cl_n_clusters,
  input  logic [1:0]  cl_lut_m,
  input  logic [6:0]  cl_lut_k,
  output logic [8:0]  cl_lut_id
);
  cell_analysis_core u_cell (
    .clk, .rst_n,
    .s_tvalid(cam_tvalid), .s_tready(cam_tready), .s_tdata(cam_tdata), .s_tlast(cam_tlast),
    .m_tvalid(res_tvalid), .m_tready(res_tready), .m_tdata(res_tdata), .m_tlast(res_tlast),
    .bg_ready, .det_done, .det_iscell, .fifo_occupancy);

  stream_cluster u_clu (
    .clk, .rst_n,
    .init_we(cl_init_we), .init_m(cl_init_m), .init_k(cl_init_k), .init_d(cl_init_d),
    .init_val(cl_init_val),
    .s_valid(cl_s_valid), .s_first(cl_s_first), .s_data(cl_s_data), .clear(cl_clear),
    .o_valid(cl_o_valid), .o_idx(cl_o_idx),
    .reduce_start(cl_reduce_start), .mode(cl_mode), .reduce_busy(cl_reduce_busy),
    .reduce_done(cl_reduce_done), .sel(cl_sel), .n_clusters(cl_n_clusters),
    .lut_m(cl_lut_m), .lut_k(cl_lut_k), .lut_id(cl_lut_id));
endmodule
