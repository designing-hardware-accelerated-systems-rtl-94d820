// frame_fifo: a FIFO of whole frames between cell detection and cell
// analysis. Each slot holds the background-subtracted image B and the raw
// image C of one frame, plus the frame number and the threshold detection
// used on it.
//
// The writer fills the slot at the write pointer pixel by pixel while it is
// still deciding whether the frame holds a cell; wr_commit then appends the
// slot to the FIFO and wr_discard leaves it to be overwritten by the next
// frame, so empty frames never reach the analysis side. wr_free is high
// while a slot is available for writing. The reader sees the oldest
// committed slot: rd_valid, its metadata, and a read port (address in,
// both pixels out one cycle later). rd_release frees it.
//
// Passing frames through FIFOs follows the design description; the slot
// count, the commit/discard protocol and the one-cycle read are this
// design's choices. NSLOT = 2 lets detection fill one frame while analysis
// works on another.
module frame_fifo #(
  parameter int unsigned W     = 64,
  parameter int unsigned H     = 64,
  parameter int unsigned NSLOT = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // write side
  output logic                       wr_free,
  input  logic                       wr_en,
  input  logic [$clog2(W*H)-1:0]     wr_addr,
  input  logic [7:0]                 wr_b,
  input  logic [7:0]                 wr_c,
  input  logic                       wr_commit,
  input  logic                       wr_discard,
  input  logic [31:0]                wr_frame,
  input  logic [7:0]                 wr_thr,
  // read side
  output logic                       rd_valid,
  output logic [31:0]                rd_frame,
  output logic [7:0]                 rd_thr,
  input  logic [$clog2(W*H)-1:0]     rd_addr,
  output logic [7:0]                 rd_b,
  output logic [7:0]                 rd_c,
  input  logic                       rd_release,
  output logic [$clog2(NSLOT+1)-1:0] occupancy
);
  localparam int unsigned NPIX = W * H;
  localparam int unsigned SW   = (NSLOT > 1) ? $clog2(NSLOT) : 1;

  logic [7:0]  mem_b [NSLOT*NPIX];
  logic [7:0]  mem_c [NSLOT*NPIX];
  logic [31:0] meta_frame [NSLOT];
  logic [7:0]  meta_thr   [NSLOT];
  logic [SW-1:0] wptr, rptr;
  logic [$clog2(NSLOT+1)-1:0] count;

  function automatic logic [SW-1:0] next_slot(input logic [SW-1:0] p);
    return (32'(p) == NSLOT - 1) ? '0 : p + 1'b1;
  endfunction

  assign wr_free   = (32'(count) < NSLOT);
  assign rd_valid  = (count != 0);
  assign occupancy = count;
  assign rd_frame  = meta_frame[rptr];
  assign rd_thr    = meta_thr[rptr];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_b[32'(wptr) * NPIX + 32'(wr_addr)] <= wr_b;
      mem_c[32'(wptr) * NPIX + 32'(wr_addr)] <= wr_c;
    end
    if (wr_commit) begin
      meta_frame[wptr] <= wr_frame;
      meta_thr[wptr]   <= wr_thr;
    end
    rd_b <= mem_b[32'(rptr) * NPIX + 32'(rd_addr)];
    rd_c <= mem_c[32'(rptr) * NPIX + 32'(rd_addr)];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (wr_commit)  wptr <= next_slot(wptr);
      if (rd_release) rptr <= next_slot(rptr);
      count <= count + {{($bits(count)-1){1'b0}}, wr_commit} - {{($bits(count)-1){1'b0}}, rd_release && rd_valid};
    end
  end

  // Handshake rules: no write or commit without a free slot, no release when empty.
  assert property (@(posedge clk) disable iff (!rst_n) (wr_en || wr_commit) |-> wr_free);
  assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_valid);
endmodule
