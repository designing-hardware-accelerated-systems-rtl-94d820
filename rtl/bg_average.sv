// bg_average: builds the background image from the first N_AVG frames and
// then forwards every later frame together with its background pixel.
//
// During the first N_AVG frames each pixel is added into a per-pixel
// accumulator (the first frame overwrites it, so no clearing is needed);
// on the last of those frames the sum is divided by N_AVG (a shift) and
// written into the background memory, which then stays fixed while the
// system runs. Averaging frames are consumed and not forwarded.
// After that, each accepted pixel leaves one cycle later on the output
// stream together with the background pixel at the same address and its
// (x, y) position. The 256-frame average held in on-chip memory follows the
// design description; the ready/valid stream handshake, the frame counter and
// the register slice are this design's choices.
//
// Interface: s_* is the camera pixel stream (raster order, s_last on the
// last pixel of a frame), m_* the forwarded stream. bg_ready goes high once
// the background exists. frame_no counts every accepted frame from 0.
module bg_average #(
  parameter int unsigned W     = 64,
  parameter int unsigned H     = 64,
  parameter int unsigned N_AVG = 256     // power of two
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 s_valid,
  output logic                 s_ready,
  input  logic [7:0]           s_data,
  input  logic                 s_last,
  output logic                 m_valid,
  input  logic                 m_ready,
  output logic [7:0]           m_pix,
  output logic [7:0]           m_bg,
  output logic [$clog2(W)-1:0] m_x,
  output logic [$clog2(H)-1:0] m_y,
  output logic                 m_last,
  output logic [31:0]          m_frame,
  output logic                 bg_ready,
  output logic [31:0]          frame_no
);
  localparam int unsigned NPIX = W * H;
  localparam int unsigned SH   = $clog2(N_AVG);
  localparam int unsigned AW   = 8 + SH;

  logic [AW-1:0] acc [NPIX];
  logic [7:0]    bg  [NPIX];

  logic [$clog2(NPIX)-1:0] addr;
  logic [$clog2(W)-1:0]    xc;
  logic [$clog2(H)-1:0]    yc;
  logic [SH:0]             avg_cnt;      // frames averaged so far
  logic                    accept;
  logic [AW-1:0]           sum;

  assign bg_ready = (32'(avg_cnt) == N_AVG);
  assign s_ready  = bg_ready ? (!m_valid || m_ready) : 1'b1;
  assign accept   = s_valid && s_ready;
  assign sum      = ((avg_cnt == 0) ? '0 : acc[addr]) + AW'(s_data);

  always_ff @(posedge clk) begin
    if (accept && !bg_ready) begin
      acc[addr] <= sum;
      if (32'(avg_cnt) == N_AVG - 1)
        bg[addr] <= sum[AW-1:SH];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      addr     <= '0;
      xc       <= '0;
      yc       <= '0;
      avg_cnt  <= '0;
      frame_no <= '0;
      m_valid  <= 1'b0;
    end else begin
      if (m_valid && m_ready) m_valid <= 1'b0;
      if (accept) begin
        if (s_last) begin
          addr     <= '0;
          xc       <= '0;
          yc       <= '0;
          frame_no <= frame_no + 1;
          if (!bg_ready) avg_cnt <= avg_cnt + 1'b1;
        end else begin
          addr <= addr + 1'b1;
          if (32'(xc) == W - 1) begin
            xc <= '0;
            yc <= yc + 1'b1;
          end else begin
            xc <= xc + 1'b1;
          end
        end
        if (bg_ready) m_valid <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (accept && bg_ready) begin
      m_pix   <= s_data;
      m_bg    <= bg[addr];
      m_x     <= xc;
      m_y     <= yc;
      m_last  <= s_last;
      m_frame <= frame_no;
    end
  end

  // A frame ends exactly on its last pixel.
  assert property (@(posedge clk) disable iff (!rst_n)
                   accept |-> (s_last == (32'(addr) == NPIX - 1)));
endmodule
