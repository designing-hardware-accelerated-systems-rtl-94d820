// tb_bg_average: feeds N_AVG background frames (consumed, nothing forwarded)
// and then live frames with random input gaps and random output stalls.
// Checks that the background equals floor(sum / N_AVG) for every pixel,
// that each forwarded pixel carries the right pixel value, position, last
// flag and frame number, and that with no stalls one pixel passes per cycle.
module tb_bg_average;
  localparam int W = 8, H = 4, NPIX = W * H, N_AVG = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic s_valid = 0, s_ready, s_last = 0, m_valid, m_ready = 1, m_last, bg_ready;
  logic [7:0] s_data = 0, m_pix, m_bg;
  logic [2:0] m_x;
  logic [1:0] m_y;
  logic [31:0] m_frame, frame_no;
  bg_average #(.W(W), .H(H), .N_AVG(N_AVG)) dut (.*);

  int sum [NPIX];
  int expq [$];   // {frame, addr, pix}
  int nfwd = 0;
  bit stall_out = 0;

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  always @(posedge clk) if (rst_n && m_valid && m_ready) begin
    int f, a, p;
    f = expq.pop_front(); a = expq.pop_front(); p = expq.pop_front();
    check("m_frame", m_frame, f);
    check("m_pix", m_pix, p);
    check("m_bg", m_bg, sum[a] / N_AVG);
    check("m_x", m_x, a % W);
    check("m_y", m_y, a / W);
    check("m_last", m_last, a == NPIX - 1);
    nfwd++;
  end
  always @(negedge clk) m_ready = stall_out ? ($urandom_range(0, 2) != 0) : 1'b1;

  // Inputs change on the falling edge; a beat counts as taken when s_ready
  // is high just before the rising edge.
  task automatic send_frame(int fno, bit gaps);
    for (int a = 0; a < NPIX; a++) begin
      byte unsigned p;
      bit took;
      p = 8'($urandom);
      if (fno < N_AVG) sum[a] += p;
      else begin expq.push_back(fno); expq.push_back(a); expq.push_back(p); end
      while (gaps && $urandom_range(0, 3) == 0) begin
        @(negedge clk); s_valid = 0;
      end
      @(negedge clk);
      s_valid = 1; s_data = p; s_last = (a == NPIX - 1);
      #1 took = s_ready;
      @(posedge clk);
      while (!took) begin @(negedge clk); #1 took = s_ready; @(posedge clk); end
    end
    @(negedge clk);
    s_valid = 0; s_last = 0;
  endtask

  initial begin repeat (10000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int t0;
    for (int a = 0; a < NPIX; a++) sum[a] = 0;
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    for (int f = 0; f < N_AVG; f++) send_frame(f, 1);
    @(posedge clk);
    check("bg_ready", bg_ready, 1);
    check("nothing forwarded while averaging", nfwd, 0);
    stall_out = 1;
    for (int f = N_AVG; f < N_AVG + 3; f++) send_frame(f, 1);
    stall_out = 0;
    repeat (5) @(posedge clk);
    // rate: one frame of NPIX pixels in NPIX cycles when nothing stalls
    t0 = $time / 10;
    send_frame(N_AVG + 3, 0);
    // the send task returns on the falling edge after the last beat
    check("cycles per frame", $time / 10 - t0, NPIX + 1);
    repeat (5) @(posedge clk);
    check("forwarded", nfwd, 4 * NPIX);
    check("frame_no", frame_no, N_AVG + 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
