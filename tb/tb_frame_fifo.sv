// tb_frame_fifo: writes frames (B and C planes plus frame number and
// threshold) into the two-slot frame FIFO, discards some, commits others,
// fills the FIFO to check that wr_free drops, and reads the committed frames
// back in order (read data one cycle after the address) with their metadata.
module tb_frame_fifo;
  localparam int W = 4, H = 4, NPIX = W * H, NSLOT = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic wr_free, wr_en = 0, wr_commit = 0, wr_discard = 0, rd_valid, rd_release = 0;
  logic [3:0] wr_addr = 0, rd_addr = 0;
  logic [7:0] wr_b = 0, wr_c = 0, wr_thr = 0, rd_thr, rd_b, rd_c;
  logic [31:0] wr_frame = 0, rd_frame;
  logic [1:0] occupancy;
  frame_fifo #(.W(W), .H(H), .NSLOT(NSLOT)) dut (.*);

  typedef struct { int frame; int thr; byte unsigned b [NPIX]; byte unsigned c [NPIX]; } fr_t;
  fr_t q [$];

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin failures++; $display("%s: got %0d expected %0d", what, got, exp); end
  endtask

  task automatic write_frame(int fno, bit keep);
    fr_t f;
    f.frame = fno; f.thr = $urandom_range(0, 255);
    for (int a = 0; a < NPIX; a++) begin
      f.b[a] = 8'($urandom); f.c[a] = 8'($urandom);
      wr_en <= 1; wr_addr <= 4'(a); wr_b <= f.b[a]; wr_c <= f.c[a];
      @(posedge clk);
    end
    wr_en <= 0;
    wr_frame <= fno; wr_thr <= 8'(f.thr);
    if (keep) wr_commit <= 1; else wr_discard <= 1;
    @(posedge clk);
    wr_commit <= 0; wr_discard <= 0;
    if (keep) q.push_back(f);
    @(posedge clk);
  endtask

  task automatic read_frame();
    fr_t f;
    f = q.pop_front();
    check("rd_valid", rd_valid, 1);
    check("rd_frame", rd_frame, f.frame);
    check("rd_thr", rd_thr, f.thr);
    for (int a = 0; a < NPIX; a++) begin
      rd_addr <= 4'(a);
      @(posedge clk); #1;
      check("rd_b", rd_b, f.b[a]);
      check("rd_c", rd_c, f.c[a]);
    end
    rd_release <= 1; @(posedge clk); rd_release <= 0; @(posedge clk);
  endtask

  initial begin repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    repeat (3) @(posedge clk); rst_n <= 1; @(posedge clk);
    check("empty", rd_valid, 0);
    check("free", wr_free, 1);
    write_frame(1, 0);                 // discarded: nothing stored
    check("after discard", occupancy, 0);
    write_frame(2, 1);
    write_frame(3, 0);
    write_frame(4, 1);
    check("full occupancy", occupancy, 2);
    check("full wr_free", wr_free, 0);
    read_frame();
    check("one left", occupancy, 1);
    check("free again", wr_free, 1);
    write_frame(5, 1);
    read_frame();
    read_frame();
    check("drained", occupancy, 0);
    check("drained valid", rd_valid, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
