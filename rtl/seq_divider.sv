// seq_divider: unsigned restoring divider, one quotient bit per cycle.
//
// start loads num/den; done pulses NW cycles later with quot = num / den and
// rem = num % den. A zero divisor gives quot = all ones. busy is high while
// a division runs; start is ignored while busy. Used for the averages
// (centroids) and the contrast scale factor, which are computed once per
// frame, so a small serial divider is enough.
module seq_divider #(
  parameter int unsigned NW = 24,   // numerator / quotient width
  parameter int unsigned DW = 16    // divisor width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [NW-1:0] num,
  input  logic [DW-1:0] den,
  output logic          busy,
  output logic          done,
  output logic [NW-1:0] quot,
  output logic [DW-1:0] rem
);
  logic [NW-1:0]        q;
  logic [DW:0]          r;
  logic [DW-1:0]        d;
  logic [$clog2(NW+1)-1:0] cnt;
  logic [DW:0]          r_sh;

  always_comb r_sh = {r[DW-1:0], q[NW-1]};

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      cnt  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy && start) begin
        busy <= 1'b1;
        q    <= num;
        d    <= den;
        r    <= '0;
        cnt  <= ($clog2(NW+1))'(NW);
      end else if (busy) begin
        if (r_sh >= {1'b0, d}) begin
          r <= r_sh - {1'b0, d};
          q <= {q[NW-2:0], 1'b1};
        end else begin
          r <= r_sh;
          q <= {q[NW-2:0], 1'b0};
        end
        cnt <= cnt - 1'b1;
        if (cnt == 1) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  assign quot = q;
  assign rem  = r[DW-1:0];
endmodule
