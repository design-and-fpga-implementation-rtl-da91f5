// double_correlator -- correlates the normalised EGC output twice with its
// own copy delayed by one Golay period (128 samples).
//
//   c1(k) = r(k)  * r(k-LAG)      (first correlation)
//   c2(k) = c1(k) * c1(k-LAG)     (second correlation)
//
// During SYNC every a128 has the same sign, so both products stay positive.
// A sign change of the Golay peaks, which happens only inside the SFD, turns
// c1 negative for the affected periods, and c2 turns negative where c1
// changes sign.  The SFD of the medium-rate header [a -a a -a] therefore
// gives one negative c2 peak at the end of its second word; the high-rate SFD
// [a a -a -a] gives two, at the ends of its third and fourth words.  Each
// correlation is a single product of two 16-bit values (two multipliers for
// the block); that the correlation is the lag product without a moving sum is
// this design's reading.  Products are Q1.15 (shifted right by 15) and
// saturated.
//
// Interface: one sample r per enable; c1 and c2 are registered.  Timing: c1
// follows r by one enable, c2 follows c1 by one enable.  Two LAG-deep delay
// lines hold the past r and c1.
module double_correlator
  import fd_pkg::*;
#(
  parameter int LAG = GOLAY_N
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t r,
  output sample_t c1,
  output sample_t c2
);

  sample_t r_d, c1_d;
  logic signed [2*DW-1:0] p1, p2;

  delay_line #(.WIDTH(DW), .DEPTH(LAG)) u_dly_r (
    .clk(clk), .rst(rst), .ce(ce), .din(r), .dout(r_d)
  );

  delay_line #(.WIDTH(DW), .DEPTH(LAG)) u_dly_c1 (
    .clk(clk), .rst(rst), .ce(ce), .din(c1), .dout(c1_d)
  );

  assign p1 = r * r_d;
  assign p2 = c1 * c1_d;

  always_ff @(posedge clk) begin
    if (rst) begin
      c1 <= '0;
      c2 <= '0;
    end else if (ce) begin
      c1 <= sat_sample(longint'(p1) >>> (DW - 1));
      c2 <= sat_sample(longint'(p2) >>> (DW - 1));
    end
  end

endmodule
