// corr_normalizer -- brings the EGC output back to the 16-bit datapath.
//
// The Golay correlation of a Q1.15 input grows by log2(128) = 7 bits.  The
// normaliser divides it by the sequence length (an arithmetic right shift by
// SHIFT = 7), so that a clean a128 of amplitude A gives a correlation peak of
// A again, and saturates the result to a sample.  Dividing by the length
// rather than by a running power estimate is this design's choice: it keeps
// the block free of dividers and matches the small logic count reported for
// the detector.
//
// Interface: W_IN-bit signed input, 16-bit signed output.  Timing: one
// register, the output follows the input by one enable.
module corr_normalizer
  import fd_pkg::*;
#(
  parameter int W_IN  = DW + GOLAY_M,
  parameter int SHIFT = GOLAY_M
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic                   ce,
  input  logic signed [W_IN-1:0] din,
  output sample_t                dout
);

  logic signed [W_IN-1:0] shifted;

  assign shifted = din >>> SHIFT;

  always_ff @(posedge clk) begin
    if (rst)     dout <= '0;
    else if (ce) dout <= sat_sample(longint'(shifted));
  end

endmodule
