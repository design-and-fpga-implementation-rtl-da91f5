// threshold_detector -- compares the double-correlated signal with a
// negative threshold.
//
// det goes high for every sample in which c2 lies below the threshold, that
// is on the negative peaks that mark the SFD, and is low otherwise.  The
// threshold is a run-time input so that it can be swept between the miss and
// false-alarm regions; a value of zero or above is allowed but makes no sense
// for this detector.
//
// Interface: signed 16-bit c2 and threshold.  Timing: one register, det
// follows c2 by one enable.
module threshold_detector
  import fd_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t c2,
  input  sample_t threshold,
  output logic    det
);

  always_ff @(posedge clk) begin
    if (rst)     det <= 1'b0;
    else if (ce) det <= (c2 < threshold);
  end

endmodule
