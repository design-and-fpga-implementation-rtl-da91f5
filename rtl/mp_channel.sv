// mp_channel -- multipath channel emulator.
//
// The channel is an FIR filter whose NTAPS coefficients are the sampled
// impulse response of a 60 GHz indoor channel (for example a realisation of
// the two-path Saleh-Valenzuela model for a residential LOS or desktop NLOS
// scenario), loaded at run time through the taps port.  Taps are Q1.15, one
// per sample period; tap 0 multiplies the newest sample.  The sum is shifted
// back to Q1.15 and saturated.  That the channel is emulated on chip and
// cascaded after the noise source follows the test bed of the design; the
// FIR form, its length and its tap format are this design's choices (the
// channel-model statistics are computed off line).
//
// Interface: x in, y out, taps run-time.  Timing: one register, y follows x
// by one enable: y(k+1) = sum_i taps[i] * x(k-i).
module mp_channel
  import fd_pkg::*;
#(
  parameter int NTAPS = 16
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  input  sample_t x,
  input  sample_t taps [NTAPS],
  output sample_t y
);

  sample_t xs [NTAPS];
  logic signed [2*DW+$clog2(NTAPS):0] acc;

  assign xs[0] = x;

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i < NTAPS; i++) xs[i] <= '0;
    end else if (ce) begin
      for (int i = 1; i < NTAPS; i++) xs[i] <= xs[i-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < NTAPS; i++) acc = acc + $bits(acc)'(taps[i] * xs[i]);
  end

  always_ff @(posedge clk) begin
    if (rst)     y <= '0;
    else if (ce) y <= sat_sample(longint'(acc) >>> (DW - 1));
  end

endmodule
