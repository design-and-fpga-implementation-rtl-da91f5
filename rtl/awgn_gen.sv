// awgn_gen -- adds white, approximately Gaussian noise of adjustable power.
//
// Twelve xorshift32 generators, each seeded differently and stepped once per
// enable, give twelve uniform 16-bit signed numbers.  Their sum has zero mean
// and a standard deviation of exactly 2^16 LSB and, by the central limit
// theorem, a near-Gaussian shape (the classic sum-of-twelve-uniforms
// generator, bounded at +/-6 sigma).  Multiplying by sigma and shifting right
// by 16 gives noise whose standard deviation is sigma LSBs of the sample, so
// the SNR is set by one register.  The noisy sample is saturated to 16 bits.
// A power-adjustable noise source follows the test bed of the design; the
// generator itself is this design's choice.
//
// Interface: x in, y = sat(x + noise) out, noise shown for monitoring.
// Timing: one register, y follows x by one enable.
module awgn_gen
  import fd_pkg::*;
#(
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  sample_t     x,
  input  logic [15:0] sigma,
  output sample_t     y,
  output sample_t     noise
);

  localparam int LANES = 12;

  logic [31:0] st [LANES];
  logic signed [19:0] usum;
  logic signed [37:0] scaled;
  logic signed [21:0] nz;

  function automatic logic [31:0] xorshift32(logic [31:0] v);
    logic [31:0] t;
    t = v ^ (v << 13);
    t = t ^ (t >> 17);
    t = t ^ (t << 5);
    return t;
  endfunction

  always_comb begin
    usum = '0;
    for (int i = 0; i < LANES; i++) usum = usum + 20'(signed'(st[i][31:16]));
  end

  assign scaled = 38'(usum) * signed'({1'b0, sigma});
  assign nz     = 22'(scaled >>> 16);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LANES; i++) st[i] <= SEED ^ (32'(i + 1) * 32'h9E37_79B9);
      y     <= '0;
      noise <= '0;
    end else if (ce) begin
      for (int i = 0; i < LANES; i++) st[i] <= xorshift32(st[i]);
      noise <= sat_sample(longint'(nz));
      y     <= sat_sample(longint'(x) + longint'(nz));
    end
  end

endmodule
