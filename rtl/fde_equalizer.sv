// fde_equalizer -- one-tap zero-forcing frequency-domain equaliser.
//
// The receiver FFT delivers, for each frame, the spectra of the two CES
// halves (tag 0: a256, tag 1: b256) and then of every data block (tag 2 on).
// Because a256 and b256 are a Golay complementary pair, their spectra obey
// |Xa(k)|^2 + |Xb(k)|^2 = 2 x 256 for every bin, so the channel is estimated
// without any division by the training spectrum:
//     H(k) = (Ya(k) conj(Xa(k)) + Yb(k) conj(Xb(k))) / 512
// The equaliser then stores G(k) = 1 / H(k) = conj(H) / |H|^2 for every bin
// and multiplies each data bin by it.  Xa and Xb are the DFTs of the +/-1
// chip sequences, computed when their tables are initialised.  Estimating
// the channel from the CES and equalising in the frequency domain follows
// the design; the zero-forcing rule and the Golay-based estimator are this
// design's choices.
//
// Scaling: the estimator assumes a CES amplitude of PRE_AMP (Q1.15) and a
// forward FFT scaled by 1/16; H is then held with 14 fraction bits and G as
// 2^14 / H, saturated to 24 bits.  Interface: in_valid/in_data/in_idx/in_tag
// from the FFT, out_valid/out_data/out_idx/out_tag for data bins only.
// Timing: two registers for the estimate, one for the equalised output.
module fde_equalizer
  import fd_pkg::*;
#(
  parameter int PRE_AMP = 8192
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  csample_t   in_data,
  input  logic [7:0] in_idx,
  input  logic [7:0] in_tag,
  output logic       out_valid,
  output csample_t   out_data,
  output logic [7:0] out_idx,
  output logic [7:0] out_tag
);

  localparam int  XS   = 10;   // fraction bits of the Xa/Xb tables
  localparam int  HF   = 14;   // fraction bits of H
  localparam int  GW   = 24;   // width of G
  // sum = H * 512 * (PRE_AMP / 16) * 2^XS ; shift back to HF fraction bits
  localparam int  HSH  = 9 + $clog2(PRE_AMP) - 4 + XS - HF;

  typedef logic signed [GW-1:0] gword_t;

  gword_t  xa_re [FFT_N], xa_im [FFT_N], xb_re [FFT_N], xb_im [FFT_N];
  sample_t ya_re [FFT_N], ya_im [FFT_N];
  gword_t  g_re [FFT_N], g_im [FFT_N];

  // Xa, Xb with XS fraction bits; each term is rounded at 8 extra bits and
  // the sums are rounded once at the end.
  initial begin
    longint sr, si;
    int     c;
    for (int k = 0; k < FFT_N; k++) begin
      for (int s = 0; s < 2; s++) begin
        sr = 0;
        si = 0;
        for (int n = 0; n < FFT_N; n++) begin
          // a256 = [a128 b128], b256 = [a128 -b128]
          c = (n < GOLAY_N) ? (a128_chip(n) ? 1 : -1) : (b128_chip(n - GOLAY_N) ? 1 : -1);
          if (s == 1 && n >= GOLAY_N) c = -c;
          sr += longint'($rtoi($floor(c * $cos(2.0 * 3.14159265358979 * ((k * n) % FFT_N) / FFT_N)
                                      * (1 << (XS + 8)) + 0.5)));
          si -= longint'($rtoi($floor(c * $sin(2.0 * 3.14159265358979 * ((k * n) % FFT_N) / FFT_N)
                                      * (1 << (XS + 8)) + 0.5)));
        end
        if (s == 0) begin
          xa_re[k] = GW'((sr + 128) >>> 8);
          xa_im[k] = GW'((si + 128) >>> 8);
        end else begin
          xb_re[k] = GW'((sr + 128) >>> 8);
          xb_im[k] = GW'((si + 128) >>> 8);
        end
      end
    end
  end

  // Stage 1: channel estimate for bin in_idx (tag 1, with the stored Ya).
  logic signed [2*DW+2:0] acc_re, acc_im;
  logic signed [31:0]     h_re, h_im;
  logic                   h_valid;
  logic [7:0]             h_idx;

  function automatic longint mul(sample_t a, logic signed [GW-1:0] b);
    return longint'(a) * longint'(b);
  endfunction

  always_comb begin
    // Y conj(X) = (yr xr + yi xi) + j (yi xr - yr xi)
    acc_re = (2*DW+3)'(mul(ya_re[in_idx], xa_re[in_idx]) + mul(ya_im[in_idx], xa_im[in_idx])
                     + mul(in_data.re, xb_re[in_idx]) + mul(in_data.im, xb_im[in_idx]));
    acc_im = (2*DW+3)'(mul(ya_im[in_idx], xa_re[in_idx]) - mul(ya_re[in_idx], xa_im[in_idx])
                     + mul(in_data.im, xb_re[in_idx]) - mul(in_data.re, xb_im[in_idx]));
  end

  // Stage 2: G = conj(H) 2^(2 HF) / |H|^2
  logic signed [63:0] den, num_re, num_im, q_re, q_im;

  always_comb begin
    den    = 64'(h_re) * 64'(h_re) + 64'(h_im) * 64'(h_im);
    num_re = 64'(h_re) <<< (2 * HF);
    num_im = -(64'(h_im) <<< (2 * HF));
    q_re   = (den != 0) ? num_re / den : 64'sd0;
    q_im   = (den != 0) ? num_im / den : 64'sd0;
  end

  function automatic gword_t sat_g(logic signed [63:0] v);
    if (v > 64'sd8388607)  return gword_t'(24'sd8388607);
    if (v < -64'sd8388608) return gword_t'(-24'sd8388608);
    return gword_t'(v);
  endfunction

  // Data: Z = Y G / 2^HF
  logic signed [DW+GW:0] z_re, z_im;

  always_comb begin
    z_re = (DW+GW+1)'(mul(in_data.re, g_re[in_idx]) - mul(in_data.im, g_im[in_idx]));
    z_im = (DW+GW+1)'(mul(in_data.re, g_im[in_idx]) + mul(in_data.im, g_re[in_idx]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      h_valid   <= 1'b0;
      h_idx     <= '0;
      h_re      <= '0;
      h_im      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
      out_tag   <= '0;
    end else begin
      h_valid   <= 1'b0;
      out_valid <= 1'b0;
      if (in_valid && in_tag == 8'd0) begin
        ya_re[in_idx] <= in_data.re;
        ya_im[in_idx] <= in_data.im;
      end
      if (in_valid && in_tag == 8'd1) begin
        h_valid <= 1'b1;
        h_idx   <= in_idx;
        h_re    <= 32'(acc_re >>> HSH);
        h_im    <= 32'(acc_im >>> HSH);
      end
      if (h_valid) begin
        g_re[h_idx] <= sat_g(q_re);
        g_im[h_idx] <= sat_g(q_im);
      end
      if (in_valid && in_tag >= 8'd2) begin
        out_valid   <= 1'b1;
        out_data.re <= sat_sample(longint'(z_re) >>> HF);
        out_data.im <= sat_sample(longint'(z_im) >>> HF);
        out_idx     <= in_idx;
        out_tag     <= in_tag;
      end
    end
  end

endmodule
