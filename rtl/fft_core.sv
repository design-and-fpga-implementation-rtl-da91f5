// fft_core -- block FFT / IFFT of the SC-FDE / OFDM transceiver.
//
// A memory-based radix-2 decimation-in-time transform of N = 256 points.
// Input samples are written in bit-reversed order into one of two banks of
// working memory; when a bank is full the engine runs log2(N) = 8 stages of
// N/2 butterflies, one butterfly per clock, in place, then reads the bank
// out in natural order.  While one bank is transformed the other one loads,
// so windows may follow each other without a gap.  INVERSE selects the
// conjugate twiddles (IFFT).  The last SCALE_STAGES stages halve their
// results (rounded); the default of 4 scales by 1/16 = 1/sqrt(N), so an IFFT followed
// by an FFT returns the original values.  The working width has room for
// the full growth of an unscaled transform, and the output is saturated to
// 16 bits.  Twiddles are cos/sin values rounded to Q1.15, computed when the
// table is initialised.  The 256-point size is the design's; the
// architecture, scaling and two-bank buffering are this design's choices.
//
// Interface: in_valid/in_data/in_tag with in_ready (a sample is taken when
// both are high; the tag of a window is taken with its first sample).  A
// window's results come out as N consecutive cycles of out_valid with
// out_idx = 0..N-1 (bin or time index), out_last on the final one and the
// window's tag.  Timing: about N/2 * 8 + N clocks from the last input sample
// to the last output, so a new window can be accepted every N input samples
// if the clock runs at least 6 times faster than the samples.
module fft_core
  import fd_pkg::*;
#(
  parameter int LOGN         = 8,
  parameter bit INVERSE      = 1'b0,
  parameter int SCALE_STAGES = 4
) (
  input  logic            clk,
  input  logic            rst,
  input  logic            in_valid,
  input  csample_t        in_data,
  input  logic [7:0]      in_tag,
  output logic            in_ready,
  output logic            out_valid,
  output csample_t        out_data,
  output logic [LOGN-1:0] out_idx,
  output logic [7:0]      out_tag,
  output logic            out_last
);

  localparam int N  = 1 << LOGN;
  localparam int IW = DW + LOGN + 2;

  typedef logic signed [IW-1:0] word_t;
  typedef enum logic [1:0] {C_IDLE, C_BFLY, C_OUT} cstate_e;

  word_t mre [2][N];
  word_t mim [2][N];
  logic signed [DW-1:0] tw_re [N/2];
  logic signed [DW-1:0] tw_im [N/2];

  logic [1:0]      full;
  logic [7:0]      tag [2];
  logic            ld_bank, cb;
  logic [LOGN-1:0] ld_cnt, oc;
  cstate_e         cst;
  logic [$clog2(LOGN)-1:0] stg;
  logic [LOGN-2:0] bj;

  initial begin
    for (int k = 0; k < N / 2; k++) begin
      tw_re[k] = DW'($rtoi($floor(32767.0 * $cos(2.0 * 3.14159265358979 * k / N) + 0.5)));
      tw_im[k] = DW'($rtoi($floor((INVERSE ? 32767.0 : -32767.0) *
                                  $sin(2.0 * 3.14159265358979 * k / N) + 0.5)));
    end
  end

  function automatic logic [LOGN-1:0] bitrev(logic [LOGN-1:0] v);
    logic [LOGN-1:0] r;
    for (int i = 0; i < LOGN; i++) r[i] = v[LOGN-1-i];
    return r;
  endfunction

  // Butterfly addresses and results for the current stage / index.
  logic [LOGN-1:0] half, pos, i0, i1;
  logic [LOGN-2:0] twk;
  word_t ar, ai, br, bi, tr, ti, y0r, y0i, y1r, y1i;
  logic signed [IW+DW-1:0] pr, pi;
  logic scale;

  always_comb begin
    half  = LOGN'(1) << stg;
    pos   = LOGN'(bj) & (half - 1'b1);
    i0    = ((LOGN'(bj) >> stg) << (stg + 1)) | pos;
    i1    = i0 + half;
    twk   = (LOGN-1)'(pos << (LOGN - 1 - 32'(stg)));
    ar    = mre[cb][i0];
    ai    = mim[cb][i0];
    br    = mre[cb][i1];
    bi    = mim[cb][i1];
    pr    = br * tw_re[twk] - bi * tw_im[twk];
    pi    = br * tw_im[twk] + bi * tw_re[twk];
    tr    = word_t'((pr + (1 <<< (DW - 2))) >>> (DW - 1));
    ti    = word_t'((pi + (1 <<< (DW - 2))) >>> (DW - 1));
    scale = (32'(stg) >= 32'(LOGN - SCALE_STAGES));
    y0r   = scale ? (ar + tr + 1) >>> 1 : ar + tr;
    y0i   = scale ? (ai + ti + 1) >>> 1 : ai + ti;
    y1r   = scale ? (ar - tr + 1) >>> 1 : ar - tr;
    y1i   = scale ? (ai - ti + 1) >>> 1 : ai - ti;
  end

  assign in_ready = ~full[ld_bank];

  always_ff @(posedge clk) begin
    if (rst) begin
      full      <= '0;
      tag[0]    <= '0;
      tag[1]    <= '0;
      ld_bank   <= 1'b0;
      ld_cnt    <= '0;
      cb        <= 1'b0;
      cst       <= C_IDLE;
      stg       <= '0;
      bj        <= '0;
      oc        <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      out_data  <= '0;
      out_idx   <= '0;
      out_tag   <= '0;
    end else begin
      // loading side
      if (in_valid && in_ready) begin
        mre[ld_bank][bitrev(ld_cnt)] <= word_t'(in_data.re);
        mim[ld_bank][bitrev(ld_cnt)] <= word_t'(in_data.im);
        if (ld_cnt == '0) tag[ld_bank] <= in_tag;
        ld_cnt <= ld_cnt + 1'b1;
        if (ld_cnt == LOGN'(N - 1)) begin
          full[ld_bank] <= 1'b1;
          ld_bank       <= ~ld_bank;
        end
      end
      // transform side
      out_valid <= 1'b0;
      out_last  <= 1'b0;
      unique case (cst)
        C_IDLE: begin
          if (full[cb]) begin
            cst <= C_BFLY;
            stg <= '0;
            bj  <= '0;
          end
        end
        C_BFLY: begin
          mre[cb][i0] <= y0r;
          mim[cb][i0] <= y0i;
          mre[cb][i1] <= y1r;
          mim[cb][i1] <= y1i;
          bj <= bj + 1'b1;
          if (&bj) begin
            if (32'(stg) == LOGN - 1) begin
              cst <= C_OUT;
              oc  <= '0;
            end else begin
              stg <= stg + 1'b1;
            end
          end
        end
        C_OUT: begin
          out_valid   <= 1'b1;
          out_data.re <= sat_sample(longint'(mre[cb][oc]));
          out_data.im <= sat_sample(longint'(mim[cb][oc]));
          out_idx     <= oc;
          out_tag     <= tag[cb];
          out_last    <= (oc == LOGN'(N - 1));
          oc          <= oc + 1'b1;
          if (oc == LOGN'(N - 1)) begin
            full[cb] <= 1'b0;
            cb       <= ~cb;
            cst      <= C_IDLE;
          end
        end
        default: cst <= C_IDLE;
      endcase
    end
  end

endmodule
