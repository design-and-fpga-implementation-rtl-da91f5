// tx_framer -- builds the transmitted frame: preamble, then blocks with a
// cyclic prefix.
//
// On start the framer sends the preamble of the chosen header rate, SYNC
// (14 x a128), SFD and CES (a256, b256), on the in-phase axis with
// amplitude AMP, and then NUM_BLK blocks of 32 + 256 samples: each block is
// a copy of its last 32 samples (the cyclic prefix) followed by the 256
// samples themselves.  The block samples (16-QAM symbols in SC-FDE mode, IFFT
// output in OFDM mode) are written into one of two 256-sample buffers at the
// clock rate, while the other buffer is sent out at the sample rate, so the
// source may be bursty as long as each block is complete before its turn;
// otherwise the block is sent as it is and underflow is raised.  Preamble and
// cyclic prefix follow the design; the buffering, the preamble amplitude
// and the block count are this design's choices.
//
// Interface: in_valid/in_data/in_ready load block samples (clock rate);
// out/out_active change on ce; ces_mark is high with the first CES sample,
// frame_mark with the first SYNC sample; blk_sent pulses for one clock when a
// buffer has been sent and is free again.  Timing: the first preamble sample
// appears one enable after start is seen.
module tx_framer
  import fd_pkg::*;
#(
  parameter int NUM_BLK = 4,
  parameter int AMP     = 8192
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     ce,
  input  logic     start,
  input  rate_e    rate,
  input  logic     in_valid,
  input  csample_t in_data,
  output logic     in_ready,
  output csample_t out,
  output logic     out_active,
  output logic     frame_mark,
  output logic     ces_mark,
  output logic     underflow,
  output logic     blk_sent,
  output logic     busy
);

  localparam int CES_OFS = SYNC_LEN + SFD_LEN;
  localparam int PRE_LEN = CES_OFS + CES_LEN;

  typedef enum logic [1:0] {T_IDLE, T_PRE, T_BLK} tstate_e;

  sample_t bre [2][FFT_N];
  sample_t bim [2][FFT_N];
  logic [1:0] full;
  logic       wr_bank, rd_bank;
  logic [7:0] wr_cnt;
  tstate_e    st;
  logic [11:0] pos;
  logic [8:0]  bpos;
  logic [7:0]  blk;
  rate_e       cur_rate;
  logic [7:0]  rd_idx;

  // Preamble sample at position p for rate rt.
  function automatic sample_t pre_sample(int p, rate_e rt);
    int  k, w;
    logic c, neg;
    if (p < SYNC_LEN) begin
      c = a128_chip(p % GOLAY_N);
      neg = 1'b0;
    end else if (p < CES_OFS) begin
      k = p - SYNC_LEN;
      w = k / GOLAY_N;
      c = a128_chip(k % GOLAY_N);
      neg = (rt == RATE_MEDIUM) ? (w % 2 == 1) : (w >= 2);
    end else begin
      k = p - CES_OFS;
      w = k / GOLAY_N;
      c = (w % 2 == 0) ? a128_chip(k % GOLAY_N) : b128_chip(k % GOLAY_N);
      neg = (w == 3);
    end
    return ((c ^ neg) ? sample_t'(AMP) : sample_t'(-AMP));
  endfunction

  assign in_ready = ~full[wr_bank];
  assign busy     = (st != T_IDLE);
  assign rd_idx   = (bpos < 9'(CP_LEN)) ? 8'(bpos + 9'(FFT_N - CP_LEN)) : 8'(bpos - 9'(CP_LEN));

  always_ff @(posedge clk) begin
    if (rst) begin
      full       <= '0;
      wr_bank    <= 1'b0;
      rd_bank    <= 1'b0;
      wr_cnt     <= '0;
      st         <= T_IDLE;
      pos        <= '0;
      bpos       <= '0;
      blk        <= '0;
      cur_rate   <= RATE_MEDIUM;
      out        <= '0;
      out_active <= 1'b0;
      frame_mark <= 1'b0;
      ces_mark   <= 1'b0;
      underflow  <= 1'b0;
      blk_sent   <= 1'b0;
    end else begin
      blk_sent <= 1'b0;
      if (ce) begin
        frame_mark <= 1'b0;
        ces_mark   <= 1'b0;
        unique case (st)
          T_IDLE: begin
            out        <= '0;
            out_active <= 1'b0;
            if (start) begin
              st       <= T_PRE;
              pos      <= '0;
              cur_rate <= rate;
            end
          end
          T_PRE: begin
            out.re     <= pre_sample(int'(pos), cur_rate);
            out.im     <= '0;
            out_active <= 1'b1;
            frame_mark <= (pos == '0);
            ces_mark   <= (pos == 12'(CES_OFS));
            pos        <= pos + 1'b1;
            if (pos == 12'(PRE_LEN - 1)) begin
              st   <= T_BLK;
              bpos <= '0;
              blk  <= '0;
            end
          end
          T_BLK: begin
            out.re     <= bre[rd_bank][rd_idx];
            out.im     <= bim[rd_bank][rd_idx];
            out_active <= 1'b1;
            if (bpos == '0 && !full[rd_bank]) underflow <= 1'b1;
            if (bpos == 9'(BLK_LEN - 1)) begin
              full[rd_bank] <= 1'b0;
              rd_bank       <= ~rd_bank;
              blk_sent      <= 1'b1;
              bpos          <= '0;
              blk           <= blk + 1'b1;
              if (blk == 8'(NUM_BLK - 1)) st <= T_IDLE;
            end else begin
              bpos <= bpos + 1'b1;
            end
          end
          default: st <= T_IDLE;
        endcase
      end
      // block loading at the clock rate; a set wins over a clear
      if (in_valid && in_ready) begin
        bre[wr_bank][wr_cnt] <= in_data.re;
        bim[wr_bank][wr_cnt] <= in_data.im;
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_cnt == 8'(FFT_N - 1)) begin
          full[wr_bank] <= 1'b1;
          wr_bank       <= ~wr_bank;
        end
      end
    end
  end

endmodule
