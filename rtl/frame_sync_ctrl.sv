// frame_sync_ctrl -- turns the comparator output into FFT triggers.
//
// The receiver needs the FFT window to start exactly on the first sample of
// the channel estimation sequence (CES) and then on every data block.  The
// controller waits in IDLE for the first negative peak (det high).  It then
// counts enables; a second peak one Golay period (128 samples, +/-WIN) after
// the first marks the high-rate SFD [a a -a -a], no such peak the
// medium-rate SFD [a -a a -a].  The CES begins a rate-dependent, fixed
// number of samples after the first peak (OFS_MED or OFS_HIGH, chosen by the
// enclosing detector from its pipeline latency), at which point ces_start
// and fft_start pulse.  Inside the CES the FFT is triggered on a256 and b256
// (every FFT_N samples); after the CES come NUM_BLK blocks of CP_LEN + FFT_N
// samples, and fft_start pulses after each cyclic prefix.  Peaks seen while
// a frame is being followed are ignored.  Telling the two SFDs apart by the
// spacing of the peaks, and the number of blocks per frame, are this
// design's choices.
//
// Interface: all outputs are registered and change only on cycles with ce
// high; a pulse lasts one enable.  sym_idx numbers the FFT windows of a
// frame: 0 and 1 for the CES halves, 2 onwards for the data blocks.
module frame_sync_ctrl
  import fd_pkg::*;
#(
  parameter int LAG      = GOLAY_N,
  parameter int WIN      = 2,
  parameter int OFS_MED  = 261,
  parameter int OFS_HIGH = 133,
  parameter int NUM_BLK  = 4
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,
  input  logic       det,
  output logic       sfd_det,     // first negative peak of a frame
  output rate_e      rate,        // header rate, valid from ces_start on
  output logic       ces_start,   // first sample of the CES
  output logic       fft_start,   // first sample of an FFT window
  output logic       blk_start,   // first sample (CP) of a data block
  output logic [7:0] sym_idx,     // FFT window number inside the frame
  output logic       frame_end,   // one enable after the last block
  output logic       busy
);

  typedef enum logic [1:0] {S_IDLE, S_CHECK, S_CES, S_DATA} state_e;

  localparam int CW = $clog2(OFS_MED + 2);

  state_e         state;
  logic [CW-1:0]  cnt;
  logic [9:0]     pos;
  logic [8:0]     bpos;
  logic [7:0]     blk;

  initial begin
    assert (OFS_HIGH > LAG + WIN) else $error("OFS_HIGH too small to see the second peak");
    assert (OFS_MED > OFS_HIGH) else $error("OFS_MED must exceed OFS_HIGH");
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      cnt       <= '0;
      pos       <= '0;
      bpos      <= '0;
      blk       <= '0;
      rate      <= RATE_MEDIUM;
      sfd_det   <= 1'b0;
      ces_start <= 1'b0;
      fft_start <= 1'b0;
      blk_start <= 1'b0;
      frame_end <= 1'b0;
      sym_idx   <= '0;
    end else if (ce) begin
      sfd_det   <= 1'b0;
      ces_start <= 1'b0;
      fft_start <= 1'b0;
      blk_start <= 1'b0;
      frame_end <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (det) begin
            state   <= S_CHECK;
            cnt     <= CW'(1);
            rate    <= RATE_MEDIUM;
            sfd_det <= 1'b1;
          end
        end
        S_CHECK: begin
          cnt <= cnt + 1'b1;
          if (det && cnt >= CW'(LAG - WIN) && cnt <= CW'(LAG + WIN)) rate <= RATE_HIGH;
          if ((rate == RATE_HIGH && cnt == CW'(OFS_HIGH)) ||
              (rate == RATE_MEDIUM && cnt == CW'(OFS_MED))) begin
            state     <= S_CES;
            pos       <= '0;
            ces_start <= 1'b1;
            fft_start <= 1'b1;
            sym_idx   <= '0;
          end
        end
        S_CES: begin
          if (pos == 10'(CES_LEN - 1)) begin
            state     <= S_DATA;
            bpos      <= '0;
            blk       <= '0;
            blk_start <= 1'b1;
          end else begin
            pos <= pos + 1'b1;
            if ((pos + 1'b1) % 10'(FFT_N) == 10'd0) begin
              fft_start <= 1'b1;
              sym_idx   <= sym_idx + 1'b1;
            end
          end
        end
        S_DATA: begin
          if (bpos == 9'(BLK_LEN - 1)) begin
            if (blk == 8'(NUM_BLK - 1)) begin
              state     <= S_IDLE;
              frame_end <= 1'b1;
            end else begin
              blk       <= blk + 1'b1;
              bpos      <= '0;
              blk_start <= 1'b1;
            end
          end else begin
            bpos <= bpos + 1'b1;
            if (bpos + 1'b1 == 9'(CP_LEN)) begin
              fft_start <= 1'b1;
              sym_idx   <= sym_idx + 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
