// frame_rom -- test-frame source of the on-chip test bed.
//
// The ROM holds two complete frames that are played out back to back and
// repeated for ever: a medium-rate frame (SFD [a -a a -a]) followed by a
// high-rate frame (SFD [a a -a -a]).  Each frame is
//   SYNC 14 x a128 | SFD 4 x 128 | CES a256 b256 | NUM_BLK x (CP 32 + 256) | GAP zeros
// with a256 = [a128 b128] and b256 = [a128 -b128].  Preamble chips are
// +/-AMP.  Data samples are the levels {-3,-1,+1,+3} x AMP/3 of one axis of
// 16-QAM, chosen by a fixed hash of the sample position, and every block
// starts with a copy of its last 32 samples as cyclic prefix.  The contents
// are computed when the ROM is initialised, from the Golay pair of fd_pkg.
// That the frames are held in a ROM and sent continuously follows the test
// bed of the design; the frame contents beyond the preamble, the data hash,
// the gap and the block count are this design's choices.
//
// Interface: on every enable the next sample appears on dout (registered).
// ces_mark is high with the first CES sample of each frame, frame_start with
// the first SYNC sample, and rate tells which of the two frames is playing.
module frame_rom
  import fd_pkg::*;
#(
  parameter int NUM_BLK = 4,
  parameter int GAP     = 128,
  parameter int AMP     = 8192
) (
  input  logic    clk,
  input  logic    rst,
  input  logic    ce,
  output sample_t dout,
  output logic    ces_mark,
  output logic    frame_start,
  output rate_e   rate
);

  localparam int CES_OFS   = SYNC_LEN + SFD_LEN;
  localparam int DATA_OFS  = CES_OFS + CES_LEN;
  localparam int FRAME_LEN = DATA_OFS + NUM_BLK * BLK_LEN + GAP;
  localparam int ROM_LEN   = 2 * FRAME_LEN;
  localparam int AW       = $clog2(ROM_LEN);
  localparam int FW       = $clog2(FRAME_LEN);

  // Sign (+1 -> 1) of SFD word w for the given rate.
  function automatic logic sfd_sign(rate_e rt, int w);
    if (rt == RATE_MEDIUM) return (w % 2) == 0;   // + - + -
    return w < 2;                                  // + + - -
  endfunction

  // One data level from a fixed hash of (frame, block, body index).
  function automatic int data_level(int fr, int blk, int j);
    logic [31:0] h;
    h = 32'(fr * 7919 + blk * 104729 + j) * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    case (h[17:16])
      2'd0: return -AMP;
      2'd1: return -(AMP / 3);
      2'd2: return AMP / 3;
      default: return AMP;
    endcase
  endfunction

  function automatic int frame_sample(int fr, int i);
    rate_e rt;
    int    k, blk, p, j;
    rt = (fr == 0) ? RATE_MEDIUM : RATE_HIGH;
    if (i < SYNC_LEN) return a128_chip(i % GOLAY_N) ? AMP : -AMP;
    if (i < CES_OFS) begin
      k = i - SYNC_LEN;
      return (a128_chip(k % GOLAY_N) == sfd_sign(rt, k / GOLAY_N)) ? AMP : -AMP;
    end
    if (i < DATA_OFS) begin
      k = i - CES_OFS;                       // 0..511: a128 b128 a128 -b128
      case (k / GOLAY_N)
        0, 2:    return a128_chip(k % GOLAY_N) ? AMP : -AMP;
        1:       return b128_chip(k % GOLAY_N) ? AMP : -AMP;
        default: return b128_chip(k % GOLAY_N) ? -AMP : AMP;
      endcase
    end
    if (i < DATA_OFS + NUM_BLK * BLK_LEN) begin
      k   = i - DATA_OFS;
      blk = k / BLK_LEN;
      p   = k % BLK_LEN;
      j   = (p < CP_LEN) ? p + FFT_N - CP_LEN : p - CP_LEN;
      return data_level(fr, blk, j);
    end
    return 0;
  endfunction

  sample_t        rom [ROM_LEN];
  logic [AW-1:0]  addr;
  logic [FW-1:0]  fpos;
  logic           fsel;

  initial begin
    for (int a = 0; a < ROM_LEN; a++)
      rom[a] = sample_t'(frame_sample(a / FRAME_LEN, a % FRAME_LEN));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      addr        <= '0;
      fpos        <= '0;
      fsel        <= 1'b0;
      dout        <= '0;
      ces_mark    <= 1'b0;
      frame_start <= 1'b0;
      rate        <= RATE_MEDIUM;
    end else if (ce) begin
      dout        <= rom[addr];
      ces_mark    <= (fpos == FW'(CES_OFS));
      frame_start <= (fpos == '0);
      rate        <= fsel ? RATE_HIGH : RATE_MEDIUM;
      if (fpos == FW'(FRAME_LEN - 1)) begin
        fpos <= '0;
        fsel <= ~fsel;
      end else begin
        fpos <= fpos + 1'b1;
      end
      addr <= (addr == AW'(ROM_LEN - 1)) ? '0 : addr + 1'b1;
    end
  end

endmodule
