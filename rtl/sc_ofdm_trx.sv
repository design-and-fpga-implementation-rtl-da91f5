// sc_ofdm_trx -- SC-FDE / OFDM transceiver loop built around the frame
// detector.
//
// Transmitter: a PRBS-15 source gives 4 bits per symbol to the 16-QAM
// mapper.  Each block holds 256 symbols.  In SC-FDE mode (mode = 0) the
// symbols go straight into the framer's block buffer.  In OFDM mode
// (mode = 1) they are first put on 256 subcarriers by an IFFT.  The framer
// adds the preamble (header rate hdr_rate) and the 32-sample cyclic prefix
// and sends NUM_BLK blocks per frame, frame after frame, while run is high.
// Two block credits, one per framer buffer, keep the source from
// overrunning the framer: a credit is used when a block is generated and
// comes back when the framer has sent a block.
//
// Channel: I and Q each get independent white noise (sigma) and pass
// through the same real FIR channel (taps).
//
// Receiver: the frame detector works on I.  Q is delayed to match its
// data_out.  Each fft_start opens a 256-sample window into the receive FFT,
// tagged with sym_idx (0: a256, 1: b256, 2 and up: data blocks).  The
// equaliser estimates the channel from the two CES windows and equalises
// the data blocks.  In SC-FDE mode an IFFT takes the equalised spectrum back
// to the time domain before the 16-QAM decision; in OFDM mode the
// equalised bins are decided directly.  A second PRBS-15 generator, in step
// with the first, gives the expected bits, and every decided bit is
// compared with it.
//
// The mode split, 16-QAM, the 256-point FFT, the 32-sample cyclic prefix
// and the CES-based frequency-domain equaliser follow the design.  The
// PRBS, the credits, the real channel taps and the bit-error counting are
// this design's choices.  All 256 subcarriers carry data; no pilot or guard
// carriers are modelled.
//
// Interface: ce is the sample enable and must be high at most one clock in
// six, because each FFT needs about 1300 clocks per 256 samples.  tx_* show
// the transmitted frame (sample, first SYNC and CES sample, active), rx_*
// the channel output and the detector (c2, comparator, CES trigger, frame
// end, busy, header rate).  Counters: rx_frames (CES triggers), rx_blocks
// (equalised data blocks), rx_bits and bit_errors.  tx_underflow and
// rx_overrun are sticky error flags: a block that was not ready in time, or
// a window an FFT could not accept.  Timing: the receiver runs DLY + 2
// samples plus the processing time (two or three FFTs, about 4000 clocks)
// behind the transmitter.
module sc_ofdm_trx
  import fd_pkg::*;
#(
  parameter int NUM_BLK = 4,
  parameter int NTAPS   = 16,
  parameter int DLY     = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        run,
  input  logic        mode,
  input  rate_e       hdr_rate,
  input  logic [15:0] sigma,
  input  sample_t     taps [NTAPS],
  input  sample_t     threshold,
  output csample_t    tx_sample,
  output logic        tx_frame_mark,
  output logic        tx_ces_mark,
  output logic        tx_active,
  output csample_t    rx_sample,
  output sample_t     rx_c2,
  output logic        rx_det,
  output logic        rx_ces_start,
  output logic        rx_frame_end,
  output logic        rx_busy,
  output rate_e       rx_rate,
  output logic [31:0] rx_frames,
  output logic [31:0] rx_blocks,
  output logic [31:0] rx_bits,
  output logic [31:0] bit_errors,
  output logic        tx_underflow,
  output logic        rx_overrun
);

  localparam logic MODE_SC = 1'b0;

  // PRBS-15, x^15 + x^14 + 1, four steps per symbol
  function automatic logic [14:0] prbs_step4(logic [14:0] s);
    logic [14:0] r = s;
    for (int i = 0; i < 4; i++) r = {r[13:0], r[14] ^ r[13]};
    return r;
  endfunction

  // ---------------------------------------------------------------- source
  logic [14:0] tx_prbs;
  logic [1:0]  credits;
  logic        gen_active, map_in_valid;
  logic [7:0]  gen_cnt;
  logic [3:0]  map_bits;
  logic        blk_sent, fr_ready, fr_busy, fr_under;
  logic        map_valid, ifft_in_ready, ifft_valid;
  csample_t    map_sym, ifft_data, tx_out;
  logic        fr_in_valid;
  csample_t    fr_in_data;

  always_ff @(posedge clk) begin
    if (rst) begin
      tx_prbs      <= 15'h7FFF;
      credits      <= 2'd2;
      gen_active   <= 1'b0;
      gen_cnt      <= '0;
      map_in_valid <= 1'b0;
      map_bits     <= '0;
    end else begin
      map_in_valid <= 1'b0;
      if (gen_active) begin
        map_in_valid <= 1'b1;
        map_bits     <= tx_prbs[3:0];
        tx_prbs      <= prbs_step4(tx_prbs);
        gen_cnt      <= gen_cnt + 1'b1;
        if (gen_cnt == 8'(FFT_N - 1)) gen_active <= 1'b0;
      end
      if (!gen_active && run && credits != 2'd0) begin
        gen_active <= 1'b1;
        gen_cnt    <= '0;
        credits    <= credits - 2'd1 + 2'(blk_sent);
      end else begin
        credits    <= credits + 2'(blk_sent);
      end
    end
  end

  qam16_mapper u_map (
    .clk(clk), .rst(rst), .in_valid(map_in_valid), .bits(map_bits),
    .out_valid(map_valid), .sym(map_sym)
  );

  fft_core #(.INVERSE(1'b1)) u_tx_ifft (
    .clk(clk), .rst(rst), .in_valid(map_valid && mode != MODE_SC), .in_data(map_sym), .in_tag(8'd0),
    .in_ready(ifft_in_ready), .out_valid(ifft_valid), .out_data(ifft_data), .out_idx(),
    .out_tag(), .out_last()
  );

  assign fr_in_valid = (mode == MODE_SC) ? map_valid : ifft_valid;
  assign fr_in_data  = (mode == MODE_SC) ? map_sym : ifft_data;

  tx_framer #(.NUM_BLK(NUM_BLK)) u_framer (
    .clk(clk), .rst(rst), .ce(ce), .start(run && !fr_busy), .rate(hdr_rate),
    .in_valid(fr_in_valid), .in_data(fr_in_data), .in_ready(fr_ready),
    .out(tx_out), .out_active(tx_active), .frame_mark(tx_frame_mark), .ces_mark(tx_ces_mark),
    .underflow(fr_under), .blk_sent(blk_sent), .busy(fr_busy)
  );

  assign tx_sample = tx_out;

  // --------------------------------------------------------------- channel
  sample_t n_i, n_q, ch_i, ch_q;

  awgn_gen #(.SEED(32'h1234_5678)) u_awgn_i (
    .clk(clk), .rst(rst), .ce(ce), .x(tx_out.re), .sigma(sigma), .y(n_i), .noise()
  );

  awgn_gen #(.SEED(32'h0BAD_F00D)) u_awgn_q (
    .clk(clk), .rst(rst), .ce(ce), .x(tx_out.im), .sigma(sigma), .y(n_q), .noise()
  );

  mp_channel #(.NTAPS(NTAPS)) u_ch_i (
    .clk(clk), .rst(rst), .ce(ce), .x(n_i), .taps(taps), .y(ch_i)
  );

  mp_channel #(.NTAPS(NTAPS)) u_ch_q (
    .clk(clk), .rst(rst), .ce(ce), .x(n_q), .taps(taps), .y(ch_q)
  );

  assign rx_sample.re = ch_i;
  assign rx_sample.im = ch_q;

  // -------------------------------------------------------------- receiver
  sample_t    d_data, q_dl, q_d;
  logic       d_ces, d_fft;
  logic [7:0] d_sym;

  frame_detector #(.DLY(DLY), .NUM_BLK(NUM_BLK)) u_det (
    .clk(clk), .rst(rst), .ce(ce), .x(ch_i), .threshold(threshold),
    .ra(), .rb(), .c1(), .c2(rx_c2), .det(rx_det), .data_out(d_data),
    .sfd_det(), .rate(rx_rate), .ces_start(d_ces), .fft_start(d_fft), .blk_start(),
    .sym_idx(d_sym), .frame_end(rx_frame_end), .busy(rx_busy)
  );

  // Q follows the same DLY-enable path as the detector's data_out
  delay_line #(.WIDTH(DW), .DEPTH(DLY - 1)) u_q_dly (
    .clk(clk), .rst(rst), .ce(ce), .din(ch_q), .dout(q_dl)
  );

  always_ff @(posedge clk) begin
    if (rst) q_d <= '0;
    else if (ce) q_d <= q_dl;
  end

  assign rx_ces_start = d_ces;

  // receive windows: 256 enables from each fft_start
  logic       win_valid, rfft_ready, rfft_valid;
  csample_t   win_data, rfft_data;
  logic [7:0] win_tag, rfft_idx, rfft_tag;
  logic [7:0] win_left;

  always_ff @(posedge clk) begin
    if (rst) begin
      win_valid <= 1'b0;
      win_data  <= '0;
      win_tag   <= '0;
      win_left  <= '0;
    end else begin
      win_valid <= 1'b0;
      if (ce && (d_fft || win_left != '0)) begin
        win_valid   <= 1'b1;
        win_data.re <= d_data;
        win_data.im <= q_d;
        if (d_fft) begin
          win_tag  <= d_sym;
          win_left <= 8'(FFT_N - 1);
        end else begin
          win_left <= win_left - 1'b1;
        end
      end
    end
  end

  fft_core #(.INVERSE(1'b0)) u_rx_fft (
    .clk(clk), .rst(rst), .in_valid(win_valid), .in_data(win_data), .in_tag(win_tag),
    .in_ready(rfft_ready), .out_valid(rfft_valid), .out_data(rfft_data), .out_idx(rfft_idx),
    .out_tag(rfft_tag), .out_last()
  );

  logic       eq_valid, sc_ready, sc_valid, sc_last, dm_in_valid, dm_valid;
  csample_t   eq_data, sc_data, dm_in;
  logic [7:0] eq_idx, eq_tag;
  logic [3:0] dm_bits;

  fde_equalizer u_fde (
    .clk(clk), .rst(rst), .in_valid(rfft_valid), .in_data(rfft_data), .in_idx(rfft_idx),
    .in_tag(rfft_tag), .out_valid(eq_valid), .out_data(eq_data), .out_idx(eq_idx), .out_tag(eq_tag)
  );

  fft_core #(.INVERSE(1'b1)) u_rx_ifft (
    .clk(clk), .rst(rst), .in_valid(eq_valid && mode == MODE_SC), .in_data(eq_data), .in_tag(eq_tag),
    .in_ready(sc_ready), .out_valid(sc_valid), .out_data(sc_data), .out_idx(),
    .out_tag(), .out_last(sc_last)
  );

  assign dm_in_valid = (mode == MODE_SC) ? sc_valid : eq_valid;
  assign dm_in       = (mode == MODE_SC) ? sc_data : eq_data;

  qam16_demapper u_demap (
    .clk(clk), .rst(rst), .in_valid(dm_in_valid), .sym(dm_in), .out_valid(dm_valid), .bits(dm_bits)
  );

  // block counter: last bin of an equalised block
  logic blk_done, blk_done_d;
  assign blk_done = (mode == MODE_SC) ? (sc_valid && sc_last) : (eq_valid && eq_idx == 8'(FFT_N - 1));

  // ------------------------------------------------------- bit-error count
  logic [14:0] rx_prbs;
  logic [3:0]  diff;

  assign diff = dm_bits ^ rx_prbs[3:0];

  always_ff @(posedge clk) begin
    if (rst) begin
      rx_prbs      <= 15'h7FFF;
      rx_frames    <= '0;
      rx_blocks    <= '0;
      rx_bits      <= '0;
      bit_errors   <= '0;
      tx_underflow <= 1'b0;
      rx_overrun   <= 1'b0;
      blk_done_d   <= 1'b0;
    end else begin
      blk_done_d <= blk_done;
      if (ce && d_ces) rx_frames <= rx_frames + 1'b1;
      if (blk_done_d) rx_blocks <= rx_blocks + 1'b1;
      if (dm_valid) begin
        rx_prbs    <= prbs_step4(rx_prbs);
        rx_bits    <= rx_bits + 32'd4;
        bit_errors <= bit_errors + 32'(diff[0]) + 32'(diff[1]) + 32'(diff[2]) + 32'(diff[3]);
      end
      if (fr_under) tx_underflow <= 1'b1;
      if ((win_valid && !rfft_ready) || (eq_valid && mode == MODE_SC && !sc_ready) ||
          (map_valid && mode != MODE_SC && !ifft_in_ready) || (fr_in_valid && !fr_ready))
        rx_overrun <= 1'b1;
    end
  end

endmodule
