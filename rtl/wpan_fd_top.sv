// wpan_fd_top -- top level: the frame-detector test bed and the SC-FDE /
// OFDM transceiver loop side by side.
//
// The test bed (fd_testbed) plays stored medium- and high-rate frames
// through noise and a multipath channel into a frame detector and counts
// packet errors.  The transceiver (sc_ofdm_trx) sends PRBS data frames in
// SC-FDE or OFDM mode through its own noise and channel, finds them with a
// second frame detector, equalises them and counts bit errors.  The two
// halves share only the clock and the reset, so a PER measurement and a
// BER measurement can run at the same time.
//
// Interface: the test-bed ports are those of fd_testbed.  The transceiver
// ports carry a trx_ prefix; trx_rst restarts the transceiver alone.
// Timing: ce may be high on every clock; trx_ce must be high at most one
// clock in six (see sc_ofdm_trx).  Putting both halves on one chip follows
// the design's FPGA test platform; the split into two independently enabled
// halves is this design's choice.
module wpan_fd_top
  import fd_pkg::*;
#(
  parameter int NUM_BLK = 4,
  parameter int NTAPS   = 16,
  parameter int DLY     = 16,
  parameter int TOL     = 2
) (
  input  logic        clk,
  input  logic        rst,
  // frame-detector test bed
  input  logic        ce,
  input  logic [15:0] sigma,
  input  sample_t     taps [NTAPS],
  input  sample_t     threshold,
  input  logic        ext_sel,
  input  sample_t     ext_x,
  output sample_t     tx_sample,
  output logic        tx_frame_start,
  output sample_t     noise,
  output sample_t     rx_sample,
  output logic signed [DW+GOLAY_M-1:0] det_ra,
  output logic signed [DW+GOLAY_M-1:0] det_rb,
  output sample_t     det_c1,
  output sample_t     det_c2,
  output logic        det_raw,
  output sample_t     det_data,
  output logic        sfd_det,
  output rate_e       det_rate,
  output logic        ces_start,
  output logic        fft_start,
  output logic        blk_start,
  output logic [7:0]  sym_idx,
  output logic        frame_end,
  output logic        det_busy,
  output logic [31:0] frames,
  output logic [31:0] errors,
  output logic [31:0] misses,
  output logic [31:0] false_alarms,
  // transceiver
  input  logic        trx_rst,
  input  logic        trx_ce,
  input  logic        trx_run,
  input  logic        trx_mode,
  input  rate_e       trx_hdr_rate,
  input  logic [15:0] trx_sigma,
  input  sample_t     trx_taps [NTAPS],
  input  sample_t     trx_threshold,
  output csample_t    trx_tx_sample,
  output logic        trx_tx_frame_mark,
  output logic        trx_tx_ces_mark,
  output logic        trx_tx_active,
  output csample_t    trx_rx_sample,
  output sample_t     trx_rx_c2,
  output logic        trx_rx_det,
  output logic        trx_rx_ces_start,
  output logic        trx_rx_frame_end,
  output logic        trx_rx_busy,
  output rate_e       trx_rx_rate,
  output logic [31:0] trx_rx_frames,
  output logic [31:0] trx_rx_blocks,
  output logic [31:0] trx_rx_bits,
  output logic [31:0] trx_bit_errors,
  output logic        trx_tx_underflow,
  output logic        trx_rx_overrun
);

  logic trx_reset;

  assign trx_reset = rst || trx_rst;

  fd_testbed #(.NUM_BLK(NUM_BLK), .NTAPS(NTAPS), .DLY(DLY), .TOL(TOL)) u_testbed (
    .clk(clk), .rst(rst), .ce(ce), .sigma(sigma), .taps(taps), .threshold(threshold),
    .ext_sel(ext_sel), .ext_x(ext_x),
    .tx_sample(tx_sample), .tx_frame_start(tx_frame_start), .noise(noise),
    .rx_sample(rx_sample), .det_ra(det_ra), .det_rb(det_rb), .det_c1(det_c1),
    .det_c2(det_c2), .det_raw(det_raw), .det_data(det_data), .sfd_det(sfd_det),
    .det_rate(det_rate), .ces_start(ces_start), .fft_start(fft_start),
    .blk_start(blk_start), .sym_idx(sym_idx), .frame_end(frame_end),
    .det_busy(det_busy), .frames(frames), .errors(errors),
    .misses(misses), .false_alarms(false_alarms)
  );

  sc_ofdm_trx #(.NUM_BLK(NUM_BLK), .NTAPS(NTAPS), .DLY(DLY)) u_trx (
    .clk(clk), .rst(trx_reset), .ce(trx_ce), .run(trx_run), .mode(trx_mode),
    .hdr_rate(trx_hdr_rate), .sigma(trx_sigma), .taps(trx_taps), .threshold(trx_threshold),
    .tx_sample(trx_tx_sample), .tx_frame_mark(trx_tx_frame_mark), .tx_ces_mark(trx_tx_ces_mark),
    .tx_active(trx_tx_active), .rx_sample(trx_rx_sample), .rx_c2(trx_rx_c2), .rx_det(trx_rx_det),
    .rx_ces_start(trx_rx_ces_start), .rx_frame_end(trx_rx_frame_end), .rx_busy(trx_rx_busy),
    .rx_rate(trx_rx_rate), .rx_frames(trx_rx_frames), .rx_blocks(trx_rx_blocks),
    .rx_bits(trx_rx_bits), .bit_errors(trx_bit_errors), .tx_underflow(trx_tx_underflow),
    .rx_overrun(trx_rx_overrun)
  );

endmodule
