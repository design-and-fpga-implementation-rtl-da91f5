// fd_testbed -- the frame detector inside its on-chip test bed.
//
// Frames held in a ROM are sent continuously through a power-adjustable
// AWGN source and a multipath channel emulator into the frame detector.  The
// ROM also marks the first CES sample of every frame; delayed by the
// latency of the noise source, the channel and the detector, that marker is
// the ideal reference path, and the packet-error counter compares it with
// the detector's own CES trigger and detected rate.  frames / errors give
// the packet error rate at the SNR set by sigma, the channel set by taps and
// the threshold; misses and false_alarms split the errors into lost frames
// and triggers where there was no frame, the two error kinds a threshold
// trades against each other.  The detector input can instead be taken from an external
// converter (ext_sel), for use on a real received signal; the PER count is
// then meaningless.  The chain follows the test bed of the design; the
// external input and the port set are this design's choices.
//
// Interface: ce is the sample enable of the whole chain.  All outputs of the
// detector are brought out; they are aligned with det_data as described in
// frame_detector.
module fd_testbed
  import fd_pkg::*;
#(
  parameter int NUM_BLK = 4,
  parameter int NTAPS   = 16,
  parameter int DLY     = 16,
  parameter int TOL     = 2
) (
  input  logic        clk,
  input  logic        rst,
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
  output logic [31:0] false_alarms
);

  localparam int REF_DLY = 2 + DLY;   // noise register + channel register + detector

  sample_t noisy, chan, det_in;
  logic    ces_mark;
  rate_e   tx_rate;
  logic [1:0] ref_d;

  frame_rom #(.NUM_BLK(NUM_BLK)) u_rom (
    .clk(clk), .rst(rst), .ce(ce),
    .dout(tx_sample), .ces_mark(ces_mark), .frame_start(tx_frame_start), .rate(tx_rate)
  );

  awgn_gen u_awgn (
    .clk(clk), .rst(rst), .ce(ce), .x(tx_sample), .sigma(sigma), .y(noisy), .noise(noise)
  );

  mp_channel #(.NTAPS(NTAPS)) u_chan (
    .clk(clk), .rst(rst), .ce(ce), .x(noisy), .taps(taps), .y(chan)
  );

  assign det_in    = ext_sel ? ext_x : chan;
  assign rx_sample = det_in;

  frame_detector #(.DLY(DLY), .NUM_BLK(NUM_BLK)) u_det (
    .clk(clk), .rst(rst), .ce(ce), .x(det_in), .threshold(threshold),
    .ra(det_ra), .rb(det_rb), .c1(det_c1), .c2(det_c2), .det(det_raw), .data_out(det_data),
    .sfd_det(sfd_det), .rate(det_rate), .ces_start(ces_start), .fft_start(fft_start),
    .blk_start(blk_start), .sym_idx(sym_idx), .frame_end(frame_end), .busy(det_busy)
  );

  // Reference path: the ideal CES marker and rate, aligned with det_data.
  delay_line #(.WIDTH(2), .DEPTH(REF_DLY)) u_ref_dly (
    .clk(clk), .rst(rst), .ce(ce), .din({ces_mark, tx_rate}), .dout(ref_d)
  );

  per_counter #(.TOL(TOL)) u_per (
    .clk(clk), .rst(rst), .ce(ce),
    .ref_mark(ref_d[1]), .ref_rate(rate_e'(ref_d[0])),
    .det_mark(ces_start), .det_rate(det_rate),
    .frames(frames), .errors(errors),
    .misses(misses), .false_alarms(false_alarms)
  );

endmodule
