// frame_detector -- preamble/frame detector for the IEEE 802.15.3c SC-FDE and
// OFDM modes.
//
// Chain: Efficient Golay Correlator matched to a128 -> normalisation of its
// 'a' output -> two successive correlations of that output with its copy
// delayed by 128 samples -> comparison with a negative threshold ->
// frame timing controller.  The SYNC field (14 x a128) produces a train of
// positive correlation peaks; the sign flips of the SFD produce negative
// peaks after the double correlation, and the first of them fixes the frame
// timing.  The controller then raises fft_start at the first sample of the
// CES and of every data block of the received stream, which leaves the
// detector on data_out, delayed by DLY samples so that the trigger for a
// high-rate frame can still be placed on the first CES sample.  The chain
// follows the detector of the design; the normaliser, the timing controller
// and the output delay are this design's reading of what it leaves open.
//
// Interface: one signed 16-bit real sample x per cycle with ce high (ce may
// be tied high); threshold is the run-time negative threshold.  data_out and
// every trigger are registered and aligned: in the enable where ces_start is
// high, data_out carries the first CES sample.  Timing: det follows the last
// chip of a Golay word by LAT = 11 enables (7 correlator stages, normaliser,
// two correlations, comparator); data_out follows x by DLY enables.
module frame_detector
  import fd_pkg::*;
#(
  parameter int DLY     = 16,
  parameter int NUM_BLK = 4,
  parameter int WIN     = 2
) (
  input  logic                      clk,
  input  logic                      rst,
  input  logic                      ce,
  input  sample_t                   x,
  input  sample_t                   threshold,
  output logic signed [DW+GOLAY_M-1:0] ra,
  output logic signed [DW+GOLAY_M-1:0] rb,
  output sample_t                   c1,
  output sample_t                   c2,
  output logic                      det,
  output sample_t                   data_out,
  output logic                      sfd_det,
  output rate_e                     rate,
  output logic                      ces_start,
  output logic                      fft_start,
  output logic                      blk_start,
  output logic [7:0]                sym_idx,
  output logic                      frame_end,
  output logic                      busy
);

  localparam int LAT      = GOLAY_M + 4;
  localparam int OFS_MED  = 2 * GOLAY_N + DLY - LAT;
  localparam int OFS_HIGH = GOLAY_N + DLY - LAT;

  sample_t r, x_d;

  golay_correlator u_egc (
    .clk(clk), .rst(rst), .ce(ce), .x(x), .ra(ra), .rb(rb)
  );

  corr_normalizer u_norm (
    .clk(clk), .rst(rst), .ce(ce), .din(ra), .dout(r)
  );

  double_correlator u_dcorr (
    .clk(clk), .rst(rst), .ce(ce), .r(r), .c1(c1), .c2(c2)
  );

  threshold_detector u_thr (
    .clk(clk), .rst(rst), .ce(ce), .c2(c2), .threshold(threshold), .det(det)
  );

  frame_sync_ctrl #(
    .LAG(GOLAY_N), .WIN(WIN), .OFS_MED(OFS_MED), .OFS_HIGH(OFS_HIGH), .NUM_BLK(NUM_BLK)
  ) u_ctrl (
    .clk(clk), .rst(rst), .ce(ce), .det(det),
    .sfd_det(sfd_det), .rate(rate), .ces_start(ces_start), .fft_start(fft_start),
    .blk_start(blk_start), .sym_idx(sym_idx), .frame_end(frame_end), .busy(busy)
  );

  // Received stream, delayed to line up with the triggers.
  delay_line #(.WIDTH(DW), .DEPTH(DLY - 1)) u_dly_x (
    .clk(clk), .rst(rst), .ce(ce), .din(x), .dout(x_d)
  );

  always_ff @(posedge clk) begin
    if (rst)     data_out <= '0;
    else if (ce) data_out <= x_d;
  end

endmodule
