// tb_per_sweep -- packet error rate of the frame detector against SNR, and
// misses and false alarms against the threshold, on the test bed.
//
// SNR is taken on the preamble: amplitude 8192, so sigma =
// 8192 * 10^(-SNR/20).  Part one runs 8 frames at each of -6, -3, 0, 3 and
// 6 dB with the default threshold (-64) and prints PER, misses and false
// alarms.  Part two holds 0 dB and runs thresholds of -8, -32, -64, -96 and
// -124.  The checks are those a short run supports: at 6 dB no frame is
// lost; PER does not grow as the SNR rises and misses do not shrink as
// the threshold falls (each with a margin of two frames for chance); the
// lowest threshold loses frames; and false alarms at -124 are no more than
// at -8.  Probabilities near 10^-3 need far more frames than a simulation
// can afford.
module tb_per_sweep;
  import fd_pkg::*;

  localparam int NTAPS = 16;
  localparam int FRAME = SYNC_LEN + SFD_LEN + CES_LEN + 4 * BLK_LEN + 128;
  localparam int NFR   = 8;
  localparam int NS    = 5;
  localparam int SNR_DB [NS] = '{-9, -7, -5, -3, 0};
  localparam int THR    [NS] = '{-8, -32, -64, -96, -124};

  logic clk = 0, rst = 1, ce = 1;
  logic [15:0] sigma = '0;
  sample_t taps [NTAPS];
  sample_t threshold = -16'sd64;
  logic ext_sel = 0;
  sample_t ext_x = '0;
  sample_t tx_sample, noise, rx_sample, det_c1, det_c2, det_data;
  logic signed [DW+GOLAY_M-1:0] det_ra, det_rb;
  logic tx_frame_start, det_raw, sfd_det, ces_start, fft_start, blk_start, frame_end, det_busy;
  rate_e det_rate;
  logic [7:0] sym_idx;
  logic [31:0] frames, errors, misses, false_alarms;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  fd_testbed dut (
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

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_point(input int snr, input int thr, output int e, output int mi, output int fa);
    rst       <= 1'b1;
    sigma     <= 16'($rtoi(8192.0 * $pow(10.0, -snr / 20.0) + 0.5));
    threshold <= sample_t'(thr);
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (NFR * FRAME + 64) @(posedge clk);
    e  = int'(errors);
    mi = int'(misses);
    fa = int'(false_alarms);
    $display("SNR %3d dB threshold %4d: frames %0d PER %f misses %0d false alarms %0d",
             snr, thr, frames, real'(e) / real'(frames), mi, fa);
    check($sformatf("%0d dB %0d: frame count", snr, thr), frames == NFR);
  endtask

  initial begin
    int e [NS], mi [NS], fa [NS];
    for (int i = 0; i < NTAPS; i++) taps[i] = '0;
    taps[0] = 16'sd32767;
    repeat (2) @(posedge clk);
    for (int p = 0; p < NS; p++) run_point(SNR_DB[p], -64, e[p], mi[p], fa[p]);
    check("no loss at 0 dB", e[NS-1] == 0);
    for (int p = 1; p < NS; p++)
      check($sformatf("PER does not grow at %0d dB", SNR_DB[p]), e[p] <= e[p-1] + 2);
    for (int p = 0; p < NS; p++) run_point(0, THR[p], e[p], mi[p], fa[p]);
    check("threshold near zero gives false alarms", fa[0] > 0);
    for (int p = 1; p < NS - 1; p++)
      check($sformatf("no error at threshold %0d", THR[p]), e[p] == 0);
    check("lowest threshold misses frames", mi[NS-1] > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NS * (NFR * FRAME + 100) + 1000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
