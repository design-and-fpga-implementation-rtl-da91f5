// tb_fd_testbed -- end-to-end run of the test bed at its default parameters.
//
// Seven phases, each started from reset and run over whole frames:
//   clean      no noise, ideal channel          -> every frame found, PER 0
//   awgn       noise at 6 dB SNR (preamble)     -> every frame found
//   low SNR    noise at 0 dB SNR                -> PER reported (at most 1 in 4)
//   multipath  LOS channel with reflections + noise, threshold halved
//                                               -> every frame found
//   miss       threshold far below the peaks    -> every frame lost, no false alarm
//   false      threshold above zero             -> false alarms counted
//   external   detector fed from the ext input  -> triggers still produced
// In every phase the CES trigger must come in alternating rates (the ROM
// sends a medium- and a high-rate frame in turn) and the data after each
// trigger must be the CES.  Each mechanism (medium-rate frame, high-rate
// frame, noise, multipath, missed detection, false alarm, external input) is counted and
// a failure is recorded for one that never happened.
module tb_fd_testbed;
  import fd_pkg::*;

  localparam int NTAPS = 16;
  localparam int FRAME = SYNC_LEN + SFD_LEN + CES_LEN + 4 * BLK_LEN + 128;

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
  int n_med = 0, n_high = 0, n_noise = 0, n_mp = 0, n_miss = 0, n_ext = 0, n_false = 0;
  bit  fa_phase = 0;   // false-alarm phase: triggers are not frame-aligned
  int n_ces = 0, n_fft = 0;

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

  // ext input: the ROM output itself, so the detector sees clean frames.
  always_ff @(posedge clk) ext_x <= tx_sample;

  // Count triggers and check rate alternation and CES content.
  rate_e last_rate;
  bit    have_last;
  always @(posedge clk) begin
    if (!rst && !fa_phase && fft_start) n_fft++;
    if (!rst && !fa_phase && ces_start) begin
      n_ces++;
      if (det_rate == RATE_HIGH) n_high++; else n_med++;
      if (have_last) begin
        checks++;
        if (det_rate == last_rate) begin
          failures++;
          $display("%0t: two frames in a row with rate %0d", $time, det_rate);
        end
      end
      last_rate = det_rate;
      have_last = 1;
      // first CES chip is a128 chip 0 (scaled by the channel, no noise phases)
      if (sigma == 0 && !ext_sel) begin
        checks++;
        if ((det_data > 0) != a128_chip(0)) begin
          failures++;
          $display("%0t: data at CES trigger has wrong sign", $time);
        end
      end
    end
  end

  initial begin
    repeat (8 * FRAME * 6 + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_channel(int kind);
    for (int i = 0; i < NTAPS; i++) taps[i] = '0;
    if (kind == 0) taps[0] = 16'sd32767;
    else begin
      taps[0] = 16'sd29000;   // line-of-sight path
      taps[2] = 16'sd6000;
      taps[5] = -16'sd5000;   // reflected cluster
      taps[11] = 16'sd3000;
    end
  endtask

  // Run nfr frames from reset and return frames and errors counted.
  task automatic run_phase(string name, int nfr, output int f, output int e);
    rst <= 1;
    have_last = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (nfr * FRAME + 64) @(posedge clk);
    f = int'(frames);
    e = int'(errors);
    $display("%-10s frames %0d errors %0d misses %0d false alarms %0d", name, f, e, misses, false_alarms);
    // with the threshold below zero, every error here is a lost frame
    checks++;
    if (!fa_phase && (misses > errors || false_alarms > misses)) begin
      failures++;
      $display("%s: error split inconsistent", name);
    end
    checks++;
    if (f != nfr) begin
      failures++;
      $display("%s: %0d reference frames, expected %0d", name, f, nfr);
    end
  endtask

  initial begin
    int f, e, ces0;
    set_channel(0);

    sigma = 0;
    ces0 = n_ces;
    run_phase("clean", 4, f, e);
    checks++;
    if (e != 0 || n_ces - ces0 != 4) begin failures++; $display("clean: errors"); end

    sigma = 16'd4096;
    ces0 = n_ces;
    run_phase("awgn", 4, f, e);
    checks++;
    if (e != 0) begin failures++; $display("awgn 6 dB: errors"); end
    else n_noise++;

    sigma = 16'd8192;
    run_phase("low SNR", 4, f, e);
    checks++;
    if (e > 1) begin failures++; $display("awgn 0 dB: too many errors"); end
    else n_noise++;

    // c2 scales with the fourth power of the channel gain: lower threshold.
    sigma = 16'd2048;
    threshold = -16'sd32;
    set_channel(1);
    run_phase("multipath", 4, f, e);
    checks++;
    if (e != 0) begin failures++; $display("multipath: errors"); end
    else n_mp++;

    sigma = 0;
    set_channel(0);
    threshold = -16'sd30000;
    ces0 = n_ces;
    run_phase("miss", 2, f, e);
    checks++;
    if (e != 2 || n_ces != ces0) begin failures++; $display("miss: frames were detected"); end
    else n_miss++;
    checks++;
    if (misses != 2 || false_alarms != 0) begin failures++; $display("miss: %0d misses %0d false alarms", misses, false_alarms); end

    // a threshold above zero fires on the quiet parts of the signal
    threshold = 16'sd100;
    fa_phase = 1;
    run_phase("false", 2, f, e);
    checks++;
    if (false_alarms == 0) begin failures++; $display("false: no false alarm counted"); end
    else n_false++;
    fa_phase = 0;
    have_last = 0;

    threshold = -16'sd64;
    ext_sel = 1;
    ces0 = n_ces;
    run_phase("external", 2, f, e);
    checks++;
    if (n_ces - ces0 != 2) begin failures++; $display("external: %0d frames", n_ces - ces0); end
    else n_ext++;

    $display("mechanisms: medium %0d high %0d noise %0d multipath %0d miss %0d external %0d fft windows %0d",
             n_med, n_high, n_noise, n_mp, n_miss, n_ext, n_fft);
    $display("false alarms: %0d phases", n_false);
    checks++;
    if (n_med == 0 || n_high == 0 || n_noise == 0 || n_mp == 0 || n_miss == 0 || n_ext == 0 || n_false == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    checks++;
    if (n_fft != 6 * n_ces) begin
      failures++;
      $display("fft windows %0d for %0d frames", n_fft, n_ces);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
