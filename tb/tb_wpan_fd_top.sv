// tb_wpan_fd_top -- end-to-end run of the top level at its default
// parameters, with the test bed and the transceiver working at the same time.
//
// Test bed, seven phases, each started from reset and run over whole frames:
//   clean      no noise, ideal channel          -> every frame found, PER 0
//   awgn       noise at 6 dB SNR (preamble)     -> every frame found
//   low SNR    noise at 0 dB SNR                -> PER reported (at most 1 in 4)
//   multipath  LOS channel with reflections + noise, threshold halved
//                                               -> every frame found
//   miss       threshold far below the peaks    -> every frame lost, no false alarm
//   false      threshold above zero             -> false alarms counted
//   external   detector fed from the ext input  -> triggers still produced
// The CES triggers must alternate in rate and the data at each trigger must
// be the CES.  Meanwhile the transceiver runs four phases from its own
// reset: SC-FDE and OFDM, medium- and high-rate headers, a clean and a
// three-path channel with noise; each must equalise six blocks without a
// bit error, with the right header rate and no underflow or overrun.  Every
// mechanism (both frame rates, noise, multipath, missed detection, false alarm,
// external input, SC-FDE, OFDM, transceiver multipath) is counted and a failure is
// recorded for one that never happened.
module tb_wpan_fd_top;
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
  bit tb_done = 0;   // test-bed phases finished: stop counting its triggers

  always #5 clk = ~clk;

  // transceiver side
  logic trx_rst = 1, trx_ce = 0, trx_run = 0, trx_mode = 0;
  rate_e trx_hdr_rate = RATE_MEDIUM;
  logic [15:0] trx_sigma = '0;
  sample_t trx_taps [NTAPS];
  sample_t trx_threshold = -16'sd64;
  csample_t trx_tx_sample, trx_rx_sample;
  logic trx_tx_frame_mark, trx_tx_ces_mark, trx_tx_active, trx_rx_det, trx_rx_ces_start;
  logic trx_rx_frame_end, trx_rx_busy, trx_tx_underflow, trx_rx_overrun;
  sample_t trx_rx_c2;
  rate_e trx_rx_rate;
  logic [31:0] trx_rx_frames, trx_rx_blocks, trx_rx_bits, trx_bit_errors;
  int n_sc = 0, n_ofdm = 0, n_trx_med = 0, n_trx_high = 0, n_trx_mp = 0, n_trx_bits = 0;

  wpan_fd_top dut (
    .clk(clk), .rst(rst), .ce(ce), .sigma(sigma), .taps(taps), .threshold(threshold),
    .ext_sel(ext_sel), .ext_x(ext_x),
    .tx_sample(tx_sample), .tx_frame_start(tx_frame_start), .noise(noise),
    .rx_sample(rx_sample), .det_ra(det_ra), .det_rb(det_rb), .det_c1(det_c1),
    .det_c2(det_c2), .det_raw(det_raw), .det_data(det_data), .sfd_det(sfd_det),
    .det_rate(det_rate), .ces_start(ces_start), .fft_start(fft_start),
    .blk_start(blk_start), .sym_idx(sym_idx), .frame_end(frame_end),
    .det_busy(det_busy), .frames(frames), .errors(errors),
    .misses(misses), .false_alarms(false_alarms),
    .trx_rst(trx_rst), .trx_ce(trx_ce), .trx_run(trx_run), .trx_mode(trx_mode),
    .trx_hdr_rate(trx_hdr_rate), .trx_sigma(trx_sigma), .trx_taps(trx_taps),
    .trx_threshold(trx_threshold), .trx_tx_sample(trx_tx_sample),
    .trx_tx_frame_mark(trx_tx_frame_mark), .trx_tx_ces_mark(trx_tx_ces_mark),
    .trx_tx_active(trx_tx_active), .trx_rx_sample(trx_rx_sample), .trx_rx_c2(trx_rx_c2),
    .trx_rx_det(trx_rx_det), .trx_rx_ces_start(trx_rx_ces_start),
    .trx_rx_frame_end(trx_rx_frame_end), .trx_rx_busy(trx_rx_busy), .trx_rx_rate(trx_rx_rate),
    .trx_rx_frames(trx_rx_frames), .trx_rx_blocks(trx_rx_blocks), .trx_rx_bits(trx_rx_bits),
    .trx_bit_errors(trx_bit_errors), .trx_tx_underflow(trx_tx_underflow),
    .trx_rx_overrun(trx_rx_overrun)
  );

  // transceiver enable: one clock in eight, sometimes one in nine or ten
  initial begin
    forever begin
      repeat (7 + $urandom_range(0, 2)) @(posedge clk);
      trx_ce <= 1'b1;
      @(posedge clk);
      trx_ce <= 1'b0;
    end
  end

  // One transceiver run from its own reset until six blocks are equalised.
  task automatic trx_phase(input string name, input logic m, input rate_e r, input bit multipath);
    trx_rst      <= 1'b1;
    trx_run      <= 1'b0;
    trx_mode     <= m;
    trx_hdr_rate <= r;
    for (int i = 0; i < NTAPS; i++) trx_taps[i] = '0;
    if (multipath) begin
      trx_taps[0] = 16'sd30000;
      trx_taps[1] = 16'sd4000;
      trx_taps[3] = -16'sd3000;
      trx_sigma     <= 16'd200 + 16'($urandom_range(0, 100));
      trx_threshold <= -16'sd32;
    end else begin
      trx_taps[0] = 16'sd32767;
      trx_sigma     <= '0;
      trx_threshold <= -16'sd64;
    end
    repeat (20) @(posedge clk);
    trx_rst <= 1'b0;
    trx_run <= 1'b1;
    wait (trx_rx_blocks >= 6);
    repeat (20) @(posedge clk);
    $display("%-22s frames %0d blocks %0d bits %0d bit errors %0d", name, trx_rx_frames,
             trx_rx_blocks, trx_rx_bits, trx_bit_errors);
    checks++;
    if (trx_bit_errors != 0 || trx_rx_bits != trx_rx_blocks * 1024 || trx_rx_rate != r ||
        trx_rx_frames < 2 || trx_tx_underflow || trx_rx_overrun) begin
      failures++;
      $display("%s: transceiver run failed (rate %0d underflow %0b overrun %0b)", name,
               trx_rx_rate, trx_tx_underflow, trx_rx_overrun);
    end else begin
      if (m) n_ofdm++; else n_sc++;
      if (r == RATE_HIGH) n_trx_high++; else n_trx_med++;
      if (multipath) n_trx_mp++;
      n_trx_bits += int'(trx_rx_bits);
    end
    trx_run <= 1'b0;
  endtask

  task automatic trx_phases();
    trx_phase("trx sc medium clean",      1'b0, RATE_MEDIUM, 1'b0);
    trx_phase("trx ofdm high clean",      1'b1, RATE_HIGH,   1'b0);
    trx_phase("trx sc high multipath",    1'b0, RATE_HIGH,   1'b1);
    trx_phase("trx ofdm medium multipath", 1'b1, RATE_MEDIUM, 1'b1);
  endtask


  // ext input: the ROM output itself, so the detector sees clean frames.
  always_ff @(posedge clk) ext_x <= tx_sample;

  // Count triggers and check rate alternation and CES content.
  rate_e last_rate;
  bit    have_last;
  always @(posedge clk) begin
    if (!rst && !tb_done && !fa_phase && fft_start) n_fft++;
    if (!rst && !tb_done && !fa_phase && ces_start) begin
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
    repeat (2000000) @(posedge clk);
    $display("watchdog");
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

  task automatic testbed_phases();
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

  endtask

  initial begin
    for (int i = 0; i < NTAPS; i++) trx_taps[i] = '0;
    fork
      begin
        testbed_phases();
        tb_done = 1;
      end
      trx_phases();
    join
    $display("mechanisms: medium %0d high %0d noise %0d multipath %0d miss %0d external %0d fft windows %0d",
             n_med, n_high, n_noise, n_mp, n_miss, n_ext, n_fft);
    $display("false alarms: %0d phases", n_false);
    checks++;
    if (n_med == 0 || n_high == 0 || n_noise == 0 || n_mp == 0 || n_miss == 0 || n_ext == 0 || n_false == 0) begin
      failures++;
      $display("a mechanism was never exercised");
    end
    $display("transceiver: sc %0d ofdm %0d medium %0d high %0d multipath %0d bits %0d",
             n_sc, n_ofdm, n_trx_med, n_trx_high, n_trx_mp, n_trx_bits);
    checks++;
    if (n_sc == 0 || n_ofdm == 0 || n_trx_med == 0 || n_trx_high == 0 || n_trx_mp == 0 || n_trx_bits == 0) begin
      failures++;
      $display("a transceiver mechanism was never exercised");
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
