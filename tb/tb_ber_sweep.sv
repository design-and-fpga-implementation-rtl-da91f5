// tb_ber_sweep -- bit error rate against SNR for both transceiver modes,
// over a clean channel and a three-path channel.
//
// SNR is taken per complex sample of the data: the 16-QAM samples carry
// 2 x (2730^2 * 5) of power, so a per-axis noise of sigma gives
// SNR = 6104^2 / sigma^2, and sigma = 6104 * 10^(-SNR/20).  For each mode
// and channel the sweep runs 8, 12, 16 and 30 dB, each from reset and for
// ten equalised blocks (10240 bits), and prints the BER.  The checks are
// those a short run can support: every frame is found and no flow error
// occurs at any point, the lowest SNR shows bit errors (the noise reaches
// the decisions), the error count never grows as the SNR rises (with a
// margin for chance), and the highest SNR is error free.  BER near 10^-6
// needs far more bits than a simulation can afford.
module tb_ber_sweep;
  import fd_pkg::*;

  localparam int NTAPS = 16;
  localparam int NPT   = 4;
  localparam int SNR_DB [NPT] = '{8, 12, 16, 30};

  logic clk = 0, rst = 1, ce = 0, run = 0, mode = 0;
  rate_e hdr_rate = RATE_MEDIUM;
  logic [15:0] sigma = '0;
  sample_t taps [NTAPS];
  sample_t threshold = -16'sd64;
  csample_t tx_sample, rx_sample;
  logic tx_frame_mark, tx_ces_mark, tx_active, rx_det, rx_ces_start, rx_frame_end, rx_busy;
  sample_t rx_c2;
  rate_e rx_rate;
  logic [31:0] rx_frames, rx_blocks, rx_bits, bit_errors;
  logic tx_underflow, rx_overrun;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    forever begin
      repeat (7) @(posedge clk);
      ce <= 1'b1;
      @(posedge clk);
      ce <= 1'b0;
    end
  end

  sc_ofdm_trx dut (
    .clk(clk), .rst(rst), .ce(ce), .run(run), .mode(mode), .hdr_rate(hdr_rate), .sigma(sigma),
    .taps(taps), .threshold(threshold), .tx_sample(tx_sample), .tx_frame_mark(tx_frame_mark),
    .tx_ces_mark(tx_ces_mark), .tx_active(tx_active), .rx_sample(rx_sample), .rx_c2(rx_c2),
    .rx_det(rx_det), .rx_ces_start(rx_ces_start), .rx_frame_end(rx_frame_end), .rx_busy(rx_busy),
    .rx_rate(rx_rate), .rx_frames(rx_frames), .rx_blocks(rx_blocks), .rx_bits(rx_bits),
    .bit_errors(bit_errors), .tx_underflow(tx_underflow), .rx_overrun(rx_overrun)
  );

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // One SNR point from reset; returns the bit errors of ten blocks.
  task automatic point(input logic m, input bit multipath, input int snr, output int errs);
    rst  <= 1'b1;
    run  <= 1'b0;
    mode <= m;
    hdr_rate <= ($urandom_range(0, 1) == 1) ? RATE_HIGH : RATE_MEDIUM;
    for (int i = 0; i < NTAPS; i++) taps[i] = '0;
    if (multipath) begin
      taps[0]   = 16'sd30000;
      taps[1]   = 16'sd4000;
      taps[3]   = -16'sd3000;
      threshold <= -16'sd32;
    end else begin
      taps[0]   = 16'sd32767;
      threshold <= -16'sd64;
    end
    sigma <= 16'($rtoi(6104.0 * $pow(10.0, -snr / 20.0) + 0.5));
    repeat (20) @(posedge clk);
    rst <= 1'b0;
    run <= 1'b1;
    wait (rx_blocks >= 10);
    @(posedge clk);
    errs = int'(bit_errors);
    $display("%s %s SNR %2d dB sigma %4d: bits %0d errors %0d BER %e", m ? "OFDM  " : "SC-FDE",
             multipath ? "3-path" : "clean ", snr, sigma, rx_bits, errs, real'(errs) / real'(rx_bits));
    check($sformatf("mode %0d mp %0d %0d dB: frames found, no flow error", m, multipath, snr),
          rx_frames >= 3 && !tx_underflow && !rx_overrun && rx_rate == hdr_rate);
    run <= 1'b0;
  endtask

  initial begin
    int e [NPT];
    for (int m = 0; m < 2; m++)
      for (int c = 0; c < 2; c++) begin
        for (int p = 0; p < NPT; p++) point(1'(m), 1'(c), SNR_DB[p], e[p]);
        check($sformatf("mode %0d mp %0d: errors at the lowest SNR", m, c), e[0] > 0);
        for (int p = 1; p < NPT; p++)
          check($sformatf("mode %0d mp %0d: errors do not grow at %0d dB", m, c, SNR_DB[p]),
                e[p] <= e[p-1] + 5);
        check($sformatf("mode %0d mp %0d: error free at %0d dB", m, c, SNR_DB[NPT-1]), e[NPT-1] == 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog: blocks %0d frames %0d", rx_blocks, rx_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
