// tb_sc_ofdm_trx -- end-to-end runs of the transceiver loop.  Four phases,
// each started from reset: SC-FDE with the medium-rate header over a clean
// channel; OFDM with the high-rate header over a clean channel; SC-FDE with
// the high-rate header over a three-path channel with noise; OFDM with the
// medium-rate header over the same channel.  The enable is high one clock in
// eight, with random extra gaps.  Each phase runs until six data blocks have
// been equalised and then checks: no bit errors, four bits per demapped
// symbol and 1024 per block, the detected header rate, at least one frame
// found, no underflow or overrun, and that the transmitter's I output
// during the preamble is the plain +/-AMP chip stream with Q at zero.
module tb_sc_ofdm_trx;
  import fd_pkg::*;

  localparam int NTAPS = 16;

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
  int pre_bad = 0, pre_seen = 0;
  bit in_pre = 0;

  always #5 clk = ~clk;

  // enable: one clock in eight, sometimes one in nine or ten
  initial begin
    forever begin
      repeat (7 + $urandom_range(0, 2)) @(posedge clk);
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

  // preamble samples on I must be +/-8192 and Q zero, from frame_mark to ces_mark
  always @(posedge clk) begin
    if (ce && tx_active) begin
      if (tx_frame_mark) in_pre = 1;
      if (tx_ces_mark) in_pre = 0;
      if (in_pre) begin
        pre_seen++;
        if (!(tx_sample.re == 16'sd8192 || tx_sample.re == -16'sd8192) || tx_sample.im != 0) pre_bad++;
      end
    end
  end

  task automatic check(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic phase(input string name, input logic m, input rate_e r, input bit multipath);
    int frames_seen;
    rst  <= 1'b1;
    run  <= 1'b0;
    mode <= m;
    hdr_rate <= r;
    foreach (taps[i]) taps[i] = '0;
    if (multipath) begin
      taps[0] = 16'sd30000;
      taps[1] = 16'sd4000;
      taps[3] = -16'sd3000;
      sigma     <= 16'd200 + 16'($urandom_range(0, 100));
      threshold <= -16'sd32;
    end else begin
      taps[0] = 16'sd32767;
      sigma     <= '0;
      threshold <= -16'sd64;
    end
    pre_bad  = 0;
    pre_seen = 0;
    repeat (20) @(posedge clk);
    rst <= 1'b0;
    run <= 1'b1;
    wait (rx_blocks >= 6);
    repeat (20) @(posedge clk);
    frames_seen = rx_frames;
    $display("%s: frames %0d blocks %0d bits %0d errors %0d", name, rx_frames, rx_blocks, rx_bits, bit_errors);
    check({name, " bit errors"}, bit_errors == 0);
    check({name, " bits per block"}, rx_bits == rx_blocks * 1024);
    check({name, " frames found"}, frames_seen >= 2);
    check({name, " detected rate"}, rx_rate == r);
    check({name, " no underflow"}, !tx_underflow);
    check({name, " no overrun"}, !rx_overrun);
    check({name, " preamble levels"}, pre_seen > 0 && pre_bad == 0);
    run <= 1'b0;
  endtask

  initial begin
    foreach (taps[i]) taps[i] = '0;
    phase("sc medium clean",     1'b0, RATE_MEDIUM, 1'b0);
    phase("ofdm high clean",     1'b1, RATE_HIGH,   1'b0);
    phase("sc high multipath",   1'b0, RATE_HIGH,   1'b1);
    phase("ofdm medium multipath", 1'b1, RATE_MEDIUM, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog: blocks %0d frames %0d", rx_blocks, rx_frames);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
