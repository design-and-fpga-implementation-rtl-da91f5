// tb_mp_channel -- loads a random tap set, a sparse two-path tap set and a
// high-gain tap set that drives the output into saturation, and compares
// every output with a direct FIR sum over the enabled input samples,
// computed here in Q1.15 with saturation.
module tb_mp_channel;
  import fd_pkg::*;

  localparam int NTAPS = 16;
  localparam int T     = 3000;

  logic clk = 0, rst = 1, ce = 0;
  sample_t x = '0, y;
  sample_t taps [NTAPS];
  int checks = 0, failures = 0, sats = 0;
  int hist [T];
  int nh = 0;
  int expv = 0;

  always #5 clk = ~clk;

  mp_channel #(.NTAPS(NTAPS)) dut (.clk(clk), .rst(rst), .ce(ce), .x(x), .taps(taps), .y(y));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc;
    int xv;
    for (int i = 0; i < NTAPS; i++) taps[i] = '0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      if (t % 1000 == 0) begin
        for (int i = 0; i < NTAPS; i++) begin
          if (t == 1000)      taps[i] = (i == 0) ? 16'sd23170 : (i == 5) ? -16'sd11585 : '0;
          else if (t == 2000) taps[i] = 16'sd20000;   // gain far above one: saturates
          else                taps[i] = sample_t'($signed($urandom_range(0, 8191)) - 4096);
        end
      end
      xv = $signed($urandom_range(0, 65535)) - 32768;
      ce <= ($urandom_range(0, 5) != 0);
      x  <= sample_t'(xv);
      @(posedge clk);
      #1;
      if (ce) begin
        hist[nh++] = xv;
        acc = 0;
        for (int i = 0; i < NTAPS; i++)
          if (nh - 1 - i >= 0) acc += longint'(taps[i]) * longint'(hist[nh-1-i]);
        acc = acc >>> 15;
        if (acc > 32767 || acc < -32768) sats++;
        expv = (acc > 32767) ? 32767 : (acc < -32768) ? -32768 : int'(acc);
      end
      checks++;
      if (int'(y) != expv) begin
        failures++;
        if (failures < 10) $display("t=%0d y=%0d exp %0d", t, y, expv);
      end
    end
    checks++;
    if (sats == 0) begin
      failures++;
      $display("saturation never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
