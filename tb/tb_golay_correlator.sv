// tb_golay_correlator -- self-checking test of the Efficient Golay Correlator.
//
// Drives random samples, then repeated a128 and b128 words, with random
// gaps in the sample enable.  Every enabled output is compared with a direct
// 128-tap correlation computed here from the Golay pair, 7 enables late.
// Also checks the complementary property of the pair (Ra + Rb = 2N delta)
// and the 128 x amplitude peak at the end of an a128 word.
module tb_golay_correlator;
  import fd_pkg::*;

  localparam int T   = 1400;
  localparam int LAT = 7;
  localparam int AMP = 1000;

  logic clk = 0, rst = 1, ce = 0;
  sample_t x = '0;
  logic signed [DW+GOLAY_M-1:0] ra, rb;
  int checks = 0, failures = 0, peaks = 0;
  int xs [T];

  always #5 clk = ~clk;

  golay_correlator dut (.clk(clk), .rst(rst), .ce(ce), .x(x), .ra(ra), .rb(rb));

  function automatic int hv(logic [GOLAY_N-1:0] h, int n);
    return h[n] ? 1 : -1;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, acc;
    // Complementary property of the pair the correlator is built from.
    for (int s = 0; s < GOLAY_N; s++) begin
      acc = 0;
      for (int n = 0; n + s < GOLAY_N; n++)
        acc += hv(H_A, n) * hv(H_A, n + s) + hv(H_B, n) * hv(H_B, n + s);
      checks++;
      if (acc != ((s == 0) ? 2 * GOLAY_N : 0)) begin
        failures++;
        $display("complementary property fails at shift %0d: %0d", s, acc);
      end
    end
    for (int t = 0; t < T; t++) begin
      if (t < 300)       xs[t] = $signed($urandom_range(0, 65535)) - 32768;
      else if (t < 684)  xs[t] = a128_chip((t - 300) % GOLAY_N) ? AMP : -AMP;
      else if (t < 812)  xs[t] = b128_chip(t - 684) ? AMP : -AMP;
      else if (t < 1200) xs[t] = $urandom_range(0, 1) ? AMP : -AMP;
      else               xs[t] = 0;
    end
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      while ($urandom_range(0, 3) == 0) begin
        ce <= 0;
        x  <= sample_t'($urandom);
        @(posedge clk);
      end
      ce <= 1;
      x  <= sample_t'(xs[t]);
      @(posedge clk);
      #1;
      ea = 0;
      eb = 0;
      for (int n = 0; n < GOLAY_N; n++) begin
        if (t - LAT + 1 - n >= 0) begin
          ea += hv(H_A, n) * xs[t-LAT+1-n];
          eb += hv(H_B, n) * xs[t-LAT+1-n];
        end
      end
      checks++;
      if (ra != ea || rb != eb) begin
        failures++;
        if (failures < 10) $display("t=%0d ra=%0d exp %0d  rb=%0d exp %0d", t, ra, ea, rb, eb);
      end
      // End of an a128 word entered LAT-1 enables ago: full peak.
      if (t - LAT + 1 >= 300 + GOLAY_N - 1 && t - LAT + 1 < 684 && (t - LAT + 2 - 300) % GOLAY_N == 0) begin
        checks++;
        peaks++;
        if (ra != GOLAY_N * AMP) begin
          failures++;
          $display("peak missing at t=%0d: %0d", t, ra);
        end
      end
    end
    checks++;
    if (peaks != 3) begin
      failures++;
      $display("expected 3 peaks, saw %0d", peaks);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
