// tb_double_correlator -- checks both lag-128 correlations against a
// reference model of c1(k) = r(k) r(k-128) and c2(k) = c1(k) c1(k-128) in
// Q1.15 with saturation, on random samples (including -1.0) with gaps in the
// enable.  Also checks that a sign flip of the Golay peaks gives a negative
// c2 peak.
module tb_double_correlator;
  import fd_pkg::*;

  localparam int T   = 1200;
  localparam int LAG = 128;

  logic clk = 0, rst = 1, ce = 0;
  sample_t r = '0, c1, c2;
  int checks = 0, failures = 0;
  int rs [T];
  int c1e [T];

  always #5 clk = ~clk;

  double_correlator dut (.clk(clk), .rst(rst), .ce(ce), .r(r), .c1(c1), .c2(c2));

  function automatic int qmul(int a, int b);
    longint p;
    p = (longint'(a) * longint'(b)) >>> 15;
    if (p > 32767) p = 32767;
    if (p < -32768) p = -32768;
    return int'(p);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e1, e2;
    bit neg_seen;
    neg_seen = 0;
    for (int t = 0; t < T; t++) begin
      if (t < 600)                 rs[t] = $signed($urandom_range(0, 65535)) - 32768;
      else if (t % LAG == 0)       rs[t] = ((t / LAG) == 7) ? -20000 : 20000;  // one sign flip
      else                         rs[t] = $urandom_range(0, 200) - 100;
      if (t == 5) rs[t] = -32768;
      if (t == 5 + LAG) rs[t] = -32768;
    end
    for (int t = 0; t < T; t++) c1e[t] = (t >= LAG) ? qmul(rs[t], rs[t-LAG]) : 0;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      while ($urandom_range(0, 4) == 0) begin
        ce <= 0;
        r  <= sample_t'($urandom);
        @(posedge clk);
      end
      ce <= 1;
      r  <= sample_t'(rs[t]);
      @(posedge clk);
      #1;
      e1 = c1e[t];
      e2 = (t >= 1 + LAG) ? qmul(c1e[t-1], c1e[t-1-LAG]) : 0;
      checks++;
      if (c1 != sample_t'(e1) || c2 != sample_t'(e2)) begin
        failures++;
        if (failures < 10) $display("t=%0d c1=%0d exp %0d c2=%0d exp %0d", t, c1, e1, c2, e2);
      end
      if (t > 600 && c2 < -1000) neg_seen = 1;
    end
    checks++;
    if (!neg_seen) begin
      failures++;
      $display("no negative peak after the sign flip");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
