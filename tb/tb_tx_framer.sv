// tb_tx_framer -- sends a medium-rate and a high-rate frame of 4 blocks,
// loading random block data in bursts at the clock rate while the framer
// sends at one sample per 4 clocks.  Every output sample is checked: the
// preamble against the frame layout, each block's cyclic prefix and body
// against the loaded data, the markers, and that no underflow occurs.  A
// third frame is started with no data, which must raise underflow.
module tb_tx_framer;
  import fd_pkg::*;

  localparam int NUM_BLK = 4;
  localparam int AMP     = 8192;
  localparam int CES0    = SYNC_LEN + SFD_LEN;
  localparam int PRE     = CES0 + CES_LEN;
  localparam int FLEN    = PRE + NUM_BLK * BLK_LEN;

  logic clk = 0, rst = 1, ce = 0, start = 0;
  rate_e rate = RATE_MEDIUM;
  logic in_valid = 0, in_ready, out_active, frame_mark, ces_mark, underflow, blk_sent, busy;
  int n_sent = 0;
  always @(posedge clk) if (blk_sent) n_sent++;
  csample_t in_data = '0, out;
  int checks = 0, failures = 0;
  int dre [2][NUM_BLK][FFT_N], dim [2][NUM_BLK][FFT_N];
  int ce_div = 0;

  always #5 clk = ~clk;
  always @(posedge clk) begin
    ce_div <= (ce_div + 1) % 4;
    ce     <= (ce_div == 3);
  end

  tx_framer #(.NUM_BLK(NUM_BLK), .AMP(AMP)) dut (
    .clk(clk), .rst(rst), .ce(ce), .start(start), .rate(rate), .in_valid(in_valid),
    .in_data(in_data), .in_ready(in_ready), .out(out), .out_active(out_active),
    .frame_mark(frame_mark), .ces_mark(ces_mark), .underflow(underflow), .blk_sent(blk_sent), .busy(busy)
  );

  function automatic int chip(bit c);
    return c ? AMP : -AMP;
  endfunction

  function automatic int exp_pre(int p, rate_e rt);
    int k, w, s;
    if (p < SYNC_LEN) return chip(a128_chip(p % GOLAY_N));
    if (p < CES0) begin
      k = p - SYNC_LEN; w = k / GOLAY_N;
      s = (rt == RATE_MEDIUM) ? ((w % 2) ? -1 : 1) : ((w < 2) ? 1 : -1);
      return s * chip(a128_chip(k % GOLAY_N));
    end
    k = p - CES0; w = k / GOLAY_N;
    case (w)
      0, 2:    return chip(a128_chip(k % GOLAY_N));
      1:       return chip(b128_chip(k % GOLAY_N));
      default: return -chip(b128_chip(k % GOLAY_N));
    endcase
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Block source: loads all blocks of both frames, in bursts.
  initial begin
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < NUM_BLK; b++)
        for (int n = 0; n < FFT_N; n++) begin
          dre[f][b][n] = $signed($urandom_range(0, 20000)) - 10000;
          dim[f][b][n] = $signed($urandom_range(0, 20000)) - 10000;
        end
    wait (!rst);
    for (int f = 0; f < 2; f++)
      for (int b = 0; b < NUM_BLK; b++)
        for (int n = 0; n < FFT_N; n++) begin
          in_valid   <= 1;
          in_data.re <= sample_t'(dre[f][b][n]);
          in_data.im <= sample_t'(dim[f][b][n]);
          @(posedge clk);
          while (!in_ready) @(posedge clk);
          if ($urandom_range(0, 9) == 0) begin
            in_valid <= 0;
            repeat ($urandom_range(1, 20)) @(posedge clk);
          end
        end
    in_valid <= 0;
  end

  initial begin
    int ere, eim, p, b, q, j;
    repeat (4) @(posedge clk);
    rst <= 0;
    repeat (50) @(posedge clk);
    for (int f = 0; f < 2; f++) begin
      rate = f ? RATE_HIGH : RATE_MEDIUM;
      @(posedge clk iff ce);
      start <= 1;
      @(posedge clk iff ce);
      start <= 0;
      @(posedge clk iff ce);
      for (int n = 0; n < FLEN; n++) begin
        #1;
        if (n < PRE) begin
          ere = exp_pre(n, rate);
          eim = 0;
        end else begin
          p = n - PRE; b = p / BLK_LEN; q = p % BLK_LEN;
          j = (q < CP_LEN) ? q + FFT_N - CP_LEN : q - CP_LEN;
          ere = dre[f][b][j];
          eim = dim[f][b][j];
        end
        checks++;
        if (!out_active || int'(out.re) != ere || int'(out.im) != eim ||
            frame_mark != (n == 0) || ces_mark != (n == CES0)) begin
          failures++;
          if (failures < 10) $display("frame %0d sample %0d: (%0d,%0d) exp (%0d,%0d) act %0b", f, n,
                                      int'(out.re), int'(out.im), ere, eim, out_active);
        end
        @(posedge clk iff ce);
      end
      #1;
      checks++;
      if (out_active || underflow) begin
        failures++;
        $display("frame %0d: active %0b underflow %0b after the frame", f, out_active, underflow);
      end
    end
    // a frame without data must underflow
    @(posedge clk iff ce);
    start <= 1;
    @(posedge clk iff ce);
    start <= 0;
    repeat (PRE + 10) @(posedge clk iff ce);
    #1;
    checks++;
    if (n_sent < 2 * NUM_BLK) begin
      failures++;
      $display("blk_sent pulsed %0d times", n_sent);
    end
    checks++;
    if (!underflow) begin
      failures++;
      $display("no underflow without data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
