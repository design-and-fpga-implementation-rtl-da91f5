// tb_frame_rom -- plays the ROM through two and a half frame pairs and
// checks every preamble sample against the frame layout (SYNC, the SFD sign
// pattern of the frame's rate, CES a128 b128 a128 -b128), the data samples
// for legal 16-QAM axis levels and for the cyclic prefix being a copy of
// the block's last 32 samples, the idle gap for zeros, and the CES and
// frame-start markers and the rate output.
module tb_frame_rom;
  import fd_pkg::*;

  localparam int NUM_BLK = 4;
  localparam int GAP     = 128;
  localparam int AMP     = 8192;
  localparam int CES0    = SYNC_LEN + SFD_LEN;
  localparam int DATA0   = CES0 + CES_LEN;
  localparam int FLEN    = DATA0 + NUM_BLK * BLK_LEN + GAP;

  logic clk = 0, rst = 1, ce = 0;
  sample_t dout;
  logic ces_mark, frame_start;
  rate_e rate;
  int checks = 0, failures = 0, n_ces = 0, n_high = 0;
  int blk_buf [BLK_LEN];

  always #5 clk = ~clk;

  frame_rom #(.NUM_BLK(NUM_BLK), .GAP(GAP), .AMP(AMP)) dut (
    .clk(clk), .rst(rst), .ce(ce), .dout(dout), .ces_mark(ces_mark),
    .frame_start(frame_start), .rate(rate)
  );

  task automatic expect_eq(int got, int want, int n, string what);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10) $display("sample %0d (%s): %0d, expected %0d", n, what, got, want);
    end
  endtask

  function automatic int chip(bit c);
    return c ? AMP : -AMP;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int i, fr, k, w, sgn, v, b, p;
    rate_e rt;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 5 * FLEN; n++) begin
      while ($urandom_range(0, 5) == 0) begin
        ce <= 0;
        @(posedge clk);
      end
      ce <= 1;
      @(posedge clk);
      #1;
      i  = n % FLEN;
      fr = (n / FLEN) % 2;
      rt = fr ? RATE_HIGH : RATE_MEDIUM;
      v  = int'(dout);
      expect_eq(int'(rate), int'(rt), n, "rate");
      expect_eq(int'(ces_mark), int'(i == CES0), n, "ces_mark");
      expect_eq(int'(frame_start), int'(i == 0), n, "frame_start");
      if (ces_mark) begin
        n_ces++;
        if (rate == RATE_HIGH) n_high++;
      end
      if (i < SYNC_LEN) begin
        expect_eq(v, chip(a128_chip(i % GOLAY_N)), n, "sync");
      end else if (i < CES0) begin
        k = i - SYNC_LEN;
        w = k / GOLAY_N;
        sgn = (rt == RATE_MEDIUM) ? ((w % 2) ? -1 : 1) : ((w < 2) ? 1 : -1);
        expect_eq(v, sgn * chip(a128_chip(k % GOLAY_N)), n, "sfd");
      end else if (i < DATA0) begin
        k = i - CES0;
        case (k / GOLAY_N)
          0, 2: expect_eq(v, chip(a128_chip(k % GOLAY_N)), n, "ces a");
          1:    expect_eq(v, chip(b128_chip(k % GOLAY_N)), n, "ces b");
          default: expect_eq(v, -chip(b128_chip(k % GOLAY_N)), n, "ces -b");
        endcase
      end else if (i < DATA0 + NUM_BLK * BLK_LEN) begin
        k = i - DATA0;
        b = k / BLK_LEN;
        p = k % BLK_LEN;
        blk_buf[p] = v;
        checks++;
        if (!(v == AMP || v == -AMP || v == AMP / 3 || v == -(AMP / 3))) begin
          failures++;
          $display("sample %0d: data level %0d", n, v);
        end
        if (p == BLK_LEN - 1)
          for (int c = 0; c < CP_LEN; c++)
            expect_eq(blk_buf[c], blk_buf[c + FFT_N], n, "cyclic prefix");
      end else begin
        expect_eq(v, 0, n, "gap");
      end
    end
    checks++;
    if (n_ces != 5 || n_high != 2) begin
      failures++;
      $display("CES markers %0d, high-rate %0d", n_ces, n_high);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
