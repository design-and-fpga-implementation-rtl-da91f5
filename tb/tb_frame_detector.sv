// tb_frame_detector -- end-to-end test of the detector on a generated
// stream of four frames (medium, high, medium, high rate) separated by idle
// noise, with small additive noise everywhere and gaps in the enable.
// Checks, per enable, that data_out is the input delayed by DLY enables;
// that the first negative peak (sfd_det) comes LAT enables after the end of
// the SFD word that causes it; that ces_start falls exactly on the first CES
// sample of each frame and reports its rate; that fft_start marks the CES
// halves and the first sample after every cyclic prefix; and that no
// trigger happens anywhere else.
module tb_frame_detector;
  import fd_pkg::*;

  localparam int DLY     = 16;
  localparam int NUM_BLK = 4;
  localparam int LAT     = 11;
  localparam int AMP     = 8192;
  localparam int NFR     = 4;
  localparam int IDLE    = 300;
  localparam int FLEN    = SYNC_LEN + SFD_LEN + CES_LEN + NUM_BLK * BLK_LEN;
  localparam int T       = IDLE + NFR * (FLEN + IDLE) + 100;

  logic clk = 0, rst = 1, ce = 0;
  sample_t x = '0, thr;
  logic signed [DW+GOLAY_M-1:0] ra, rb;
  sample_t c1, c2, data_out;
  logic det, sfd_det, ces_start, fft_start, blk_start, frame_end, busy;
  rate_e rate;
  logic [7:0] sym_idx;
  int checks = 0, failures = 0;
  int n_ces = 0, n_fft = 0, n_high = 0, n_med = 0;

  int xs [T];
  bit ces_at [T], fft_at [T], sfd_at [T];
  rate_e rate_at [T];

  always #5 clk = ~clk;

  frame_detector #(.DLY(DLY), .NUM_BLK(NUM_BLK)) dut (
    .clk(clk), .rst(rst), .ce(ce), .x(x), .threshold(thr),
    .ra(ra), .rb(rb), .c1(c1), .c2(c2), .det(det), .data_out(data_out),
    .sfd_det(sfd_det), .rate(rate), .ces_start(ces_start), .fft_start(fft_start),
    .blk_start(blk_start), .sym_idx(sym_idx), .frame_end(frame_end), .busy(busy)
  );

  function automatic int chip(bit c);
    return c ? AMP : -AMP;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, f0, ces0, sgn, lvl, e_first;
    rate_e rt;
    for (int t = 0; t < T; t++) begin
      xs[t] = 0; ces_at[t] = 0; fft_at[t] = 0; sfd_at[t] = 0; rate_at[t] = RATE_MEDIUM;
    end
    p = IDLE;
    for (int f = 0; f < NFR; f++) begin
      rt = (f % 2) ? RATE_HIGH : RATE_MEDIUM;
      f0 = p;
      for (int i = 0; i < SYNC_LEN; i++) xs[p++] = chip(a128_chip(i % GOLAY_N));
      for (int w = 0; w < 4; w++) begin
        sgn = (rt == RATE_MEDIUM) ? ((w % 2) ? -1 : 1) : ((w < 2) ? 1 : -1);
        for (int i = 0; i < GOLAY_N; i++) xs[p++] = sgn * chip(a128_chip(i));
      end
      // first negative peak: end of SFD word 2 (medium) or word 3 (high)
      e_first = f0 + SYNC_LEN + ((rt == RATE_MEDIUM) ? 2 : 3) * GOLAY_N - 1;
      sfd_at[e_first + LAT] = 1;
      ces0 = p;
      for (int i = 0; i < GOLAY_N; i++) xs[p++] = chip(a128_chip(i));
      for (int i = 0; i < GOLAY_N; i++) xs[p++] = chip(b128_chip(i));
      for (int i = 0; i < GOLAY_N; i++) xs[p++] = chip(a128_chip(i));
      for (int i = 0; i < GOLAY_N; i++) xs[p++] = -chip(b128_chip(i));
      for (int b = 0; b < NUM_BLK; b++) begin
        for (int i = 0; i < BLK_LEN; i++) begin
          lvl = $urandom_range(0, 3);
          xs[p++] = (2 * lvl - 3) * AMP / 3;
        end
        fft_at[ces0 + 512 + b * BLK_LEN + CP_LEN + DLY - 1] = 1;
      end
      // output-side enable index at which data_out carries sample i: i + DLY - 1
      ces_at[ces0 + DLY - 1] = 1;
      rate_at[ces0 + DLY - 1] = rt;
      fft_at[ces0 + DLY - 1] = 1;
      fft_at[ces0 + 256 + DLY - 1] = 1;
      p += IDLE;
    end
    for (int t = 0; t < T; t++) xs[t] += $urandom_range(0, 400) - 200;

    thr = -64;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int t = 0; t < T; t++) begin
      while ($urandom_range(0, 7) == 0) begin
        ce <= 0;
        x  <= sample_t'($urandom);
        @(posedge clk);
      end
      ce <= 1;
      x  <= sample_t'(xs[t]);
      @(posedge clk);
      #1;
      checks++;
      if (data_out != ((t >= DLY - 1) ? sample_t'(xs[t-DLY+1]) : sample_t'(0))) begin
        failures++;
        if (failures < 10) $display("t=%0d data_out=%0d", t, data_out);
      end
      checks++;
      if (sfd_det != sfd_at[t] || ces_start != ces_at[t] || fft_start != fft_at[t]) begin
        failures++;
        if (failures < 20) $display("t=%0d sfd=%0b/%0b ces=%0b/%0b fft=%0b/%0b", t,
                                    sfd_det, sfd_at[t], ces_start, ces_at[t], fft_start, fft_at[t]);
      end
      if (fft_start) n_fft++;
      if (ces_start) begin
        n_ces++;
        checks++;
        if (rate != rate_at[t]) begin
          failures++;
          $display("t=%0d rate %0d exp %0d", t, rate, rate_at[t]);
        end
        if (rate == RATE_HIGH) n_high++; else n_med++;
      end
    end
    checks++;
    if (n_ces != NFR || n_fft != NFR * (2 + NUM_BLK) || n_high != NFR / 2 || n_med != NFR / 2) begin
      failures++;
      $display("frames %0d fft windows %0d high %0d medium %0d", n_ces, n_fft, n_high, n_med);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
