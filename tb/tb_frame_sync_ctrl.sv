// tb_frame_sync_ctrl -- drives detection pulses for a medium-rate frame, a
// high-rate frame (with a stray pulse inside the frame that must be
// ignored), a high-rate frame whose second peak is one sample early and a
// medium-rate frame whose peak lasts two samples.  A reference model built
// from the frame layout gives, for every enable, the expected ces_start,
// fft_start, blk_start, frame_end and sfd_det pulses, the window number and
// the rate; all are compared on every enable.
module tb_frame_sync_ctrl;
  import fd_pkg::*;

  localparam int OFS_MED  = 261;
  localparam int OFS_HIGH = 133;
  localparam int NUM_BLK  = 4;
  localparam int T        = 9000;

  logic clk = 0, rst = 1, ce = 0, det = 0;
  logic sfd_det, ces_start, fft_start, blk_start, frame_end, busy;
  rate_e rate;
  logic [7:0] sym_idx;
  int checks = 0, failures = 0;
  int n_high = 0, n_med = 0;

  bit d_in [T];
  bit x_sfd [T], x_ces [T], x_fft [T], x_blk [T], x_end [T];
  int x_sym [T];
  rate_e x_rate [T];

  always #5 clk = ~clk;

  frame_sync_ctrl #(.OFS_MED(OFS_MED), .OFS_HIGH(OFS_HIGH), .NUM_BLK(NUM_BLK)) dut (
    .clk(clk), .rst(rst), .ce(ce), .det(det), .sfd_det(sfd_det), .rate(rate),
    .ces_start(ces_start), .fft_start(fft_start), .blk_start(blk_start),
    .sym_idx(sym_idx), .frame_end(frame_end), .busy(busy)
  );

  // One frame whose first peak is presented at enable t1.
  task automatic add_frame(int t1, rate_e rt);
    int e0, w;
    e0 = t1 + ((rt == RATE_HIGH) ? OFS_HIGH : OFS_MED);
    x_sfd[t1] = 1;
    x_ces[e0] = 1;
    x_fft[e0] = 1;        x_sym[e0] = 0;
    x_fft[e0 + 256] = 1;  x_sym[e0 + 256] = 1;
    for (int b = 0; b < NUM_BLK; b++) begin
      x_blk[e0 + 512 + b * BLK_LEN] = 1;
      w = e0 + 512 + b * BLK_LEN + CP_LEN;
      x_fft[w] = 1;
      x_sym[w] = 2 + b;
    end
    x_end[e0 + 512 + NUM_BLK * BLK_LEN] = 1;
    for (int t = e0; t < e0 + 2100 && t < T; t++) x_rate[t] = rt;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int sym_exp;
    for (int t = 0; t < T; t++) begin
      d_in[t] = 0; x_sfd[t] = 0; x_ces[t] = 0; x_fft[t] = 0; x_blk[t] = 0; x_end[t] = 0;
      x_sym[t] = -1; x_rate[t] = RATE_MEDIUM;
    end
    // Frame 1: medium rate, single peak.
    d_in[100] = 1;
    add_frame(100, RATE_MEDIUM);
    // Frame 2: high rate, peaks 128 apart, stray peak inside the CES.
    d_in[2200] = 1; d_in[2328] = 1; d_in[2500] = 1;
    add_frame(2200, RATE_HIGH);
    // Frame 3: high rate, second peak one sample early.
    d_in[4300] = 1; d_in[4427] = 1;
    add_frame(4300, RATE_HIGH);
    // Frame 4: medium rate, peak two samples wide.
    d_in[6400] = 1; d_in[6401] = 1;
    add_frame(6400, RATE_MEDIUM);

    repeat (2) @(posedge clk);
    rst <= 0;
    sym_exp = 0;
    for (int t = 0; t < T; t++) begin
      while ($urandom_range(0, 5) == 0) begin
        ce  <= 0;
        det <= 1'($urandom);
        @(posedge clk);
      end
      ce  <= 1;
      det <= d_in[t];
      @(posedge clk);
      #1;
      if (x_sym[t] >= 0) sym_exp = x_sym[t];
      checks++;
      if (sfd_det != x_sfd[t] || ces_start != x_ces[t] || fft_start != x_fft[t] ||
          blk_start != x_blk[t] || frame_end != x_end[t]) begin
        failures++;
        if (failures < 10)
          $display("t=%0d sfd=%0b/%0b ces=%0b/%0b fft=%0b/%0b blk=%0b/%0b end=%0b/%0b", t,
                   sfd_det, x_sfd[t], ces_start, x_ces[t], fft_start, x_fft[t],
                   blk_start, x_blk[t], frame_end, x_end[t]);
      end
      if (fft_start) begin
        checks++;
        if (sym_idx != 8'(sym_exp)) begin
          failures++;
          $display("t=%0d sym_idx=%0d exp %0d", t, sym_idx, sym_exp);
        end
      end
      if (ces_start) begin
        checks++;
        if (rate != x_rate[t]) begin
          failures++;
          $display("t=%0d rate=%0d exp %0d", t, rate, x_rate[t]);
        end
        if (rate == RATE_HIGH) n_high++; else n_med++;
      end
    end
    checks++;
    if (n_high != 2 || n_med != 2) begin
      failures++;
      $display("frames by rate: high %0d medium %0d", n_high, n_med);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
