// tb_fde_equalizer -- drives the equaliser with spectra computed here in
// double precision.  For each of three frames a random three-tap complex
// channel h is drawn (main tap 0.8, the others small, so |H| stays above
// 0.4); the CES spectra Ya = 512 H Xa and Yb = 512 H Xb and two blocks of
// random 16-QAM bins Y = H S are sent in FFT order with random gaps in
// in_valid.  Every equalised bin must return S within 4 LSB, with the bin
// index and tag passed through and no output for the CES bins.  A fourth
// frame with an all-zero channel checks that a zero estimate gives a zero
// output rather than an overflow.
module tb_fde_equalizer;
  import fd_pkg::*;

  localparam int  N  = 256;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic in_valid = 0, out_valid;
  csample_t in_data = '0, out_data;
  logic [7:0] in_idx = '0, in_tag = '0, out_idx, out_tag;
  int checks = 0, failures = 0, outs = 0;
  real xa_r [N], xa_i [N], xb_r [N], xb_i [N];
  real hr [N], hi [N];
  int  s_re [2][N], s_im [2][N];
  int  exp_tag = 2, exp_idx = 0;
  bit  zero_frame = 0;

  always #5 clk = ~clk;

  fde_equalizer dut (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .in_idx(in_idx), .in_tag(in_tag),
    .out_valid(out_valid), .out_data(out_data), .out_idx(out_idx), .out_tag(out_tag)
  );

  function automatic int lvl();
    int v = $urandom_range(0, 3);
    return (2 * v - 3) * QAM_UNIT;
  endfunction

  function automatic sample_t rnd(real v);
    return sample_t'($rtoi($floor(v + 0.5)));
  endfunction

  always @(posedge clk) begin
    if (out_valid) begin
      int er, ei;
      outs++;
      checks++;
      er = zero_frame ? 0 : s_re[out_tag - 2][out_idx];
      ei = zero_frame ? 0 : s_im[out_tag - 2][out_idx];
      if (out_tag != 8'(exp_tag) || out_idx != 8'(exp_idx) ||
          (out_data.re - er) > 4 || (er - out_data.re) > 4 ||
          (out_data.im - ei) > 4 || (ei - out_data.im) > 4) begin
        failures++;
        if (failures < 10)
          $display("tag %0d bin %0d: (%0d,%0d) exp (%0d,%0d)", out_tag, out_idx, int'(out_data.re), int'(out_data.im), er, ei);
      end
      if (exp_idx == N - 1) begin
        exp_idx = 0;
        exp_tag = (exp_tag == 3) ? 2 : 3;
      end else exp_idx++;
    end
  end

  task automatic send(input int tag, input real yr [N], input real yi [N]);
    for (int k = 0; k < N; k++) begin
      while ($urandom_range(0, 3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
      in_valid   <= 1'b1;
      in_tag     <= 8'(tag);
      in_idx     <= 8'(k);
      in_data.re <= rnd(yr[k]);
      in_data.im <= rnd(yi[k]);
      @(posedge clk);
    end
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    real yr [N], yi [N];
    for (int k = 0; k < N; k++) begin
      xa_r[k] = 0; xa_i[k] = 0; xb_r[k] = 0; xb_i[k] = 0;
      for (int n = 0; n < N; n++) begin
        int ca, cb;
        ca = (n < 128) ? (a128_chip(n) ? 1 : -1) : (b128_chip(n - 128) ? 1 : -1);
        cb = (n < 128) ? ca : -ca;
        xa_r[k] += ca * $cos(2*PI*k*n/N);  xa_i[k] -= ca * $sin(2*PI*k*n/N);
        xb_r[k] += cb * $cos(2*PI*k*n/N);  xb_i[k] -= cb * $sin(2*PI*k*n/N);
      end
      // complementary property used by the estimator
      checks++;
      if ((xa_r[k]**2 + xa_i[k]**2 + xb_r[k]**2 + xb_i[k]**2 - 512.0) > 1e-6 ||
          (xa_r[k]**2 + xa_i[k]**2 + xb_r[k]**2 + xb_i[k]**2 - 512.0) < -1e-6) failures++;
    end
    repeat (4) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 4; f++) begin
      real t_r [3], t_i [3];
      zero_frame = (f == 3);
      t_r[0] = 0.8; t_i[0] = 0.0;
      for (int l = 1; l < 3; l++) begin
        int ur, ui;
        ur = $urandom_range(0, 2000);
        ui = $urandom_range(0, 2000);
        t_r[l] = (ur - 1000) / 7100.0;
        t_i[l] = (ui - 1000) / 7100.0;
      end
      if (zero_frame) begin
        t_r = '{0.0, 0.0, 0.0};
        t_i = '{0.0, 0.0, 0.0};
      end
      for (int k = 0; k < N; k++) begin
        hr[k] = 0; hi[k] = 0;
        for (int l = 0; l < 3; l++) begin
          hr[k] += t_r[l] * $cos(2*PI*k*l/N) + t_i[l] * $sin(2*PI*k*l/N);
          hi[k] += t_i[l] * $cos(2*PI*k*l/N) - t_r[l] * $sin(2*PI*k*l/N);
        end
      end
      for (int k = 0; k < N; k++) begin
        yr[k] = 512.0 * (hr[k] * xa_r[k] - hi[k] * xa_i[k]);
        yi[k] = 512.0 * (hr[k] * xa_i[k] + hi[k] * xa_r[k]);
      end
      send(0, yr, yi);
      for (int k = 0; k < N; k++) begin
        yr[k] = 512.0 * (hr[k] * xb_r[k] - hi[k] * xb_i[k]);
        yi[k] = 512.0 * (hr[k] * xb_i[k] + hi[k] * xb_r[k]);
      end
      send(1, yr, yi);
      for (int b = 0; b < 2; b++) begin
        for (int k = 0; k < N; k++) begin
          s_re[b][k] = lvl();
          s_im[b][k] = lvl();
          yr[k] = hr[k] * s_re[b][k] - hi[k] * s_im[b][k];
          yi[k] = hr[k] * s_im[b][k] + hi[k] * s_re[b][k];
        end
        send(2 + b, yr, yi);
      end
      repeat (3) @(posedge clk);
    end
    checks++;
    if (outs != 4 * 2 * N) begin
      failures++;
      $display("outputs %0d, expected %0d", outs, 4 * 2 * N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
