// tb_fft_core -- checks the forward and inverse transforms against a
// double-precision DFT computed here.  Three windows of random complex
// samples (the third loaded back to back with the second) go through a
// forward core, and the forward results go through an inverse core, whose
// output must return the original samples.  Every output bin must be within
// 12 LSB of the exact scaled DFT and every round-trip sample within 20 LSB
// of the original (two transforms of rounding); tags, indices and out_last
// are checked too.
module tb_fft_core;
  import fd_pkg::*;

  localparam int N   = 256;
  localparam int NW  = 3;
  localparam real PI = 3.14159265358979;

  logic clk = 0, rst = 1;
  logic in_valid = 0, in_ready, f_valid, f_last, i_ready, i_valid, i_last;
  csample_t in_data = '0, f_data, i_data;
  logic [7:0] in_tag = '0, f_tag, i_tag;
  logic [7:0] f_idx, i_idx;
  int checks = 0, failures = 0;
  real xr [NW][N], xi [NW][N];
  real maxerr_f = 0, maxerr_i = 0;
  int fw = 0, iw = 0;

  always #5 clk = ~clk;

  fft_core #(.INVERSE(1'b0)) u_fwd (
    .clk(clk), .rst(rst), .in_valid(in_valid), .in_data(in_data), .in_tag(in_tag), .in_ready(in_ready),
    .out_valid(f_valid), .out_data(f_data), .out_idx(f_idx), .out_tag(f_tag), .out_last(f_last)
  );

  fft_core #(.INVERSE(1'b1)) u_inv (
    .clk(clk), .rst(rst), .in_valid(f_valid), .in_data(f_data), .in_tag(f_tag), .in_ready(i_ready),
    .out_valid(i_valid), .out_data(i_data), .out_idx(i_idx), .out_tag(i_tag), .out_last(i_last)
  );

  // forward results: DFT / 16
  always @(posedge clk) begin
    if (!rst && f_valid) begin
      real er, ei, d;
      er = 0; ei = 0;
      for (int n = 0; n < N; n++) begin
        er += xr[fw][n] * $cos(2*PI*n*f_idx/N) + xi[fw][n] * $sin(2*PI*n*f_idx/N);
        ei += xi[fw][n] * $cos(2*PI*n*f_idx/N) - xr[fw][n] * $sin(2*PI*n*f_idx/N);
      end
      er /= 16.0; ei /= 16.0;
      d = (f_data.re - er) * (f_data.re - er) + (f_data.im - ei) * (f_data.im - ei);
      d = $sqrt(d);
      if (d > maxerr_f) maxerr_f = d;
      checks++;
      if (d > 12.0 || f_tag != 8'(10 + fw) || f_idx != 8'(f_idx)) begin
        failures++;
        if (failures < 10) $display("fwd window %0d bin %0d: (%0d,%0d) exp (%f,%f)", fw, f_idx, int'(f_data.re), int'(f_data.im), er, ei);
      end
      if (f_last) begin
        checks++;
        if (f_idx != 8'(N - 1)) failures++;
        fw++;
      end
    end
    if (!rst && i_valid) begin
      real d;
      d = $sqrt((i_data.re - xr[iw][i_idx]) ** 2 + (i_data.im - xi[iw][i_idx]) ** 2);
      if (d > maxerr_i) maxerr_i = d;
      checks++;
      if (d > 20.0 || i_tag != 8'(10 + iw)) begin
        failures++;
        if (failures < 10) $display("inv window %0d n %0d: (%0d,%0d) exp (%f,%f)", iw, i_idx, i_data.re, i_data.im, xr[iw][i_idx], xi[iw][i_idx]);
      end
      if (i_last) iw++;
    end
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int w = 0; w < NW; w++)
      for (int n = 0; n < N; n++) begin
        xr[w][n] = $itor($signed($urandom_range(0, 16000)) - 8000);
        xi[w][n] = $itor($signed($urandom_range(0, 16000)) - 8000);
        if (w == 0 && n < 4) begin xr[w][n] = 8191; xi[w][n] = -8192; end
      end
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int w = 0; w < NW; w++) begin
      for (int n = 0; n < N; n++) begin
        in_valid   <= 1;
        in_data.re <= sample_t'($rtoi(xr[w][n]));
        in_data.im <= sample_t'($rtoi(xi[w][n]));
        in_tag     <= 8'(10 + w);
        // the sample is taken at the first edge where in_ready is high
        @(posedge clk iff in_ready);
        // slower than the clock for the first window only
        if (w == 0) begin
          in_valid <= 0;
          repeat (6) @(posedge clk);
        end
      end
    end
    in_valid <= 0;
    wait (iw == NW);
    $display("max error forward %f inverse %f LSB", maxerr_f, maxerr_i);
    checks++;
    if (fw != NW) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
