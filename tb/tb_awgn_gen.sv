// tb_awgn_gen -- checks the noise source two ways: bit-exactly against a
// model of the twelve xorshift32 lanes written here, and statistically (mean
// near zero, standard deviation within 3 % of sigma, no sample beyond
// 6 sigma) over 40000 samples.  Also checks the saturation of x + noise at
// full scale and that sigma = 0 passes the input unchanged.
module tb_awgn_gen;
  import fd_pkg::*;

  localparam logic [31:0] SEED = 32'h1234_5678;
  localparam int N = 40000;

  logic clk = 0, rst = 1, ce = 0;
  sample_t x = '0, y, noise;
  logic [15:0] sigma = '0;
  int checks = 0, failures = 0;
  logic [31:0] st [12];
  int exp_y = 0, exp_n = 0;

  always #5 clk = ~clk;

  awgn_gen #(.SEED(SEED)) dut (.clk(clk), .rst(rst), .ce(ce), .x(x), .sigma(sigma), .y(y), .noise(noise));

  function automatic int sat16(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  // Advance the model by one sample and return the noise for this sigma.
  function automatic longint model_step(int sg);
    longint s;
    s = 0;
    for (int l = 0; l < 12; l++) begin
      s += longint'($signed(st[l][31:16]));
      st[l] = st[l] ^ (st[l] << 13);
      st[l] = st[l] ^ (st[l] >> 17);
      st[l] = st[l] ^ (st[l] << 5);
    end
    return (s * sg) >>> 16;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real sum, sum2, mean, sd;
    int xv, sg, maxabs;
    longint nz;
    for (int l = 0; l < 12; l++) st[l] = SEED ^ (32'(l + 1) * 32'h9E37_79B9);
    repeat (2) @(posedge clk);
    rst <= 0;
    sum = 0; sum2 = 0; maxabs = 0;
    for (int n = 0; n < N + 2000; n++) begin
      if (n < N)           begin sg = 3000;  xv = 0; end
      else if (n < N + 500) begin sg = 20000; xv = (n % 2) ? 32000 : -32000; end
      else if (n < N + 1000) begin sg = 0; xv = $signed($urandom_range(0, 65535)) - 32768; end
      else                 begin sg = $urandom_range(0, 65535); xv = $signed($urandom_range(0, 65535)) - 32768; end
      ce    <= ($urandom_range(0, 5) != 0);
      x     <= sample_t'(xv);
      sigma <= 16'(sg);
      @(posedge clk);
      #1;
      if (ce) begin
        nz    = model_step(sg);
        exp_n = sat16(nz);
        exp_y = sat16(longint'(xv) + nz);
        if (n < N) begin
          sum  += real'(nz);
          sum2 += real'(nz) * real'(nz);
          if ((nz < 0 ? -nz : nz) > maxabs) maxabs = int'(nz < 0 ? -nz : nz);
        end
      end else if (n < N) begin
        n--;   // keep N enabled samples for the statistics
      end
      checks++;
      if (int'(y) != exp_y || int'(noise) != exp_n) begin
        failures++;
        if (failures < 10) $display("n=%0d y=%0d exp %0d noise=%0d exp %0d", n, y, exp_y, noise, exp_n);
      end
    end
    mean = sum / N;
    sd   = $sqrt(sum2 / N - mean * mean);
    $display("noise mean %f sd %f (sigma 3000) max |n| %0d", mean, sd, maxabs);
    checks++;
    if (mean > 60.0 || mean < -60.0 || sd < 2910.0 || sd > 3090.0 || maxabs > 18000) begin
      failures++;
      $display("noise statistics out of range");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
