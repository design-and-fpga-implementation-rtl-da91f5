// tb_qam16_demapper -- feeds every 16-QAM point with random noise inside the
// decision region (up to 0.9 UNIT) and on the boundaries, and checks the
// recovered Gray bits.
module tb_qam16_demapper;
  import fd_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [3:0] bits;
  csample_t sym = '0;
  int checks = 0, failures = 0;
  int lv [4] = '{-3, -1, 3, 1};

  always #5 clk = ~clk;

  qam16_demapper dut (.clk(clk), .rst(rst), .in_valid(in_valid), .sym(sym), .out_valid(out_valid), .bits(bits));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ni, nq;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int n = 0; n < 2000; n++) begin
      int b;
      b  = $urandom_range(0, 15);
      ni = $urandom_range(0, 2 * QAM_UNIT * 9 / 10) - QAM_UNIT * 9 / 10;
      nq = $urandom_range(0, 2 * QAM_UNIT * 9 / 10) - QAM_UNIT * 9 / 10;
      in_valid <= 1;
      sym.re   <= sample_t'(lv[b >> 2] * QAM_UNIT + ni);
      sym.im   <= sample_t'(lv[b & 3] * QAM_UNIT + nq);
      @(posedge clk);
      #1;
      checks++;
      if (!out_valid || bits != 4'(b)) begin
        failures++;
        if (failures < 10) $display("n=%0d sent %0d got %0d", n, b, bits);
      end
    end
    // boundaries: 0 -> +1 region, 2U -> +3 region, -2U -> -1 region
    in_valid <= 1;
    sym.re <= 0; sym.im <= sample_t'(2 * QAM_UNIT);
    @(posedge clk);
    #1;
    checks++;
    if (bits != 4'b1110) begin failures++; $display("boundary: %b", bits); end
    sym.re <= sample_t'(-2 * QAM_UNIT); sym.im <= sample_t'(-1);
    @(posedge clk);
    #1;
    checks++;
    if (bits != 4'b0101) begin failures++; $display("boundary: %b", bits); end
    in_valid <= 0;
    @(posedge clk);
    #1;
    checks++;
    if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
