// tb_qam16_mapper -- checks all 16 points of the mapper against the Gray
// table, the valid timing, and that neighbouring levels differ in one bit.
module tb_qam16_mapper;
  import fd_pkg::*;

  logic clk = 0, rst = 1, in_valid = 0, out_valid;
  logic [3:0] bits = '0;
  csample_t sym;
  int checks = 0, failures = 0;
  int lv [4] = '{-3, -1, 3, 1};   // level for 2-bit code 00, 01, 10, 11

  always #5 clk = ~clk;

  qam16_mapper dut (.clk(clk), .rst(rst), .in_valid(in_valid), .bits(bits), .out_valid(out_valid), .sym(sym));

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int r = 0; r < 3; r++) begin
      for (int b = 0; b < 16; b++) begin
        in_valid <= 1;
        bits     <= 4'(b);
        @(posedge clk);
        #1;
        checks++;
        if (!out_valid || sym.re != sample_t'(lv[b >> 2] * QAM_UNIT) || sym.im != sample_t'(lv[b & 3] * QAM_UNIT)) begin
          failures++;
          $display("bits %0d -> %0d %0d", b, sym.re, sym.im);
        end
        in_valid <= 0;
        @(posedge clk);
        #1;
        checks++;
        if (out_valid) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
