// tb_threshold_detector -- checks the negative-threshold comparison on
// random values, on the threshold itself and one below it.
module tb_threshold_detector;
  import fd_pkg::*;

  logic clk = 0, rst = 1, ce = 0;
  sample_t c2 = '0, thr = '0;
  logic det;
  logic expd = 1'b0;
  int checks = 0, failures = 0, highs = 0;

  always #5 clk = ~clk;

  threshold_detector dut (.clk(clk), .rst(rst), .ce(ce), .c2(c2), .threshold(thr), .det(det));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, t;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      t = -$urandom_range(1, 2000);
      case (i % 4)
        0: v = t;
        1: v = t - 1;
        default: v = $urandom_range(0, 8000) - 4000;
      endcase
      ce  <= ($urandom_range(0, 4) != 0);
      c2  <= sample_t'(v);
      thr <= sample_t'(t);
      @(posedge clk);
      #1;
      if (ce) expd = (v < t);
      checks++;
      if (det != expd) begin
        failures++;
        if (failures < 10) $display("i=%0d c2=%0d thr=%0d det=%0d", i, v, t, det);
      end
      if (det) highs++;
    end
    checks++;
    if (highs == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
