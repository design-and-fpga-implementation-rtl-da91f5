// tb_corr_normalizer -- checks the divide-by-128 and saturation of the
// normaliser on random and extreme inputs, with gaps in the enable.
module tb_corr_normalizer;
  import fd_pkg::*;

  localparam int W_IN = DW + GOLAY_M;

  logic clk = 0, rst = 1, ce = 0;
  logic signed [W_IN-1:0] din = '0;
  sample_t dout;
  int checks = 0, failures = 0;
  int expv = 0;

  always #5 clk = ~clk;

  corr_normalizer dut (.clk(clk), .rst(rst), .ce(ce), .din(din), .dout(dout));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v, q;
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: v = -(1 << (W_IN - 1));
        1: v = (1 << (W_IN - 1)) - 1;
        2: v = -1;
        3: v = 127;
        4: v = -129;
        default: v = $signed($urandom) >>> (32 - W_IN);
      endcase
      ce  <= ($urandom_range(0, 4) != 0);
      din <= W_IN'(v);
      @(posedge clk);
      #1;
      if (ce) begin
        // floor(v / 128) computed with integer division.
        q = (v >= 0) ? v / 128 : -((-v + 127) / 128);
        if (q > 32767) q = 32767;
        if (q < -32768) q = -32768;
        expv = q;
      end
      checks++;
      if (dout != sample_t'(expv)) begin
        failures++;
        if (failures < 10) $display("i=%0d in=%0d out=%0d exp=%0d", i, v, dout, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
