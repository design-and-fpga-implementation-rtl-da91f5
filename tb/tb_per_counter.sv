// tb_per_counter -- feeds reference markers with detector markers placed
// exactly on them, up to TOL samples early or late, TOL+1 samples off,
// missing, and with the wrong rate, and checks the frame and error counts
// after each case, including the split into misses and false alarms (a
// trigger more than TOL samples off is both a miss and a false alarm; a
// trigger with no frame at all is a false alarm only).
module tb_per_counter;
  import fd_pkg::*;

  localparam int TOL = 2;

  logic clk = 0, rst = 1, ce = 0;
  logic ref_mark = 0, det_mark = 0;
  rate_e ref_rate = RATE_MEDIUM, det_rate = RATE_MEDIUM;
  logic [31:0] frames, errors, misses, false_alarms;
  int checks = 0, failures = 0;
  int exp_frames = 0, exp_errors = 0, exp_miss = 0, exp_fa = 0;

  always #5 clk = ~clk;

  per_counter #(.TOL(TOL)) dut (
    .clk(clk), .rst(rst), .ce(ce), .ref_mark(ref_mark), .ref_rate(ref_rate),
    .det_mark(det_mark), .det_rate(det_rate), .frames(frames), .errors(errors),
    .misses(misses), .false_alarms(false_alarms)
  );

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One enabled sample, with random disabled cycles before it.
  task automatic step(bit r, bit d);
    while ($urandom_range(0, 3) == 0) begin
      ce <= 0;
      ref_mark <= 1'($urandom);
      det_mark <= 1'($urandom);
      @(posedge clk);
    end
    ce <= 1;
    ref_mark <= r;
    det_mark <= d;
    @(posedge clk);
  endtask

  // A frame whose detector marker is off by 'off' samples (none if miss).
  task automatic frame(int off, bit miss, rate_e rr, rate_e dr, bit bad, bit no_ref = 0);
    bit far;
    ref_rate <= rr;
    det_rate <= dr;
    for (int k = -10; k <= 10; k++) step(!no_ref && k == 0, !miss && k == off);
    far = (off > TOL || off < -TOL);
    if (!no_ref) exp_frames++;
    if (bad) exp_errors++;
    if (!no_ref && (miss || far)) exp_miss++;
    if (!miss && (far || no_ref)) exp_fa++;
    checks++;
    if (frames != 32'(exp_frames) || errors != 32'(exp_errors) ||
        misses != 32'(exp_miss) || false_alarms != 32'(exp_fa)) begin
      failures++;
      $display("off=%0d miss=%0b: frames %0d errors %0d misses %0d false %0d, expected %0d %0d %0d %0d",
               off, miss, frames, errors, misses, false_alarms, exp_frames, exp_errors, exp_miss, exp_fa);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    frame(0, 0, RATE_MEDIUM, RATE_MEDIUM, 0);
    for (int off = -TOL - 2; off <= TOL + 2; off++)
      frame(off, 0, RATE_HIGH, RATE_HIGH, off > TOL || off < -TOL);
    frame(0, 1, RATE_MEDIUM, RATE_MEDIUM, 1);
    frame(0, 0, RATE_HIGH, RATE_MEDIUM, 1);
    frame(1, 0, RATE_MEDIUM, RATE_HIGH, 1);
    frame(-1, 0, RATE_MEDIUM, RATE_MEDIUM, 0);
    frame(0, 0, RATE_MEDIUM, RATE_MEDIUM, 0, 1);
    frame(3, 0, RATE_HIGH, RATE_HIGH, 0, 1);
    frame(2, 0, RATE_HIGH, RATE_HIGH, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
