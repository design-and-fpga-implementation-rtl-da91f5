// per_counter -- packet-error counter of the test bed.
//
// Two paths see the same frames: a reference path that knows exactly where
// every frame's channel estimation sequence starts (the marker from the
// frame ROM, delayed by the latency of the emulated channel and the
// detector) and the real path, the detector working on the noisy, dispersed
// signal.  A frame is counted as received correctly when the detector's
// CES trigger falls within +/-TOL samples of the reference marker and the
// detector found the header rate the frame was sent with; otherwise it is a
// packet error.  The errors are also split the way a detector's threshold
// trades them: a miss is a frame with no CES trigger within +/-TOL samples,
// and a false alarm is a CES trigger with no reference marker within +/-TOL
// samples.  Comparing the real detector against an ideal reference path
// follows the test bed of the design; judging a packet by its timing and
// rate, and the tolerance, are this design's choices.
//
// Interface: ref_mark and det_mark are one-enable pulses.  Timing: the check
// for a frame is made TOL enables after its reference marker, and the check
// for a trigger TOL enables after the trigger; frames, errors, misses and
// false_alarms are 32-bit counters that update then.
module per_counter
  import fd_pkg::*;
#(
  parameter int TOL = 2
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,
  input  logic        ref_mark,
  input  rate_e       ref_rate,
  input  logic        det_mark,
  input  rate_e       det_rate,
  output logic [31:0] frames,
  output logic [31:0] errors,
  output logic [31:0] misses,
  output logic [31:0] false_alarms
);

  localparam int SW = $clog2(2 * TOL + 2) + 1;

  logic [TOL:0] ref_sr;
  rate_e        rate_sr [TOL+1];
  logic [SW-1:0] since_det, since_ref;
  logic [TOL:0]  det_sr;
  logic          ref_now, hit, det_now, matched;
  rate_e         ref_rate_now;

  assign ref_sr[0]    = ref_mark;
  assign rate_sr[0]   = ref_rate;
  assign ref_now      = ref_sr[TOL];
  assign ref_rate_now = rate_sr[TOL];
  assign hit          = det_mark || (32'(since_det) + 1 <= 32'(2 * TOL));
  assign det_sr[0]    = det_mark;
  assign det_now      = det_sr[TOL];
  assign matched      = ref_mark || (32'(since_ref) + 1 <= 32'(2 * TOL));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 1; i <= TOL; i++) begin
        ref_sr[i]  <= 1'b0;
        rate_sr[i] <= RATE_MEDIUM;
        det_sr[i]  <= 1'b0;
      end
      since_det    <= '1;
      since_ref    <= '1;
      frames       <= '0;
      errors       <= '0;
      misses       <= '0;
      false_alarms <= '0;
    end else if (ce) begin
      for (int i = 1; i <= TOL; i++) begin
        ref_sr[i]  <= ref_sr[i-1];
        rate_sr[i] <= rate_sr[i-1];
        det_sr[i]  <= det_sr[i-1];
      end
      if (det_mark)        since_det <= '0;
      else if (~&since_det) since_det <= since_det + 1'b1;
      if (ref_mark)        since_ref <= '0;
      else if (~&since_ref) since_ref <= since_ref + 1'b1;
      if (ref_now) begin
        frames <= frames + 1'b1;
        if (!(hit && det_rate == ref_rate_now)) errors <= errors + 1'b1;
        if (!hit) misses <= misses + 1'b1;
      end
      if (det_now && !matched) false_alarms <= false_alarms + 1'b1;
    end
  end

endmodule
