// qam16_demapper -- hard-decision 16-QAM demapper of the transceiver.
//
// Each axis of the equalised symbol is compared with the decision
// boundaries 0 and +/-2 UNIT and mapped back through the Gray map of
// qam16_mapper (-3 -> 00, -1 -> 01, +1 -> 11, +3 -> 10).  Hard decisions are
// this design's choice.
//
// Interface: in_valid/sym in, out_valid/bits out.  Timing: one register.
module qam16_demapper
  import fd_pkg::*;
#(
  parameter int UNIT = QAM_UNIT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  csample_t   sym,
  output logic       out_valid,
  output logic [3:0] bits
);

  function automatic logic [1:0] decide(sample_t v);
    if (v < sample_t'(-2 * UNIT)) return 2'b00;
    if (v < 0)                    return 2'b01;
    if (v < sample_t'(2 * UNIT))  return 2'b11;
    return 2'b10;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      bits      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) bits <= {decide(sym.re), decide(sym.im)};
    end
  end

endmodule
