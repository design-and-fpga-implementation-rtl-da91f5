// qam16_mapper -- Gray-coded 16-QAM mapper of the transceiver.
//
// Bits [3:2] choose the in-phase level and bits [1:0] the quadrature level,
// each with the Gray map 00 -> -3, 01 -> -1, 11 -> +1, 10 -> +3 (in units of
// UNIT), so that neighbouring levels differ in one bit.  16-QAM is the
// modulation of the design; the Gray map and the level unit (peak 0.25 of
// full scale, the same as the preamble) are this design's choices.
//
// Interface: in_valid/bits in, out_valid/sym out.  Timing: one register.
module qam16_mapper
  import fd_pkg::*;
#(
  parameter int UNIT = QAM_UNIT
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic [3:0] bits,
  output logic       out_valid,
  output csample_t   sym
);

  function automatic sample_t level(logic [1:0] b);
    case (b)
      2'b00:   return sample_t'(-3 * UNIT);
      2'b01:   return sample_t'(-UNIT);
      2'b11:   return sample_t'(UNIT);
      default: return sample_t'(3 * UNIT);
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      sym       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        sym.re <= level(bits[3:2]);
        sym.im <= level(bits[1:0]);
      end
    end
  end

endmodule
