// delay_line -- fixed delay of DEPTH sample-enables for a WIDTH-bit word.
//
// A circular buffer of DEPTH words: on every cycle with ce high the oldest
// word is overwritten by din and the pointer advances.  dout is read
// combinationally from the oldest slot, so dout equals the din that was
// written DEPTH enables earlier (an SRL or distributed-RAM delay on an FPGA).
// The buffer is cleared by the synchronous reset so that no stale data comes
// out of it after reset.
module delay_line #(
  parameter int WIDTH = 16,
  parameter int DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             ce,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);

  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    ptr;

  always_ff @(posedge clk) begin
    if (rst) begin
      ptr <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (ce) begin
      mem[ptr] <= din;
      ptr      <= (ptr == AW'(DEPTH - 1)) ? '0 : ptr + 1'b1;
    end
  end

  assign dout = mem[ptr];

endmodule
