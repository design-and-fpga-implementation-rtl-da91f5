// golay_correlator -- Efficient Golay Correlator (EGC) for the 128-chip
// complementary pair (a128, b128).
//
// The correlator is a cascade of M = log2(128) = 7 identical stages.  Stage m
// delays its 'b' input by D_m samples, weights it by W_m = +/-1 and forms the
// sum (new 'a') and the difference (new 'b') with its 'a' input.  Both
// branches start from the input sample, so after the last stage the 'a'
// output is the correlation of the input with a128 and the 'b' output the
// correlation with b128, computed together with 7 additions, 7 subtractions
// and no multiplier (against 127 additions per sequence for a direct matched
// filter).  The stage structure follows the EGC of the design; the D and W
// vectors come from fd_pkg.
//
// Interface: one real input sample per clock with ce high.  Each stage adds
// one bit of growth, so ra and rb are DW+7 bits wide and cannot overflow.
// Timing: every stage is registered, so a sample that enters with ce appears
// in ra/rb after 7 enables.  A full a128 at the input gives a peak of
// 128 x amplitude at ra on the enable after its last chip has passed all
// seven stages.
module golay_correlator
  import fd_pkg::*;
#(
  parameter int         W_IN = DW,
  parameter golay_vec_t D    = GOLAY_D,
  parameter golay_vec_t W    = GOLAY_W
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           ce,
  input  logic signed [W_IN-1:0]         x,
  output logic signed [W_IN+GOLAY_M-1:0] ra,
  output logic signed [W_IN+GOLAY_M-1:0] rb
);

  localparam int WO = W_IN + GOLAY_M;

  logic signed [WO-1:0] a_s [GOLAY_M+1];
  logic signed [WO-1:0] b_s [GOLAY_M+1];

  assign a_s[0] = WO'(x);
  assign b_s[0] = WO'(x);

  for (genvar m = 0; m < GOLAY_M; m++) begin : g_stage
    logic signed [WO-1:0] bd;
    logic signed [WO-1:0] wbd;

    delay_line #(.WIDTH(WO), .DEPTH(D[m])) u_dly (
      .clk (clk),
      .rst (rst),
      .ce  (ce),
      .din (b_s[m]),
      .dout(bd)
    );

    assign wbd = (W[m] < 0) ? -bd : bd;

    always_ff @(posedge clk) begin
      if (rst) begin
        a_s[m+1] <= '0;
        b_s[m+1] <= '0;
      end else if (ce) begin
        a_s[m+1] <= a_s[m] + wbd;
        b_s[m+1] <= a_s[m] - wbd;
      end
    end
  end

  assign ra = a_s[GOLAY_M];
  assign rb = b_s[GOLAY_M];

endmodule
