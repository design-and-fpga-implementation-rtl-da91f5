// fd_pkg -- types, constants and helper functions shared by the frame
// detector and its on-chip test bed.
//
// The IEEE 802.15.3c preamble is built from the 128-chip binary Golay
// complementary pair (a128, b128).  A Golay pair of length 2^M is produced by
// M stages of the recursion
//     a_m(n) = a_{m-1}(n) + W_m * b_{m-1}(n - D_m)
//     b_m(n) = a_{m-1}(n) - W_m * b_{m-1}(n - D_m)
// started from a unit impulse.  The Efficient Golay Correlator uses the same
// recursion as a filter, so its impulse responses are exactly the generated
// pair; the chip sequences that it is matched to are those responses read
// backwards.  The delay vector D and weight vector W below are this design's
// choice (the 128-chip pair of the 60 GHz single-carrier PHYs); any pair of a
// permutation of {1,2,...,64} and +/-1 weights yields a valid Golay pair and
// may be substituted here.
//
// Frame layout (Table I and the preamble description): 14 repetitions of
// a128 (SYNC), a 4 x 128 start-frame delimiter (SFD) whose sign pattern
// tells the header rate, a channel estimation sequence of a256 then b256,
// then data blocks of a 32-sample cyclic prefix and 256 samples.  The number
// of data blocks per frame is this design's choice.
//
// Samples are real, signed 16-bit (Q1.15); the transceiver carries complex
// samples as a pair of them.
package fd_pkg;

  localparam int DW        = 16;    // datapath width (Table II)
  localparam int GOLAY_M   = 7;     // stages of the correlator
  localparam int GOLAY_N   = 128;   // chips in a128 / b128
  localparam int SYNC_REP  = 14;    // a128 repetitions in SYNC
  localparam int SFD_LEN   = 4 * GOLAY_N;
  localparam int SYNC_LEN  = SYNC_REP * GOLAY_N;
  localparam int CES_LEN   = 4 * GOLAY_N;   // a256 followed by b256
  localparam int FFT_N     = 256;   // Table I
  localparam int CP_LEN    = 32;    // Table I
  localparam int BLK_LEN   = FFT_N + CP_LEN;

  typedef logic signed [DW-1:0] sample_t;

  // Complex sample of the SC-FDE / OFDM transceiver.
  typedef struct packed {
    sample_t re;
    sample_t im;
  } csample_t;

  // 16-QAM: one axis level unit (levels are +/-1 and +/-3 units).
  localparam int QAM_UNIT = 2730;

  // Header rate signalled by the SFD sign pattern.
  typedef enum logic {
    RATE_MEDIUM = 1'b0,   // SFD = [ a  -a  a  -a ]
    RATE_HIGH   = 1'b1    // SFD = [ a   a -a  -a ]
  } rate_e;

  typedef int golay_vec_t [GOLAY_M];

  // Delay and weight vectors of the Golay pair, stage 1 first.
  localparam golay_vec_t GOLAY_D = '{1, 8, 2, 4, 16, 32, 64};
  localparam golay_vec_t GOLAY_W = '{-1, -1, -1, -1, 1, -1, -1};

  // Impulse response of the correlator, bit n = 1 for +1, 0 for -1.
  // sel_b = 0 returns the 'a' branch, 1 the 'b' branch.
  function automatic logic [GOLAY_N-1:0] golay_response(bit sel_b);
    int a [GOLAY_N];
    int b [GOLAY_N];
    int na [GOLAY_N];
    int nb [GOLAY_N];
    int bd;
    logic [GOLAY_N-1:0] r;
    for (int n = 0; n < GOLAY_N; n++) begin
      a[n] = (n == 0) ? 1 : 0;
      b[n] = (n == 0) ? 1 : 0;
    end
    for (int m = 0; m < GOLAY_M; m++) begin
      for (int n = 0; n < GOLAY_N; n++) begin
        bd = (n >= GOLAY_D[m]) ? b[n-GOLAY_D[m]] : 0;
        na[n] = a[n] + GOLAY_W[m] * bd;
        nb[n] = a[n] - GOLAY_W[m] * bd;
      end
      a = na;
      b = nb;
    end
    for (int n = 0; n < GOLAY_N; n++) r[n] = sel_b ? (b[n] > 0) : (a[n] > 0);
    return r;
  endfunction

  localparam logic [GOLAY_N-1:0] H_A = golay_response(1'b0);
  localparam logic [GOLAY_N-1:0] H_B = golay_response(1'b1);

  // Transmitted chip i (0 = first on air) of a128 / b128, as +1 -> 1.
  function automatic logic a128_chip(int i);
    return H_A[GOLAY_N-1-i];
  endfunction

  function automatic logic b128_chip(int i);
    return H_B[GOLAY_N-1-i];
  endfunction

  // Saturate a wide signed value to the sample width.
  function automatic sample_t sat_sample(longint v);
    if (v > longint'(2**(DW-1) - 1)) return sample_t'(2**(DW-1) - 1);
    if (v < -longint'(2**(DW-1)))    return sample_t'(-(2**(DW-1)));
    return sample_t'(v);
  endfunction

endpackage
