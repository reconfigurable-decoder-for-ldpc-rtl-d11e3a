// bp_pkg: constants, types and code tables shared by the reconfigurable
// belief-propagation decoder for an N=8 polar code and a (12,6) LDPC code.
//
// LLRs are 7-bit two's complement numbers with two fractional bits (one sign
// bit, four integer bits, two fractional bits), log(P(0)/P(1)), so a positive
// LLR favours bit 0. The value range is kept symmetric, +/-LLR_MAX = +/-15.75,
// so that the magnitude of every message fits in six bits. The fixed-point
// format and both codes follow the source design; the symmetric clamp and
// the sign convention are this implementation's choice.
//
// The LDPC code is the regular (12,6) code with row weight 4 and column
// weight 2 whose parity-check matrix is H below. Edge e = 4*j + k is the
// k-th one (counted from the left) in row j. The functions below turn H into
// the wiring tables of the decoder at elaboration time.
package bp_pkg;

  localparam int LLR_W    = 7;
  localparam int LLR_FRAC = 2;

  // Polar code: N = 2^n, n stages of N/2 basic computational blocks.
  localparam int POLAR_N    = 8;
  localparam int POLAR_LOGN = 3;
  localparam int NUM_MBCB   = POLAR_N / 2 * POLAR_LOGN;  // 12
  localparam int POLAR_WORDS = (POLAR_LOGN + 1) * POLAR_N; // nodes per L or R bank

  // LDPC code.
  localparam int LDPC_M     = 12;  // code length
  localparam int LDPC_CHK   = 6;   // number of check nodes (m - k)
  localparam int LDPC_DC    = 4;   // row weight
  localparam int LDPC_DV    = 2;   // column weight
  localparam int LDPC_EDGES = LDPC_CHK * LDPC_DC;  // 24

  localparam int ITER_DEFAULT = 10;

  // H[j][i] = 1 when check node j and variable node i share an edge.
  localparam logic [0:LDPC_M-1] H [LDPC_CHK] = '{
    12'b1111_0000_0000,
    12'b1000_1110_0000,
    12'b0100_1001_1000,
    12'b0010_0100_0110,
    12'b0001_0001_0011,
    12'b0000_0010_1101
  };

  typedef enum logic {MODE_POLAR = 1'b0, MODE_LDPC = 1'b1} mode_e;
  typedef enum logic {PASS_L = 1'b0, PASS_R = 1'b1} pass_e;

  // Column of edge k of check node j.
  function automatic int edge_col(input int j, input int k);
    int cnt = 0;
    for (int i = 0; i < LDPC_M; i++) begin
      if (H[j][i]) begin
        if (cnt == k) return i;
        cnt++;
      end
    end
    return 0;
  endfunction

  // Edge index (4*j + k) of the t-th edge (counted from the top) of column i.
  function automatic int vn_edge(input int i, input int t);
    int cnt = 0;
    for (int j = 0; j < LDPC_CHK; j++) begin
      int k = 0;
      for (int c = 0; c < LDPC_M; c++) begin
        if (H[j][c]) begin
          if (c == i) begin
            if (cnt == t) return LDPC_DC * j + k;
            cnt++;
          end
          k++;
        end
      end
    end
    return 0;
  endfunction

  // Which of the two edges of its variable node edge e is (0 or 1).
  function automatic int edge_slot(input int e);
    int col = edge_col(e / LDPC_DC, e % LDPC_DC);
    return (vn_edge(col, 0) == e) ? 0 : 1;
  endfunction

  // Bit reversal of a POLAR_LOGN-bit index: left-stage node j holds u[bitrev(j)].
  function automatic int bitrev(input int x);
    int r = 0;
    for (int b = 0; b < POLAR_LOGN; b++) r |= ((x >> b) & 1) << (POLAR_LOGN - 1 - b);
    return r;
  endfunction

endpackage
