// bp_ref_pkg: integer reference models used by the testbenches.
//
// These re-derive the decoder arithmetic from the min-sum equations with
// plain integers (LLRs in units of 1/4), independent of the RTL structure:
// a saturating add, the g function, one polar BP decoder using 1-based node
// labels (i, j) exactly as in the BCB update equations, and one flooding
// LDPC decoder working on the (check, column) pairs of H.
package bp_ref_pkg;
  import bp_pkg::*;

  localparam int MAXV = 63;

  function automatic int ref_sat(input int x);
    if (x > MAXV) return MAXV;
    if (x < -MAXV) return -MAXV;
    return x;
  endfunction

  function automatic int ref_abs(input int x);
    return (x < 0) ? -x : x;
  endfunction

  function automatic int ref_g(input int a, input int b);
    int m = (ref_abs(a) < ref_abs(b)) ? ref_abs(a) : ref_abs(b);
    if (m > MAXV) m = MAXV;
    return ((a < 0) != (b < 0)) ? -m : m;
  endfunction

  // Polar min-sum BP, N = 8, n = 3, schedule: iters x (L pass stages n..1,
  // R pass stages 1..n), then one more L pass. llr[] are x[0..7], frozen[]
  // indexed by u. Returns decided u bits.
  function automatic logic [7:0] ref_polar(input int llr[8], input logic [7:0] frozen,
                                           input int iters);
    int n = 3, NN = 8;
    int L[5][9];
    int R[5][9];
    logic [7:0] u;
    for (int i = 0; i < 5; i++) for (int j = 0; j < 9; j++) begin L[i][j] = 0; R[i][j] = 0; end
    for (int j = 1; j <= NN; j++) begin
      L[n+1][j] = (llr[j-1] < -MAXV) ? -MAXV : llr[j-1];
      R[1][j]   = frozen[bitrev(j-1)] ? MAXV : 0;
    end
    for (int it = 0; it <= iters; it++) begin
      for (int i = n; i >= 1; i--) begin
        for (int j = 1; j <= NN/2; j++) begin
          int a, b;
          a = ref_g(L[i+1][2*j-1], ref_sat(L[i+1][2*j] + R[i][j+NN/2]));
          b = ref_sat(ref_g(R[i][j], L[i+1][2*j-1]) + L[i+1][2*j]);
          L[i][j] = a; L[i][j+NN/2] = b;
        end
      end
      if (it == iters) break;
      for (int i = 1; i <= n; i++) begin
        for (int j = 1; j <= NN/2; j++) begin
          int a, b;
          a = ref_g(R[i][j], ref_sat(L[i+1][2*j] + R[i][j+NN/2]));
          b = ref_sat(ref_g(R[i][j], L[i+1][2*j-1]) + R[i][j+NN/2]);
          R[i+1][2*j-1] = a; R[i+1][2*j] = b;
        end
      end
    end
    for (int k = 0; k < NN; k++) u[k] = !frozen[k] && (L[1][bitrev(k)+1] < 0);
    return u;
  endfunction

  // Flooding min-sum LDPC decoder on H. q[j][i] are variable-to-check
  // messages; each iteration runs every check node, then every variable
  // node, and the decision is taken from the last a posteriori LLRs:
  // Q = (Lc + r_lower) + r_upper, where r_upper is the message of the lower
  // numbered check of the column.
  function automatic logic [11:0] ref_ldpc(input int llr[12], input int iters);
    int q[6][12];
    int r[6][12];
    int lc[12];
    logic [11:0] c = '0;
    for (int i = 0; i < 12; i++) lc[i] = (llr[i] < -MAXV) ? -MAXV : llr[i];
    for (int j = 0; j < 6; j++) for (int i = 0; i < 12; i++) q[j][i] = lc[i];
    for (int it = 0; it < iters; it++) begin
      for (int j = 0; j < 6; j++) begin
        for (int i = 0; i < 12; i++) begin
          if (H[j][i]) begin
            int sgn = 0, m = MAXV;
            for (int i2 = 0; i2 < 12; i2++) begin
              if (H[j][i2] && i2 != i) begin
                if (q[j][i2] < 0) sgn ^= 1;
                if (ref_abs(q[j][i2]) < m) m = ref_abs(q[j][i2]);
              end
            end
            r[j][i] = (sgn != 0) ? -m : m;
          end
        end
      end
      for (int i = 0; i < 12; i++) begin
        int j0 = -1, j1 = -1;
        for (int j = 0; j < 6; j++) if (H[j][i]) begin
          if (j0 < 0) j0 = j; else j1 = j;
        end
        q[j0][i] = ref_sat(lc[i] + r[j1][i]);
        q[j1][i] = ref_sat(lc[i] + r[j0][i]);
        c[i] = ref_sat(q[j0][i] + r[j0][i]) < 0;
      end
    end
    return c;
  endfunction
endpackage
