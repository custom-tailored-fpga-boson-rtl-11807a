// perm_ref_pkg: floating-point reference models used by the testbenches.
//
// glynn_sum returns sum_delta (prod delta) prod_j sum_i delta_i a_ij over
// all delta with delta_0 = +1, i.e. 2^(n-1) * perm(A), computed directly in
// double precision (no Gray code). rep_expand_sum does the same for the
// matrix whose row k is repeated M_k times and column j N_j times. Fixed
// point conversion helpers use the Q2.62 format of the design.
package perm_ref_pkg;
  import perm_pkg::*;

  typedef real mat_t [N_MAX][N_MAX];

  function automatic logic signed [W_IN-1:0] to_fix(input real x);
    return W_IN'(longint'(x * (2.0 ** 62)));
  endfunction

  // wide signed fixed-point word with frac fraction bits to real: the
  // magnitude is summed in 32-bit pieces, so small values keep their full
  // relative precision
  function automatic real wide_to_real(input logic signed [255:0] v, input int frac);
    logic [255:0] a;
    real r;
    a = v[255] ? 256'(-v) : 256'(v);
    r = 0.0;
    for (int k = 7; k >= 0; k--)
      r = r * (2.0 ** 32) + real'(longint'({32'd0, a[32*k +: 32]}));
    r = r / (2.0 ** frac);
    return v[255] ? -r : r;
  endfunction

  // fix3 < 0: all delta with delta_0 = +1. fix3 = 0 or 1: only those with
  // delta_3 = +1 or -1 (the share of one board in dual mode).
  function automatic void glynn_sum(input mat_t ar, input mat_t ai, input int n,
                                    input int fix3, output real sr, output real si);
    sr = 0.0;
    si = 0.0;
    for (longint d = 0; d < (longint'(1) << (n - 1)); d++) begin
      real pr, pi, cr, ci, t;
      int neg;
      if (fix3 >= 0 && n > 3 && int'(d[2]) != fix3) continue;
      pr = 1.0; pi = 0.0; neg = 0;
      for (int i = 1; i < n; i++) if (d[i-1]) neg ^= 1;
      for (int j = 0; j < n; j++) begin
        cr = ar[0][j]; ci = ai[0][j];
        for (int i = 1; i < n; i++) begin
          if (d[i-1]) begin cr -= ar[i][j]; ci -= ai[i][j]; end
          else        begin cr += ar[i][j]; ci += ai[i][j]; end
        end
        t  = pr * cr - pi * ci;
        pi = pr * ci + pi * cr;
        pr = t;
      end
      if (neg != 0) begin sr -= pr; si -= pi; end
      else          begin sr += pr; si += pi; end
    end
  endfunction

  // Expand rows by M and columns by Nm, then 2^(n-1) * perm by glynn_sum.
  function automatic void rep_expand_sum(input mat_t ar, input mat_t ai, input int m,
                                         input int M [N_MAX], input int Nm [N_MAX],
                                         output real sr, output real si, output int n);
    mat_t er, ei;
    int ri, cj;
    ri = 0;
    for (int k = 0; k < m; k++)
      for (int a = 0; a < M[k]; a++) begin
        cj = 0;
        for (int j = 0; j < m; j++)
          for (int b = 0; b < Nm[j]; b++) begin
            er[ri][cj] = ar[k][j];
            ei[ri][cj] = ai[k][j];
            cj++;
          end
        ri++;
      end
    n = ri;
    glynn_sum(er, ei, n, -1, sr, si);
  endfunction
endpackage
