// tb_rep_photons: repeated-row permanents with 20, 30 and 40 photons on the
// full-size design.
//
// Runs the repeated engine of boson_sampling_top (default parameters) with
// n = 20, 30 and 40 photons spread over few distinct rows and columns. At
// 40 photons every photon slot of the 40-leaf product tree is used and the
// binomial weights reach C(20,10)^2 ~ 2^35. The reference evaluates the same sum over Delta
// in double precision by brute force (every Delta vector enumerated in
// counting order, binomials from Pascal's rule), independent of the Gray
// order and of the incremental updates. The tolerance (1e-13) is relative to the
// sum of the magnitudes of all terms. The latency is checked as well.
module tb_rep_photons;
  import perm_pkg::*;
  import perm_ref_pkg::*;

  localparam int N = N_MAX;
  localparam int LEVELS = tree_levels(N);

  logic clk = 0, rst_n = 0;
  logic g_start = 0, g_dual_en = 0, g_board_id = 0, g_row_valid = 0;
  logic [IDX_W-1:0] g_n = '0;
  logic g_row_ready, g_busy, g_done;
  cplx_t g_row_data [N];
  logic signed [ACC_W-1:0] g_perm_re, g_perm_im;
  logic r_start = 0, r_row_valid = 0;
  logic [IDX_W-1:0] r_m = '0;
  logic [MULT_W-1:0] r_row_mult [N];
  logic [MULT_W-1:0] r_col_mult [N];
  logic r_row_ready, r_busy, r_done;
  cplx_t r_row_data [N];
  logic signed [REP_ACC_W-1:0] r_perm_re, r_perm_im;

  boson_sampling_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  real ar [N_MAX][N_MAX], ai [N_MAX][N_MAX];
  real C [41][41];

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real rnd();
    int u;
    u = int'($urandom % 2001) - 1000;
    return u / 1000.0;
  endfunction

  // brute-force sum over Delta of formula with the anchor on row 0
  task automatic ref_sum(input int m, input int M [N_MAX], input int Nm [N_MAX],
                         output real sr, output real si, output real mag, output int states);
    int d [N_MAX], mp [N_MAX];
    sr = 0; si = 0; mag = 0; states = 1;
    for (int k = 0; k < m; k++) begin
      mp[k] = (k == 0) ? M[0] - 1 : M[k];
      d[k] = 0;
      states *= mp[k] + 1;
    end
    for (int t = 0; t < states; t++) begin
      real w, pr, pi, cr, ci, qr, qi, tmp;
      int par;
      w = 1; par = 0;
      for (int k = 0; k < m; k++) begin
        w *= C[mp[k]][d[k]];
        par += d[k];
      end
      pr = 1; pi = 0;
      for (int j = 0; j < m; j++) begin
        cr = 0; ci = 0;
        for (int k = 0; k < m; k++) begin
          cr += (M[k] - 2 * d[k]) * ar[k][j];
          ci += (M[k] - 2 * d[k]) * ai[k][j];
        end
        for (int e = 0; e < Nm[j]; e++) begin
          tmp = pr * cr - pi * ci; pi = pr * ci + pi * cr; pr = tmp;
        end
      end
      if (par % 2 == 1) w = -w;
      sr += w * pr; si += w * pi;
      mag += ((w < 0) ? -w : w) * $sqrt(pr * pr + pi * pi);
      // next Delta in counting order
      for (int k = 0; k < m; k++) begin
        if (d[k] < mp[k]) begin d[k]++; break; end
        d[k] = 0;
      end
    end
  endtask

  task automatic run(input int m, input int M [N_MAX], input int Nm [N_MAX], input int photons);
    int n, cyc, states, r;
    real rr, ri, mag, hr, hi, tol;
    n = 0;
    for (int k = 0; k < m; k++) n += M[k];
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++) begin
        // nearly uniform positive entries keep the column sums close to
        // one, so the products do not vanish at 40 photons
        ar[i][j] = (0.9 + 0.05 * rnd()) / n;
        ai[i][j] = 0.05 * rnd() / n;
      end
    ref_sum(m, M, Nm, rr, ri, mag, states);
    @(negedge clk);
    r_m = IDX_W'(m);
    for (int k = 0; k < N; k++) begin
      r_row_mult[k] = MULT_W'(M[k]);
      r_col_mult[k] = MULT_W'(Nm[k]);
    end
    r_start = 1;
    @(negedge clk);
    r_start = 0;
    cyc = 1;
    r = 0;
    r_row_valid = 1;
    while (r < m) begin
      for (int j = 0; j < N; j++) begin
        r_row_data[j].re = (j < m) ? to_fix(ar[r][j]) : '0;
        r_row_data[j].im = (j < m) ? to_fix(ai[r][j]) : '0;
      end
      @(posedge clk);
      if (r_row_ready) r++;
      @(negedge clk);
      cyc++;
    end
    r_row_valid = 0;
    while (!r_done) begin
      @(negedge clk);
      cyc++;
    end
    hr = wide_to_real(256'(r_perm_re), FRAC_MAX);
    hi = wide_to_real(256'(r_perm_im), FRAC_MAX);
    tol = 1e-13 * mag + 1e-15;
    checks += 3;
    if ((hr - rr) > tol || (rr - hr) > tol || (hi - ri) > tol || (ri - hi) > tol) begin
      failures++;
      $display("FAIL m=%0d n=%0d got %g %g expected %g %g (tol %g)", m, n, hr, hi, rr, ri, tol);
    end
    if (cyc != m + states + 3 + CMUL_LAT * LEVELS) begin
      failures++;
      $display("FAIL m=%0d cycles %0d expected %0d", m, cyc, m + states + 3 + CMUL_LAT * LEVELS);
    end
    if (n != photons) begin failures++; $display("FAIL photon count %0d", n); end
    $display("m=%0d n=%0d states=%0d result %g %g reference %g %g, sum of |terms| %g",
             m, n, states, hr, hi, rr, ri, mag);
  endtask

  initial begin
    int M [N_MAX], Nm [N_MAX];
    for (int i = 0; i <= 40; i++)
      for (int j = 0; j <= 40; j++)
        C[i][j] = (j == 0) ? 1.0 : (i == 0) ? 0.0 : C[i-1][j-1] + C[i-1][j];
    for (int j = 0; j < N; j++) begin
      g_row_data[j] = '0; r_row_data[j] = '0; r_row_mult[j] = '0; r_col_mult[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_MAX; k++) begin M[k] = 0; Nm[k] = 0; end
    // two modes with 20 photons each
    M[0] = 20; M[1] = 20; Nm[0] = 13; Nm[1] = 27;
    run(2, M, Nm, 40);
    // four modes
    M[0] = 10; M[1] = 12; M[2] = 8; M[3] = 10; Nm[0] = 9; Nm[1] = 11; Nm[2] = 10; Nm[3] = 10;
    run(4, M, Nm, 40);
    // 20 photons over five modes
    for (int k = 0; k < 5; k++) begin M[k] = 4; Nm[k] = 4; end
    Nm[0] = 1; Nm[4] = 7;
    run(5, M, Nm, 20);
    // 30 photons over three modes
    for (int k = 0; k < N_MAX; k++) begin M[k] = 0; Nm[k] = 0; end
    M[0] = 10; M[1] = 10; M[2] = 10; Nm[0] = 5; Nm[1] = 15; Nm[2] = 10;
    run(3, M, Nm, 30);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
