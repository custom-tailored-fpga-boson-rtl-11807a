// tb_rep_perm_top: end-to-end test of the repeated row/column permanent engine.
//
// A reduced engine (N = 8) computes several random normalised matrices with
// given row and column multiplicities, including the (2,2,2) rows of the
// worked Gray-code example and a row of multiplicity zero. Each result is
// compared with a double-precision permanent of the expanded n x n matrix,
// and the start-to-done cycle count with m + prod(M'_k + 1) + 3 + 3*levels.
module tb_rep_perm_top;
  import perm_pkg::*;
  import perm_ref_pkg::*;

  localparam int N = 8;
  localparam int LEVELS = tree_levels(N);

  logic clk = 0, rst_n = 0;
  logic start = 0, row_valid = 0;
  logic [IDX_W-1:0] m_in = '0;
  logic [MULT_W-1:0] row_mult [N];
  logic [MULT_W-1:0] col_mult [N];
  logic row_ready, busy, done;
  cplx_t row_data [N];
  logic signed [REP_ACC_W-1:0] perm_re, perm_im;

  rep_perm_top #(.N(N)) dut (
    .clk(clk), .rst_n(rst_n), .start(start), .m(m_in), .row_mult(row_mult),
    .col_mult(col_mult), .row_valid(row_valid), .row_ready(row_ready),
    .row_data(row_data), .busy(busy), .done(done),
    .perm_re(perm_re), .perm_im(perm_im)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  mat_t ar, ai;

  initial begin
    repeat (100000) @(posedge clk);
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

  task automatic check_val(input string what, input real got, input real exp);
    real tol;
    tol = 1e-12 + 1e-9 * ((exp < 0) ? -exp : exp);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, got, exp);
    end
  endtask

  task automatic run_case(input int m, input int M [N_MAX], input int Nm [N_MAX]);
    int n, cyc, exp_cyc, states, r;
    real rr, ri, hr, hi, scale;
    n = 0;
    for (int k = 0; k < m; k++) n += M[k];
    scale = 0.7 / n;
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++) begin
        ar[i][j] = scale * rnd();
        ai[i][j] = scale * rnd();
      end
    rep_expand_sum(ar, ai, m, M, Nm, rr, ri, n);
    states = M[0];
    for (int k = 1; k < m; k++) states *= M[k] + 1;
    @(negedge clk);
    m_in = IDX_W'(m);
    for (int k = 0; k < N; k++) begin
      row_mult[k] = MULT_W'(M[k]);
      col_mult[k] = MULT_W'(Nm[k]);
    end
    start = 1;
    @(negedge clk);
    start = 0;
    cyc = 1;
    r = 0;
    row_valid = 1;
    while (r < m) begin
      for (int j = 0; j < N; j++) begin
        row_data[j].re = (j < m) ? to_fix(ar[r][j]) : '0;
        row_data[j].im = (j < m) ? to_fix(ai[r][j]) : '0;
      end
      @(posedge clk);
      if (row_ready) r++;
      @(negedge clk);
      cyc++;
    end
    row_valid = 0;
    while (!done) begin
      @(negedge clk);
      cyc++;
    end
    hr = wide_to_real(256'(perm_re), FRAC_MAX);
    hi = wide_to_real(256'(perm_im), FRAC_MAX);
    check_val($sformatf("m=%0d n=%0d re", m, n), hr, rr);
    check_val($sformatf("m=%0d n=%0d im", m, n), hi, ri);
    exp_cyc = m + states + 3 + CMUL_LAT * LEVELS;
    checks++;
    if (cyc != exp_cyc) begin
      failures++;
      $display("FAIL m=%0d cycles %0d expected %0d", m, cyc, exp_cyc);
    end
  endtask

  initial begin
    int M [N_MAX], Nm [N_MAX];
    for (int j = 0; j < N; j++) row_data[j] = '0;
    for (int k = 0; k < N; k++) begin row_mult[k] = '0; col_mult[k] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < N_MAX; k++) begin M[k] = 0; Nm[k] = 0; end
    // worked example: non-anchor multiplicities (1,2,2)
    M[0] = 2; M[1] = 2; M[2] = 2; Nm[0] = 2; Nm[1] = 3; Nm[2] = 1;
    run_case(3, M, Nm);
    // all ones: plain permanent
    for (int k = 0; k < 5; k++) begin M[k] = 1; Nm[k] = 1; end
    run_case(5, M, Nm);
    // a zero-multiplicity row and a zero-multiplicity column
    M[0] = 3; M[1] = 0; M[2] = 1; M[3] = 2; Nm[0] = 1; Nm[1] = 4; Nm[2] = 0; Nm[3] = 1;
    run_case(4, M, Nm);
    // single row, all photons in it
    M[0] = 4; Nm[0] = 4;
    run_case(1, M, Nm);
    // eight photons over three rows / columns
    M[0] = 1; M[1] = 4; M[2] = 3; Nm[0] = 3; Nm[1] = 3; Nm[2] = 2;
    run_case(3, M, Nm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
