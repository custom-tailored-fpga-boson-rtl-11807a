// tb_boson_sampling_top: end-to-end test of the full-size design (N = 40).
//
// The binary engine computes random normalised matrices in single mode
// (with gaps in the row stream, so that loading stalls) and as both boards
// of a dual pair; the repeated engine computes matrices with repeated rows
// and columns, including a row of multiplicity zero. Results are compared
// with double-precision references and the latencies with the expected
// cycle counts. Each mechanism (single run, dual run, load stall, padding
// of unused columns, repeated rows, repeated columns, zero multiplicity) is
// counted; one that never happened counts as a failure.
module tb_boson_sampling_top;
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
  int cnt_single = 0, cnt_dual = 0, cnt_stall = 0, cnt_pad = 0;
  int cnt_reprow = 0, cnt_repcol = 0, cnt_zero = 0;
  mat_t ar, ai;

  initial begin
    repeat (20000) @(posedge clk);
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

  task automatic make_matrix(input int n);
    for (int i = 0; i < N_MAX; i++)
      for (int j = 0; j < N_MAX; j++) begin
        ar[i][j] = 0.7 / n * rnd();
        ai[i][j] = 0.7 / n * rnd();
      end
  endtask

  task automatic check_val(input string what, input real got, input real exp);
    real tol;
    tol = 1e-12 + 1e-9 * ((exp < 0) ? -exp : exp);
    checks++;
    if ((got - exp) > tol || (exp - got) > tol) begin
      failures++;
      $display("FAIL %s got %g expected %g", what, got, exp);
    end
  endtask

  task automatic check_cyc(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s cycles %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic glynn_run(input int n, input bit dual, input bit board, input bit gaps,
                           output real hr, output real hi, output int cyc);
    int r;
    @(negedge clk);
    g_n = IDX_W'(n); g_dual_en = dual; g_board_id = board; g_start = 1;
    @(negedge clk);
    g_start = 0;
    cyc = 1;
    r = 0;
    while (r < n) begin
      g_row_valid = gaps ? ($urandom % 3 != 0) : 1'b1;
      for (int j = 0; j < N; j++) begin
        g_row_data[j].re = (j < n) ? to_fix(ar[r][j]) : W_IN'($urandom);
        g_row_data[j].im = (j < n) ? to_fix(ai[r][j]) : W_IN'($urandom);
      end
      @(posedge clk);
      if (g_row_valid && g_row_ready) r++;
      else cnt_stall++;
      @(negedge clk);
      cyc++;
    end
    g_row_valid = 0;
    while (!g_done) begin
      @(negedge clk);
      cyc++;
    end
    if (n < N) cnt_pad++;
    hr = wide_to_real(256'(g_perm_re), FRAC_MAX);
    hi = wide_to_real(256'(g_perm_im), FRAC_MAX);
  endtask

  task automatic rep_run(input int m, input int M [N_MAX], input int Nm [N_MAX]);
    int n, cyc, states, r;
    real rr, ri, hr, hi;
    n = 0;
    for (int k = 0; k < m; k++) n += M[k];
    make_matrix(n);
    rep_expand_sum(ar, ai, m, M, Nm, rr, ri, n);
    states = M[0];
    for (int k = 1; k < m; k++) states *= M[k] + 1;
    for (int k = 0; k < m; k++) begin
      if (M[k] > 1) cnt_reprow++;
      if (Nm[k] > 1) cnt_repcol++;
      if (M[k] == 0 || Nm[k] == 0) cnt_zero++;
    end
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
    check_val($sformatf("rep m=%0d n=%0d re", m, n), hr, rr);
    check_val($sformatf("rep m=%0d n=%0d im", m, n), hi, ri);
    check_cyc("rep", cyc, m + states + 3 + CMUL_LAT * LEVELS);
  endtask

  initial begin
    real hr, hi, hr1, hi1, rr, ri;
    int cyc;
    int M [N_MAX], Nm [N_MAX];
    for (int j = 0; j < N; j++) begin
      g_row_data[j] = '0;
      r_row_data[j] = '0;
      r_row_mult[j] = '0;
      r_col_mult[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;

    // binary engine, single mode
    for (int n = 6; n <= 10; n += 4) begin
      make_matrix(n);
      glynn_run(n, 0, 0, 0, hr, hi, cyc);
      glynn_sum(ar, ai, n, -1, rr, ri);
      check_val($sformatf("glynn n=%0d re", n), hr, rr);
      check_val($sformatf("glynn n=%0d im", n), hi, ri);
      check_cyc("glynn", cyc, n + (1 << (n - 3)) + 3 + CMUL_LAT * LEVELS);
      cnt_single++;
    end
    // with gaps in the row stream
    make_matrix(7);
    glynn_run(7, 0, 0, 1, hr, hi, cyc);
    glynn_sum(ar, ai, 7, -1, rr, ri);
    check_val("glynn stalled re", hr, rr);
    check_val("glynn stalled im", hi, ri);
    cnt_single++;
    // dual mode, both boards
    make_matrix(9);
    glynn_run(9, 1, 0, 0, hr, hi, cyc);
    check_cyc("glynn dual", cyc, 9 + (1 << (9 - 4)) + 3 + CMUL_LAT * LEVELS);
    glynn_run(9, 1, 1, 0, hr1, hi1, cyc);
    glynn_sum(ar, ai, 9, -1, rr, ri);
    check_val("glynn dual re", hr + hr1, rr);
    check_val("glynn dual im", hi + hi1, ri);
    cnt_dual++;

    // repeated engine
    for (int k = 0; k < N_MAX; k++) begin M[k] = 0; Nm[k] = 0; end
    M[0] = 2; M[1] = 1; M[2] = 2; M[3] = 1;
    Nm[0] = 1; Nm[1] = 2; Nm[2] = 2; Nm[3] = 1;
    rep_run(4, M, Nm);
    M[0] = 1; M[1] = 3; M[2] = 0; M[3] = 3;
    Nm[0] = 4; Nm[1] = 0; Nm[2] = 1; Nm[3] = 2;
    rep_run(4, M, Nm);

    $display("single %0d dual %0d stall %0d pad %0d reprow %0d repcol %0d zero %0d",
             cnt_single, cnt_dual, cnt_stall, cnt_pad, cnt_reprow, cnt_repcol, cnt_zero);
    checks++;
    if (cnt_single == 0 || cnt_dual == 0 || cnt_stall == 0 || cnt_pad == 0 ||
        cnt_reprow == 0 || cnt_repcol == 0 || cnt_zero == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
