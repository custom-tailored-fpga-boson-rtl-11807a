// tb_accuracy_sweep: accuracy of the binary engine over matrix sizes
// n = 3 .. 20 on the full-size design (default parameters).
//
// For each n a random complex matrix is drawn with real and imaginary parts
// in [-1/n, 1/n], so every signed column sum stays inside the unit square,
// which is the range the host normalisation guarantees. The result must
// agree with a double-precision Glynn sum to a relative error of 1e-9 of
// its magnitude (no absolute floor, so small permanents are held to the same
// standard), and the latency must be n + 2^(n-3) + 3 + 3*levels cycles. The
// largest relative error seen is printed for each size.
module tb_accuracy_sweep;
  import perm_pkg::*;
  import perm_ref_pkg::*;

  localparam int N = N_MAX;
  localparam int LEVELS = tree_levels(N);
  localparam int N_LAST = 20;

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
  mat_t ar, ai;

  initial begin
    repeat (600000) @(posedge clk);
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

  function automatic real absr(input real x);
    return (x < 0) ? -x : x;
  endfunction

  initial begin
    int cyc, r;
    real hr, hi, rr, ri, mag, err;
    for (int j = 0; j < N; j++) begin
      g_row_data[j] = '0; r_row_data[j] = '0; r_row_mult[j] = '0; r_col_mult[j] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 3; n <= N_LAST; n++) begin
      for (int i = 0; i < N_MAX; i++)
        for (int j = 0; j < N_MAX; j++) begin
          ar[i][j] = rnd() / n;
          ai[i][j] = rnd() / n;
        end
      @(negedge clk);
      g_n = IDX_W'(n); g_start = 1;
      @(negedge clk);
      g_start = 0;
      cyc = 1;
      for (r = 0; r < n; r++) begin
        g_row_valid = 1;
        for (int j = 0; j < N; j++) begin
          g_row_data[j].re = (j < n) ? to_fix(ar[r][j]) : '0;
          g_row_data[j].im = (j < n) ? to_fix(ai[r][j]) : '0;
        end
        @(negedge clk);
        cyc++;
      end
      g_row_valid = 0;
      while (!g_done) begin
        @(negedge clk);
        cyc++;
      end
      hr = wide_to_real(256'(g_perm_re), FRAC_MAX);
      hi = wide_to_real(256'(g_perm_im), FRAC_MAX);
      glynn_sum(ar, ai, n, -1, rr, ri);
      mag = $sqrt(rr * rr + ri * ri);
      err = $sqrt((hr - rr) * (hr - rr) + (hi - ri) * (hi - ri)) / mag;
      $display("n=%0d  2^(n-1)*perm = %g %g  relative error %g  cycles %0d", n, rr, ri, err, cyc);
      checks++;
      if (!(err < 1e-9)) begin
        failures++;
        $display("FAIL n=%0d got %g %g expected %g %g", n, hr, hi, rr, ri);
      end
      checks++;
      if (cyc != n + (1 << (n - 3)) + 3 + CMUL_LAT * LEVELS) begin
        failures++;
        $display("FAIL n=%0d latency %0d", n, cyc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
