// tb_rep_colsum: checks the repeated-row column sums and photon slots.
//
// A 6 x 6 block is loaded with a random integer 4 x 4 matrix, row
// multiplicities (2, 1, 0, 3) and column multiplicities (1, 2, 0, 3).
// A random walk of Delta steps (each digit staying within 0..M_k) is driven
// into the block; after each step all six slots are compared with
// sum_k (M_k - 2 Delta_k) a_kj for the slot's column (slots 0..5 map to
// columns 0, 1, 1, 3, 3, 3), computed from scratch.
module tb_rep_colsum;
  import perm_pkg::*;
  localparam int N = 6;
  logic clk = 0, rst_n = 0, clear = 0, load_valid = 0, start = 0, step = 0, flip = 0, flip_inc = 0;
  logic [IDX_W-1:0] load_idx = '0, flip_idx = '0;
  cplx_t load_row [N];
  logic [MULT_W-1:0] row_mult [N];
  logic [MULT_W-1:0] col_mult [N];
  cplx_t slot [N];

  rep_colsum #(.N(N)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int M [N] = '{2, 1, 0, 3, 0, 0};
  int Nm [N] = '{1, 2, 0, 3, 0, 0};
  int colmap [N] = '{0, 1, 1, 3, 3, 3};
  logic signed [W_IN-1:0] ar [N][N], ai [N][N];
  int dl [N];

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_slots(input string msg);
    for (int p = 0; p < N; p++) begin
      logic signed [W_IN-1:0] er, ei;
      er = 0; ei = 0;
      for (int k = 0; k < 4; k++) begin
        er += ar[k][colmap[p]] * (M[k] - 2 * dl[k]);
        ei += ai[k][colmap[p]] * (M[k] - 2 * dl[k]);
      end
      checks++;
      if (slot[p].re != er || slot[p].im != ei) begin
        failures++;
        $display("FAIL %s slot %0d", msg, p);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < N; k++) begin
      row_mult[k] = MULT_W'(M[k]);
      col_mult[k] = MULT_W'(Nm[k]);
      load_row[k] = '0;
      dl[k] = 0;
      for (int j = 0; j < N; j++) begin
        ar[k][j] = (k < 4 && j < 4) ? W_IN'(int'($urandom % 20001) - 10000) : '0;
        ai[k][j] = (k < 4 && j < 4) ? W_IN'(int'($urandom % 20001) - 10000) : '0;
      end
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int r = 0; r < 4; r++) begin
      load_valid = 1; load_idx = IDX_W'(r);
      for (int j = 0; j < N; j++) load_row[j] = '{re: ar[r][j], im: ai[r][j]};
      @(negedge clk);
    end
    load_valid = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    step = 1; flip = 0;
    @(negedge clk);
    check_slots("initial");
    for (int t = 0; t < 60; t++) begin
      int k;
      do k = $urandom % 4; while (M[k] == 0);
      flip = 1;
      flip_idx = IDX_W'(k);
      if (dl[k] == 0) flip_inc = 1;
      else if (dl[k] == M[k]) flip_inc = 0;
      else flip_inc = $urandom % 2;
      dl[k] += flip_inc ? 1 : -1;
      @(negedge clk);
      check_slots($sformatf("step %0d", t));
    end
    step = 0; flip = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
