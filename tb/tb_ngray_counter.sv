// tb_ngray_counter: checks the direction-encoded mixed-radix Gray code.
//
// First the sequence for multiplicities (1, 2, 2) is compared with the
// 18-code worked example (Gray codes listed below). Then random
// multiplicities over 5 digits are walked: every code must differ from the
// previous one in the reported digit by one in the reported direction, all
// prod(m_k + 1) codes must be distinct, and parity and last must agree.
module tb_ngray_counter;
  localparam int D = 5, MW = 6, IDX_W = 6;
  logic clk = 0, rst_n = 0, start = 0;
  logic [MW-1:0] mult [D];
  logic valid, flip, inc, parity, last;
  logic [IDX_W-1:0] idx;
  logic [MW-1:0] old_val;
  logic [MW-1:0] gc [D];

  ngray_counter #(.D(D), .IDX_W(IDX_W), .MW(MW)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  // worked example: digits (d0, d1, d2)
  int ex [18][3] = '{'{0,0,0}, '{1,0,0}, '{1,1,0}, '{0,1,0}, '{0,2,0}, '{1,2,0},
                     '{1,2,1}, '{0,2,1}, '{0,1,1}, '{1,1,1}, '{1,0,1}, '{0,0,1},
                     '{0,0,2}, '{1,0,2}, '{1,1,2}, '{0,1,2}, '{0,2,2}, '{1,2,2}};

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic walk(input int ms [D], input bit use_ex);
    int t, total, par;
    int prev [D];
    bit seen [int];
    total = 1;
    for (int k = 0; k < D; k++) begin
      mult[k] = MW'(ms[k]);
      total *= ms[k] + 1;
    end
    @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    t = 0;
    par = 0;
    while (valid) begin
      int key;
      key = 0;
      for (int k = 0; k < D; k++) key = key * 64 + int'(gc[k]);
      chk(!seen.exists(key), "code repeated");
      seen[key] = 1;
      if (use_ex && t < 18)
        chk(int'(gc[0]) == ex[t][0] && int'(gc[1]) == ex[t][1] && int'(gc[2]) == ex[t][2],
            $sformatf("example row %0d", t));
      if (t == 0) begin
        chk(!flip, "first has no flip");
        for (int k = 0; k < D; k++) chk(gc[k] == 0, "starts at zero");
      end else begin
        chk(flip, "flip");
        for (int k = 0; k < D; k++)
          if (k == int'(idx)) begin
            chk(int'(old_val) == prev[k], "old value");
            chk(int'(gc[k]) == prev[k] + (inc ? 1 : -1), "step of one");
          end else chk(int'(gc[k]) == prev[k], "other digits unchanged");
        par ^= 1;
      end
      chk(parity == par[0], "parity");
      chk(last == (t == total - 1), "last");
      for (int k = 0; k < D; k++) prev[k] = int'(gc[k]);
      t++;
      @(negedge clk);
    end
    chk(t == total, $sformatf("count %0d expected %0d", t, total));
  endtask

  initial begin
    int ms [D];
    for (int k = 0; k < D; k++) mult[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    ms = '{1, 2, 2, 0, 0};
    walk(ms, 1);
    for (int r = 0; r < 4; r++) begin
      for (int k = 0; k < D; k++) ms[k] = $urandom % 4;
      walk(ms, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
