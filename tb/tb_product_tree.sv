// tb_product_tree: checks the pipelined product tree.
//
// Two trees are tested: N = 5 (levels 5 -> 3 -> 2 -> 1, with pass-through
// values at odd counts) and N = 40 (the 20-10-5-2-1-1 multiplier tree).
// Random leaves with magnitude below one stream in one set per cycle; the
// product is compared with a double-precision product, and the latency of
// 3 cycles per level and the tag alignment are checked.
module tb_product_tree;
  import perm_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int NA = 5, NB = 40;
  logic va = 0, vb = 0, ova, ovb;
  logic [7:0] ta = '0, tb = '0, ota, otb;
  cplx_t la [NA];
  cplx_t lb [NB];
  cplx_w_t pa, pb;

  product_tree #(.N(NA), .TAG_W(8)) ua (.clk(clk), .rst_n(rst_n), .in_valid(va), .in_tag(ta),
    .leaf(la), .out_valid(ova), .out_tag(ota), .prod(pa));
  product_tree #(.N(NB), .TAG_W(8)) ub (.clk(clk), .rst_n(rst_n), .in_valid(vb), .in_tag(tb),
    .leaf(lb), .out_valid(ovb), .out_tag(otb), .prod(pb));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real era [$], eia [$], erb [$], eib [$];
  int  sent_a [$], sent_b [$];

  function automatic real rnd();
    int u;
    u = int'($urandom % 2001) - 1000;
    return u / 1000.0;
  endfunction

  function automatic real w2r(input logic signed [W_MAX-1:0] v);
    logic signed [W_MAX-1:0] t;
    t = v >>> (FRAC_MAX - 60);
    return real'(longint'(t[63:0])) / (2.0 ** 60);
  endfunction

  task automatic chk(input real got, input real exp, input string msg);
    checks++;
    if ((got - exp) > 1e-15 || (exp - got) > 1e-15) begin
      failures++;
      $display("FAIL %s got %g expected %g", msg, got, exp);
    end
  endtask

  int cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ova) begin
      chk(w2r(pa.re), era.pop_front(), "N=5 re");
      chk(w2r(pa.im), eia.pop_front(), "N=5 im");
      checks++;
      if (int'(ota) != sent_a.pop_front() % 256) begin failures++; $display("FAIL tag a"); end
    end
    if (ovb) begin
      chk(w2r(pb.re), erb.pop_front(), "N=40 re");
      chk(w2r(pb.im), eib.pop_front(), "N=40 im");
      checks++;
      if (int'(otb) != sent_b.pop_front() % 256) begin failures++; $display("FAIL tag b"); end
    end
  end

  int first_out_a = -1, first_out_b = -1, first_in = -1;
  always @(posedge clk) begin
    if (ova && first_out_a < 0) first_out_a <= cyc;
    if (ovb && first_out_b < 0) first_out_b <= cyc;
  end

  initial begin
    for (int i = 0; i < NA; i++) la[i] = '0;
    for (int i = 0; i < NB; i++) lb[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      real pr, pi, xr, xi, tmp, rmax;
      @(negedge clk);
      if (t == 0) first_in = cyc;
      va = 1; vb = 1; ta = 8'(t); tb = 8'(t + 100);
      pr = 1; pi = 0;
      for (int i = 0; i < NA; i++) begin
        xr = 0.7 * rnd(); xi = 0.7 * rnd();
        la[i].re = W_IN'(longint'(xr * 2.0 ** 62));
        la[i].im = W_IN'(longint'(xi * 2.0 ** 62));
        xr = real'(longint'(la[i].re)) / 2.0 ** 62;
        xi = real'(longint'(la[i].im)) / 2.0 ** 62;
        tmp = pr * xr - pi * xi; pi = pr * xi + pi * xr; pr = tmp;
      end
      era.push_back(pr); eia.push_back(pi); sent_a.push_back(t);
      pr = 1; pi = 0;
      // keep the N = 40 product away from underflow: leaves near the unit circle
      for (int i = 0; i < NB; i++) begin
        real ang;
        ang = 3.14159 * rnd();
        rmax = 0.95 + 0.05 * (rnd() + 1.0) / 2.0;
        xr = rmax * $cos(ang) * 0.99; xi = rmax * $sin(ang) * 0.99;
        lb[i].re = W_IN'(longint'(xr * 2.0 ** 62));
        lb[i].im = W_IN'(longint'(xi * 2.0 ** 62));
        xr = real'(longint'(lb[i].re)) / 2.0 ** 62;
        xi = real'(longint'(lb[i].im)) / 2.0 ** 62;
        tmp = pr * xr - pi * xi; pi = pr * xi + pi * xr; pr = tmp;
      end
      erb.push_back(pr); eib.push_back(pi); sent_b.push_back(t + 100);
    end
    @(negedge clk);
    va = 0; vb = 0;
    repeat (30) @(negedge clk);
    checks += 3;
    if (first_out_a - first_in != 3 * tree_levels(NA)) begin
      failures++; $display("FAIL latency N=5: %0d", first_out_a - first_in);
    end
    if (first_out_b - first_in != 3 * tree_levels(NB)) begin
      failures++; $display("FAIL latency N=40: %0d", first_out_b - first_in);
    end
    if (era.size() != 0 || erb.size() != 0) begin failures++; $display("FAIL missing outputs"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
