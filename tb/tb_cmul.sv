// tb_cmul: checks the three-multiplication complex multiplier.
//
// Random operands (and the extremes +-1) go through cmul at two width
// pairs; the expected result is computed with the four-multiplication
// formula (ac - bd) + (ad + bc)i in wide integer arithmetic and truncated
// the same way. The 3-cycle latency is checked by streaming one operand
// pair per cycle.
module tb_cmul;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  localparam int WI = 64, WO = 93;
  localparam int WI2 = 127, WO2 = 127;
  logic signed [WI-1:0] a_re, a_im, b_re, b_im;
  logic signed [WO-1:0] p_re, p_im;
  logic signed [WI2-1:0] c_re, c_im, d_re, d_im;
  logic signed [WO2-1:0] q_re, q_im;

  cmul #(.WI(WI), .WO(WO)) u1 (.clk(clk), .a_re(a_re), .a_im(a_im), .b_re(b_re), .b_im(b_im),
                               .p_re(p_re), .p_im(p_im));
  cmul #(.WI(WI2), .WO(WO2)) u2 (.clk(clk), .a_re(c_re), .a_im(c_im), .b_re(d_re), .b_im(d_im),
                                 .p_re(q_re), .p_im(q_im));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef logic signed [299:0] big_t;
  big_t e1r [$], e1i [$], e2r [$], e2i [$];

  // value in [-1, 1) with w-2 fraction bits, components scaled by 0.7
  function automatic big_t rnd(input int w);
    big_t v;
    v = 0;
    for (int k = 0; k < 10; k++) v = (v <<< 32) | big_t'($urandom);
    v = v % (big_t'(1) <<< (w - 2));
    v = (v * 7) / 10;
    if ($urandom % 2) v = -v;
    return v;
  endfunction

  initial begin
    a_re = 0; a_im = 0; b_re = 0; b_im = 0;
    c_re = 0; c_im = 0; d_re = 0; d_im = 0;
    for (int t = 0; t < 203; t++) begin
      @(negedge clk);
      if (t < 200) begin
        big_t x1, y1, x2, y2, u1v, v1, u2v, v2;
        if (t == 0) begin
          x1 = big_t'(1) <<< (WI - 2); y1 = 0; x2 = -(big_t'(1) <<< (WI - 2)); y2 = 0;
          u1v = 0; v1 = big_t'(1) <<< (WI2 - 2); u2v = 0; v2 = big_t'(1) <<< (WI2 - 2);
        end else begin
          x1 = rnd(WI); y1 = rnd(WI); x2 = rnd(WI); y2 = rnd(WI);
          u1v = rnd(WI2); v1 = rnd(WI2); u2v = rnd(WI2); v2 = rnd(WI2);
        end
        a_re = WI'(x1); a_im = WI'(y1); b_re = WI'(x2); b_im = WI'(y2);
        c_re = WI2'(u1v); c_im = WI2'(v1); d_re = WI2'(u2v); d_im = WI2'(v2);
        e1r.push_back((x1 * x2 - y1 * y2) >>> (2 * (WI - 2) - (WO - 2)));
        e1i.push_back((x1 * y2 + y1 * x2) >>> (2 * (WI - 2) - (WO - 2)));
        e2r.push_back((u1v * u2v - v1 * v2) >>> (2 * (WI2 - 2) - (WO2 - 2)));
        e2i.push_back((u1v * v2 + v1 * u2v) >>> (2 * (WI2 - 2) - (WO2 - 2)));
      end
      if (t >= 3) begin
        big_t r1, i1, r2, i2;
        r1 = e1r.pop_front(); i1 = e1i.pop_front();
        r2 = e2r.pop_front(); i2 = e2i.pop_front();
        checks += 2;
        if (p_re != WO'(r1) || p_im != WO'(i1)) begin
          failures++; $display("FAIL 64->93 t=%0d", t);
        end
        if (q_re != WO2'(r2) || q_im != WO2'(i2)) begin
          failures++; $display("FAIL 127->127 t=%0d", t);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
