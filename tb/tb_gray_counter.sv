// tb_gray_counter: checks the binary reflected Gray code counter.
//
// For code lengths 0..7 it rebuilds the code from the reported bit flips
// and compares it with t ^ (t >> 1), and checks set, parity, the number of
// codes and that last marks the final one.
module tb_gray_counter;
  logic clk = 0, rst_n = 0, start = 0;
  logic [5:0] nbits = '0;
  logic valid, flip, set, parity, last;
  logic [5:0] idx;

  gray_counter #(.CW(12), .IDX_W(6)) dut (.*);

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int nb = 0; nb <= 7; nb++) begin
      logic [11:0] code;
      int t;
      @(negedge clk);
      nbits = 6'(nb); start = 1;
      @(negedge clk);
      start = 0;
      code = '0;
      t = 0;
      while (valid) begin
        if (t == 0) chk(!flip, "first code has no flip");
        else begin
          chk(flip, "flip expected");
          code[idx] = ~code[idx];
          chk(set == code[idx], "set bit value");
        end
        chk(code == 12'(t ^ (t >> 1)), $sformatf("code t=%0d", t));
        chk(parity == ($countones(code) % 2 == 1), "parity");
        chk(last == (t == (1 << nb) - 1), "last");
        t++;
        @(negedge clk);
      end
      chk(t == (1 << nb), $sformatf("count %0d for nbits %0d", t, nb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
