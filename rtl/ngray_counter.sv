// ngray_counter: reflected mixed-radix (n-ary) Gray code with direction encoding.
//
// Digit k counts Delta_k = 0..mult[k] and back, so consecutive codes differ
// in one digit by one. Each digit is kept in direction-encoded form: a
// counter d_k modulo 2(mult[k]+1); the Gray digit is d_k while
// d_k <= mult[k] (rising) and 2 mult[k] + 1 - d_k otherwise (falling).
// A step sends a carry into digit 0; a digit whose counter sits at the top
// of either half (d_k = mult[k] or 2 mult[k] + 1) keeps its Gray digit and
// passes the carry on, and the first digit that does not, moves its Gray
// digit by one. This reproduces the "counter chain / DEGC / GC" sequence
// of the document's worked example for multiplicities (1, 2, 2). Digits
// with mult[k] = 0 always pass the carry, so unused digits are harmless.
//
// Interface: start (one cycle) resets all digits and starts the walk; then
// one code per cycle with valid. For each code the change from the previous
// code is given: flip, idx (digit), inc (rising) and old_val (the digit's
// Gray value before the step); parity is the parity of sum Delta_k.
// last marks the final code (prod (mult[k]+1) codes in all). gc shows the
// whole current code. The direction encoding and worked example are the
// document's; the carry formulation is this design's.
module ngray_counter #(
  parameter int D     = 40,
  parameter int IDX_W = 6,
  parameter int MW    = 6
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [MW-1:0]    mult [D],
  output logic             valid,
  output logic             flip,
  output logic [IDX_W-1:0] idx,
  output logic             inc,
  output logic [MW-1:0]    old_val,
  output logic             parity,
  output logic             last,
  output logic [MW-1:0]    gc [D]
);
  logic [MW:0] d [D];          // direction-encoded digits
  logic [MW:0] d_next [D];
  logic        carry_out;      // a step would overflow the top digit
  logic [D-1:0] wrap;
  logic             n_flip, n_inc;
  logic [IDX_W-1:0] n_idx;
  logic [MW-1:0]    n_old;

  always_comb begin
    logic c;
    c        = 1'b1;
    n_flip   = 1'b0;
    n_idx    = '0;
    n_inc    = 1'b0;
    n_old    = '0;
    for (int k = 0; k < D; k++) begin
      logic [MW:0] r;
      r = (MW+1)'(mult[k]);
      wrap[k]      = (d[k] == r) || (d[k] == 2 * r + 1);
      d_next[k]    = d[k];
      gc[k]        = (d[k] <= r) ? MW'(d[k]) : MW'(2 * r + 1 - d[k]);
      if (c) begin
        d_next[k] = (d[k] == 2 * r + 1) ? '0 : d[k] + 1'b1;
        if (!wrap[k]) begin
          n_flip = 1'b1;
          n_idx  = IDX_W'(k);
          n_inc  = d[k] < r;
          n_old  = gc[k];
        end
      end
      c = c && wrap[k];
    end
    carry_out = c;
  end

  assign last = valid && carry_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= 1'b0;
      flip    <= 1'b0;
      idx     <= '0;
      inc     <= 1'b0;
      old_val <= '0;
      parity  <= 1'b0;
      for (int k = 0; k < D; k++) d[k] <= '0;
    end else if (start) begin
      valid  <= 1'b1;
      flip   <= 1'b0;
      parity <= 1'b0;
      for (int k = 0; k < D; k++) d[k] <= '0;
    end else if (valid) begin
      if (last) begin
        valid <= 1'b0;
      end else begin
        d       <= d_next;
        flip    <= n_flip;
        idx     <= n_idx;
        inc     <= n_inc;
        old_val <= n_old;
        parity  <= ~parity;
      end
    end
  end
endmodule
