// cmul: pipelined complex fixed-point multiplier, three real multiplications.
//
// Computes (a + bi)(c + di) with Knuth's 3M+5A scheme:
//   x  = c(a + b)
//   re = x - b(c + d)
//   im = x + a(d - c)
// Stage 1 registers the three pre-additions, stage 2 the three products and
// stage 3 the post-additions, so the latency is 3 cycles and a new operand
// pair is accepted every cycle. Inputs are signed WI-bit words with WI-2
// fraction bits; outputs are WO-bit words with WO-2 fraction bits. The
// exact product is truncated towards minus infinity (low bits dropped).
// The 3M+5A scheme is the document's; the pipeline split and truncation are
// this design's choices. The document maps these products onto 18x25 DSP
// tiles; here they are written as plain multiplications.
module cmul #(
  parameter int WI = 64,
  parameter int WO = 93
) (
  input  logic                 clk,
  input  logic signed [WI-1:0] a_re,
  input  logic signed [WI-1:0] a_im,
  input  logic signed [WI-1:0] b_re,
  input  logic signed [WI-1:0] b_im,
  output logic signed [WO-1:0] p_re,
  output logic signed [WO-1:0] p_im
);
  localparam int SH = 2 * (WI - 2) - (WO - 2);  // fraction bits to drop
  localparam int PW = 2 * WI + 2;               // product width
  localparam int KW = PW + 1;                   // post-addition width

  // operands: a = a_re, b = a_im, c = b_re, d = b_im
  logic signed [WI:0] s_ab, s_cd, s_dc, r_a, r_b, r_c;
  logic signed [PW-1:0] m_x, m_y, m_z;
  logic signed [KW-1:0] k_re, k_im;

  always_ff @(posedge clk) begin
    s_ab <= (WI+1)'(a_re) + (WI+1)'(a_im);
    s_cd <= (WI+1)'(b_re) + (WI+1)'(b_im);
    s_dc <= (WI+1)'(b_im) - (WI+1)'(b_re);
    r_a  <= (WI+1)'(a_re);
    r_b  <= (WI+1)'(a_im);
    r_c  <= (WI+1)'(b_re);
    m_x  <= PW'(r_c) * PW'(s_ab);
    m_y  <= PW'(r_b) * PW'(s_cd);
    m_z  <= PW'(r_a) * PW'(s_dc);
  end

  assign k_re = (KW'(m_x) - KW'(m_y)) >>> SH;
  assign k_im = (KW'(m_x) + KW'(m_z)) >>> SH;

  always_ff @(posedge clk) begin
    p_re <= k_re[WO-1:0];
    p_im <= k_im[WO-1:0];
  end

  initial begin
    assert (SH >= 0) else $error("cmul: WO too wide for WI");
  end
endmodule
