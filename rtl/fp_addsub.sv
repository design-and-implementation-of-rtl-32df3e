// Single-precision floating-point adder/subtractor (combinational).
//
// Computes y = a + b (sub_i = 0) or y = a - b (sub_i = 1) on IEEE-754
// single-precision words. Subtraction flips the sign of b and adds. The
// operands are ordered so that X1 has the larger magnitude; the result takes
// X1's exponent and sign. The smaller mantissa is shifted right by the
// exponent difference, the two 24-bit mantissas (implicit 1 restored) are
// added when the effective signs agree and subtracted otherwise, and the
// result is normalised: one place right after a carry out, or left by the
// number of leading zeros after a subtraction, with the exponent adjusted to
// match. These steps follow the document.
//
// Bits shifted out during alignment and normalisation are dropped
// (truncation, no guard/round/sticky bits); this reproduces the printed sums
// and differences bit for bit, e.g. 5.3 - 2.8 = 0x40200002. The handling of
// special values is this design's own: an exponent field of 0 is read as
// zero (denormals flushed), a result that underflows becomes +0, one that
// overflows becomes infinity, and NaN/infinity inputs are not treated
// specially. An exact cancellation gives +0.
//
// Interface: a_i, b_i, sub_i in, y_o out; purely combinational.
module fp_addsub
  import riscv_sub_pkg::*;
(
  input  fp32_t a_i,
  input  fp32_t b_i,
  input  logic  sub_i,
  output fp32_t y_o
);

  logic        sb;          // effective sign of b
  logic        swap;
  logic        s1;
  logic [7:0]  e1, e2, ediff;
  logic [23:0] m1, m2, m2s;
  logic [24:0] sum;
  logic [23:0] diff;
  logic [4:0]  lz;
  logic [9:0]  e_res;       // signed room for under/overflow
  logic [23:0] m_res;

  always_comb begin
    sb   = b_i.sign ^ sub_i;
    // order by magnitude: {exp, man} compares as an unsigned number
    swap = {b_i.exp, b_i.man} > {a_i.exp, a_i.man};
    if (swap) begin
      s1 = sb;         e1 = b_i.exp; m1 = {(b_i.exp != 8'd0), b_i.man};
      e2 = a_i.exp;    m2 = {(a_i.exp != 8'd0), a_i.man};
    end else begin
      s1 = a_i.sign;   e1 = a_i.exp; m1 = {(a_i.exp != 8'd0), a_i.man};
      e2 = b_i.exp;    m2 = {(b_i.exp != 8'd0), b_i.man};
    end
    if (e1 == 8'd0) m1 = '0;
    if (e2 == 8'd0) m2 = '0;

    ediff = e1 - e2;
    m2s   = (ediff > 8'd23) ? 24'd0 : (m2 >> ediff);

    sum   = {1'b0, m1} + {1'b0, m2s};
    diff  = m1 - m2s;

    lz = 5'd0;
    for (int i = 23; i >= 0; i--) begin
      if (diff[i]) break;
      lz++;
    end

    e_res = {2'b00, e1};
    m_res = '0;
    if (s1 == ((swap) ? a_i.sign : sb)) begin
      // effective addition
      if (sum[24]) begin
        m_res = sum[24:1];
        e_res = {2'b00, e1} + 10'd1;
      end else begin
        m_res = sum[23:0];
      end
    end else begin
      // effective subtraction
      m_res = diff << lz;
      e_res = {2'b00, e1} - {5'd0, lz};
    end

    if (m_res[23] == 1'b0 || e1 == 8'd0 || $signed(e_res) <= 0) begin
      y_o = '0;                                  // zero or underflow
    end else if ($signed(e_res) >= 255) begin
      y_o = '{sign: s1, exp: 8'hFF, man: '0};    // overflow to infinity
    end else begin
      y_o = '{sign: s1, exp: e_res[7:0], man: m_res[22:0]};
    end
  end

endmodule
