// Single-precision floating-point multiplier (combinational).
//
// Follows the document's five steps: a zero operand gives a zero result; the
// result sign is the XOR of the operand signs; the 24-bit mantissas (implicit
// 1 restored) are multiplied and the product truncated to 24 bits; the
// exponent is E1 + E2 - 127; a product of 2 or more is normalised by one
// right shift and an exponent increment.
//
// MUL_W sets how many of the mantissa's leading bits enter the multiplier
// (13..24). The default, 24, is the full product the text describes. With
// MUL_W = 14 the low 10 bits of each mantissa are dropped before the
// multiply, and the module then reproduces bit for bit the products the
// document prints in its waveforms (e.g. 5.3 x 2.3 = 0x41430429); that
// narrow multiplier is an inference from those printed values.
//
// Own choices: an exponent field of 0 counts as zero, underflow gives +0,
// overflow gives infinity, NaN/infinity inputs are not treated specially,
// a zero result is +0.
//
// Interface: a_i, b_i in, y_o out; purely combinational.
module fp_mul
  import riscv_sub_pkg::*;
#(
  parameter int unsigned MUL_W = 24
) (
  input  fp32_t a_i,
  input  fp32_t b_i,
  output fp32_t y_o
);

  logic [MUL_W-1:0]   ma, mb;
  logic [2*MUL_W-1:0] prod;
  logic [47:0]        p48;     // product left-aligned in 48 bits
  logic [22:0]        man;
  logic [9:0]         e_res;

  always_comb begin
    ma    = MUL_W'({1'b1, a_i.man} >> (24 - MUL_W));
    mb    = MUL_W'({1'b1, b_i.man} >> (24 - MUL_W));
    prod  = ma * mb;
    p48   = 48'(prod) << (48 - 2 * MUL_W);
    e_res = {2'b00, a_i.exp} + {2'b00, b_i.exp} - 10'(FP_BIAS);
    if (p48[47]) begin
      man   = p48[46:24];
      e_res = e_res + 10'd1;
    end else begin
      man   = p48[45:23];
    end

    if (a_i.exp == 8'd0 || b_i.exp == 8'd0 || $signed(e_res) <= 0) begin
      y_o = '0;
    end else if ($signed(e_res) >= 255) begin
      y_o = '{sign: a_i.sign ^ b_i.sign, exp: 8'hFF, man: '0};
    end else begin
      y_o = '{sign: a_i.sign ^ b_i.sign, exp: e_res[7:0], man: man};
    end
  end

  initial assert (MUL_W >= 13 && MUL_W <= 24)
    else $error("fp_mul: MUL_W must be 13..24");

endmodule
