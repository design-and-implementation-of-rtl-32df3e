// Floating-point unit of the execute stage (combinational).
//
// Selects one of three single-precision operations on a_i and b_i with the
// two select lines, as in the document: 00 gives zero, 01 addition,
// 10 subtraction, 11 multiplication. Addition and subtraction share one
// fp_addsub datapath; multiplication is fp_mul. MUL_W is passed to fp_mul
// (24 = full mantissa product). The result is combinational; the pipeline
// register that follows the execute stage captures it.
module fpu
  import riscv_sub_pkg::*;
#(
  parameter int unsigned MUL_W = 24
) (
  input  fp32_t    a_i,
  input  fp32_t    b_i,
  input  fpu_sel_e sel_i,
  output fp32_t    y_o
);

  fp32_t addsub_y, mul_y;

  fp_addsub u_addsub (
    .a_i   (a_i),
    .b_i   (b_i),
    .sub_i (sel_i == FPU_SUB),
    .y_o   (addsub_y)
  );

  fp_mul #(.MUL_W(MUL_W)) u_mul (
    .a_i (a_i),
    .b_i (b_i),
    .y_o (mul_y)
  );

  always_comb begin
    unique case (sel_i)
      FPU_ADD, FPU_SUB: y_o = addsub_y;
      FPU_MUL:          y_o = mul_y;
      default:          y_o = '0;
    endcase
  end

endmodule
