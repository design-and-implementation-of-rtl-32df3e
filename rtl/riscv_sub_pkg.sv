// Shared types and constants of the RISC-V pipeline sub-blocks.
//
// fp32_t is the IEEE-754 single-precision layout: sign in bit 31, an 8-bit
// biased exponent in bits 30..23 and 23 stored mantissa bits in 22..0 (the
// leading 1 is implicit). op_e is the 4-bit internal opcode that the operand
// and opcode logic hands to the execute stage; the three floating-point
// operations are numbered 1..3 so that their low two bits are the FPU select
// code (01 add, 10 subtract, 11 multiply, 00 gives zero). The 4-bit width and
// the FPU select code follow the document; the other opcode numbers are this
// design's own. reg_tag_t names an architectural register together with its
// file (integer or floating point), which is what the forwarding unit
// compares.
package riscv_sub_pkg;

  localparam int unsigned FP_BIAS  = 127;

  typedef struct packed {
    logic        sign;
    logic [7:0]  exp;
    logic [22:0] man;
  } fp32_t;

  // FPU select lines
  typedef enum logic [1:0] {
    FPU_ZERO = 2'b00,
    FPU_ADD  = 2'b01,
    FPU_SUB  = 2'b10,
    FPU_MUL  = 2'b11
  } fpu_sel_e;

  // Internal opcode produced by the operand and opcode logic
  typedef enum logic [3:0] {
    OP_NOP    = 4'h0,
    OP_FADD   = 4'h1,
    OP_FSUB   = 4'h2,
    OP_FMUL   = 4'h3,
    OP_ADD    = 4'h4,
    OP_SUB    = 4'h5,
    OP_AND    = 4'h6,
    OP_OR     = 4'h7,
    OP_XOR    = 4'h8,
    OP_SLL    = 4'h9,
    OP_SRL    = 4'hA,
    OP_SLT    = 4'hB,
    OP_LUI    = 4'hC,
    OP_BRANCH = 4'hD,
    OP_LOAD   = 4'hE,
    OP_STORE  = 4'hF
  } op_e;

  // RV32 major opcodes (instr[6:0])
  localparam logic [6:0] OPC_OP      = 7'b0110011;
  localparam logic [6:0] OPC_OP_IMM  = 7'b0010011;
  localparam logic [6:0] OPC_LUI     = 7'b0110111;
  localparam logic [6:0] OPC_BRANCH  = 7'b1100011;
  localparam logic [6:0] OPC_LOAD    = 7'b0000011;
  localparam logic [6:0] OPC_STORE   = 7'b0100011;
  localparam logic [6:0] OPC_LOAD_FP = 7'b0000111;
  localparam logic [6:0] OPC_STOREFP = 7'b0100111;
  localparam logic [6:0] OPC_OP_FP   = 7'b1010011;

  typedef struct packed {
    logic       is_fp;   // 1: floating-point register file, 0: integer
    logic [4:0] addr;
  } reg_tag_t;

  function automatic logic is_fp_op(op_e op);
    return (op == OP_FADD) || (op == OP_FSUB) || (op == OP_FMUL);
  endfunction

endpackage
