// Operand and opcode logic of the decode stage, with the ID/EX register.
//
// Decodes one 32-bit RV32 instruction. Combinationally it names the source
// registers (number and file) so the register files can be read in the same
// cycle; on the clock edge it registers, for the execute stage, the 4-bit
// internal opcode (op_e), operand A, operand B, the destination register and
// the source-register tags the forwarding unit compares.
//
// Operand A is the first source register's value (0 for LUI). Operand B is
// the second source register's value for register-register, branch, store
// and floating-point operations, and the sign-extended immediate otherwise;
// for a store B is the data to be written, and the address is A + imm_o, so
// the store data passes through the forwarding unit like any operand. The
// decoded subset: ADD SUB SLL SLT XOR SRL OR AND and their immediate forms,
// LUI, the six branches, LW/FLW, SW/FSW, FADD.S FSUB.S FMUL.S. Any other
// encoding becomes OP_NOP and writes nothing. For branches the B-immediate
// is registered in imm_o and funct3 in funct3_o.
//
// The document gives the block's role (operands and opcode for the execute
// stage) and a 4-bit opcode; the instruction subset, the opcode numbering
// and the operand rules are this design's, taken from the RISC-V base and
// F encodings. Reset and flush_i clear the registered outputs (valid_o = 0,
// opcode OP_NOP, operands 0).
module operand_logic
  import riscv_sub_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        flush_i,
  input  logic        valid_i,
  input  logic [31:0] instr_i,
  input  logic [31:0] pc_i,
  // register file read (combinational)
  output reg_tag_t    rs1_o,
  output reg_tag_t    rs2_o,
  input  logic [31:0] rs1_data_i,
  input  logic [31:0] rs2_data_i,
  // ID/EX register
  output logic        valid_o,
  output op_e         op_o,
  output logic [31:0] a_o,
  output logic [31:0] b_o,
  output logic        a_is_reg_o,
  output logic        b_is_reg_o,
  output reg_tag_t    src_a_o,
  output reg_tag_t    src_b_o,
  output logic        rd_we_o,
  output reg_tag_t    rd_o,
  output logic [31:0] imm_o,
  output logic [2:0]  funct3_o,
  output logic [31:0] pc_o
);

  logic [6:0]  opc;
  logic [2:0]  f3;
  logic [6:0]  f7;
  logic [31:0] imm_i, imm_s, imm_b, imm_u;

  op_e         op;
  logic        a_reg, b_reg, use_imm, we;
  logic [31:0] imm;
  reg_tag_t    rd;

  assign opc   = instr_i[6:0];
  assign f3    = instr_i[14:12];
  assign f7    = instr_i[31:25];
  assign imm_i = {{20{instr_i[31]}}, instr_i[31:20]};
  assign imm_s = {{20{instr_i[31]}}, instr_i[31:25], instr_i[11:7]};
  assign imm_b = {{19{instr_i[31]}}, instr_i[31], instr_i[7], instr_i[30:25], instr_i[11:8], 1'b0};
  assign imm_u = {instr_i[31:12], 12'd0};

  always_comb begin
    op      = OP_NOP;
    a_reg   = 1'b0;
    b_reg   = 1'b0;
    use_imm = 1'b0;
    we      = 1'b0;
    imm     = '0;
    rd      = '{is_fp: 1'b0, addr: instr_i[11:7]};
    rs1_o   = '{is_fp: 1'b0, addr: instr_i[19:15]};
    rs2_o   = '{is_fp: 1'b0, addr: instr_i[24:20]};

    unique case (opc)
      OPC_OP: begin
        a_reg = 1'b1; b_reg = 1'b1; we = 1'b1;
        unique case ({f7, f3})
          {7'b0000000, 3'b000}: op = OP_ADD;
          {7'b0100000, 3'b000}: op = OP_SUB;
          {7'b0000000, 3'b001}: op = OP_SLL;
          {7'b0000000, 3'b010}: op = OP_SLT;
          {7'b0000000, 3'b100}: op = OP_XOR;
          {7'b0000000, 3'b101}: op = OP_SRL;
          {7'b0000000, 3'b110}: op = OP_OR;
          {7'b0000000, 3'b111}: op = OP_AND;
          default: begin op = OP_NOP; a_reg = 1'b0; b_reg = 1'b0; we = 1'b0; end
        endcase
      end
      OPC_OP_IMM: begin
        a_reg = 1'b1; use_imm = 1'b1; we = 1'b1; imm = imm_i;
        unique case (f3)
          3'b000: op = OP_ADD;
          3'b010: op = OP_SLT;
          3'b100: op = OP_XOR;
          3'b110: op = OP_OR;
          3'b111: op = OP_AND;
          3'b001: begin
            op = (f7 == 7'b0000000) ? OP_SLL : OP_NOP;
            imm = {27'd0, instr_i[24:20]};
          end
          3'b101: begin
            op = (f7 == 7'b0000000) ? OP_SRL : OP_NOP;
            imm = {27'd0, instr_i[24:20]};
          end
          default: op = OP_NOP;
        endcase
        if (op == OP_NOP) begin a_reg = 1'b0; use_imm = 1'b0; we = 1'b0; end
      end
      OPC_LUI: begin
        op = OP_LUI; use_imm = 1'b1; we = 1'b1; imm = imm_u;
      end
      OPC_BRANCH: begin
        if (f3 != 3'b010 && f3 != 3'b011) begin
          op = OP_BRANCH; a_reg = 1'b1; b_reg = 1'b1; imm = imm_b;
        end
      end
      OPC_LOAD, OPC_LOAD_FP: begin
        if (f3 == 3'b010) begin
          op = OP_LOAD; a_reg = 1'b1; use_imm = 1'b1; we = 1'b1; imm = imm_i;
          rd.is_fp = (opc == OPC_LOAD_FP);
        end
      end
      OPC_STORE, OPC_STOREFP: begin
        if (f3 == 3'b010) begin
          op = OP_STORE; a_reg = 1'b1; b_reg = 1'b1; imm = imm_s;
          rs2_o.is_fp = (opc == OPC_STOREFP);
        end
      end
      OPC_OP_FP: begin
        a_reg = 1'b1; b_reg = 1'b1; we = 1'b1;
        rd.is_fp = 1'b1; rs1_o.is_fp = 1'b1; rs2_o.is_fp = 1'b1;
        unique case (f7)
          7'b0000000: op = OP_FADD;
          7'b0000100: op = OP_FSUB;
          7'b0001000: op = OP_FMUL;
          default: begin op = OP_NOP; a_reg = 1'b0; b_reg = 1'b0; we = 1'b0; end
        endcase
      end
      default: ;
    endcase

    if (!valid_i) begin
      op = OP_NOP; a_reg = 1'b0; b_reg = 1'b0; we = 1'b0;
    end
    // writes to integer x0 are dropped
    if (!rd.is_fp && rd.addr == 5'd0) we = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (rst || flush_i) begin
      valid_o    <= 1'b0;
      op_o       <= OP_NOP;
      a_o        <= '0;
      b_o        <= '0;
      a_is_reg_o <= 1'b0;
      b_is_reg_o <= 1'b0;
      src_a_o    <= '0;
      src_b_o    <= '0;
      rd_we_o    <= 1'b0;
      rd_o       <= '0;
      imm_o      <= '0;
      funct3_o   <= '0;
      pc_o       <= '0;
    end else begin
      valid_o    <= valid_i;
      op_o       <= op;
      a_o        <= a_reg ? rs1_data_i : 32'd0;
      b_o        <= use_imm ? imm : (b_reg ? rs2_data_i : 32'd0);
      a_is_reg_o <= a_reg;
      b_is_reg_o <= b_reg;
      src_a_o    <= rs1_o;
      src_b_o    <= rs2_o;
      rd_we_o    <= we;
      rd_o       <= rd;
      imm_o      <= imm;
      funct3_o   <= f3;
      pc_o       <= pc_i;
    end
  end

endmodule
