// Testbench for operand_logic.
//
// Builds RV32 instructions from their fields (20 kinds, random register
// numbers and immediates), presents them with register-file data that is a
// known function of the register tag, and checks one cycle later the
// registered opcode, operands A and B, destination, write enable and
// immediate against what the chosen instruction must give. Also checks the
// outputs after reset, that valid_i = 0 and flush_i give a NOP, and that
// an unsupported encoding (SLTU) gives a NOP that writes nothing.
module operand_logic_tb;
  import riscv_sub_pkg::*;

  logic        clk = 1'b0, rst, flush, vin;
  logic [31:0] instr, pc;
  reg_tag_t    rs1, rs2, src_a, src_b, rd;
  logic [31:0] rs1_d, rs2_d, a, b, imm, pc_q;
  logic        vout, a_reg, b_reg, we;
  op_e         op;
  logic [2:0]  f3;
  int          checks = 0, failures = 0;

  operand_logic dut (
    .clk(clk), .rst(rst), .flush_i(flush), .valid_i(vin), .instr_i(instr), .pc_i(pc),
    .rs1_o(rs1), .rs2_o(rs2), .rs1_data_i(rs1_d), .rs2_data_i(rs2_d),
    .valid_o(vout), .op_o(op), .a_o(a), .b_o(b), .a_is_reg_o(a_reg), .b_is_reg_o(b_reg),
    .src_a_o(src_a), .src_b_o(src_b), .rd_we_o(we), .rd_o(rd), .imm_o(imm),
    .funct3_o(f3), .pc_o(pc_q));

  function automatic logic [31:0] regval(reg_tag_t t);
    return 32'hD00F_0000 ^ {t.is_fp, 26'd0, t.addr} ^ (32'(t.addr) << 11);
  endfunction
  assign rs1_d = regval(rs1);
  assign rs2_d = regval(rs2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] r_t(logic [6:0] f7, logic [4:0] s2, logic [4:0] s1,
                                      logic [2:0] f, logic [4:0] d, logic [6:0] o);
    return {f7, s2, s1, f, d, o};
  endfunction

  task automatic expect_out(string what, logic e_v, op_e e_op, logic [31:0] e_a, logic [31:0] e_b,
                            logic e_we, reg_tag_t e_rd, logic [31:0] e_imm);
    checks++;
    if (vout !== e_v || op !== e_op || a !== e_a || b !== e_b || we !== e_we ||
        (e_we && rd !== e_rd) || imm !== e_imm) begin
      failures++;
      $display("FAIL %s instr=%h: v%b op=%s a=%h b=%h we=%b rd=%p imm=%h; expected v%b %s %h %h %b %p %h",
               what, instr, vout, op.name(), a, b, we, rd, imm, e_v, e_op.name(), e_a, e_b, e_we, e_rd, e_imm);
    end
  endtask

  initial begin
    rst = 1'b1; flush = 1'b0; vin = 1'b0; instr = '0; pc = '0;
    repeat (2) @(posedge clk); #1;
    expect_out("reset", 1'b0, OP_NOP, 0, 0, 1'b0, '0, 0);
    rst = 1'b0;

    for (int i = 0; i < 3000; i++) begin
      int          k;
      logic [4:0]  s1, s2, d;
      logic [11:0] i12;
      logic [19:0] u20;
      logic [12:0] boff;
      logic [31:0] sx;
      reg_tag_t    t1, t2, td;
      op_e         e_op;
      logic [31:0] e_a, e_b, e_imm;
      logic        e_we, e_v;
      string       nm;

      k   = $urandom_range(20, 0);
      s1  = 5'($urandom); s2 = 5'($urandom); d = 5'($urandom);
      i12 = 12'($urandom); u20 = 20'($urandom);
      boff = {12'($urandom), 1'b0};
      sx  = {{20{i12[11]}}, i12};
      t1  = '{1'b0, s1}; t2 = '{1'b0, s2}; td = '{1'b0, d};
      e_v = 1'b1; e_imm = 0;
      e_a = regval(t1); e_b = regval(t2); e_we = (d != 0);
      pc  = $urandom;
      case (k)
        0:  begin instr = r_t(7'h00, s2, s1, 3'd0, d, 7'b0110011); e_op = OP_ADD; end
        1:  begin instr = r_t(7'h20, s2, s1, 3'd0, d, 7'b0110011); e_op = OP_SUB; end
        2:  begin instr = r_t(7'h00, s2, s1, 3'd7, d, 7'b0110011); e_op = OP_AND; end
        3:  begin instr = r_t(7'h00, s2, s1, 3'd6, d, 7'b0110011); e_op = OP_OR;  end
        4:  begin instr = r_t(7'h00, s2, s1, 3'd4, d, 7'b0110011); e_op = OP_XOR; end
        5:  begin instr = r_t(7'h00, s2, s1, 3'd1, d, 7'b0110011); e_op = OP_SLL; end
        6:  begin instr = r_t(7'h00, s2, s1, 3'd5, d, 7'b0110011); e_op = OP_SRL; end
        7:  begin instr = r_t(7'h00, s2, s1, 3'd2, d, 7'b0110011); e_op = OP_SLT; end
        8:  begin instr = {i12, s1, 3'd0, d, 7'b0010011}; e_op = OP_ADD; e_b = sx; e_imm = sx; end
        9:  begin instr = {7'h00, s2, s1, 3'd1, d, 7'b0010011}; e_op = OP_SLL; e_b = 32'(s2); e_imm = 32'(s2); end
        10: begin instr = {u20, d, 7'b0110111}; e_op = OP_LUI; e_a = 0; e_b = {u20, 12'd0}; e_imm = {u20, 12'd0}; end
        11: begin
              instr = {boff[12], boff[10:5], s2, s1, 3'd1, boff[4:1], boff[11], 7'b1100011};
              e_op = OP_BRANCH; e_we = 1'b0; e_imm = {{19{boff[12]}}, boff};
            end
        12: begin instr = {i12, s1, 3'd2, d, 7'b0000011}; e_op = OP_LOAD; e_b = sx; e_imm = sx; end
        13: begin instr = {i12, s1, 3'd2, d, 7'b0000111}; e_op = OP_LOAD; e_b = sx; e_imm = sx;
                  td.is_fp = 1'b1; e_we = 1'b1; end
        14: begin instr = {i12[11:5], s2, s1, 3'd2, i12[4:0], 7'b0100011}; e_op = OP_STORE;
                  e_imm = sx; e_we = 1'b0; end
        15: begin instr = {i12[11:5], s2, s1, 3'd2, i12[4:0], 7'b0100111}; e_op = OP_STORE;
                  t2.is_fp = 1'b1; e_b = regval(t2); e_imm = sx; e_we = 1'b0; end
        16, 17, 18: begin
              instr = r_t((k == 16) ? 7'h00 : (k == 17) ? 7'h04 : 7'h08, s2, s1, 3'd0, d, 7'b1010011);
              e_op = (k == 16) ? OP_FADD : (k == 17) ? OP_FSUB : OP_FMUL;
              t1.is_fp = 1'b1; t2.is_fp = 1'b1; td.is_fp = 1'b1;
              e_a = regval(t1); e_b = regval(t2); e_we = 1'b1;
            end
        19: begin instr = r_t(7'h00, s2, s1, 3'd3, d, 7'b0110011); e_op = OP_NOP;
                  e_a = 0; e_b = 0; e_we = 1'b0; end
        default: begin instr = r_t(7'h00, s2, s1, 3'd0, d, 7'b0110011); e_op = OP_NOP;
                  e_a = 0; e_b = 0; e_we = 1'b0; e_v = 1'b0; end
      endcase
      vin = (k != 20);
      #1;
      if (k == 15) begin
        checks++;
        if (rs2 !== '{1'b1, s2}) begin failures++; $display("FAIL FSW rs2 tag %p", rs2); end
      end
      @(posedge clk); #1;
      expect_out($sformatf("kind %0d", k), e_v, e_op, e_a, e_b, e_we, td, e_imm);
      checks++;
      if (vout && pc_q !== pc) begin failures++; $display("FAIL pc"); end
    end

    // flush
    instr = r_t(7'h00, 5'd3, 5'd2, 3'd0, 5'd1, 7'b0110011); vin = 1'b1; flush = 1'b1;
    @(posedge clk); #1;
    expect_out("flush", 1'b0, OP_NOP, 0, 0, 1'b0, '0, 0);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
