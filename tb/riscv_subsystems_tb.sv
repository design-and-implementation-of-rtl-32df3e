// End-to-end testbench for riscv_subsystems at its default parameters.
//
// The testbench supplies, as behavioural models, the parts that sit outside
// the datapath: an instruction memory returning two words per fetch, a data
// memory, the integer register file (reads see a write of the same cycle),
// the two integer ALUs and the branch resolution in the memory stage. A
// branch is resolved when it is in the memory stage; it counts as
// mispredicted when the next instruction that followed it (in EX, in the
// hold register, or being fetched) is not at the correct next address; the
// prediction table is trained with every resolved branch.
//
// The program (addresses in hex, two instructions per pair):
//   00 FLW f1,0      | ADDI x1,x0,5       08 FLW f2,4     | ADDI x2,x1,3
//   10 FLW f3,8      | ADDI x3,x1,1       18 FLW f4,12    | ADD  x4,x2,x3
//   20 ADD x10,x4,x0 | NOP                28 FADD f5,f1,f2 | ADD x5,x4,x1
//   30 FSUB f6,f1,f2 | ADDI x6,x0,100     38 FMUL f7,f5,f3 | NOP
//   40 FMUL f8,f7,f4 | NOP                48 FADD f9,f8,f5 | NOP
//   50 FSW f9,16     | SW x5,20           58 NOP | NOP  (rollback here and at 5C)
//   60 ADDI x7,x0,3  | NOP                68 ADDI x7,x7,-1 | NOP
//   70 BNE x7,x0,68  | NOP                78 ADDI x8,x0,2  | NOP
//   80 ADDI x8,x8,-1 | NOP                88 BEQ x0,x1,C8  | NOP
//   90 BNE x8,x0,80  | NOP                98 ADDI x9,x6,1  | NOP
//   A0 BEQ x0,x0,A0  | NOP  (end)
// with data memory words 0..3 = 5.3, 2.8, 2.0, 0.5. Expected results,
// worked out by hand (FP values are the truncating adder's results printed
// in the reference waveforms, or exact doublings and halvings of them):
//   f5 = 5.3+2.8 = 41019999, f6 = 5.3-2.8 = 40200002, f7 = f5*2 = 41819999,
//   f8 = f7*0.5 = 41019999, f9 = f8+f5 = 41819999; memory word 4 = f9,
//   word 5 = x5 = 19; x1..x10 = 5 8 6 14 19 100 0 0 101 14.
// Counted mechanisms, each of which must occur: forwarding from each of the
// four MEM/WB sources, the three FPU operations, FP load and store, integer
// store, rollback, a redirect by a fetch-time prediction, a redirect by a
// decode-stage prediction, an ignored repeat prediction, a misprediction.
// Also checked: two instructions (8 bytes) fetched per cycle on straight-
// line code and a five-stage latency (FLW f1 fetched in cycle 0 writes the
// FP register file in cycle 4).
module riscv_subsystems_tb;
  import riscv_sub_pkg::*;

  logic        clk = 1'b0, rst;
  logic [31:0] fetch_pc;
  logic        fetch_pred;
  logic [31:0] instr [2];
  logic        rollback, mispredict, upd_v, upd_tk;
  logic [31:0] mem_tgt, upd_pc, upd_tgt;
  logic [4:0]  irs1 [2], irs2 [2], iwa [2];
  logic [31:0] ird1 [2], ird2 [2], iwd [2];
  logic        iwe [2];
  logic        alu_v [2];
  logic [3:0]  alu_op [2];
  logic [31:0] alu_a [2], alu_b [2], alu_imm [2], alu_pc [2], alu_res [2];
  logic [2:0]  alu_f3 [2];
  logic        dre [2], dwe [2];
  logic [31:0] daddr [2], dwdata [2], drdata [2];
  logic        fwe;
  logic [4:0]  fwa;
  logic [31:0] fwd;

  int checks = 0, failures = 0, cycle = 0;

  riscv_subsystems dut (
    .clk(clk), .rst(rst),
    .fetch_pc_o(fetch_pc), .fetch_predicted_o(fetch_pred), .instr_i(instr),
    .rollback_i(rollback),
    .mispredict_i(mispredict), .mem_target_i(mem_tgt),
    .br_upd_valid_i(upd_v), .br_upd_pc_i(upd_pc), .br_upd_taken_i(upd_tk), .br_upd_target_i(upd_tgt),
    .int_rs1_addr_o(irs1), .int_rs2_addr_o(irs2), .int_rs1_data_i(ird1), .int_rs2_data_i(ird2),
    .int_wb_en_o(iwe), .int_wb_addr_o(iwa), .int_wb_data_o(iwd),
    .alu_valid_o(alu_v), .alu_op_o(alu_op), .alu_a_o(alu_a), .alu_b_o(alu_b),
    .alu_imm_o(alu_imm), .alu_funct3_o(alu_f3), .alu_pc_o(alu_pc), .alu_result_i(alu_res),
    .dmem_re_o(dre), .dmem_we_o(dwe), .dmem_addr_o(daddr), .dmem_wdata_o(dwdata), .dmem_rdata_i(drdata),
    .fp_wb_en_o(fwe), .fp_wb_addr_o(fwa), .fp_wb_data_o(fwd));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ encoders
  localparam logic [31:0] NOP = 32'h0000_0013;
  function automatic logic [31:0] addi(int rd, int rs1, int imm);
    return {12'(imm), 5'(rs1), 3'd0, 5'(rd), 7'b0010011};
  endfunction
  function automatic logic [31:0] add(int rd, int rs1, int rs2);
    return {7'd0, 5'(rs2), 5'(rs1), 3'd0, 5'(rd), 7'b0110011};
  endfunction
  function automatic logic [31:0] flw(int fd, int imm, int rs1);
    return {12'(imm), 5'(rs1), 3'd2, 5'(fd), 7'b0000111};
  endfunction
  function automatic logic [31:0] st(logic fp, int rs2, int imm, int rs1);
    logic [11:0] i = 12'(imm);
    return {i[11:5], 5'(rs2), 5'(rs1), 3'd2, i[4:0], fp ? 7'b0100111 : 7'b0100011};
  endfunction
  function automatic logic [31:0] fop(logic [6:0] f7, int fd, int fs1, int fs2);
    return {f7, 5'(fs2), 5'(fs1), 3'd0, 5'(fd), 7'b1010011};
  endfunction
  function automatic logic [31:0] br(logic [2:0] f3, int rs1, int rs2, int off);
    logic [12:0] o = 13'(off);
    return {o[12], o[10:5], 5'(rs2), 5'(rs1), f3, o[4:1], o[11], 7'b1100011};
  endfunction

  // ------------------------------------------------------------ models
  logic [31:0] im [64];
  logic [31:0] dm [64];
  logic [31:0] xr [32];
  logic [31:0] fr [32];

  assign instr[0] = im[fetch_pc[7:2]];
  assign instr[1] = im[6'(fetch_pc[7:2] + 6'd1)];

  function automatic logic [31:0] xread(logic [4:0] a);
    if (a == 0) return 0;
    for (int l = 0; l < 2; l++) if (iwe[l] && iwa[l] == a) return iwd[l];
    return xr[a];
  endfunction

  for (genvar l = 0; l < 2; l++) begin : g_env
    assign ird1[l]   = xread(irs1[l]);
    assign ird2[l]   = xread(irs2[l]);
    assign drdata[l] = dm[daddr[l][7:2]];
    always_comb begin
      unique case (op_e'(alu_op[l]))
        OP_ADD:               alu_res[l] = alu_a[l] + alu_b[l];
        OP_SUB:               alu_res[l] = alu_a[l] - alu_b[l];
        OP_AND:               alu_res[l] = alu_a[l] & alu_b[l];
        OP_OR:                alu_res[l] = alu_a[l] | alu_b[l];
        OP_XOR:               alu_res[l] = alu_a[l] ^ alu_b[l];
        OP_SLL:               alu_res[l] = alu_a[l] << alu_b[l][4:0];
        OP_SRL:               alu_res[l] = alu_a[l] >> alu_b[l][4:0];
        OP_SLT:               alu_res[l] = 32'($signed(alu_a[l]) < $signed(alu_b[l]));
        OP_LUI:               alu_res[l] = alu_b[l];
        OP_LOAD, OP_STORE:    alu_res[l] = alu_a[l] + alu_imm[l];
        default:              alu_res[l] = 32'd0;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      if (iwe[l] && iwa[l] != 0) xr[iwa[l]] <= iwd[l];
      if (dwe[l]) dm[daddr[l][7:2]] <= dwdata[l];
    end
    if (fwe) fr[fwa] <= fwd;
  end

  // branch resolution: EX -> MEM
  logic        m_v, m_tk;
  logic [31:0] m_pc, m_tgt, correct, nxt;
  logic        ex_br, ex_tk;

  always_comb begin
    ex_br = alu_v[0] && op_e'(alu_op[0]) == OP_BRANCH;
    unique case (alu_f3[0])
      3'b000:  ex_tk = alu_a[0] == alu_b[0];
      3'b001:  ex_tk = alu_a[0] != alu_b[0];
      3'b100:  ex_tk = $signed(alu_a[0]) <  $signed(alu_b[0]);
      3'b101:  ex_tk = $signed(alu_a[0]) >= $signed(alu_b[0]);
      3'b110:  ex_tk = alu_a[0] <  alu_b[0];
      default: ex_tk = alu_a[0] >= alu_b[0];
    endcase
    correct = m_tk ? m_tgt : m_pc + 32'd8;
    if (dut.ex_valid[0])                                  nxt = dut.ex_pc[0];
    else if (dut.ifid_valid &&
             !(dut.u_next_pc.pred_use && !dut.u_next_pc.if_lookup_q)) nxt = dut.ifid_pc;
    else                                                  nxt = dut.u_next_pc.after_bpu;
    mispredict = m_v && (nxt != correct);
    mem_tgt    = correct;
    upd_v      = m_v;
    upd_pc     = m_pc;
    upd_tk     = m_tk;
    upd_tgt    = m_tgt;
  end

  always_ff @(posedge clk) begin
    if (rst) m_v <= 1'b0;
    else begin
      m_v   <= ex_br && !mispredict;
      m_tk  <= ex_tk;
      m_pc  <= alu_pc[0];
      m_tgt <= alu_pc[0] + alu_imm[0];
    end
  end

  assign rollback = !rst && (fetch_pc == 32'h58 || fetch_pc == 32'h5C);

  // ------------------------------------------------------------ counters
  int n_fwd [6];
  int n_fadd = 0, n_fsub = 0, n_fmul = 0, n_fld = 0, n_fst = 0, n_ist = 0, n_rb = 0;
  int n_ifpred = 0, n_holdpred = 0, n_ignored = 0, n_mispred = 0, n_lane1_br = 0;
  int first_fp_wb = -1, seq_steps = 0;
  logic [31:0] last_pc;

  always_ff @(posedge clk) begin
    if (!rst) begin
      cycle <= cycle + 1;
      for (int l = 0; l < 2; l++) begin
        if (alu_v[l] && op_e'(alu_op[l]) == OP_BRANCH && l == 1) n_lane1_br++;
      end
      if (dut.ex_valid[0] && dut.ex_a_reg[0]) n_fwd[dut.g_ex[0].u_fwd_a.sel_o]++;
      if (dut.ex_valid[0] && dut.ex_b_reg[0]) n_fwd[dut.g_ex[0].u_fwd_b.sel_o]++;
      if (dut.ex_valid[1] && dut.ex_a_reg[1]) n_fwd[dut.g_ex[1].u_fwd_a.sel_o]++;
      if (dut.ex_valid[1] && dut.ex_b_reg[1]) n_fwd[dut.g_ex[1].u_fwd_b.sel_o]++;
      if (dut.ex_valid[0] && dut.ex_op[0] == OP_FADD) n_fadd++;
      if (dut.ex_valid[0] && dut.ex_op[0] == OP_FSUB) n_fsub++;
      if (dut.ex_valid[0] && dut.ex_op[0] == OP_FMUL) n_fmul++;
      if (dre[0] && dut.mem_rd[0].is_fp) n_fld++;
      if (dwe[0]) n_fst++;
      if (dwe[1]) n_ist++;
      if (rollback) n_rb++;
      if (fetch_pred && dut.u_next_pc.if_lookup_q)  n_ifpred++;
      if (fetch_pred && !dut.u_next_pc.if_lookup_q) n_holdpred++;
      if (dut.u_next_pc.pred_taken && dut.u_next_pc.ignore_q) n_ignored++;
      if (mispredict) n_mispred++;
      if (fwe && first_fp_wb < 0) first_fp_wb <= cycle;
      // straight-line fetch rate: 8 bytes per cycle from 0x00 to 0x58
      if (cycle >= 1 && cycle <= 11) begin
        checks++;
        if (fetch_pc != last_pc + 32'd8) begin
          failures++; $display("FAIL fetch rate: cycle %0d pc %h after %h", cycle, fetch_pc, last_pc);
        end
        seq_steps++;
      end
      last_pc <= fetch_pc;
    end
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s = %h, expected %h", what, got, e); end
  endtask

  initial begin
    for (int i = 0; i < 64; i++) begin im[i] = NOP; dm[i] = '0; end
    for (int i = 0; i < 32; i++) begin xr[i] = '0; fr[i] = '0; end
    dm[0] = 32'h40A9999A; dm[1] = 32'h40333333; dm[2] = 32'h40000000; dm[3] = 32'h3F000000;
    im['h00/4] = flw(1, 0, 0);             im['h04/4] = addi(1, 0, 5);
    im['h08/4] = flw(2, 4, 0);             im['h0C/4] = addi(2, 1, 3);
    im['h10/4] = flw(3, 8, 0);             im['h14/4] = addi(3, 1, 1);
    im['h18/4] = flw(4, 12, 0);            im['h1C/4] = add(4, 2, 3);
    im['h20/4] = add(10, 4, 0);
    im['h28/4] = fop(7'h00, 5, 1, 2);      im['h2C/4] = add(5, 4, 1);
    im['h30/4] = fop(7'h04, 6, 1, 2);      im['h34/4] = addi(6, 0, 100);
    im['h38/4] = fop(7'h08, 7, 5, 3);
    im['h40/4] = fop(7'h08, 8, 7, 4);
    im['h48/4] = fop(7'h00, 9, 8, 5);
    im['h50/4] = st(1'b1, 9, 16, 0);       im['h54/4] = st(1'b0, 5, 20, 0);
    im['h60/4] = addi(7, 0, 3);
    im['h68/4] = addi(7, 7, -1);
    im['h70/4] = br(3'b001, 7, 0, -8);
    im['h78/4] = addi(8, 0, 2);
    im['h80/4] = addi(8, 8, -1);
    im['h88/4] = br(3'b000, 0, 1, 'h40);
    im['h90/4] = br(3'b001, 8, 0, -16);
    im['h98/4] = addi(9, 6, 1);
    im['hA0/4] = br(3'b000, 0, 0, 0);      // end: branch to itself

    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    repeat (80) @(posedge clk);
    #1;

    chk("f1", fr[1], 32'h40A9999A); chk("f2", fr[2], 32'h40333333);
    chk("f3", fr[3], 32'h40000000); chk("f4", fr[4], 32'h3F000000);
    chk("f5 = 5.3+2.8", fr[5], 32'h41019999);
    chk("f6 = 5.3-2.8", fr[6], 32'h40200002);
    chk("f7 = f5*2.0", fr[7], 32'h41819999);
    chk("f8 = f7*0.5", fr[8], 32'h41019999);
    chk("f9 = f8+f5", fr[9], 32'h41819999);
    chk("mem[16]", dm[4], 32'h41819999);
    chk("mem[20]", dm[5], 32'd19);
    chk("x1", xr[1], 5);   chk("x2", xr[2], 8);    chk("x3", xr[3], 6);
    chk("x4", xr[4], 14);  chk("x5", xr[5], 19);   chk("x6", xr[6], 100);
    chk("x7", xr[7], 0);   chk("x8", xr[8], 0);    chk("x9", xr[9], 101);
    chk("x10", xr[10], 14);
    chk("first FP write-back cycle", 32'(first_fp_wb), 32'd4);
    chk("no branch in pipeline 2", 32'(n_lane1_br), 0);

    $display("forwarding selections D0..D5: %0d %0d %0d %0d %0d %0d",
             n_fwd[0], n_fwd[1], n_fwd[2], n_fwd[3], n_fwd[4], n_fwd[5]);
    $display("fadd=%0d fsub=%0d fmul=%0d fp-load=%0d fp-store=%0d int-store=%0d rollback=%0d",
             n_fadd, n_fsub, n_fmul, n_fld, n_fst, n_ist, n_rb);
    $display("fetch-time predictions=%0d decode-stage predictions=%0d ignored repeats=%0d mispredictions=%0d",
             n_ifpred, n_holdpred, n_ignored, n_mispred);
    for (int k = 2; k < 6; k++) begin
      checks++; if (n_fwd[k] == 0) begin failures++; $display("FAIL no forwarding from D%0d", k); end
    end
    begin
      int cnt [11];
      string nm [11];
      cnt = '{n_fadd, n_fsub, n_fmul, n_fld, n_fst, n_ist, n_rb, n_ifpred, n_holdpred, n_ignored, n_mispred};
      nm = '{"fadd", "fsub", "fmul", "fp load", "fp store", "int store", "rollback",
                         "fetch-time prediction", "decode-stage prediction", "ignored repeat", "misprediction"};
      foreach (cnt[k]) begin
        checks++;
        if (cnt[k] == 0) begin failures++; $display("FAIL mechanism never happened: %s", nm[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
