// Sub-blocks of a 32-bit, five-stage, two-pipeline RISC-V processor, wired
// into one datapath: IF, ID, EX, MEM, WB.
//
//   IF   next_pc_logic (PC+4/PC+8, branch prediction, MEM-stage correction)
//        sends one address per cycle; the instruction cache (outside) returns
//        two instructions, one per pipeline, in the same cycle. The pair, its
//        PC and a valid bit are held in the IF/ID (hold) register.
//   ID   one operand_logic per pipeline decodes its instruction and reads its
//        sources: floating-point registers from fp_regfile (four read ports),
//        integer registers from the integer register file (outside, ports).
//   EX   four forwarding_unit instances, two operands per pipeline, choose
//        between the decode-stage operands and the MEM/WB results of both
//        pipelines. Pipeline 1 holds the FPU; its integer operations and all
//        of pipeline 2 go to the two integer ALUs outside (ports alu_*),
//        whose results come back in the same cycle.
//   MEM  EX/MEM register per pipeline (result, destination, write enable,
//        load/store flags, store data); loads and stores go to the data
//        cache outside (ports dmem_*).
//   WB   MEM/WB register per pipeline; floating-point results are written to
//        fp_regfile, integer results leave through the int_wb_* ports.
//
// The stage split, the two pipelines, the FPU in the execute stage, the
// six-input forwarding multiplexer and the separate floating-point register
// file in write-back follow the document. This design's own choices:
// floating-point arithmetic runs in pipeline 1 only, and an FP operation or
// FP load placed in pipeline 2 writes nothing (the FP register file has one
// write port, fed by pipeline 1); the data cache is outside: in the memory
// stage each pipeline presents address (the integer ALU's A + imm), store
// data (forwarded operand B) and read/write strobes, and read data is
// expected back in the same cycle; there is no load-use interlock, so the
// consumer of a load must be at least two pairs behind it; the issuing
// logic is outside, so the two instructions of a pair are taken
// as independent and rollback_i only steers the PC+4/PC+8 choice; the
// integer register file outside is expected to read through a write in the
// same cycle, like fp_regfile. There are no stalls.
//
// Branches are resolved outside (from the alu_* ports) and reported in the
// memory stage: mispredict_i with mem_target_i redirects fetch in the same
// cycle and discards the younger instructions in decode and execute; br_upd_* trains the
// prediction unit. A redirect made from a decode-stage prediction discards
// the pair then in decode, which was fetched after the branch.
module riscv_subsystems
  import riscv_sub_pkg::*;
#(
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter int unsigned BTB_ENTRIES = 16,
  parameter int unsigned MUL_W       = 24
) (
  input  logic        clk,
  input  logic        rst,
  // instruction cache
  output logic [31:0] fetch_pc_o,
  output logic        fetch_predicted_o,
  input  logic [31:0] instr_i [2],
  // issuing logic
  input  logic        rollback_i,
  // branch resolution in the memory stage
  input  logic        mispredict_i,
  input  logic [31:0] mem_target_i,
  input  logic        br_upd_valid_i,
  input  logic [31:0] br_upd_pc_i,
  input  logic        br_upd_taken_i,
  input  logic [31:0] br_upd_target_i,
  // integer register file
  output logic [4:0]  int_rs1_addr_o [2],
  output logic [4:0]  int_rs2_addr_o [2],
  input  logic [31:0] int_rs1_data_i [2],
  input  logic [31:0] int_rs2_data_i [2],
  output logic        int_wb_en_o    [2],
  output logic [4:0]  int_wb_addr_o  [2],
  output logic [31:0] int_wb_data_o  [2],
  // integer ALUs
  output logic        alu_valid_o    [2],
  output logic [3:0]  alu_op_o       [2],
  output logic [31:0] alu_a_o        [2],
  output logic [31:0] alu_b_o        [2],
  output logic [31:0] alu_imm_o      [2],
  output logic [2:0]  alu_funct3_o   [2],
  output logic [31:0] alu_pc_o       [2],
  input  logic [31:0] alu_result_i   [2],
  // data cache (memory stage)
  output logic        dmem_re_o      [2],
  output logic        dmem_we_o      [2],
  output logic [31:0] dmem_addr_o    [2],
  output logic [31:0] dmem_wdata_o   [2],
  input  logic [31:0] dmem_rdata_i   [2],
  // floating-point write-back
  output logic        fp_wb_en_o,
  output logic [4:0]  fp_wb_addr_o,
  output logic [31:0] fp_wb_data_o
);

  // ---------------------------------------------------------------- IF
  logic        hold_redirect;
  logic        ifid_valid;
  logic [31:0] ifid_instr [2];
  logic [31:0] ifid_pc;

  next_pc_logic #(
    .AW(32), .RESET_PC(RESET_PC), .BTB_ENTRIES(BTB_ENTRIES)
  ) u_next_pc (
    .clk             (clk),
    .rst             (rst),
    .rollback_i      (rollback_i),
    .hold_pc_i       (ifid_pc),
    .hold_opcode_i   (ifid_valid ? ifid_instr[0][6:0] : 7'd0),
    .mispredict_i    (mispredict_i),
    .mem_target_i    (mem_target_i),
    .upd_valid_i     (br_upd_valid_i),
    .upd_pc_i        (br_upd_pc_i),
    .upd_taken_i     (br_upd_taken_i),
    .upd_target_i    (br_upd_target_i),
    .next_pc_o       (fetch_pc_o),
    .bpu_redirect_o  (fetch_predicted_o),
    .hold_redirect_o (hold_redirect)
  );

  // IF/ID hold register
  always_ff @(posedge clk) begin
    if (rst) begin
      ifid_valid <= 1'b0;
      ifid_pc    <= '0;
      ifid_instr <= '{default: '0};
    end else begin
      // the pair fetched in a redirect cycle is the correct target; the
      // wrong-path pair is the one now in decode, flushed at ID/EX
      ifid_valid <= 1'b1;
      ifid_pc    <= fetch_pc_o;
      ifid_instr <= instr_i;
    end
  end

  // ---------------------------------------------------------------- ID
  reg_tag_t    rs1 [2], rs2 [2];
  logic [31:0] fp_rd_data [4];
  logic [4:0]  fp_rd_addr [4];
  logic [31:0] rs1_data [2], rs2_data [2];

  logic        ex_valid [2];
  op_e         ex_op    [2];
  logic [31:0] ex_a     [2], ex_b [2];
  logic        ex_a_reg [2], ex_b_reg [2];
  reg_tag_t    ex_src_a [2], ex_src_b [2];
  logic        ex_rd_we [2];
  reg_tag_t    ex_rd    [2];
  logic [31:0] ex_imm   [2];
  logic [2:0]  ex_f3    [2];
  logic [31:0] ex_pc    [2];

  logic        fp_wb_en;
  logic [4:0]  fp_wb_addr;
  logic [31:0] fp_wb_data;
  logic [31:0] fp_wb_out;

  fp_regfile #(.NREGS(32), .W(32), .NREAD(4)) u_fp_rf (
    .clk       (clk),
    .rst       (rst),
    .wb_en_i   (fp_wb_en),
    .wb_addr_i (fp_wb_addr),
    .wb_data_i (fp_wb_data),
    .wb_out_o  (fp_wb_out),
    .rd_addr_i (fp_rd_addr),
    .rd_data_o (fp_rd_data)
  );

  for (genvar l = 0; l < 2; l++) begin : g_id
    assign fp_rd_addr[2*l]   = rs1[l].addr;
    assign fp_rd_addr[2*l+1] = rs2[l].addr;
    assign int_rs1_addr_o[l] = rs1[l].addr;
    assign int_rs2_addr_o[l] = rs2[l].addr;
    assign rs1_data[l] = rs1[l].is_fp ? fp_rd_data[2*l]   : int_rs1_data_i[l];
    assign rs2_data[l] = rs2[l].is_fp ? fp_rd_data[2*l+1] : int_rs2_data_i[l];

    operand_logic u_operand (
      .clk        (clk),
      .rst        (rst),
      .flush_i    (mispredict_i || hold_redirect),
      .valid_i    (ifid_valid),
      .instr_i    (ifid_instr[l]),
      .pc_i       (ifid_pc + 32'(4 * l)),
      .rs1_o      (rs1[l]),
      .rs2_o      (rs2[l]),
      .rs1_data_i (rs1_data[l]),
      .rs2_data_i (rs2_data[l]),
      .valid_o    (ex_valid[l]),
      .op_o       (ex_op[l]),
      .a_o        (ex_a[l]),
      .b_o        (ex_b[l]),
      .a_is_reg_o (ex_a_reg[l]),
      .b_is_reg_o (ex_b_reg[l]),
      .src_a_o    (ex_src_a[l]),
      .src_b_o    (ex_src_b[l]),
      .rd_we_o    (ex_rd_we[l]),
      .rd_o       (ex_rd[l]),
      .imm_o      (ex_imm[l]),
      .funct3_o   (ex_f3[l]),
      .pc_o       (ex_pc[l])
    );
  end

  // ---------------------------------------------------------------- EX
  logic        mem_we    [2];
  logic        mem_ld    [2], mem_st [2];
  logic        mem_fwd_we [2];
  reg_tag_t    mem_rd    [2];
  logic [31:0] mem_res   [2];
  logic [31:0] mem_sdata [2];
  logic        wb_we     [2];
  reg_tag_t    wb_rd     [2];
  logic [31:0] wb_res    [2];

  logic [31:0] fwd_a [2], fwd_b [2];
  logic [31:0] ex_res [2];
  logic        ex_we  [2];
  fp32_t       fpu_y;

  for (genvar l = 0; l < 2; l++) begin : g_ex
    forwarding_unit #(.W(32), .LANE(l)) u_fwd_a (
      .d_i         ('{ex_a[0], ex_a[1], mem_res[0], mem_res[1], wb_res[0], wb_res[1]}),
      .src_valid_i (ex_valid[l] && ex_a_reg[l]),
      .src_i       (ex_src_a[l]),
      .mem_we_i    (mem_fwd_we),
      .mem_rd_i    (mem_rd),
      .wb_we_i     (wb_we),
      .wb_rd_i     (wb_rd),
      .sel_o       (),
      .data_o      (fwd_a[l])
    );

    forwarding_unit #(.W(32), .LANE(l)) u_fwd_b (
      .d_i         ('{ex_b[0], ex_b[1], mem_res[0], mem_res[1], wb_res[0], wb_res[1]}),
      .src_valid_i (ex_valid[l] && ex_b_reg[l]),
      .src_i       (ex_src_b[l]),
      .mem_we_i    (mem_fwd_we),
      .mem_rd_i    (mem_rd),
      .wb_we_i     (wb_we),
      .wb_rd_i     (wb_rd),
      .sel_o       (),
      .data_o      (fwd_b[l])
    );

    assign alu_valid_o[l]  = ex_valid[l] && ex_op[l] != OP_NOP && !(l == 0 && is_fp_op(ex_op[l]));
    assign alu_op_o[l]     = ex_op[l];
    assign alu_a_o[l]      = fwd_a[l];
    assign alu_b_o[l]      = fwd_b[l];
    assign alu_imm_o[l]    = ex_imm[l];
    assign alu_funct3_o[l] = ex_f3[l];
    assign alu_pc_o[l]     = ex_pc[l];
  end

  fpu #(.MUL_W(MUL_W)) u_fpu (
    .a_i   (fp32_t'(fwd_a[0])),
    .b_i   (fp32_t'(fwd_b[0])),
    .sel_i (fpu_sel_e'(ex_op[0][1:0])),
    .y_o   (fpu_y)
  );

  assign ex_res[0] = is_fp_op(ex_op[0]) ? 32'(fpu_y) : alu_result_i[0];
  assign ex_res[1] = alu_result_i[1];
  assign ex_we[0]  = ex_valid[0] && ex_rd_we[0];
  assign ex_we[1]  = ex_valid[1] && ex_rd_we[1] && !ex_rd[1].is_fp;

  // ---------------------------------------------------------------- MEM / WB
  always_ff @(posedge clk) begin
    for (int l = 0; l < 2; l++) begin
      if (rst) begin
        mem_we[l] <= 1'b0; mem_rd[l] <= '0; mem_res[l] <= '0;
        mem_ld[l] <= 1'b0; mem_st[l] <= 1'b0; mem_sdata[l] <= '0;
        wb_we[l]  <= 1'b0; wb_rd[l]  <= '0; wb_res[l]  <= '0;
      end else begin
        // EX/MEM: the instruction in EX is younger than a mispredicted branch
        mem_we[l]    <= ex_we[l] && !mispredict_i;
        mem_ld[l]    <= ex_valid[l] && ex_op[l] == OP_LOAD && !mispredict_i;
        mem_st[l]    <= ex_valid[l] && ex_op[l] == OP_STORE && !mispredict_i;
        mem_rd[l]    <= ex_rd[l];
        mem_res[l]   <= ex_res[l];
        mem_sdata[l] <= fwd_b[l];
        // MEM/WB
        wb_we[l]     <= mem_we[l];
        wb_rd[l]     <= mem_rd[l];
        wb_res[l]    <= mem_ld[l] ? dmem_rdata_i[l] : mem_res[l];
      end
    end
  end

  for (genvar l = 0; l < 2; l++) begin : g_mem
    // a load's value is not known before write-back: not forwarded from MEM
    assign mem_fwd_we[l]   = mem_we[l] && !mem_ld[l];
    assign dmem_re_o[l]    = mem_ld[l];
    assign dmem_we_o[l]    = mem_st[l];
    assign dmem_addr_o[l]  = mem_res[l];
    assign dmem_wdata_o[l] = mem_sdata[l];
  end

  assign fp_wb_en   = wb_we[0] && wb_rd[0].is_fp;
  assign fp_wb_addr = wb_rd[0].addr;
  assign fp_wb_data = wb_res[0];

  assign fp_wb_en_o   = fp_wb_en;
  assign fp_wb_addr_o = fp_wb_addr;
  assign fp_wb_data_o = fp_wb_out;

  for (genvar l = 0; l < 2; l++) begin : g_wb
    assign int_wb_en_o[l]   = wb_we[l] && !wb_rd[l].is_fp;
    assign int_wb_addr_o[l] = wb_rd[l].addr;
    assign int_wb_data_o[l] = wb_res[l];
  end

endmodule
