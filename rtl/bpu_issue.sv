// Branch prediction issuing unit of the fetch stage (combinational).
//
// Chooses the PC the branch prediction unit looks up. The opcode of the
// instruction held in the decode stage is compared with the branch opcode;
// on a match the PC from the decode stage's hold register is passed on,
// otherwise the PC of the instruction being fetched. This two-way
// multiplexer with an equality compare is the document's. The branch opcode
// is the RV32 BRANCH major opcode (1100011) by default, this design's
// reading of "branch instruction opcode".
//
// Interface: if_pc_i, hold_pc_i, hold_opcode_i in; bpu_pc_o and
// hold_is_branch_o (the mux select) out.
module bpu_issue
  import riscv_sub_pkg::*;
#(
  parameter int unsigned AW          = 32,
  parameter logic [6:0]  BRANCH_OPC  = OPC_BRANCH
) (
  input  logic [AW-1:0] if_pc_i,
  input  logic [AW-1:0] hold_pc_i,
  input  logic [6:0]    hold_opcode_i,
  output logic [AW-1:0] bpu_pc_o,
  output logic          hold_is_branch_o
);

  assign hold_is_branch_o = (hold_opcode_i == BRANCH_OPC);
  assign bpu_pc_o         = hold_is_branch_o ? hold_pc_i : if_pc_i;

endmodule
