// Next-PC logic of the fetch stage (two instructions fetched per cycle).
//
// Three multiplexers in a row, as in the document's next-PC diagram:
//   1. PC+4 or PC+8 of the address being fetched. PC+8 steps over the pair
//      just fetched; PC+4 is chosen when the decode stage declares a
//      rollback (only the first of the pair was taken). The choice is
//      registered (seq_q), giving the sequential next fetch address.
//   2. seq_q or the target predicted by the branch prediction unit.
//   3. that result or the correct branch target from the memory stage when a
//      misprediction is reported there (highest priority).
// The output of the third multiplexer, next_pc_o, is the address sent to the
// instruction cache in the current cycle, and it is also the "PC from IF"
// that the BPU issuing unit offers to the prediction unit. Because the
// prediction unit reads synchronously, a prediction looked up for the
// address fetched in cycle t steers the fetch of cycle t+1.
//
// When the decode stage holds a branch, the issuing unit looks up the hold
// register's PC instead. The result of such a hold lookup is dropped when,
// in the cycle of the lookup, the fetch was redirected: by a misprediction
// or by a hold-lookup prediction the pair in decode is being discarded, and
// by a fetch-time prediction the branch in decode is the one that was just
// predicted, whose target must not be fetched twice. This guard is this
// design's own. hold_redirect_o flags a redirect
// made by a hold lookup: the pair in decode at that moment was fetched after
// the branch. Reset sets the first fetch address to RESET_PC.
//
// Timing: next_pc_o is combinational from registers and from mispredict_i /
// mem_target_i.
module next_pc_logic
  import riscv_sub_pkg::*;
#(
  parameter int unsigned AW          = 32,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000,
  parameter int unsigned BTB_ENTRIES = 16
) (
  input  logic          clk,
  input  logic          rst,
  // decode stage
  input  logic          rollback_i,
  input  logic [AW-1:0] hold_pc_i,
  input  logic [6:0]    hold_opcode_i,
  // memory stage: branch resolution
  input  logic          mispredict_i,
  input  logic [AW-1:0] mem_target_i,
  input  logic          upd_valid_i,
  input  logic [AW-1:0] upd_pc_i,
  input  logic          upd_taken_i,
  input  logic [AW-1:0] upd_target_i,
  // to the instruction cache
  output logic [AW-1:0] next_pc_o,
  output logic          bpu_redirect_o,   // next_pc_o is a predicted target
  output logic          hold_redirect_o   // ... from a decode-stage (hold) lookup
);

  logic [AW-1:0] seq_q;
  logic [AW-1:0] bpu_pc;
  logic          hold_is_branch;
  logic          pred_taken;
  logic [AW-1:0] pred_target;
  logic          ignore_q;
  logic          if_lookup_q;     // registered prediction came from an IF lookup
  logic          pred_use;
  logic [AW-1:0] after_bpu;

  bpu_issue #(.AW(AW)) u_issue (
    .if_pc_i          (next_pc_o),
    .hold_pc_i        (hold_pc_i),
    .hold_opcode_i    (hold_opcode_i),
    .bpu_pc_o         (bpu_pc),
    .hold_is_branch_o (hold_is_branch)
  );

  bpu #(.AW(AW), .ENTRIES(BTB_ENTRIES)) u_bpu (
    .clk           (clk),
    .rst           (rst),
    .lookup_pc_i   (bpu_pc),
    .pred_taken_o  (pred_taken),
    .pred_target_o (pred_target),
    .upd_valid_i   (upd_valid_i),
    .upd_pc_i      (upd_pc_i),
    .upd_taken_i   (upd_taken_i),
    .upd_target_i  (upd_target_i)
  );

  // multiplexer 1 and its register
  always_ff @(posedge clk) begin
    if (rst) begin
      seq_q       <= AW'(RESET_PC);
      ignore_q    <= 1'b0;
      if_lookup_q <= 1'b0;
    end else begin
      seq_q       <= rollback_i ? next_pc_o + AW'(4) : next_pc_o + AW'(8);
      // a hold lookup made while the fetch is redirected is stale
      ignore_q    <= hold_is_branch && (mispredict_i || pred_use);
      if_lookup_q <= !hold_is_branch;
    end
  end

  // multiplexers 2 and 3
  assign pred_use        = pred_taken && !ignore_q;
  assign bpu_redirect_o  = pred_use && !mispredict_i;
  assign hold_redirect_o = bpu_redirect_o && !if_lookup_q;
  assign after_bpu       = pred_use ? pred_target : seq_q;
  assign next_pc_o      = mispredict_i ? mem_target_i : after_bpu;

endmodule
