// Testbench for next_pc_logic (RESET_PC = 0x100, 16-entry prediction table).
//
// The testbench plays the decode stage: hold_pc is the address fetched in
// the previous cycle, and the hold opcode is set to BRANCH where the test
// says the pair in decode holds a branch. Each step states the expected
// fetch address, worked out by hand:
//   reset -> 0x100, then +8 per cycle; a rollback gives +4;
//   a taken update for 0x124 -> fetching 0x124 redirects the next fetch to
//   0x200 (one cycle later); the branch, now in decode, is not predicted a
//   second time, so 0x208 follows;
//   a branch at 0x300 that was not predicted at fetch is predicted from the
//   decode stage: the cycle after it is in decode, the fetch goes to 0x400;
//   a misprediction fetches the memory-stage target in the same cycle and
//   wins over a prediction due in that cycle;
//   a not-taken update stops the redirect.
module next_pc_logic_tb;
  import riscv_sub_pkg::*;

  logic        clk = 1'b0, rst;
  logic        rollback, mispredict, upd_v, upd_tk;
  logic [31:0] hold_pc, mem_tgt, upd_pc, upd_tgt, npc, prev_pc;
  logic [6:0]  hold_opc;
  logic        redir, hredir;
  int          checks = 0, failures = 0;
  int          n_seq = 0, n_rollback = 0, n_pred = 0, n_hold = 0, n_mispred = 0, n_ignored = 0;

  next_pc_logic #(.RESET_PC(32'h100)) dut (
    .clk(clk), .rst(rst), .rollback_i(rollback), .hold_pc_i(hold_pc), .hold_opcode_i(hold_opc),
    .mispredict_i(mispredict), .mem_target_i(mem_tgt), .upd_valid_i(upd_v), .upd_pc_i(upd_pc),
    .upd_taken_i(upd_tk), .upd_target_i(upd_tgt), .next_pc_o(npc), .bpu_redirect_o(redir),
    .hold_redirect_o(hredir));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one cycle: inputs are applied, the fetch address is checked, clock edge
  task automatic step(logic [31:0] e_pc, logic e_redir, logic e_hredir,
                      logic hold_branch = 1'b0, logic rb = 1'b0, logic mp = 1'b0,
                      logic [31:0] mt = '0, logic uv = 1'b0, logic [31:0] up = '0,
                      logic ut = 1'b0, logic [31:0] ug = '0);
    hold_pc = prev_pc; hold_opc = hold_branch ? 7'b1100011 : 7'b0010011;
    rollback = rb; mispredict = mp; mem_tgt = mt;
    upd_v = uv; upd_pc = up; upd_tk = ut; upd_tgt = ug;
    #1;
    checks++;
    if (npc !== e_pc || redir !== e_redir || hredir !== e_hredir) begin
      failures++;
      $display("FAIL fetch %h redirect %b/%b, expected %h %b/%b", npc, redir, hredir, e_pc, e_redir, e_hredir);
    end
    prev_pc = npc;
    @(posedge clk); #1;
  endtask

  initial begin
    rst = 1'b1; rollback = 0; mispredict = 0; upd_v = 0; upd_tk = 0; hold_opc = '0;
    hold_pc = '0; mem_tgt = '0; upd_pc = '0; upd_tgt = '0; prev_pc = '0;
    repeat (2) @(posedge clk); #1 rst = 1'b0;

    step(32'h100, 0, 0);                       n_seq++;
    step(32'h108, 0, 0);                       n_seq++;
    step(32'h110, 0, 0, .rb(1'b1));            n_rollback++;
    step(32'h114, 0, 0);
    // train: 0x124 taken to 0x200
    step(32'h11C, 0, 0, .uv(1'b1), .up(32'h124), .ut(1'b1), .ug(32'h200));
    step(32'h124, 0, 0);
    step(32'h200, 1, 0, .hold_branch(1'b1));   n_pred++;   // 0x124 pair in decode, branch
    step(32'h208, 0, 0);                       n_ignored++;
    step(32'h210, 0, 0, .uv(1'b1), .up(32'h300), .ut(1'b1), .ug(32'h400));
    // decode holds a branch at 0x300 (hold_pc is forced here)
    prev_pc = 32'h300;
    step(32'h218, 0, 0, .hold_branch(1'b1));
    step(32'h400, 1, 1);                       n_hold++;
    step(32'h408, 0, 0);
    // misprediction
    step(32'h500, 0, 0, .mp(1'b1), .mt(32'h500)); n_mispred++;
    step(32'h508, 0, 0);
    // misprediction wins over a due prediction: fetch 0x124 (predicted) ...
    step(32'h124, 0, 0, .mp(1'b1), .mt(32'h124)); n_mispred++;
    step(32'h600, 0, 0, .mp(1'b1), .mt(32'h600)); n_mispred++;
    step(32'h608, 0, 0);
    // not-taken update for 0x124, then fetch it again
    step(32'h610, 0, 0, .uv(1'b1), .up(32'h124), .ut(1'b0), .ug(32'h200));
    step(32'h124, 0, 0, .mp(1'b1), .mt(32'h124));
    step(32'h12C, 0, 0);
    step(32'h134, 0, 0, .rb(1'b1));            n_rollback++;
    step(32'h138, 0, 0);

    $display("sequential=%0d rollback=%0d predicted=%0d hold-predicted=%0d ignored=%0d mispredict=%0d",
             n_seq, n_rollback, n_pred, n_hold, n_ignored, n_mispred);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
