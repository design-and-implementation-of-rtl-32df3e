// Testbench for bpu_issue: random PCs and opcodes; whenever the decode-stage
// opcode is the RV32 BRANCH opcode (1100011) the hold-register PC must be
// forwarded, otherwise the fetch-stage PC. Every opcode value is tried.
module bpu_issue_tb;
  logic        clk = 1'b0;
  logic [31:0] if_pc, hold_pc, pc;
  logic [6:0]  opc;
  logic        is_br;
  int          checks = 0, failures = 0, n_hold = 0;

  bpu_issue dut (.if_pc_i(if_pc), .hold_pc_i(hold_pc), .hold_opcode_i(opc),
                 .bpu_pc_o(pc), .hold_is_branch_o(is_br));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      if_pc   = $urandom;
      hold_pc = $urandom;
      opc     = (i < 128) ? 7'(i) : ((i % 3 == 0) ? 7'b1100011 : 7'($urandom));
      @(posedge clk);
      checks++;
      if (opc == 7'b1100011) begin
        n_hold++;
        if (pc !== hold_pc || is_br !== 1'b1) begin failures++; $display("FAIL branch opc: %h", pc); end
      end else begin
        if (pc !== if_pc || is_br !== 1'b0) begin failures++; $display("FAIL opc %b: %h", opc, pc); end
      end
    end
    checks++;
    if (n_hold < 10) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
