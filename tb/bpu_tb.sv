// Testbench for bpu (branch target buffer, 16 entries).
//
// Directed: no prediction after reset; a taken update makes the next lookup
// of that PC predict taken with its target, one cycle after the lookup; a
// not-taken update turns it off; a PC with the same index but another tag
// misses and, once written, evicts the first. Random: 3000 cycles of random
// updates and lookups over 64 PCs, against a model that keeps, per index,
// the last PC written, its target and outcome.
module bpu_tb;
  logic        clk = 1'b0, rst;
  logic [31:0] lk_pc, up_pc, up_tgt, p_tgt;
  logic        up_v, up_tk, p_tk;
  int          checks = 0, failures = 0;

  bpu #(.AW(32), .ENTRIES(16)) dut (
    .clk(clk), .rst(rst), .lookup_pc_i(lk_pc), .pred_taken_o(p_tk), .pred_target_o(p_tgt),
    .upd_valid_i(up_v), .upd_pc_i(up_pc), .upd_taken_i(up_tk), .upd_target_i(up_tgt));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // model: per index, last PC written
  logic        m_valid [16];
  logic [31:0] m_pc    [16];
  logic [31:0] m_tgt   [16];
  logic        m_tk    [16];

  task automatic cycle(logic [31:0] l, logic uv, logic [31:0] up, logic ut, logic [31:0] ug,
                       logic check_it, logic e_tk, logic [31:0] e_tgt);
    lk_pc = l; up_v = uv; up_pc = up; up_tk = ut; up_tgt = ug;
    @(posedge clk); #1;
    if (check_it) begin
      checks++;
      if (p_tk !== e_tk || (e_tk && p_tgt !== e_tgt)) begin
        failures++;
        $display("FAIL lookup %h: taken %b target %h, expected %b %h", l, p_tk, p_tgt, e_tk, e_tgt);
      end
    end
  endtask

  initial begin
    rst = 1'b1; up_v = 1'b0; lk_pc = '0; up_pc = '0; up_tk = 1'b0; up_tgt = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    cycle(32'h0000_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b0, '0);                       // empty
    cycle(32'h0000_0040, 1'b1, 32'h0000_0040, 1'b1, 32'h0000_0800, 1'b1, 1'b0, '0);  // old contents
    cycle(32'h0000_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b1, 32'h0000_0800);             // hit
    cycle(32'h0000_0080, 1'b0, '0, 1'b0, '0, 1'b1, 1'b0, '0);                        // other index
    cycle(32'h0001_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b0, '0);                        // same index, other tag
    cycle(32'h0000_0040, 1'b1, 32'h0000_0040, 1'b0, 32'h0000_0800, 1'b1, 1'b1, 32'h0000_0800);
    cycle(32'h0000_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b0, '0);                        // not taken now
    cycle(32'h0001_0040, 1'b1, 32'h0001_0040, 1'b1, 32'h0000_0900, 1'b0, 1'b0, '0);
    cycle(32'h0001_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b1, 32'h0000_0900);
    cycle(32'h0000_0040, 1'b0, '0, 1'b0, '0, 1'b1, 1'b0, '0);                        // evicted

    // random, against the model (reset first)
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    for (int i = 0; i < 16; i++) m_valid[i] = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      logic [31:0] l, u, g;
      logic        uv, ut, e_tk;
      logic [3:0]  li, ui;
      l  = {24'(($urandom_range(3, 0)) << 4), 8'd0} | {26'd0, 4'($urandom), 2'b00};
      u  = {24'(($urandom_range(3, 0)) << 4), 8'd0} | {26'd0, 4'($urandom), 2'b00};
      uv = ($urandom_range(2, 0) == 0);
      ut = 1'($urandom);
      g  = $urandom;
      li = l[5:2];
      e_tk = m_valid[li] && m_tk[li] && m_pc[li] == l;
      cycle(l, uv, u, ut, g, 1'b1, e_tk, m_tgt[li]);
      if (uv) begin
        ui = u[5:2];
        m_valid[ui] = 1'b1; m_pc[ui] = u; m_tgt[ui] = g; m_tk[ui] = ut;
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
