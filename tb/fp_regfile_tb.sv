// Testbench for fp_regfile (32 x 32, two read ports).
//
// After reset every register reads 0. The write-back sequence of the
// reference waveform (address 0x1E with 0x124578AD, 0x1C with 0x348278AD
// while disabled, 0x01 with 0x124578AD) is replayed. Then 3000 random
// cycles of writes and reads are checked against an array model,
// including reads of the register being written in the same cycle, which
// must return the new data.
module fp_regfile_tb;
  logic        clk = 1'b0, rst, en;
  logic [4:0]  wa;
  logic [31:0] wd, wo;
  logic [4:0]  ra [2];
  logic [31:0] rdat [2];
  logic [31:0] model [32];
  int          checks = 0, failures = 0;

  fp_regfile dut (.clk(clk), .rst(rst), .wb_en_i(en), .wb_addr_i(wa), .wb_data_i(wd),
                  .wb_out_o(wo), .rd_addr_i(ra), .rd_data_o(rdat));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, logic [31:0] got, logic [31:0] e);
    checks++;
    if (got !== e) begin failures++; $display("FAIL %s: %h expected %h", what, got, e); end
  endtask

  function automatic logic [31:0] expect_rd(logic [4:0] a);
    return (en && a == wa) ? wd : model[a];
  endfunction

  initial begin
    rst = 1'b1; en = 1'b0; wa = '0; wd = '0; ra = '{default: '0};
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int i = 0; i < 32; i++) model[i] = '0;
    for (int i = 0; i < 32; i++) begin
      ra[0] = 5'(i); ra[1] = 5'(31 - i); #1;
      chk("after reset", rdat[0], 32'h0);
      chk("after reset", rdat[1], 32'h0);
    end

    // the reference waveform's write-back sequence
    en = 1'b1; wa = 5'h1E; wd = 32'h124578AD; #1;
    chk("wb_out write-through", wo, 32'h124578AD);
    @(posedge clk); #1; model[5'h1E] = 32'h124578AD;
    en = 1'b0; wa = 5'h1C; wd = 32'h348278AD; #1;
    chk("wb_out disabled", wo, 32'h0);
    @(posedge clk); #1;
    en = 1'b1; wa = 5'h01; wd = 32'h124578AD;
    @(posedge clk); #1; model[5'h01] = 32'h124578AD;
    en = 1'b0; wa = 5'h1E; #1;
    chk("wb_out read back", wo, 32'h124578AD);
    wa = 5'h1C; #1;
    chk("not written", wo, 32'h0);

    for (int i = 0; i < 3000; i++) begin
      en = 1'($urandom); wa = 5'($urandom); wd = $urandom;
      ra[0] = (i % 5 == 0) ? wa : 5'($urandom);
      ra[1] = 5'($urandom);
      #1;
      chk("read 0", rdat[0], expect_rd(ra[0]));
      chk("read 1", rdat[1], expect_rd(ra[1]));
      chk("wb_out", wo, expect_rd(wa));
      @(posedge clk); #1;
      if (en) model[wa] = wd;
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
