// Testbench for forwarding_unit, both lanes.
//
// Directed: the select/data pairs of the reference waveform (select 0, 1, 5,
// 2 give D0, D1, D5, D2) are produced by placing the source register in the
// matching stage. Then 5000 random cases over a small register space (so
// that matches are frequent) against a model that applies the rules in
// order: no register source or no match -> own decode value; a memory-stage
// match (pipeline 2 before pipeline 1) before a write-back match; integer
// x0 never forwarded; register files distinguished. Each of the six
// selections must occur.
module forwarding_unit_tb;
  import riscv_sub_pkg::*;

  logic        clk = 1'b0;
  logic [31:0] d [6];
  logic        sv;
  reg_tag_t    src;
  logic        mwe [2], wwe [2];
  reg_tag_t    mrd [2], wrd [2];
  logic [2:0]  sel0, sel1;
  logic [31:0] q0, q1;
  int          checks = 0, failures = 0;
  int          seen [6];

  forwarding_unit #(.LANE(0)) dut0 (.d_i(d), .src_valid_i(sv), .src_i(src), .mem_we_i(mwe),
    .mem_rd_i(mrd), .wb_we_i(wwe), .wb_rd_i(wrd), .sel_o(sel0), .data_o(q0));
  forwarding_unit #(.LANE(1)) dut1 (.d_i(d), .src_valid_i(sv), .src_i(src), .mem_we_i(mwe),
    .mem_rd_i(mrd), .wb_we_i(wwe), .wb_rd_i(wrd), .sel_o(sel1), .data_o(q1));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int model(int lane);
    int cand [4] = '{3, 2, 5, 4};
    if (!sv || (!src.is_fp && src.addr == 0)) return lane;
    foreach (cand[k]) begin
      int c = cand[k];
      logic we = (c < 4) ? mwe[c - 2] : wwe[c - 4];
      reg_tag_t rd = (c < 4) ? mrd[c - 2] : wrd[c - 4];
      if (we && rd == src) return c;
    end
    return lane;
  endfunction

  task automatic check_both();
    int e0, e1;
    #1;
    e0 = model(0); e1 = model(1);
    checks += 2;
    if (sel0 !== 3'(e0) || q0 !== d[e0]) begin failures++; $display("FAIL lane0 sel %0d exp %0d", sel0, e0); end
    if (sel1 !== 3'(e1) || q1 !== d[e1]) begin failures++; $display("FAIL lane1 sel %0d exp %0d", sel1, e1); end
    seen[e0]++; seen[e1]++;
  endtask

  initial begin
    // reference waveform data words
    d = '{32'h34765678, 32'h1A896678, 32'h00145678, 32'h12345678, 32'h1001A101, 32'h128456BD};
    sv = 1'b1; src = '{1'b0, 5'd7};
    mwe = '{1'b0, 1'b0}; wwe = '{1'b0, 1'b0};
    mrd = '{default: '0}; wrd = '{default: '0};
    check_both();                                   // D0 / D1
    checks++; if (q0 !== 32'h34765678 || q1 !== 32'h1A896678) failures++;
    wwe[1] = 1'b1; wrd[1] = '{1'b0, 5'd7};
    check_both();                                   // D5
    checks++; if (q0 !== 32'h128456BD) failures++;
    mwe[0] = 1'b1; mrd[0] = '{1'b0, 5'd7};
    check_both();                                   // D2 beats D5
    checks++; if (q0 !== 32'h00145678) failures++;
    src = '{1'b1, 5'd7};
    check_both();                                   // FP reg 7 is not x7
    checks++; if (q0 !== 32'h34765678) failures++;

    for (int i = 0; i < 5000; i++) begin
      foreach (d[k]) d[k] = $urandom;
      sv  = ($urandom_range(5, 0) != 0);
      src = '{1'($urandom), 5'($urandom_range(3, 0))};
      for (int p = 0; p < 2; p++) begin
        mwe[p] = 1'($urandom); wwe[p] = 1'($urandom);
        mrd[p] = '{1'($urandom), 5'($urandom_range(3, 0))};
        wrd[p] = '{1'($urandom), 5'($urandom_range(3, 0))};
      end
      check_both();
    end

    foreach (seen[k]) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL selection D%0d never made", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
