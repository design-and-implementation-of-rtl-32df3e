// Testbench for fpu.
//
// Steps the select lines through 00, 01, 10, 11 for the operands of the
// reference FPU waveform (5.3 and 2.8) and checks the printed results bit
// for bit on an instance with MUL_W = 14 (the multiplier those results
// come from): 0, 0x41019999, 0x40200002, 0x416D6A29. The default instance
// (full product) must agree except for the product, 0x416D70A4. Random
// operands then check that each select code routes the matching operation:
// the FPU output must equal a separately instantiated fp_addsub / fp_mul.
module fpu_tb;
  import riscv_sub_pkg::*;

  logic     clk = 1'b0;
  fp32_t    a, b, y, y14, ref_add, ref_sub, ref_mul;
  fpu_sel_e sel;
  int       checks = 0, failures = 0;

  fpu                 dut   (.a_i(a), .b_i(b), .sel_i(sel), .y_o(y));
  fpu #(.MUL_W(14))   dut14 (.a_i(a), .b_i(b), .sel_i(sel), .y_o(y14));

  fp_addsub u_ref_add (.a_i(a), .b_i(b), .sub_i(1'b0), .y_o(ref_add));
  fp_addsub u_ref_sub (.a_i(a), .b_i(b), .sub_i(1'b1), .y_o(ref_sub));
  fp_mul    u_ref_mul (.a_i(a), .b_i(b), .y_o(ref_mul));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s sel=%b: %h, expected %h", what, sel, got, exp_v);
    end
  endtask

  initial begin
    logic [31:0] printed [4] = '{32'h00000000, 32'h41019999, 32'h40200002, 32'h416D6A29};
    logic [31:0] full    [4] = '{32'h00000000, 32'h41019999, 32'h40200002, 32'h416D70A4};
    a = 32'h40A9999A;
    b = 32'h40333333;
    for (int s = 0; s < 4; s++) begin
      sel = fpu_sel_e'(s);
      @(posedge clk);
      check("MUL_W=14", y14, printed[s]);
      check("default", y, full[s]);
    end

    for (int i = 0; i < 2000; i++) begin
      a   = {1'($urandom), 8'($urandom_range(150, 100)), 23'($urandom)};
      b   = {1'($urandom), 8'($urandom_range(150, 100)), 23'($urandom)};
      sel = fpu_sel_e'($urandom_range(3, 0));
      #1;
      unique case (sel)
        FPU_ZERO: check("rand", y, 32'h0);
        FPU_ADD:  check("rand", y, ref_add);
        FPU_SUB:  check("rand", y, ref_sub);
        FPU_MUL:  check("rand", y, ref_mul);
      endcase
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
