// Testbench for fp_mul.
//
// Two instances: the default full 24-bit mantissa product, and MUL_W = 14,
// the narrow multiplier that reproduces the products printed in the
// reference waveforms. Checks:
// 1. printed products, bit for bit, on the MUL_W = 14 instance;
// 2. the same operands on the full instance, against products worked out
//    by hand from the 48-bit mantissa product, truncated;
// 3. zero operands and sign rules;
// 4. 4000 random pairs on the full instance against a double-precision
//    model, within two units in the last place of the result.
module fp_mul_tb;
  import riscv_sub_pkg::*;

  logic  clk = 1'b0;
  fp32_t a, b, y_full, y_narrow;
  int    checks = 0, failures = 0;

  fp_mul                 dut_full   (.a_i(a), .b_i(b), .y_o(y_full));
  fp_mul #(.MUL_W(14))   dut_narrow (.a_i(a), .b_i(b), .y_o(y_narrow));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real pow2(int e);
    real r = 1.0;
    if (e >= 0) for (int i = 0; i < e; i++) r = r * 2.0;
    else        for (int i = 0; i < -e; i++) r = r / 2.0;
    return r;
  endfunction

  function automatic real fp2real(logic [31:0] v);
    real m;
    if (v[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(v[22:0]) / 8388608.0;
    m = m * pow2(int'(v[30:23]) - 127);
    return v[31] ? -m : m;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp_v);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: %h * %h = %h, expected %h", what, a, b, got, exp_v);
    end
  endtask

  task automatic both(logic [31:0] x, logic [31:0] z, logic [31:0] e_full, logic [31:0] e_narrow);
    a = x; b = z;
    #1;
    check("full", y_full, e_full);
    check("narrow", y_narrow, e_narrow);
  endtask

  initial begin
    // operands and narrow products from the reference waveforms; full
    // products: 5.3*2.3 -> mantissa product 0x61851ED147AE, bits 45..23
    both(32'h40A9999A, 32'h40133333, 32'h41430A3D, 32'h41430429);  // 5.3 * 2.3
    both(32'h410F3333, 32'h40B8F5C3, 32'h424EEC8B, 32'h424EE5F3);  // 8.95 * 5.78
    both(32'h40A9999A, 32'h40333333, 32'h416D70A4, 32'h416D6A29);  // 5.3 * 2.8
    // exact small cases
    both(32'h40000000, 32'h40400000, 32'h40C00000, 32'h40C00000);  // 2 * 3 = 6
    both(32'hC0000000, 32'h40400000, 32'hC0C00000, 32'hC0C00000);  // -2 * 3
    both(32'hBFC00000, 32'hBFC00000, 32'h40100000, 32'h40100000);  // -1.5 * -1.5 = 2.25
    both(32'h00000000, 32'h40A9999A, 32'h00000000, 32'h00000000);  // 0 * x
    both(32'h40A9999A, 32'h80000000, 32'h00000000, 32'h00000000);  // x * -0
    both(32'h00000000, 32'h00000000, 32'h00000000, 32'h00000000);

    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, z;
      real r, e, tol;
      x = {1'($urandom), 8'($urandom_range(170, 85)), 23'($urandom)};
      z = {1'($urandom), 8'($urandom_range(170, 85)), 23'($urandom)};
      a = x; b = z;
      #1;
      e   = fp2real(x) * fp2real(z);
      r   = fp2real(y_full);
      tol = 2.0 * (e < 0 ? -e : e) / 8388608.0;
      checks++;
      if ((r - e > tol) || (e - r > tol)) begin
        failures++;
        if (failures < 10) $display("FAIL rand %h * %h = %h (%g), expected %g", x, z, y_full, r, e);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
