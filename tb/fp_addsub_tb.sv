// Testbench for fp_addsub.
//
// 1. The sums and differences of the reference waveforms, checked bit for
//    bit (the adder truncates exactly as those waveforms show).
// 2. Zero operands and exact cancellation.
// 3. 4000 random operand pairs of moderate exponent, checked against a
//    double-precision model: the error may not exceed two units in the last
//    place of the larger operand plus two of the result (truncation, with
//    no guard bits, loses up to one unit of the larger operand when the
//    smaller one is aligned, and one more when the result is normalised).
module fp_addsub_tb;
  import riscv_sub_pkg::*;

  logic  clk = 1'b0;
  fp32_t a, b, y;
  logic  sub;
  int    checks = 0, failures = 0;

  fp_addsub dut (.a_i(a), .b_i(b), .sub_i(sub), .y_o(y));

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

  function automatic real ulp(logic [31:0] v);
    return pow2(int'(v[30:23]) - 150);
  endfunction

  task automatic exact(logic [31:0] x, logic [31:0] z, logic s, logic [31:0] expect_y);
    a = x; b = z; sub = s;
    #1;
    checks++;
    if (y !== expect_y) begin
      failures++;
      $display("FAIL %h %s %h = %h, expected %h", x, s ? "-" : "+", z, y, expect_y);
    end
  endtask

  initial begin
    // values printed in the reference waveforms
    exact(32'h40A9999A, 32'h40266666, 1'b0, 32'h40FCCCCD);  // 5.3 + 2.6
    exact(32'h41940000, 32'h42B2CCCD, 1'b0, 32'h42D7CCCD);  // 18.5 + 89.4
    exact(32'h41466666, 32'h41080000, 1'b1, 32'h40799998);  // 12.4 - 8.5
    exact(32'h41280000, 32'h41480000, 1'b1, 32'hC0000000);  // 10.5 - 12.5
    exact(32'h40A9999A, 32'h40333333, 1'b0, 32'h41019999);  // 5.3 + 2.8
    exact(32'h40A9999A, 32'h40333333, 1'b1, 32'h40200002);  // 5.3 - 2.8
    // worked by hand: 21.6 + 10.2 = 0x41ACCCCD + 0x41233333
    //   1.35*16 + 1.275*8: M1 = 0xACCCCD, M2>>1 = 0x519999, sum 0xFE6666
    exact(32'h41ACCCCD, 32'h41233333, 1'b0, 32'h41FE6666);
    // 5.2 - 1.1: M1 = 0xA66666, M2 = 0x8CCCCD >> 2 = 0x233333,
    //   diff 0x833333, exponent 0x81 -> 0x40833333
    exact(32'h40A66666, 32'h3F8CCCCD, 1'b1, 32'h40833333);
    // zeros and cancellation
    exact(32'h00000000, 32'h40A00000, 1'b0, 32'h40A00000);
    exact(32'h40A00000, 32'h00000000, 1'b1, 32'h40A00000);
    exact(32'h00000000, 32'h40A00000, 1'b1, 32'hC0A00000);
    exact(32'h40A9999A, 32'h40A9999A, 1'b1, 32'h00000000);
    exact(32'hC0A9999A, 32'h40A9999A, 1'b0, 32'h00000000);
    exact(32'h3F800000, 32'h3F800000, 1'b0, 32'h40000000);  // 1 + 1 = 2
    exact(32'h3F800000, 32'hBF000000, 1'b0, 32'h3F000000);  // 1 - 0.5

    // random operands against a real-number model
    for (int i = 0; i < 4000; i++) begin
      logic [31:0] x, z;
      real r, e, tol;
      x = {$urandom_range(1, 0) == 1, 8'($urandom_range(154, 100)), 23'($urandom)};
      z = {$urandom_range(1, 0) == 1, 8'($urandom_range(154, 100)), 23'($urandom)};
      if (i % 4 == 0) z[30:23] = x[30:23];       // equal exponents
      a = x; b = z; sub = 1'($urandom);
      #1;
      e   = sub ? fp2real(x) - fp2real(z) : fp2real(x) + fp2real(z);
      r   = fp2real(y);
      tol = 2.0 * ((x[30:23] > z[30:23]) ? ulp(x) : ulp(z)) + 2.0 * ((e < 0 ? -e : e) / 8388608.0);
      checks++;
      if ((r - e > tol) || (e - r > tol) || (y[30:23] == 8'hFF)) begin
        failures++;
        if (failures < 10) $display("FAIL rand %h %s %h = %h (%g), expected %g", x, sub ? "-" : "+", z, y, r, e);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
