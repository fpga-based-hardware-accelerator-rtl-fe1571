// tb_fp_add: checks fp_add against a double-precision reference. Random
// operands with exponent fields less than 29 apart (where the reference is
// exact), same- and opposite-signed, near-cancellations, operands whose
// exponents differ by more than the significand width, and special values.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_add dut (.a, .b, .y);

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = fadd(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("fp_add %h + %h = %h, expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    check(32'h3f80_0000, 32'h3f80_0000);  // 1 + 1
    check(32'h3f80_0000, 32'hbf80_0000);  // 1 - 1 = +0
    check(32'h3f80_0001, 32'hbf80_0000);  // cancellation
    check(32'h4b80_0000, 32'h3f80_0000);  // 2^24 + 1, tie to even
    check(32'h4b80_0001, 32'h3f80_0000);  // tie, round up
    check(32'h7f7f_ffff, 32'h7f7f_ffff);  // overflow
    check(32'h7f80_0000, 32'hff80_0000);  // inf - inf = NaN
    check(32'hff80_0000, 32'h3f80_0000);
    check(32'h8000_0000, 32'h8000_0000);  // -0 + -0
    check(32'h0000_0000, 32'h4049_0fdb);
    check(32'h00ff_ffff, 32'h8080_0001);  // result below normal range
    for (int i = 0; i < 30000; i++) begin
      x = rand_float(40, 200);
      z = x;
      z[31] = 1'($urandom);
      z[30:23] = 8'(int'(x[30:23]) - 28 + int'($urandom_range(0, 56)));
      z[22:0] = 23'($urandom);
      check(x, z);
    end
    for (int i = 0; i < 5000; i++) begin  // near-cancellation
      x = rand_float(40, 200);
      z = x ^ 32'h8000_0000;
      z[7:0] = 8'($urandom);
      if ($urandom_range(0, 1) == 1) z[30:23] = z[30:23] - 8'd1;
      check(x, z);
    end
    for (int i = 0; i < 2000; i++) begin  // far apart: small operand only rounds
      x = rand_float(100, 200);
      z = rand_float(1, 60);
      check(x, z);
    end
    for (int i = 0; i < 5000; i++) check(rand_prob(), rand_prob());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
