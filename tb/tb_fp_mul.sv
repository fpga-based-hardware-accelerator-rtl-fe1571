// tb_fp_mul: checks fp_mul against a double-precision reference on random
// operands (including results that overflow and underflow) and on special
// values: zeros, infinities, NaN, 1.0 and values whose product rounds up into
// the next binade.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = fmul(x, z);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("fp_mul %h * %h = %h, expected %h", x, z, y, exp_y);
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
    check(32'h3f80_0000, 32'h4000_0000);  // 1 * 2
    check(32'h3fc0_0000, 32'h3fc0_0000);  // 1.5 * 1.5
    check(32'h3fff_ffff, 32'h3fff_ffff);  // rounds into next binade
    check(32'h3f80_0001, 32'h3f80_0001);
    check(32'h0000_0000, 32'hbf80_0000);  // 0 * -1
    check(32'h7f80_0000, 32'h3f80_0000);  // inf
    check(32'h7f80_0000, 32'h0000_0000);  // inf * 0 = NaN
    check(32'h7fc0_0001, 32'h3f80_0000);  // NaN
    check(32'h7f7f_ffff, 32'h4000_0000);  // overflow
    check(32'h0080_0000, 32'h3f00_0000);  // underflow -> 0
    check(32'h0000_1234, 32'h3f80_0000);  // subnormal in -> 0
    for (int i = 0; i < 20000; i++) check(rand_float(64, 190), rand_float(64, 190));
    for (int i = 0; i < 5000; i++)  check(rand_float(1, 254), rand_float(1, 254));
    for (int i = 0; i < 5000; i++)  check(rand_prob(), rand_prob());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
