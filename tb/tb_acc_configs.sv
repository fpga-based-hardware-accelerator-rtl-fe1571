// tb_acc_configs: the accelerator in three optimization configurations other
// than the default, side by side, each driven by acc_config_harness:
//   4 lanes, pipelined        - partial unrolling
//   20 lanes, not pipelined   - unrolling only
//   1 lane, not pipelined     - neither optimization
// Each harness checks its messages bit for bit and its operation latencies.
module tb_acc_configs;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic done_a, done_b, done_c;
  int   chk_a, chk_b, chk_c, fail_a, fail_b, fail_c;
  int   checks, failures;

  acc_config_harness #(.LANES(4),  .PIPELINE(1'b1)) u_a (.clk, .rst_n, .finished(done_a), .checks(chk_a), .failures(fail_a));
  acc_config_harness #(.LANES(20), .PIPELINE(1'b0)) u_b (.clk, .rst_n, .finished(done_b), .checks(chk_b), .failures(fail_b));
  acc_config_harness #(.LANES(1),  .PIPELINE(1'b0)) u_c (.clk, .rst_n, .finished(done_c), .checks(chk_c), .failures(fail_c));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c, fail_a + fail_b + fail_c + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_a && done_b && done_c);
    checks   = chk_a + chk_b + chk_c;
    failures = fail_a + fail_b + fail_c;
    $display("4 lanes pipelined: %0d checks, 20 lanes unpipelined: %0d, 1 lane unpipelined: %0d",
             chk_a, chk_b, chk_c);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
