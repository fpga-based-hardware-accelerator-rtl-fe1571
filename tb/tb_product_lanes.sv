// tb_product_lanes: drives random rows of factor entries, random messages,
// digits and variable masks into two instances, one lane per state (20 lanes)
// and an unroll factor of 4 (a row is one of five chunks of variable 0's
// states). Every lane is checked one clock later against the reference product
// ((f * m0[x0]) * m1[dig1]) * m2[dig2], where x0 = chunk * LANES + lane and
// unselected variables are skipped. Also checks the one-clock valid latency.
module tb_product_lanes;
  import fp_ref_pkg::*;
  localparam int C  = 20;
  localparam int L2 = 4;
  localparam int MS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          in_valid = 0, out_valid, out_valid2;
  logic [31:0]   f [C];
  logic [31:0]   f2 [L2];
  logic [4:0]    dig [MS];
  logic [4:0]    dig2 [MS];
  logic [MS-1:0] mask;
  logic [31:0]   msg [MS][C];
  logic [31:0]   p [C];
  logic [31:0]   p2 [L2];
  logic [31:0]   expv [C];
  logic [31:0]   expv2 [L2];
  int checks = 0, failures = 0;

  product_lanes #(.N_STATES(C), .LANES(C), .MAX_SCOPE(MS)) dut (
    .clk, .rst_n, .in_valid, .f, .dig, .mask, .msg, .out_valid, .p);
  product_lanes #(.N_STATES(C), .LANES(L2), .MAX_SCOPE(MS)) dut4 (
    .clk, .rst_n, .in_valid, .f(f2), .dig(dig2), .mask, .msg, .out_valid(out_valid2), .p(p2));

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask = '0;
    for (int s = 0; s < MS; s++) begin dig[s] = '0; dig2[s] = '0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 3000; k++) begin
      for (int s = 0; s < MS; s++) begin
        for (int j = 0; j < C; j++) msg[s][j] = rand_prob();
        dig[s]  = (s == 0) ? 5'd0 : 5'($urandom_range(0, C - 1));
        dig2[s] = (s == 0) ? 5'($urandom_range(0, C / L2 - 1)) : 5'($urandom_range(0, C - 1));
      end
      mask = MS'($urandom);
      for (int j = 0; j < C; j++) begin
        f[j] = rand_prob();
        expv[j] = f[j];
        for (int s = 0; s < MS; s++)
          if (mask[s]) expv[j] = fmul(expv[j], msg[s][(s == 0) ? j : int'(dig[s])]);
      end
      for (int j = 0; j < L2; j++) begin
        f2[j] = rand_prob();
        expv2[j] = f2[j];
        for (int s = 0; s < MS; s++)
          if (mask[s]) expv2[j] = fmul(expv2[j], msg[s][(s == 0) ? int'(dig2[0]) * L2 + j : int'(dig2[s])]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      chk(out_valid && out_valid2, "out_valid one clock after in_valid");
      for (int j = 0; j < C; j++)
        chk(p[j] === expv[j], $sformatf("lane %0d mask %b: %h expected %h", j, mask, p[j], expv[j]));
      for (int j = 0; j < L2; j++)
        chk(p2[j] === expv2[j], $sformatf("4-lane: lane %0d chunk %0d mask %b: %h expected %h", j, dig2[0], mask, p2[j], expv2[j]));
      @(negedge clk);
      chk(!out_valid && !out_valid2, "out_valid drops");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
