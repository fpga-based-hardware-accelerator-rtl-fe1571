// tb_marginalizer: streams random tables, one row per clock, into two
// instances, one with a row of all 20 states and one with rows of 4 states
// (five chunks per setting of the other variables). The accumulated marginal
// is checked against a reference: when the target is variable 0, state
// chunk * LANES + j adds word j of each row; otherwise a pairwise tree sum of
// each row (padded with zeros to a power of two) is added into the bucket of
// the row's target state. Also checks 'clear' and that the result is complete
// two clocks after the last row.
module tb_marginalizer;
  import fp_ref_pkg::*;
  localparam int C  = 20;
  localparam int L2 = 4;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        clear = 0, in_valid = 0, tgt_is_v0 = 0;
  logic [4:0]  tgt_dig = '0, chunk = '0, chunk2 = '0;
  logic [31:0] row [C];
  logic [31:0] row2 [L2];
  logic [31:0] msg [C];
  logic [31:0] msg2 [C];
  logic [31:0] model [C];
  logic [31:0] model2 [C];
  int checks = 0, failures = 0;

  marginalizer #(.N_STATES(C), .LANES(C)) dut (
    .clk, .rst_n, .clear, .in_valid, .tgt_is_v0, .tgt_dig, .chunk, .row, .msg);
  marginalizer #(.N_STATES(C), .LANES(L2)) dut4 (
    .clk, .rst_n, .clear, .in_valid, .tgt_is_v0, .tgt_dig, .chunk(chunk2), .row(row2), .msg(msg2));

  function automatic logic [31:0] tree_sum(logic [31:0] v [], int n, int leaves);
    logic [31:0] t [32];
    for (int k = 0; k < 32; k++) t[k] = (k < n) ? v[k] : 32'd0;
    for (int w = leaves / 2; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) t[k] = fadd(t[2*k], t[2*k+1]);
    return t[0];
  endfunction

  task automatic run_table(bit v0, int nrows);
    logic [31:0] d [];
    clear = 1;
    @(negedge clk);
    clear = 0;
    for (int j = 0; j < C; j++) begin model[j] = 32'd0; model2[j] = 32'd0; end
    for (int r = 0; r < nrows; r++) begin
      in_valid = 1; tgt_is_v0 = v0; tgt_dig = 5'($urandom_range(0, C - 1));
      chunk = 5'd0; chunk2 = 5'(r % (C / L2));
      for (int j = 0; j < C; j++) row[j] = rand_prob();
      for (int j = 0; j < L2; j++) row2[j] = rand_prob();
      if (v0) begin
        for (int j = 0; j < C; j++) model[j] = fadd(model[j], row[j]);
        for (int j = 0; j < L2; j++) model2[chunk2 * L2 + j] = fadd(model2[chunk2 * L2 + j], row2[j]);
      end else begin
        d = new[C];
        for (int j = 0; j < C; j++) d[j] = row[j];
        model[tgt_dig] = fadd(model[tgt_dig], tree_sum(d, C, 32));
        d = new[L2];
        for (int j = 0; j < L2; j++) d[j] = row2[j];
        model2[tgt_dig] = fadd(model2[tgt_dig], tree_sum(d, L2, L2));
      end
      @(negedge clk);
    end
    in_valid = 0;
    tgt_is_v0 = ~v0;  // must not matter once the rows are in
    @(negedge clk);
    @(negedge clk);
    for (int j = 0; j < C; j++) begin
      checks += 2;
      if (msg[j] !== model[j]) begin
        failures++;
        if (failures < 10) $display("v0=%0d bucket %0d: %h expected %h", v0, j, msg[j], model[j]);
      end
      if (msg2[j] !== model2[j]) begin
        failures++;
        if (failures < 10) $display("4-lane v0=%0d bucket %0d: %h expected %h", v0, j, msg2[j], model2[j]);
      end
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
    for (int j = 0; j < C; j++) row[j] = '0;
    for (int j = 0; j < L2; j++) row2[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 10; k++) begin
      run_table(1'b1, 400);
      run_table(1'b0, 400);
    end
    run_table(1'b0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
