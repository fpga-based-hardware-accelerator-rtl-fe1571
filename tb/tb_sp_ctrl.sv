// tb_sp_ctrl: runs random commands (both operations, 1..3 scope variables,
// every target) and checks, clock by clock: rows are read in order 0..R-1 with
// R = C^(n-1), one per clock; the digits presented with each row (stage p2)
// are the mixed-radix digits of that row; mask and target outputs match the
// command; product rows are written back two clocks after they were read;
// the marginalizer is cleared when a marginalization starts; and done pulses
// exactly R + 3 clocks after the start was taken.
module tb_sp_ctrl;
  import fg_pkg::*;
  localparam int C  = 20;
  localparam int MS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic          start = 0;
  cmd_t          cmd;
  logic          idle, done, rd_en, prod_valid, marg_valid, marg_clear, tgt_is_v0, wr_en;
  op_e           cur_op;
  logic [8:0]    rd_row, wr_row;
  logic [4:0]    s1_dig [MS];
  logic [MS-1:0] mask;
  logic [4:0]    tgt_dig;
  int checks = 0, failures = 0;

  sp_ctrl #(.N_STATES(C), .MAX_SCOPE(MS)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  task automatic run(op_e op, int ns, int node);
    int rows, nread, nwrite, nvalid, cyc;
    bit seen_done;
    rows = 1;
    for (int s = 1; s < ns; s++) rows *= C;
    cmd.op = op; cmd.n_scope = 4'(ns); cmd.node_idx = 4'(node);
    start = 1;
    #1;
    chk(idle, "idle before start");
    chk(marg_clear == (op == OP_MARGINALIZE), "clear on start");
    @(negedge clk);
    start = 0;
    nread = 0; nwrite = 0; nvalid = 0; cyc = 0; seen_done = 0;
    while (!seen_done && cyc < rows + 20) begin
      cyc++;
      if (rd_en) begin
        chk(int'(rd_row) == nread, $sformatf("read row %0d expected %0d", rd_row, nread));
        nread++;
      end
      if (prod_valid || marg_valid) begin
        chk(prod_valid == (op == OP_PRODUCT), "valid matches op");
        chk(s1_dig[0] == 0, "one chunk per row at the default unroll");
        for (int s = 1; s < ns; s++) begin
          int d;
          d = nvalid;
          for (int k = 1; k < s; k++) d /= C;
          d %= C;
          chk(int'(s1_dig[s]) == d, $sformatf("row %0d digit %0d = %0d expected %0d", nvalid, s, s1_dig[s], d));
        end
        for (int s = 0; s < MS; s++)
          chk(mask[s] == ((s < ns) && (s != node)), "mask");
        chk(tgt_is_v0 == (node == 0), "tgt_is_v0");
        if (node > 0) chk(tgt_dig == s1_dig[node], "tgt_dig");
        nvalid++;
      end
      if (wr_en) begin
        chk(op == OP_PRODUCT, "write only for product");
        chk(int'(wr_row) == nwrite, "write row order");
        nwrite++;
      end
      if (done) begin
        seen_done = 1;
        chk(cyc == rows + 3, $sformatf("latency %0d expected %0d", cyc, rows + 3));
      end
      @(negedge clk);
    end
    chk(seen_done, "done seen");
    chk(nread == rows && nvalid == rows, "row count");
    chk(nwrite == ((op == OP_PRODUCT) ? rows : 0), "write count");
    chk(idle, "idle after done");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cmd = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int ns = 1; ns <= MS; ns++)
      for (int node = 0; node < ns; node++) begin
        run(OP_PRODUCT, ns, node);
        run(OP_MARGINALIZE, ns, node);
      end
    for (int k = 0; k < 6; k++) begin
      int ns;
      ns = $urandom_range(1, MS);
      run(op_e'($urandom_range(0, 1)), ns, $urandom_range(0, ns - 1));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
