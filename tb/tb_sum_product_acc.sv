// tb_sum_product_acc: end-to-end test of the accelerator at its default size
// (20 states, 3 scope variables), acting as the host processor.
//
// The factor is the joint table of a three-variable sensor-fusion node
// (variables 0, 1, 2 = gyroscope G, compass C, tracker T), filled with random
// probabilities through factor_PORTA and spot-checked by reading it back.
// Then, for each target variable and for factors of 3, 2 and 1 scope
// variables, the test writes the incoming messages over AXI4-Lite, runs a
// factor product and a marginalization, and compares the outgoing message
// bit for bit with a reference model that applies the same operation order
// (multiplications in variable order; per-lane sums, or a pairwise tree per
// row, accumulated in row order). The inference of T from G and C is the
// target-2 case. Completion is taken from the interrupt for products and by
// polling ap_done for marginalizations. Each run's start-to-done time is
// checked against rows + 3 clocks. Mechanisms counted, each must occur:
// factor product, marginalization onto variable 0 (per-lane accumulation),
// marginalization onto another variable (adder tree), interrupt completion,
// polled completion, overlapped pipeline (a row read in the same clock as an
// earlier row is written back).
module tb_sum_product_acc;
  import fp_ref_pkg::*;
  localparam int C   = 20;
  localparam int MS  = 3;
  localparam int N   = C * C * C;
  localparam int FAW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [15:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hf;
  logic        s_axi_bvalid, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready = 0;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic           factor_porta_en = 0, factor_porta_we = 0;
  logic [FAW-1:0] factor_porta_addr = '0;
  logic [31:0]    factor_porta_din = '0, factor_porta_dout;
  logic           irq;

  sum_product_acc dut (.*);

  int checks = 0, failures = 0;
  int n_product = 0, n_marg_v0 = 0, n_marg_tree = 0, n_irq = 0, n_poll = 0, n_overlap = 0;
  int cyc = 0, t_start = 0, last_latency = 0;

  logic [31:0] factor [N];
  logic [31:0] work [N];
  logic [31:0] msgs [MS][C];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.start) t_start <= cyc;
    if (dut.eng_done) last_latency <= cyc - t_start;
    if (rst_n && dut.rd_en && dut.wr_en) n_overlap <= n_overlap + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  task automatic axi_write(logic [15:0] addr, logic [31:0] data);
    s_axi_awvalid = 1; s_axi_wvalid = 1; s_axi_awaddr = addr; s_axi_wdata = data;
    #1;
    while (!(s_axi_awready && s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [15:0] addr, output logic [31:0] data);
    s_axi_arvalid = 1; s_axi_araddr = addr;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0; s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  function automatic logic [31:0] tree_sum(int base);
    logic [31:0] t [32];
    for (int k = 0; k < 32; k++) t[k] = (k < C) ? work[base + k] : 32'd0;
    for (int w = 16; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) t[k] = fadd(t[2*k], t[2*k+1]);
    return t[0];
  endfunction

  // polled completion; a pending interrupt status is cleared as a driver would
  task automatic poll_done();
    logic [31:0] d;
    do axi_read(16'h0000, d); while (!d[1]);
    axi_read(16'h000C, d);
    if (d[0]) axi_write(16'h000C, 32'h1);
    n_poll++;
  endtask

  // one message computation: factor product then marginalization onto 'tgt'
  task automatic message(int ns, int tgt, bit use_irq);
    int rows;
    logic [31:0] d;
    logic [31:0] expect_out [C];
    rows = 1;
    for (int s = 1; s < ns; s++) rows *= C;
    // incoming messages of the other scope variables
    for (int s = 0; s < ns; s++)
      if (s != tgt)
        for (int j = 0; j < C; j++) begin
          msgs[s][j] = rand_prob();
          axi_write(16'h1000 + 16'(s * 'h100 + j * 4), msgs[s][j]);
        end
    // reference
    for (int r = 0; r < rows; r++)
      for (int j = 0; j < C; j++) begin
        int x [MS];
        int i;
        i = r * C + j;
        x[0] = j; x[1] = r % C; x[2] = r / C;
        work[i] = factor[i];
        for (int s = 0; s < MS; s++)
          if (s < ns && s != tgt) work[i] = fmul(work[i], msgs[s][x[s]]);
      end
    for (int j = 0; j < C; j++) expect_out[j] = 32'd0;
    for (int r = 0; r < rows; r++) begin
      if (tgt == 0) begin
        for (int j = 0; j < C; j++) expect_out[j] = fadd(expect_out[j], work[r * C + j]);
      end else begin
        int dgt;
        dgt = (tgt == 1) ? r % C : r / C;
        expect_out[dgt] = fadd(expect_out[dgt], tree_sum(r * C));
      end
    end
    // factor product
    axi_write(16'h0010, 32'd0);
    axi_write(16'h0018, 32'(ns));
    axi_write(16'h0020, 32'(tgt));
    axi_write(16'h0000, 32'h1);
    if (use_irq) begin
      fork
        begin wait (irq); n_irq++; end
        begin repeat (rows * 4 + 100) @(posedge clk); end
      join_any
      disable fork;
      chk(irq, "interrupt after product");
      @(negedge clk);
      axi_write(16'h000C, 32'h1);
      chk(!irq, "interrupt cleared");
      axi_read(16'h0000, d);
    end else begin
      poll_done();
    end
    chk(last_latency == rows + 3, $sformatf("product latency %0d expected %0d", last_latency, rows + 3));
    n_product++;
    // marginalization, completion by polling
    axi_write(16'h0010, 32'd1);
    axi_write(16'h0000, 32'h1);
    poll_done();
    chk(last_latency == rows + 3, $sformatf("marginal latency %0d expected %0d", last_latency, rows + 3));
    if (tgt == 0) n_marg_v0++; else n_marg_tree++;
    for (int j = 0; j < C; j++) begin
      axi_read(16'h2000 + 16'(j * 4), d);
      chk(d == expect_out[j], $sformatf("n=%0d t=%0d msgOut[%0d]=%h expected %h", ns, tgt, j, d, expect_out[j]));
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // load the factor table through factor_PORTA
    for (int i = 0; i < N; i++) begin
      factor[i] = rand_prob();
      factor_porta_en = 1; factor_porta_we = 1;
      factor_porta_addr = FAW'(i); factor_porta_din = factor[i];
      @(negedge clk);
    end
    factor_porta_we = 0;
    for (int k = 0; k < 200; k++) begin
      int i;
      i = $urandom_range(0, N - 1);
      factor_porta_addr = FAW'(i);
      @(negedge clk);
      chk(factor_porta_dout == factor[i], "factor_PORTA read back");
    end
    factor_porta_en = 0;
    axi_write(16'h0004, 32'h1);
    axi_write(16'h0008, 32'h1);
    // three-variable factor: a message to each variable (T given G and C last)
    message(3, 0, 1);
    message(3, 1, 0);
    message(3, 2, 1);
    // smaller scopes in the same table
    message(2, 1, 1);
    message(2, 0, 0);
    message(1, 0, 1);

    chk(n_product > 0,   "factor product exercised");
    chk(n_marg_v0 > 0,   "per-lane marginalization exercised");
    chk(n_marg_tree > 0, "tree marginalization exercised");
    chk(n_irq > 0,       "interrupt completion exercised");
    chk(n_poll > 0,      "polled completion exercised");
    chk(n_overlap > 0,   "overlapped pipeline exercised");
    $display("mechanisms: product=%0d marg_v0=%0d marg_tree=%0d irq=%0d poll=%0d overlap=%0d",
             n_product, n_marg_v0, n_marg_tree, n_irq, n_poll, n_overlap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
