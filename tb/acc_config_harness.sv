// acc_config_harness: a host model plus one sum_product_acc built with a given
// unroll factor (LANES) and pipelining switch (PIPELINE), for checking
// configurations other than the default.
//
// It loads a random three-variable factor of 20 states through factor_PORTA,
// then computes messages to every variable of the 3-variable scope and one of
// a 2-variable scope (factor product, then marginalization), all over
// AXI4-Lite. Each outgoing message is compared bit for bit with a reference
// that follows the hardware's operation order for this LANES: a table row is
// a chunk of LANES states of variable 0, and tree sums run over one row.
// Every operation's start-to-done time is checked against R + 3 clocks
// (pipelined) or 3R + 1 (not pipelined), with R = (20 / LANES) * 20^(n-1)
// rows. It also counts clocks in which a row is read while an earlier row is
// still in the pipeline. That must happen when pipelined and never otherwise.
// 'finished' rises when all checks are done; 'checks' and 'failures' count
// them.
module acc_config_harness #(
  parameter int unsigned LANES    = 4,
  parameter bit          PIPELINE = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  import fp_ref_pkg::*;
  localparam int C   = 20;
  localparam int MS  = 3;
  localparam int CH  = C / LANES;
  localparam int N   = C * C * C;
  localparam int FAW = $clog2(N);
  localparam int P2  = 1 << $clog2(LANES);

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

  sum_product_acc #(.N_STATES(C), .MAX_SCOPE(MS), .LANES(LANES), .PIPELINE(PIPELINE)) dut (.*);

  int cyc = 0, t_start = 0, last_latency = 0, n_overlap = 0;
  logic [31:0] factor [N];
  logic [31:0] work [N];
  logic [31:0] msgs [MS][C];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.start) t_start <= cyc;
    if (dut.eng_done) last_latency <= cyc - t_start;
    if (rst_n && dut.rd_en && (dut.u_ctrl.s1_valid || dut.u_ctrl.s2_valid)) n_overlap <= n_overlap + 1;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("LANES=%0d PIPELINE=%0d: %s", LANES, PIPELINE, what);
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

  task automatic run_op(int op, int rows);
    logic [31:0] d;
    axi_write(16'h0010, 32'(op));
    axi_write(16'h0000, 32'h1);
    do axi_read(16'h0000, d); while (!d[1]);
    chk(last_latency == (PIPELINE ? rows + 3 : 3 * rows + 1),
        $sformatf("op %0d latency %0d for %0d rows", op, last_latency, rows));
  endtask

  function automatic logic [31:0] row_sum(int base);
    logic [31:0] t [32];
    for (int k = 0; k < 32; k++) t[k] = (k < int'(LANES)) ? work[base + k] : 32'd0;
    for (int w = P2 / 2; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) t[k] = fadd(t[2*k], t[2*k+1]);
    return t[0];
  endfunction

  task automatic message(int ns, int tgt);
    int rows, rest;
    logic [31:0] d;
    logic [31:0] expect_out [C];
    rest = 1;
    for (int s = 1; s < ns; s++) rest *= C;
    rows = CH * rest;
    for (int s = 0; s < ns; s++)
      if (s != tgt)
        for (int j = 0; j < C; j++) begin
          msgs[s][j] = rand_prob();
          axi_write(16'h1000 + 16'(s * 'h100 + j * 4), msgs[s][j]);
        end
    for (int i = 0; i < C * rest; i++) begin
      int x [MS];
      x[0] = i % C; x[1] = (i / C) % C; x[2] = i / (C * C);
      work[i] = factor[i];
      for (int s = 0; s < MS; s++)
        if (s < ns && s != tgt) work[i] = fmul(work[i], msgs[s][x[s]]);
    end
    for (int j = 0; j < C; j++) expect_out[j] = 32'd0;
    for (int r = 0; r < rows; r++) begin
      int base, x1, x2;
      base = r * LANES;
      x1 = (base / C) % C; x2 = base / (C * C);
      if (tgt == 0)
        for (int j = 0; j < int'(LANES); j++)
          expect_out[(base + j) % C] = fadd(expect_out[(base + j) % C], work[base + j]);
      else if (tgt == 1) expect_out[x1] = fadd(expect_out[x1], row_sum(base));
      else               expect_out[x2] = fadd(expect_out[x2], row_sum(base));
    end
    axi_write(16'h0018, 32'(ns));
    axi_write(16'h0020, 32'(tgt));
    run_op(0, rows);
    run_op(1, rows);
    for (int j = 0; j < C; j++) begin
      axi_read(16'h2000 + 16'(j * 4), d);
      chk(d == expect_out[j], $sformatf("n=%0d t=%0d msgOut[%0d]=%h expected %h", ns, tgt, j, d, expect_out[j]));
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    @(posedge rst_n);
    @(negedge clk);
    for (int i = 0; i < N; i++) begin
      factor[i] = rand_prob();
      factor_porta_en = 1; factor_porta_we = 1;
      factor_porta_addr = FAW'(i); factor_porta_din = factor[i];
      @(negedge clk);
    end
    factor_porta_en = 0; factor_porta_we = 0;
    message(3, 0);
    message(3, 1);
    message(3, 2);
    message(2, 1);
    if (PIPELINE) chk(n_overlap > 0, "rows overlapped in the pipeline");
    else          chk(n_overlap == 0, "no row issued while the pipeline is busy");
    finished = 1;
  end
endmodule
