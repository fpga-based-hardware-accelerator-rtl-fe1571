// tb_four_variable_fusion: the extended fusion network, with a fourth sensor
// (wheel odometry, O) joining gyroscope G, compass C and tracker T in one
// factor f(G, C, O, T). The accelerator is built with four scope variables
// and 10 states per variable (MAX_SCOPE = 4, N_STATES = 10, one lane per
// state, pipelined), the smaller of the two sizes this network was evaluated
// at in the original work. The default build has room for three scope
// variables only.
//
// Messages are population codes as in tb_sensor_fusion: K Gaussian tuning
// curves with centres (i + 0.5) / K and width 1 / K, normalised to sum 1. The
// factor is a discretised joint density in which T is near the mean of G, C
// and O. For several readings the host sends the G, C and O messages and
// computes the message to T (product, then marginalization); once per run it
// also computes the message to G from C, O and T. Checks: every outgoing word
// matches a bit-exact model of the hardware's operation order and is within
// 1e-4 (relative) of a double-precision marginal; each operation takes
// 10^3 + 3 clocks; and the decoded heading of T is within 1.5 / K of the mean
// of the three readings.
module tb_four_variable_fusion;
  import fp_ref_pkg::*;
  localparam int C   = 10;
  localparam int MS  = 4;
  localparam int N   = C * C * C * C;
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

  sum_product_acc #(.N_STATES(C), .MAX_SCOPE(MS)) dut (.*);

  int checks = 0, failures = 0;
  logic [31:0] factor [N];
  logic [31:0] work [N];
  logic [31:0] m [MS][C];
  int cyc = 0, t_start = 0, last_latency = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dut.start) t_start <= cyc;
    if (dut.eng_done) last_latency <= cyc - t_start;
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

  task automatic run_op(int op);
    logic [31:0] d;
    axi_write(16'h0010, 32'(op));
    axi_write(16'h0000, 32'h1);
    do axi_read(16'h0000, d); while (!d[1]);
    chk(last_latency == C * C * C + 3, $sformatf("op %0d took %0d clocks", op, last_latency));
  endtask

  function automatic real gauss(real x, real mu, real sigma);
    return $exp(-(x - mu) * (x - mu) / (2.0 * sigma * sigma));
  endfunction

  // population code of stimulus s over C states, normalised
  task automatic encode(real s, int v);
    real p [C];
    real sum;
    sum = 0.0;
    for (int i = 0; i < C; i++) begin
      p[i] = gauss(s, (i + 0.5) / C, 1.0 / C);
      sum += p[i];
    end
    for (int i = 0; i < C; i++) m[v][i] = round_to_single(p[i] / sum);
  endtask

  // pairwise sum of one 10-word row, padded with +0 to 16 words
  function automatic logic [31:0] tree_sum(int base);
    logic [31:0] t [16];
    for (int k = 0; k < 16; k++) t[k] = (k < C) ? work[base + k] : 32'd0;
    for (int w = 8; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) t[k] = fadd(t[2*k], t[2*k+1]);
    return t[0];
  endfunction

  // message to variable tgt from the other three; returns the decoded value
  task automatic message(int tgt, output real est);
    logic [31:0] d, model [C];
    real exact [C], tot, num;
    for (int s = 0; s < MS; s++)
      if (s != tgt)
        for (int j = 0; j < C; j++) axi_write(16'h1000 + 16'(s * 'h100 + j * 4), m[s][j]);
    axi_write(16'h0020, 32'(tgt));
    for (int j = 0; j < C; j++) begin
      model[j] = 32'd0;
      exact[j] = 0.0;
    end
    for (int i = 0; i < N; i++) begin
      int x [MS];
      real e;
      x[0] = i % C; x[1] = (i / C) % C; x[2] = (i / (C * C)) % C; x[3] = i / (C * C * C);
      work[i] = factor[i];
      e = to_real(factor[i]);
      for (int s = 0; s < MS; s++)
        if (s != tgt) begin
          work[i] = fmul(work[i], m[s][x[s]]);
          e *= to_real(m[s][x[s]]);
        end
      exact[x[tgt]] += e;
    end
    for (int r = 0; r < N / C; r++)
      if (tgt == 0)
        for (int j = 0; j < C; j++) model[j] = fadd(model[j], work[r * C + j]);
      else begin
        int xt;
        xt = (tgt == 1) ? r % C : (tgt == 2) ? (r / C) % C : r / (C * C);
        model[xt] = fadd(model[xt], tree_sum(r * C));
      end
    run_op(0);
    run_op(1);
    tot = 0.0; num = 0.0;
    for (int j = 0; j < C; j++) begin
      real hw;
      axi_read(16'h2000 + 16'(j * 4), d);
      hw = to_real(d);
      chk(d == model[j], $sformatf("target %0d [%0d]=%h model %h", tgt, j, d, model[j]));
      chk((hw - exact[j]) <= 1e-4 * exact[j] && (exact[j] - hw) <= 1e-4 * exact[j],
          $sformatf("target %0d [%0d]=%g exact %g", tgt, j, hw, exact[j]));
      tot += hw;
      num += hw * (j + 0.5) / C;
    end
    est = num / tot;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real est;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    // factor over (G, C, O, T) = variables 0..3
    for (int i = 0; i < N; i++) begin
      real g, c, o, t;
      g = (i % C + 0.5) / C; c = ((i / C) % C + 0.5) / C;
      o = ((i / (C * C)) % C + 0.5) / C; t = (i / (C * C * C) + 0.5) / C;
      factor[i] = round_to_single(0.05 + gauss(t, (g + c + o) / 3.0, 1.0 / C));
      factor_porta_en = 1; factor_porta_we = 1;
      factor_porta_addr = FAW'(i); factor_porta_din = factor[i];
      @(negedge clk);
    end
    factor_porta_en = 0; factor_porta_we = 0;
    axi_write(16'h0018, 32'(MS));
    for (int trial = 0; trial < 3; trial++) begin
      real g_s, c_s, o_s, mean;
      g_s = 0.2 + 0.6 * ($urandom_range(0, 1000) / 1000.0);
      c_s = g_s + 0.1 * (($urandom_range(0, 1000) / 1000.0) - 0.5);
      o_s = g_s + 0.1 * (($urandom_range(0, 1000) / 1000.0) - 0.5);
      encode(g_s, 0); encode(c_s, 1); encode(o_s, 2);
      message(3, est);
      mean = (g_s + c_s + o_s) / 3.0;
      chk((est - mean) < 1.5 / C && (mean - est) < 1.5 / C,
          $sformatf("heading %f expected about %f", est, mean));
      $display("G=%f C=%f O=%f -> T=%f", g_s, c_s, o_s, est);
    end
    // message back to the gyroscope node from C, O and T
    encode(0.5, 3);
    message(0, est);
    $display("message to G decodes to %f", est);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
