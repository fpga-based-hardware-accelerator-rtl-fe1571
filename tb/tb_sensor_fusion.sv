// tb_sensor_fusion: the gyroscope / compass / tracker fusion inference run on
// the accelerator at its default size, for networks of 5, 10, 15 and 20 states
// per variable. A network with K < 20 states is zero-padded into the 20-state
// table: factor entries with any state >= K are 0, so the padded states of the
// result are exactly 0 and the others are unchanged.
//
// Messages are population codes: a heading s in [0, 1) is encoded by K
// Gaussian tuning curves with centres mu_i = (i + 0.5) / K, width 1 / K,
// normalised to sum 1. The factor f(G, C, T) is a discretised joint density in
// which T is near the mean of G and C. For several sensor readings (g, c) the
// host runs a factor product with the G and C messages and a marginalization
// onto T. Checks: the message matches a bit-exact model of the hardware's
// operation order; it is within 1e-4 (relative) of the same marginal computed
// in double precision on the unpadded K-state factor; padded states are 0; and
// the heading decoded by the centre of mass, sum_i mu_i p_i / sum_i p_i, is
// within 1.5 / K of (g + c) / 2.
module tb_sensor_fusion;
  import fp_ref_pkg::*;
  localparam int C   = 20;
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
  logic [31:0] factor [N];
  logic [31:0] work [N];
  logic [31:0] mg [C], mc [C];

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
  endtask

  function automatic real gauss(real x, real mu, real sigma);
    return $exp(-(x - mu) * (x - mu) / (2.0 * sigma * sigma));
  endfunction

  // population code of stimulus s over k states, normalised
  task automatic encode(real s, int k, output logic [31:0] m [C]);
    real v [C];
    real sum;
    sum = 0.0;
    for (int i = 0; i < C; i++) begin
      v[i] = (i < k) ? gauss(s, (i + 0.5) / k, 1.0 / k) : 0.0;
      sum += v[i];
    end
    for (int i = 0; i < C; i++) m[i] = round_to_single(v[i] / sum);
  endtask

  function automatic logic [31:0] tree_sum(int base);
    logic [31:0] t [32];
    for (int k = 0; k < 32; k++) t[k] = (k < C) ? work[base + k] : 32'd0;
    for (int w = 16; w >= 1; w /= 2)
      for (int k = 0; k < w; k++) t[k] = fadd(t[2*k], t[2*k+1]);
    return t[0];
  endfunction

  task automatic network(int k);
    // factor over (G = var 0, C = var 1, T = var 2), zero outside k states
    for (int t = 0; t < C; t++)
      for (int c = 0; c < C; c++)
        for (int g = 0; g < C; g++) begin
          int i;
          real v;
          i = g + C * c + C * C * t;
          v = 0.0;
          if (g < k && c < k && t < k)
            v = 0.05 + gauss((t + 0.5) / k, ((g + 0.5) / k + (c + 0.5) / k) / 2.0, 1.0 / k);
          factor[i] = round_to_single(v);
        end
    for (int i = 0; i < N; i++) begin
      factor_porta_en = 1; factor_porta_we = 1;
      factor_porta_addr = FAW'(i); factor_porta_din = factor[i];
      @(negedge clk);
    end
    factor_porta_en = 0; factor_porta_we = 0;
    axi_write(16'h0018, 32'd3);
    axi_write(16'h0020, 32'd2);

    for (int trial = 0; trial < 3; trial++) begin
      real g_s, c_s, exact [C], tot, est, num;
      logic [31:0] d, model [C];
      g_s = 0.2 + 0.6 * ($urandom_range(0, 1000) / 1000.0);
      c_s = g_s + 0.1 * (($urandom_range(0, 1000) / 1000.0) - 0.5);
      encode(g_s, k, mg);
      encode(c_s, k, mc);
      for (int j = 0; j < C; j++) begin
        axi_write(16'h1000 + 16'(j * 4), mg[j]);
        axi_write(16'h1100 + 16'(j * 4), mc[j]);
      end
      // bit-exact model of the hardware, and a double-precision marginal
      for (int j = 0; j < C; j++) begin
        model[j] = 32'd0;
        exact[j] = 0.0;
      end
      for (int r = 0; r < C * C; r++) begin
        for (int j = 0; j < C; j++) begin
          int i;
          i = r * C + j;
          work[i] = fmul(fmul(factor[i], mg[j]), mc[r % C]);
          exact[r / C] += to_real(factor[i]) * to_real(mg[j]) * to_real(mc[r % C]);
        end
        model[r / C] = fadd(model[r / C], tree_sum(r * C));
      end
      run_op(0);
      run_op(1);
      tot = 0.0; num = 0.0;
      for (int j = 0; j < C; j++) begin
        real hw;
        axi_read(16'h2000 + 16'(j * 4), d);
        hw = to_real(d);
        chk(d == model[j], $sformatf("K=%0d T[%0d]=%h model %h", k, j, d, model[j]));
        if (j >= k) chk(d == 32'd0, "padded state is zero");
        else chk((hw - exact[j]) <= 1e-4 * exact[j] && (exact[j] - hw) <= 1e-4 * exact[j],
                 $sformatf("K=%0d T[%0d]=%g exact %g", k, j, hw, exact[j]));
        tot += hw;
        if (j < k) num += hw * (j + 0.5) / k;
      end
      est = num / tot;
      chk((est - (g_s + c_s) / 2.0) < 1.5 / k && ((g_s + c_s) / 2.0 - est) < 1.5 / k,
          $sformatf("K=%0d heading %f expected about %f", k, est, (g_s + c_s) / 2.0));
      $display("K=%0d: G=%f C=%f -> T=%f", k, g_s, c_s, est);
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
    network(5);
    network(10);
    network(15);
    network(20);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
