// tb_axi_lite_ctrl: drives the AXI4-Lite slave as the host would, with a
// simple engine model on the other side. Checks register write/read-back, the
// message windows (writes reach the message buffer with the right variable,
// state and data; reads return the buffer and the outgoing message), address
// and data arriving in different clocks, response back-pressure, the
// start/idle/done/ready protocol, the interrupt enable and status logic and
// clear-on-read of ap_done.
module tb_axi_lite_ctrl;
  import fg_pkg::*;
  localparam int C  = 20;
  localparam int MS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        s_axi_awvalid = 0, s_axi_awready, s_axi_wvalid = 0, s_axi_wready;
  logic [15:0] s_axi_awaddr = '0, s_axi_araddr = '0;
  logic [31:0] s_axi_wdata = '0, s_axi_rdata;
  logic [3:0]  s_axi_wstrb = 4'hf;
  logic        s_axi_bvalid, s_axi_bready = 0, s_axi_arvalid = 0, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready = 0;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        irq, start, eng_idle = 1, eng_done = 0, msg_we;
  cmd_t        cmd;
  logic [1:0]  msg_var;
  logic [4:0]  msg_state;
  logic [31:0] msg_wdata;
  logic [31:0] msg_in [MS][C];
  logic [31:0] msg_out [C];
  int checks = 0, failures = 0, starts = 0;

  axi_lite_ctrl #(.N_STATES(C), .MAX_SCOPE(MS), .ADDR_W(16)) dut (.*);

  // message buffer model
  always_ff @(posedge clk) if (msg_we) msg_in[msg_var][msg_state] <= msg_wdata;
  always_ff @(posedge clk) if (rst_n && start) starts <= starts + 1;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("%t: %s", $time, what);
    end
  endtask

  task automatic axi_write(logic [15:0] addr, logic [31:0] data, int w_delay = 0, int b_delay = 0);
    s_axi_wvalid = (w_delay < 0);
    s_axi_awvalid = 1; s_axi_awaddr = addr; s_axi_wdata = data;
    if (w_delay < 0) begin
      s_axi_awvalid = 0;
      repeat (-w_delay) @(negedge clk);
      s_axi_awvalid = 1;
    end else begin
      repeat (w_delay) @(negedge clk);
      s_axi_wvalid = 1;
    end
    #1;
    while (!(s_axi_awready && s_axi_wready)) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_awvalid = 0; s_axi_wvalid = 0;
    repeat (b_delay) begin
      chk(s_axi_bvalid, "bvalid held");
      @(negedge clk);
    end
    s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    chk(s_axi_bresp == 2'b00, "bresp okay");
    @(negedge clk);
    s_axi_bready = 0;
  endtask

  task automatic axi_read(logic [15:0] addr, output logic [31:0] data);
    s_axi_arvalid = 1; s_axi_araddr = addr;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0;
    s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    data = s_axi_rdata;
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [31:0] ref_in [MS][C];
    for (int s = 0; s < MS; s++) for (int j = 0; j < C; j++) msg_in[s][j] = 32'h3f80_0000;
    for (int j = 0; j < C; j++) msg_out[j] = $urandom;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // idle after reset
    axi_read(16'h0000, d);
    chk(d == 32'h4, $sformatf("AP_CTRL after reset %h", d));
    // argument registers
    axi_write(16'h0010, 32'h1);
    axi_write(16'h0018, 32'h3, 2);
    axi_write(16'h0020, 32'h2, -2, 3);
    axi_read(16'h0010, d); chk(d == 1, "OP read back");
    axi_read(16'h0018, d); chk(d == 3, "N_SCOPE read back");
    axi_read(16'h0020, d); chk(d == 2, "NODE_IDX read back");
    // message window
    for (int s = 0; s < MS; s++)
      for (int j = 0; j < C; j++) begin
        ref_in[s][j] = $urandom;
        axi_write(16'h1000 + 16'(s * 'h100 + j * 4), ref_in[s][j], $urandom_range(0, 1));
      end
    axi_write(16'h1000 + 16'(3 * 'h100), 32'hdead_beef);  // beyond the scope: ignored
    for (int s = 0; s < MS; s++)
      for (int j = 0; j < C; j++) begin
        chk(msg_in[s][j] == ref_in[s][j], "message write reached buffer");
        axi_read(16'h1000 + 16'(s * 'h100 + j * 4), d);
        chk(d == ref_in[s][j], "message read back");
      end
    for (int j = 0; j < C; j++) begin
      axi_read(16'h2000 + 16'(j * 4), d);
      chk(d == msg_out[j], "outgoing message read");
    end

    // start without interrupts, engine busy for a while
    eng_idle = 0;
    axi_write(16'h0000, 32'h1);
    repeat (3) @(negedge clk);
    chk(starts == 0, "no start while engine busy");
    eng_idle = 1;
    #1;
    chk(start == 1, "start when idle");
    chk(cmd.op == OP_MARGINALIZE && cmd.n_scope == 3 && cmd.node_idx == 2, "command fields");
    @(negedge clk);
    eng_idle = 0;
    #1;
    chk(start == 0, "start is one clock");
    axi_read(16'h0000, d);
    chk(d[0] == 0 && d[2] == 0, "ap_start cleared, not idle");
    repeat (5) @(negedge clk);
    eng_done = 1; @(negedge clk); eng_done = 0; eng_idle = 1;
    chk(irq == 0, "no irq when disabled");
    axi_read(16'h0000, d); chk(d[1] == 1, "ap_done set");
    axi_read(16'h0000, d); chk(d[1] == 0, "ap_done cleared on read");
    axi_read(16'h000C, d); chk(d == 0, "ISR stays clear with IER off");

    // interrupt path
    axi_write(16'h0004, 32'h1);
    axi_write(16'h0008, 32'h1);
    axi_read(16'h0004, d); chk(d == 1, "GIE read back");
    axi_read(16'h0008, d); chk(d == 1, "IER read back");
    axi_write(16'h0000, 32'h1);
    @(negedge clk);
    chk(starts == 2, "second start");
    eng_idle = 0;
    repeat (4) @(negedge clk);
    chk(irq == 0, "no irq before done");
    eng_done = 1; @(negedge clk); eng_done = 0; eng_idle = 1;
    chk(irq == 1, "irq on done");
    axi_read(16'h000C, d); chk(d == 1, "ISR set");
    axi_write(16'h000C, 32'h1);
    chk(irq == 0, "irq cleared by ISR toggle");
    axi_write(16'h0004, 32'h0);
    axi_write(16'h0000, 32'h1);
    @(negedge clk);
    eng_done = 1; @(negedge clk); eng_done = 0;
    chk(irq == 0, "GIE masks irq");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
