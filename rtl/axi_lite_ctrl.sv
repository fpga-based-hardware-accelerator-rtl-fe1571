// axi_lite_ctrl: AXI4-Lite register slave and interrupt of the accelerator.
//
// The host processor drives the accelerator through this port: it writes the
// incoming messages and the arguments, sets ap_start, and either polls ap_done
// or waits for the interrupt, then reads the outgoing message. Byte map
// (32-bit registers, word aligned):
//   0x0000 AP_CTRL  bit0 ap_start (write 1; cleared when the engine takes it),
//                   bit1 ap_done (set on completion, cleared when AP_CTRL is
//                   read), bit2 ap_idle, bit3 ap_ready (engine took a start)
//   0x0004 GIE      bit0 global interrupt enable
//   0x0008 IER      bit0 enable the 'done' interrupt
//   0x000C ISR      bit0 'done' interrupt status, write 1 to toggle (clear)
//   0x0010 OP       bit0: 0 factor product, 1 marginalization
//   0x0018 N_SCOPE  number of scope variables
//   0x0020 NODE_IDX target variable
//   0x1000 + v*0x100 + 4*j  incoming message of variable v, state j (R/W)
//   0x2000 + 4*j            outgoing message, state j (read only)
// 'irq' = GIE & (ISR & IER). The layout mimics the control block that
// high-level synthesis tools generate (start/done/idle, GIE/IER/ISR); the
// exact offsets are this design's choice.
//
// Handshakes: a write is taken when AWVALID and WVALID are both high and no
// response is pending; BVALID follows one clock later and is held until
// BREADY. A read is taken when ARVALID is high and no read data is pending;
// RVALID follows one clock later and is held until RREADY. Responses are OKAY.
//
// Lint note: Verilator reports rst_n as flopped both synchronously and
// asynchronously. The synchronous use is only the 'disable iff' of the
// assertions below; all flip-flops use the asynchronous reset.
module axi_lite_ctrl
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES  = 20,
  parameter int unsigned MAX_SCOPE = 3,
  parameter int unsigned ADDR_W    = 16,
  localparam int unsigned VW = (MAX_SCOPE > 1) ? $clog2(MAX_SCOPE) : 1,
  localparam int unsigned SW = $clog2(N_STATES)
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite slave
  input  logic              s_axi_awvalid,
  output logic              s_axi_awready,
  input  logic [ADDR_W-1:0] s_axi_awaddr,
  input  logic              s_axi_wvalid,
  output logic              s_axi_wready,
  input  logic [31:0]       s_axi_wdata,
  input  logic [3:0]        s_axi_wstrb,
  output logic              s_axi_bvalid,
  input  logic              s_axi_bready,
  output logic [1:0]        s_axi_bresp,
  input  logic              s_axi_arvalid,
  output logic              s_axi_arready,
  input  logic [ADDR_W-1:0] s_axi_araddr,
  output logic              s_axi_rvalid,
  input  logic              s_axi_rready,
  output logic [31:0]       s_axi_rdata,
  output logic [1:0]        s_axi_rresp,
  output logic              irq,
  // engine side
  output logic              start,
  output cmd_t              cmd,
  input  logic              eng_idle,
  input  logic              eng_done,
  output logic              msg_we,
  output logic [VW-1:0]     msg_var,
  output logic [SW-1:0]     msg_state,
  output float32_t          msg_wdata,
  input  float32_t          msg_in [MAX_SCOPE][N_STATES],
  input  float32_t          msg_out [N_STATES]
);

  localparam logic [ADDR_W-1:0] A_CTRL  = 'h0000;
  localparam logic [ADDR_W-1:0] A_GIE   = 'h0004;
  localparam logic [ADDR_W-1:0] A_IER   = 'h0008;
  localparam logic [ADDR_W-1:0] A_ISR   = 'h000C;
  localparam logic [ADDR_W-1:0] A_OP    = 'h0010;
  localparam logic [ADDR_W-1:0] A_NSC   = 'h0018;
  localparam logic [ADDR_W-1:0] A_NODE  = 'h0020;

  logic ap_start, ap_done, ap_ready, gie, ier, isr;
  logic wr_fire, rd_fire;
  logic [ADDR_W-1:0] waddr, raddr;
  logic [31:0] rdata_c;

  // write channel
  assign wr_fire       = s_axi_awvalid && s_axi_wvalid && !s_axi_bvalid;
  assign s_axi_awready = wr_fire;
  assign s_axi_wready  = wr_fire;
  assign s_axi_bresp   = 2'b00;
  assign waddr         = s_axi_awaddr;

  // read channel
  assign rd_fire       = s_axi_arvalid && !s_axi_rvalid;
  assign s_axi_arready = rd_fire;
  assign s_axi_rresp   = 2'b00;
  assign raddr         = s_axi_araddr;

  // message window decode (full 32-bit writes only)
  always_comb begin
    msg_we    = 1'b0;
    msg_var   = VW'(waddr[11:8]);
    msg_state = SW'(waddr[7:2]);
    msg_wdata = s_axi_wdata;
    if (wr_fire && (waddr[ADDR_W-1:12] == (ADDR_W-12)'(1)) && (s_axi_wstrb == 4'hf) &&
        (32'(waddr[11:8]) < MAX_SCOPE) && (32'(waddr[7:2]) < N_STATES))
      msg_we = 1'b1;
  end

  assign start = ap_start && eng_idle;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ap_start     <= 1'b0;
      ap_done      <= 1'b0;
      ap_ready     <= 1'b0;
      gie          <= 1'b0;
      ier          <= 1'b0;
      isr          <= 1'b0;
      cmd          <= '0;
      s_axi_bvalid <= 1'b0;
    end else begin
      // engine events
      if (start) ap_start <= 1'b0;
      ap_ready <= start;
      if (eng_done) begin
        ap_done <= 1'b1;
        if (ier) isr <= 1'b1;
      end
      // register writes
      if (wr_fire) begin
        s_axi_bvalid <= 1'b1;
        unique case (waddr)
          A_CTRL: if (s_axi_wdata[0]) ap_start <= 1'b1;
          A_GIE:  gie <= s_axi_wdata[0];
          A_IER:  ier <= s_axi_wdata[0];
          A_ISR:  if (s_axi_wdata[0]) isr <= isr ^ 1'b1;
          A_OP:   cmd.op <= op_e'(s_axi_wdata[0]);
          A_NSC:  cmd.n_scope <= s_axi_wdata[3:0];
          A_NODE: cmd.node_idx <= s_axi_wdata[3:0];
          default: ;
        endcase
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
      // reading AP_CTRL clears ap_done (a completion in the same clock wins)
      if (rd_fire && (raddr == A_CTRL) && !eng_done) ap_done <= 1'b0;
    end
  end

  // read data
  always_comb begin
    rdata_c = 32'd0;
    if (raddr[ADDR_W-1:12] == (ADDR_W-12)'(1)) begin
      if ((32'(raddr[11:8]) < MAX_SCOPE) && (32'(raddr[7:2]) < N_STATES))
        rdata_c = msg_in[VW'(raddr[11:8])][SW'(raddr[7:2])];
    end else if (raddr[ADDR_W-1:12] == (ADDR_W-12)'(2)) begin
      if (32'(raddr[11:2]) < N_STATES)
        rdata_c = msg_out[SW'(raddr[11:2])];
    end else begin
      unique case (raddr)
        A_CTRL: rdata_c = {28'd0, ap_ready, eng_idle, ap_done, ap_start};
        A_GIE:  rdata_c = {31'd0, gie};
        A_IER:  rdata_c = {31'd0, ier};
        A_ISR:  rdata_c = {31'd0, isr};
        A_OP:   rdata_c = {31'd0, cmd.op};
        A_NSC:  rdata_c = {28'd0, cmd.n_scope};
        A_NODE: rdata_c = {28'd0, cmd.node_idx};
        default: rdata_c = 32'd0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_axi_rvalid <= 1'b0;
      s_axi_rdata  <= 32'd0;
    end else if (rd_fire) begin
      s_axi_rvalid <= 1'b1;
      s_axi_rdata  <= rdata_c;
    end else if (s_axi_rvalid && s_axi_rready) begin
      s_axi_rvalid <= 1'b0;
    end
  end

  assign irq = gie && ier && isr;

  // AXI rule: a response stays valid until it is accepted
  a_bvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_axi_bvalid && !s_axi_bready) |=> s_axi_bvalid);
  a_rvalid_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_axi_rvalid && !s_axi_rready) |=> (s_axi_rvalid && $stable(s_axi_rdata)));

endmodule
