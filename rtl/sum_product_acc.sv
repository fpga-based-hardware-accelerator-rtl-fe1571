// sum_product_acc: FPGA accelerator for the sum-product step of one factor node.
//
// The factor-graph library on the host processor keeps the graph and the
// message schedule; for the costly part of belief propagation it hands one
// factor node to this accelerator. The factor's table f(x0 .. x(n-1)) (C states
// per variable, C^n single-precision entries) is loaded once through the
// dedicated block-RAM port factor_PORTA. Per call the host writes the incoming
// messages and the arguments over AXI4-Lite and starts one of two operations:
//   factor product   work = f * prod over s != target of msgIn_s   (entry-wise)
//   marginalization  msgOut[x] = sum of work over all entries with x_target = x
// A message to variable t is a product with target t followed by a
// marginalization onto t. Completion sets ap_done and raises 'irq' when
// enabled.
//
// Structure: axi_lite_ctrl (registers, interrupt) -> sp_ctrl (row sequencer,
// read/compute/write pipeline) -> factor and work tables (row_table, one bank
// per lane) -> product_lanes (LANES lanes of multipliers) or marginalizer
// (adder tree and C accumulators) -> outgoing message registers.
//
// Configurable optimization: LANES is the unroll factor (states of variable 0
// handled per clock; a divisor of N_STATES) and PIPELINE overlaps the three
// stages. With R = (C / LANES) * C^(n-1) rows, an operation takes R + 3 clocks
// from the start being taken to done when pipelined, and 3R + 1 when not. The
// defaults are the fully optimized configuration: LANES = C, pipelined.
//
// factor_PORTA: element address = flat table index, variable 0 fastest
// (index = x0 + C*x1 + C^2*x2 ...); read data one clock after en. The host must
// not write the factor table while a factor product runs.
//
// Defaults: 20 states (the largest cardinality evaluated for both network
// sizes), 3 scope variables (the gyroscope / compass / tracker fusion factor),
// one lane per state, pipelined. The split into these sub-blocks, the register
// map and the table layout are this design's own.
//
// Lint note: Verilator reports rst_n as flopped both synchronously and
// asynchronously. The synchronous use is only the 'disable iff' of the
// assertions below; all flip-flops use the asynchronous reset.
module sum_product_acc
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES  = 20,
  parameter int unsigned MAX_SCOPE = 3,
  parameter int unsigned LANES     = N_STATES,
  parameter bit          PIPELINE  = 1'b1,
  parameter int unsigned ADDR_W    = 16,
  localparam int unsigned ROWS = (N_STATES / LANES) * N_STATES ** (MAX_SCOPE - 1),
  localparam int unsigned FAW  = $clog2(LANES * ROWS),
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned SW   = $clog2(N_STATES),
  localparam int unsigned VW   = (MAX_SCOPE > 1) ? $clog2(MAX_SCOPE) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // AXI4-Lite control slave
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
  // factor_PORTA: direct access to the factor table
  input  logic              factor_porta_en,
  input  logic              factor_porta_we,
  input  logic [FAW-1:0]    factor_porta_addr,
  input  logic [31:0]       factor_porta_din,
  output logic [31:0]       factor_porta_dout,
  output logic              irq
);

  logic          start, eng_idle, eng_done;
  cmd_t          cmd;
  op_e           cur_op;
  logic          msg_we;
  logic [VW-1:0] msg_var;
  logic [SW-1:0] msg_state;
  float32_t      msg_wdata, msg_rd_unused;
  float32_t      msg_in  [MAX_SCOPE][N_STATES];
  float32_t      msg_out [N_STATES];

  logic          rd_en, prod_valid, marg_valid, marg_clear, wr_en, tgt_is_v0, p_valid;
  logic [RW-1:0] rd_row, wr_row;
  logic [SW-1:0] s1_dig [MAX_SCOPE];
  logic [SW-1:0] tgt_dig;
  logic [MAX_SCOPE-1:0] mask;

  float32_t      f_row [LANES];
  float32_t      w_row [LANES];
  float32_t      p_row [LANES];
  float32_t      zero_row [LANES];
  float32_t      work_h_unused;

  for (genvar j = 0; j < LANES; j++) begin : g_zero
    assign zero_row[j] = FP_ZERO;
  end

  axi_lite_ctrl #(.N_STATES(N_STATES), .MAX_SCOPE(MAX_SCOPE), .ADDR_W(ADDR_W)) u_axi (
    .clk, .rst_n,
    .s_axi_awvalid, .s_axi_awready, .s_axi_awaddr, .s_axi_wvalid, .s_axi_wready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_bvalid, .s_axi_bready, .s_axi_bresp,
    .s_axi_arvalid, .s_axi_arready, .s_axi_araddr, .s_axi_rvalid, .s_axi_rready,
    .s_axi_rdata, .s_axi_rresp,
    .irq(irq),
    .start, .cmd, .eng_idle, .eng_done,
    .msg_we, .msg_var, .msg_state, .msg_wdata,
    .msg_in, .msg_out
  );

  msg_in_buf #(.N_STATES(N_STATES), .MAX_SCOPE(MAX_SCOPE)) u_msg_in (
    .clk, .rst_n,
    .we(msg_we), .var_idx(msg_var), .state_idx(msg_state), .wdata(msg_wdata),
    .rd_data(msg_rd_unused), .msg(msg_in)
  );

  sp_ctrl #(.N_STATES(N_STATES), .LANES(LANES), .MAX_SCOPE(MAX_SCOPE), .PIPELINE(PIPELINE)) u_ctrl (
    .clk, .rst_n, .start, .cmd,
    .idle(eng_idle), .done(eng_done), .cur_op,
    .rd_en, .rd_row,
    .prod_valid, .marg_valid, .marg_clear, .s1_dig, .mask, .tgt_is_v0, .tgt_dig,
    .wr_en, .wr_row
  );

  // factor table: written by the host, read by the factor product
  row_table #(.LANES(LANES), .ROWS(ROWS)) u_factor (
    .clk,
    .h_en(factor_porta_en), .h_we(factor_porta_we), .h_addr(factor_porta_addr),
    .h_wdata(factor_porta_din), .h_rdata(factor_porta_dout),
    .rd_en(rd_en && (cur_op == OP_PRODUCT)), .rd_row, .rd_data(f_row),
    .wr_en(1'b0), .wr_row('0), .wr_data(zero_row)
  );

  // work table: written by the factor product, read by the marginalization
  row_table #(.LANES(LANES), .ROWS(ROWS)) u_work (
    .clk,
    .h_en(1'b0), .h_we(1'b0), .h_addr('0), .h_wdata(FP_ZERO), .h_rdata(work_h_unused),
    .rd_en(rd_en && (cur_op == OP_MARGINALIZE)), .rd_row, .rd_data(w_row),
    .wr_en, .wr_row, .wr_data(p_row)
  );

  product_lanes #(.N_STATES(N_STATES), .LANES(LANES), .MAX_SCOPE(MAX_SCOPE)) u_prod (
    .clk, .rst_n,
    .in_valid(prod_valid), .f(f_row), .dig(s1_dig), .mask, .msg(msg_in),
    .out_valid(p_valid), .p(p_row)
  );

  marginalizer #(.N_STATES(N_STATES), .LANES(LANES)) u_marg (
    .clk, .rst_n,
    .clear(marg_clear), .in_valid(marg_valid), .tgt_is_v0, .tgt_dig, .chunk(s1_dig[0]),
    .row(w_row), .msg(msg_out)
  );

  // the product row reaches the write port in the same clock as its write enable
  a_wr_aligned: assert property (@(posedge clk) disable iff (!rst_n) wr_en |-> p_valid);

endmodule
