// sp_ctrl: sequencer of the sum-product accelerator.
//
// On 'start' it latches the command (operation, number of scope variables n,
// target variable) and sweeps the active rows of the factor table through a
// three-stage pipeline:
//   p1 read    - rd_en/rd_row address the table. The row's digits are kept by
//                a mixed-radix counter instead of a divider: digit 0 is the
//                chunk of variable 0's states (N_STATES / LANES chunks),
//                digits 1 .. n-1 are the states of the other scope
//                variables, fastest first;
//   p2 compute - the row is on rd_data, and product_lanes or the marginalizer
//                use s1_dig, mask and the target fields in this clock;
//   p3 write   - wr_en/wr_row store the product row in the work table
//                (product), or the marginalizer accumulates (marginalization).
// A command has R = (N_STATES / LANES) * N_STATES^(n-1) rows.
//
// PIPELINE = 1 (default) issues a row every clock, so rows overlap in the
// three stages, and 'done' pulses R + 3 clocks after the clock in which start
// was taken. PIPELINE = 0 issues a row only once the previous one has left the
// pipeline, giving 3R + 1 clocks. Together with LANES, this is the
// accelerator's configurable optimization: unrolling (LANES) and pipelining.
// 'idle' is high only in the idle state, where start is taken.
//
// The read/compute/write split follows the original accelerator's three-stage
// pipeline. The counter-based addressing, the exact latencies and the clamping
// of n to 1 .. MAX_SCOPE are this design's choices.
//
// Lint note: Verilator reports rst_n as flopped both synchronously and
// asynchronously. The synchronous use is only the 'disable iff' of the
// assertions below; all flip-flops use the asynchronous reset.
module sp_ctrl
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES  = 20,
  parameter int unsigned LANES     = 20,
  parameter int unsigned MAX_SCOPE = 3,
  parameter bit          PIPELINE  = 1'b1,
  localparam int unsigned CHUNKS = N_STATES / LANES,
  localparam int unsigned ROWS = CHUNKS * N_STATES ** (MAX_SCOPE - 1),
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned SW   = $clog2(N_STATES)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  cmd_t                 cmd,
  output logic                 idle,
  output logic                 done,
  output op_e                  cur_op,
  // p1: table read
  output logic                 rd_en,
  output logic [RW-1:0]        rd_row,
  // p2: compute controls, aligned with rd_data
  output logic                 prod_valid,
  output logic                 marg_valid,
  output logic                 marg_clear,
  output logic [SW-1:0]        s1_dig [MAX_SCOPE],
  output logic [MAX_SCOPE-1:0] mask,
  output logic                 tgt_is_v0,
  output logic [SW-1:0]        tgt_dig,
  // p3: work-table write
  output logic                 wr_en,
  output logic [RW-1:0]        wr_row
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DRAIN} state_e;

  state_e        state;
  cmd_t          cmd_q;
  logic [RW-1:0] row;
  logic [SW-1:0] dig [MAX_SCOPE];
  logic [SW-1:0] dig_nx [MAX_SCOPE];
  logic          last_row;
  logic          s1_valid, s2_valid, issue;
  logic [RW-1:0] s1_row;
  logic [3:0]    n_scope_c;

  if (N_STATES % LANES != 0) begin : g_bad_lanes
    $error("N_STATES must be a multiple of LANES");
  end

  // clamp the scope size to what the hardware holds
  always_comb begin
    n_scope_c = cmd.n_scope;
    if (n_scope_c == 4'd0) n_scope_c = 4'd1;
    if (32'(n_scope_c) > MAX_SCOPE) n_scope_c = 4'(MAX_SCOPE);
  end

  // the last row has every active digit at its maximum
  always_comb begin
    last_row = (32'(dig[0]) == CHUNKS - 1);
    for (int s = 1; s < MAX_SCOPE; s++) begin
      if ((s < 32'(cmd_q.n_scope)) && (32'(dig[s]) != N_STATES - 1)) last_row = 1'b0;
    end
  end

  // mixed-radix increment of the row digits, chunk of variable 0 fastest
  always_comb begin
    logic carry;
    carry = 1'b1;
    for (int s = 0; s < MAX_SCOPE; s++) dig_nx[s] = dig[s];
    for (int s = 0; s < MAX_SCOPE; s++) begin
      if (carry) begin
        if (32'(dig[s]) == ((s == 0) ? CHUNKS : N_STATES) - 1) begin
          dig_nx[s] = '0;
        end else begin
          dig_nx[s] = dig[s] + 1'b1;
          carry = 1'b0;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cmd_q <= '0;
      row   <= '0;
      for (int s = 0; s < MAX_SCOPE; s++) dig[s] <= '0;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            cmd_q         <= cmd;
            cmd_q.n_scope <= n_scope_c;
            row           <= '0;
            for (int s = 0; s < MAX_SCOPE; s++) dig[s] <= '0;
            state         <= S_RUN;
          end
        end
        S_RUN: begin
          if (issue && last_row) begin
            state <= S_DRAIN;
          end else if (issue) begin
            row <= row + 1'b1;
            for (int s = 0; s < MAX_SCOPE; s++) dig[s] <= dig_nx[s];
          end
        end
        S_DRAIN: begin
          if (!s1_valid && !s2_valid) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign idle   = (state == S_IDLE);
  assign done   = (state == S_DRAIN) && !s1_valid && !s2_valid;
  assign cur_op = cmd_q.op;
  assign issue  = (state == S_RUN) && (PIPELINE || (!s1_valid && !s2_valid));
  assign rd_en  = issue;
  assign rd_row = row;
  assign marg_clear = (state == S_IDLE) && start && (cmd.op == OP_MARGINALIZE);

  // pipeline bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s2_valid <= 1'b0;
    end else begin
      s1_valid <= rd_en;
      s2_valid <= s1_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_en) begin
      s1_row <= row;
      for (int s = 0; s < MAX_SCOPE; s++) s1_dig[s] <= dig[s];
    end
    if (s1_valid) wr_row <= s1_row;
  end

  assign prod_valid = s1_valid && (cmd_q.op == OP_PRODUCT);
  assign marg_valid = s1_valid && (cmd_q.op == OP_MARGINALIZE);
  assign wr_en      = s2_valid && (cmd_q.op == OP_PRODUCT);

  always_comb begin
    for (int s = 0; s < MAX_SCOPE; s++)
      mask[s] = (s < 32'(cmd_q.n_scope)) && (s != 32'(cmd_q.node_idx));
    tgt_is_v0 = (cmd_q.node_idx == 4'd0);
    tgt_dig   = '0;
    for (int s = 1; s < MAX_SCOPE; s++)
      if (s == 32'(cmd_q.node_idx)) tgt_dig = s1_dig[s];
  end

  // a new command is only taken while idle, and the read and write ports of the
  // pipeline never point at the same row in one clock
  a_done_idle: assert property (@(posedge clk) disable iff (!rst_n) done |-> !rd_en);
  a_no_rw_clash: assert property (@(posedge clk) disable iff (!rst_n)
                                  (rd_en && wr_en) |-> (rd_row != wr_row));

endmodule
