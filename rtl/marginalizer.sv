// marginalizer: sums a factor table onto one target variable.
//
// The table streams in one row per clock. A row holds LANES words, and word j
// belongs to state chunk * LANES + j of scope variable 0. The row comes with
// its chunk number and with the row's state of the target variable,
// 'tgt_dig'. The outgoing message has one accumulator per state (N_STATES):
//   - target is variable 0 (tgt_is_v0): accumulator chunk * LANES + j adds
//     word j of the row;
//   - any other target: a pairwise adder tree first reduces the row (inputs
//     padded with +0 to a power of two), then accumulator tgt_dig adds the
//     sum.
// 'clear' sets all accumulators to +0 before a new marginalization.
//
// Timing: stage 1 registers the row (or its tree sum) one clock after
// in_valid. Stage 2 adds it into the accumulators on the next clock, so 'msg'
// holds the full marginal two clocks after the last row. Each accumulator is a
// single-cycle read-modify-write loop, so a row can arrive every clock. The
// tree order and the two stages are this design's choices. The operation is
// the marginalization step of the sum-product algorithm.
module marginalizer
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES = 20,
  parameter int unsigned LANES    = 20,
  localparam int unsigned SW      = $clog2(N_STATES),
  localparam int unsigned LV      = $clog2(LANES),
  localparam int unsigned P2      = 1 << LV
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          in_valid,
  input  logic          tgt_is_v0,
  input  logic [SW-1:0] tgt_dig,
  input  logic [SW-1:0] chunk,
  input  float32_t      row  [LANES],
  output float32_t      msg  [N_STATES]
);

  // pairwise adder tree: level l holds P2 >> (l + 1) partial sums
  float32_t leaf [P2];
  float32_t row_sum;

  for (genvar k = 0; k < P2; k++) begin : g_leaf
    if (k < LANES) begin : g_in
      assign leaf[k] = row[k];
    end else begin : g_pad
      assign leaf[k] = FP_ZERO;
    end
  end

  if (LV == 0) begin : g_single
    assign row_sum = leaf[0];
  end else begin : g_tree
    for (genvar l = 0; l < LV; l++) begin : g_lvl
      float32_t node [P2 >> (l + 1)];
      for (genvar k = 0; k < (P2 >> (l + 1)); k++) begin : g_node
        float32_t a, b;
        if (l == 0) begin : g_first
          assign a = leaf[2*k];
          assign b = leaf[2*k+1];
        end else begin : g_next
          assign a = g_lvl[l-1].node[2*k];
          assign b = g_lvl[l-1].node[2*k+1];
        end
        fp_add u_add (.a(a), .b(b), .y(node[k]));
      end
    end
    assign row_sum = g_lvl[LV-1].node[0];
  end

  // stage 1 registers
  logic          s1_valid, s1_v0;
  logic [SW-1:0] s1_dig, s1_chunk;
  float32_t      s1_row [LANES];
  float32_t      s1_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1_valid <= 1'b0;
    else        s1_valid <= in_valid & ~clear;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      s1_v0    <= tgt_is_v0;
      s1_dig   <= tgt_dig;
      s1_chunk <= chunk;
      s1_sum   <= row_sum;
      for (int j = 0; j < LANES; j++) s1_row[j] <= row[j];
    end
  end

  // stage 2: one accumulator per state
  for (genvar k = 0; k < N_STATES; k++) begin : g_acc
    float32_t addend, acc_nx;
    logic     acc_en;
    assign addend = s1_v0 ? s1_row[k % LANES] : s1_sum;
    assign acc_en = s1_valid && (s1_v0 ? (32'(s1_chunk) == k / LANES) : (32'(s1_dig) == k));
    fp_add u_acc (.a(msg[k]), .b(addend), .y(acc_nx));

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)      msg[k] <= FP_ZERO;
      else if (clear)  msg[k] <= FP_ZERO;
      else if (acc_en) msg[k] <= acc_nx;
    end
  end

endmodule
