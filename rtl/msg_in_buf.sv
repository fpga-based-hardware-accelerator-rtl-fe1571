// msg_in_buf: register file holding the incoming message of every scope variable.
//
// The host writes one float per access: message of variable 'var_idx', state
// 'state_idx'. All MAX_SCOPE x N_STATES words are visible at once on 'msg', so
// the unrolled product lanes can each pick the value they need in the same
// cycle; for that reason the buffer is built from flip-flops (LUT memory)
// rather than block RAM. Reset fills every word with 1.0, the neutral message,
// which is this design's choice. 'rd_data' returns the word addressed by
// var_idx/state_idx combinationally, for host read-back.
module msg_in_buf
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES  = 20,
  parameter int unsigned MAX_SCOPE = 3,
  localparam int unsigned VW = (MAX_SCOPE > 1) ? $clog2(MAX_SCOPE) : 1,
  localparam int unsigned SW = $clog2(N_STATES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          we,
  input  logic [VW-1:0] var_idx,
  input  logic [SW-1:0] state_idx,
  input  float32_t      wdata,
  output float32_t      rd_data,
  output float32_t      msg [MAX_SCOPE][N_STATES]
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < MAX_SCOPE; s++)
        for (int j = 0; j < N_STATES; j++)
          msg[s][j] <= FP_ONE;
    end else if (we && (32'(var_idx) < MAX_SCOPE) && (32'(state_idx) < N_STATES)) begin
      msg[var_idx][state_idx] <= wdata;
    end
  end

  always_comb begin
    rd_data = FP_ZERO;
    if ((32'(var_idx) < MAX_SCOPE) && (32'(state_idx) < N_STATES))
      rd_data = msg[var_idx][state_idx];
  end

endmodule
