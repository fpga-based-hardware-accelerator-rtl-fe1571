// product_lanes: unrolled factor product (the compute stage of one table row).
//
// A table row holds LANES consecutive states of scope variable 0. The row is
// chunk dig[0] of the variable's N_STATES states, so lane j works on state
// x0 = dig[0] * LANES + j. With the default LANES = N_STATES a row is all
// states and dig[0] is 0. Lane j multiplies the factor entry f[j] by the
// incoming message of every scope variable selected in 'mask':
//   - for variable 0 it uses state x0 of that message;
//   - for a variable s > 0 it uses state dig[s], the row's digit, which is the
//     same for all lanes.
// Unselected variables multiply by 1.0, which is exact. The multiplications
// are chained in variable order, ((f * m0) * m1) * m2 ..., with one fp_mul per
// lane and variable.
//
// Timing: the products are combinational from f/dig/mask/msg and registered
// once, so p and out_valid appear one clock after in_valid. Unrolling over the
// states, with one lane per state at the default, follows the original
// accelerator. Making the lane count a parameter and the output register are
// this design's choices.
module product_lanes
  import fg_pkg::*;
#(
  parameter int unsigned N_STATES  = 20,
  parameter int unsigned LANES     = 20,
  parameter int unsigned MAX_SCOPE = 3,
  localparam int unsigned SW = $clog2(N_STATES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  float32_t      f    [LANES],
  input  logic [SW-1:0] dig  [MAX_SCOPE],
  input  logic [MAX_SCOPE-1:0] mask,
  input  float32_t      msg  [MAX_SCOPE][N_STATES],
  output logic          out_valid,
  output float32_t      p    [LANES]
);

  float32_t prod [LANES];

  for (genvar j = 0; j < LANES; j++) begin : g_lane
    for (genvar s = 0; s < MAX_SCOPE; s++) begin : g_var
      float32_t x_in, opnd, x_out;
      if (s == 0) begin : g_own
        logic [SW-1:0] x0;
        assign x0   = SW'(32'(dig[0]) * LANES + j);
        assign x_in = f[j];
        assign opnd = mask[s] ? msg[s][x0] : FP_ONE;
      end else begin : g_row
        assign x_in = g_lane[j].g_var[s-1].x_out;
        assign opnd = mask[s] ? msg[s][dig[s]] : FP_ONE;
      end
      fp_mul u_mul (.a(x_in), .b(opnd), .y(x_out));
    end
    assign prod[j] = g_var[MAX_SCOPE-1].x_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int j = 0; j < LANES; j++) p[j] <= prod[j];
    end
  end

endmodule
