// fg_pkg: types and constants shared by the factor-graph sum-product accelerator.
//
// Messages and factor entries are IEEE-754 single-precision words, as the
// accelerator computes in 32-bit floating point. The accelerator runs two
// operations on one factor node: the factor product (multiply each factor
// entry by the incoming messages of the scope variables other than the target)
// and the marginalization (sum the product table onto the target variable).
// The operation codes, the command layout and the float constants below are
// this design's own choices. Not every module uses every constant, so a
// module compiled on its own may get unused-parameter lint warnings for the
// others.
package fg_pkg;

  typedef logic [31:0] float32_t;

  localparam float32_t FP_ZERO = 32'h0000_0000;
  localparam float32_t FP_ONE  = 32'h3f80_0000;
  localparam float32_t FP_QNAN = 32'h7fc0_0000;

  typedef enum logic [0:0] {
    OP_PRODUCT     = 1'b0,  // work[r][j] = factor[r][j] * prod(msgIn of scope vars != target)
    OP_MARGINALIZE = 1'b1   // msgOut[x]  = sum of work entries whose target digit is x
  } op_e;

  // Command latched by the control interface when the host starts an operation.
  typedef struct packed {
    op_e        op;
    logic [3:0] n_scope;   // number of variables in the factor's scope
    logic [3:0] node_idx;  // target variable (excluded from the product, kept by the marginal)
  } cmd_t;

endpackage
