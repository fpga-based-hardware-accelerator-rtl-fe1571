// row_table: factor table memory split into LANES banks, one per datapath lane.
//
// A factor over n variables of C states each holds C^n entries. Entry i is
// stored in bank (i mod LANES) at row (i div LANES). With LANES = C one row
// holds the C values of scope variable 0 for one setting of the others; with
// fewer lanes a row holds LANES consecutive states of variable 0. The
// datapath reads or writes a whole row, one word per lane, in one clock. This
// is cyclic array partitioning, which feeds the unrolled lanes; the row
// layout that follows from it is this design's choice.
//
// Each bank is a true dual-port RAM:
//   port A - host element port: h_en/h_we, flat element address h_addr,
//            h_wdata; h_rdata is valid one cycle after h_en.
//   port B - datapath row port: rd_en/rd_row gives rd_data one cycle later;
//            wr_en/wr_row/wr_data writes a whole row. A row write has priority
//            over a row read in the same cycle (the controller never issues both
//            to one table).
// Port A and port B writing the same word in one cycle is not defined.
module row_table
  import fg_pkg::*;
#(
  parameter int unsigned LANES = 20,
  parameter int unsigned ROWS  = 400,
  localparam int unsigned AW   = $clog2(LANES * ROWS),
  localparam int unsigned RW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned LW   = (LANES > 1) ? $clog2(LANES) : 1
) (
  input  logic            clk,
  // port A: host element access
  input  logic            h_en,
  input  logic            h_we,
  input  logic [AW-1:0]   h_addr,
  input  float32_t        h_wdata,
  output float32_t        h_rdata,
  // port B: datapath row access
  input  logic            rd_en,
  input  logic [RW-1:0]   rd_row,
  output float32_t        rd_data [LANES],
  input  logic            wr_en,
  input  logic [RW-1:0]   wr_row,
  input  float32_t        wr_data [LANES]
);

  logic [RW-1:0] h_row;
  logic [LW-1:0] h_lane, h_lane_q;
  float32_t bank_h_rdata [LANES];

  // flat element index -> (row, bank); the divisor is a constant
  assign h_row  = RW'(h_addr / AW'(LANES));
  assign h_lane = LW'(h_addr % AW'(LANES));

  for (genvar j = 0; j < LANES; j++) begin : g_bank
    float32_t mem [ROWS];

    always_ff @(posedge clk) begin
      if (h_en && (h_lane == j)) begin
        if (h_we) mem[h_row] <= h_wdata;
        bank_h_rdata[j] <= mem[h_row];
      end
      if (wr_en) begin
        mem[wr_row] <= wr_data[j];
      end else if (rd_en) begin
        rd_data[j] <= mem[rd_row];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (h_en) h_lane_q <= h_lane;
  end

  assign h_rdata = bank_h_rdata[h_lane_q];

endmodule
