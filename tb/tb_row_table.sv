// tb_row_table: fills the table through the host element port, reads it back
// by element, overwrites random rows through the row write port and reads
// every row through the row read port, checking each read against a flat
// reference array (index = row * LANES + lane). Both ports have a read latency
// of one clock, which the checks rely on.
module tb_row_table;
  localparam int LANES = 20;
  localparam int ROWS  = 400;
  localparam int N     = LANES * ROWS;
  localparam int AW    = $clog2(N);
  localparam int RW    = $clog2(ROWS);

  logic clk = 0;
  always #5 clk = ~clk;

  logic          h_en = 0, h_we = 0;
  logic [AW-1:0] h_addr = '0;
  logic [31:0]   h_wdata = '0, h_rdata;
  logic          rd_en = 0, wr_en = 0;
  logic [RW-1:0] rd_row = '0, wr_row = '0;
  logic [31:0]   rd_data [LANES];
  logic [31:0]   wr_data [LANES];
  logic [31:0]   model [N];
  int checks = 0, failures = 0;

  row_table #(.LANES(LANES), .ROWS(ROWS)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < LANES; j++) wr_data[j] = '0;
    @(negedge clk);
    // host writes every element
    for (int i = 0; i < N; i++) begin
      model[i] = $urandom;
      h_en = 1; h_we = 1; h_addr = AW'(i); h_wdata = model[i];
      @(negedge clk);
    end
    h_we = 0;
    // host reads random elements
    for (int k = 0; k < 2000; k++) begin
      int i;
      i = $urandom_range(0, N - 1);
      h_en = 1; h_addr = AW'(i);
      @(negedge clk);
      h_en = 0;
      checks++;
      if (h_rdata !== model[i]) begin
        failures++;
        if (failures < 10) $display("host read %0d: %h expected %h", i, h_rdata, model[i]);
      end
    end
    // row writes on random rows
    for (int k = 0; k < 200; k++) begin
      int r;
      r = $urandom_range(0, ROWS - 1);
      wr_en = 1; wr_row = RW'(r);
      for (int j = 0; j < LANES; j++) begin
        wr_data[j] = $urandom;
        model[r * LANES + j] = wr_data[j];
      end
      @(negedge clk);
    end
    wr_en = 0;
    // row reads of every row
    for (int r = 0; r < ROWS; r++) begin
      rd_en = 1; rd_row = RW'(r);
      @(negedge clk);
      rd_en = 0;
      for (int j = 0; j < LANES; j++) begin
        checks++;
        if (rd_data[j] !== model[r * LANES + j]) begin
          failures++;
          if (failures < 10) $display("row %0d lane %0d: %h expected %h", r, j, rd_data[j], model[r*LANES+j]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
