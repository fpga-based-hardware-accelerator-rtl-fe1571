// tb_msg_in_buf: checks the reset value (1.0 everywhere), random writes
// against a reference array on both the parallel output and the addressed
// read port, and that writes outside the buffer are ignored.
module tb_msg_in_buf;
  localparam int NS = 20;
  localparam int MS = 3;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        we = 0;
  logic [1:0]  var_idx = '0;
  logic [4:0]  state_idx = '0;
  logic [31:0] wdata = '0, rd_data;
  logic [31:0] msg [MS][NS];
  logic [31:0] model [MS][NS];
  int checks = 0, failures = 0;

  msg_in_buf #(.N_STATES(NS), .MAX_SCOPE(MS)) dut (.*);

  task automatic compare_all();
    for (int s = 0; s < MS; s++)
      for (int j = 0; j < NS; j++) begin
        checks++;
        if (msg[s][j] !== model[s][j]) begin
          failures++;
          if (failures < 10) $display("msg[%0d][%0d]=%h expected %h", s, j, msg[s][j], model[s][j]);
        end
      end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < MS; s++) for (int j = 0; j < NS; j++) model[s][j] = 32'h3f80_0000;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    compare_all();
    for (int k = 0; k < 500; k++) begin
      int s, j;
      s = $urandom_range(0, 3); j = $urandom_range(0, 31);
      we = 1; var_idx = 2'(s); state_idx = 5'(j); wdata = $urandom;
      if (s < MS && j < NS) model[s][j] = wdata;
      @(negedge clk);
      we = 0;
      var_idx = 2'($urandom_range(0, MS - 1)); state_idx = 5'($urandom_range(0, NS - 1));
      #1;
      checks++;
      if (rd_data !== model[var_idx][state_idx]) begin
        failures++;
        if (failures < 10) $display("read [%0d][%0d]=%h expected %h", var_idx, state_idx, rd_data, model[var_idx][state_idx]);
      end
    end
    compare_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
