// tb_flow_state_table: the 4096 x 128 state table. Waits for the clearing after
// reset, checks that reads return zero, writes random states to random
// addresses against a model, and checks the one-cycle read latency and the
// write-first bypass when a read and a write hit the same address.
module tb_flow_state_table;
  localparam int D = 4096, SW = 128;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic rd_en, wr_en, init_done;
  logic [11:0] rd_addr, wr_addr;
  logic [SW-1:0] rd_data, wr_data;
  flow_state_table dut (.*);
  logic [SW-1:0] model [D];
  int checks = 0, failures = 0;
  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wr_data = '0;
    for (int i = 0; i < D; i++) model[i] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    wait (init_done);
    for (int t = 0; t < 4000; t++) begin
      logic [11:0] a;
      @(negedge clk);
      a = 12'($urandom % 64);
      wr_en = ($urandom % 2 == 0);
      wr_addr = 12'($urandom % 64);
      wr_data = {$urandom, $urandom, $urandom, $urandom};
      rd_en = 1;
      rd_addr = (t % 7 == 0) ? wr_addr : a;
      @(posedge clk);
      #1;
      if (wr_en) model[wr_addr] = wr_data;
      checks++;
      if (rd_data != model[rd_addr]) begin
        failures++; $display("FAIL addr %0d got %h exp %h", rd_addr, rd_data, model[rd_addr]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
