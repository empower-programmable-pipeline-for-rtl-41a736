// tb_sync_fifo: random push/pop against a queue model at the RB depth (16):
// data order, full/empty flags and fill count; also checks that a head word is
// readable in the cycle it is popped.
module tb_sync_fifo;
  localparam int W = 32, D = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic push, pop, full, empty;
  logic [W-1:0] wd, rd;
  logic [$clog2(D+1)-1:0] count;
  sync_fifo #(.W(W), .DEPTH(D)) dut (.clk, .rst_n, .push, .wr_data(wd), .pop, .rd_data(rd),
    .full, .empty, .count);
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  initial begin
    push = 0; pop = 0; wd = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (count != q.size() || empty != (q.size() == 0) || full != (q.size() == D)) begin
        failures++; $display("FAIL flags at %0d: count %0d model %0d", i, count, q.size());
      end
      if (q.size() > 0) begin
        checks++;
        if (rd != q[0]) begin failures++; $display("FAIL data %h exp %h", rd, q[0]); end
      end
      push = (i % 400 < 200) ? ($urandom % 4 != 0) : ($urandom % 4 == 0);
      pop  = ($urandom % 2 == 0);
      if (push && full) push = 0;
      if (pop && empty) pop = 0;
      wd = $urandom;
      @(posedge clk);
      #1;
      if (pop)  void'(q.pop_front());
      if (push) q.push_back(wd);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
