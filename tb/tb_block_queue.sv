// tb_block_queue: the Block queue's two-clock timer. Flows are pushed at random
// gaps; with the heartbeat present every cycle each must expire exactly T
// cycles after its push (popped as soon as it expires). A second run drops the
// heartbeat in random cycles: each flow must then expire after exactly T
// heartbeat cycles, even when several flows fall due in the same cycle. Queue
// order is checked too.
module tb_block_queue;
  localparam int T = 40;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic tick, push, pop, head_exp, empty, full;
  logic [9:0] push_data, head_data;
  block_queue #(.DEPTH(64), .DW(10), .TW(10)) dut (.clk, .rst_n, .t_wait(10'(T)), .tick,
    .push, .push_data, .pop, .head_exp, .head_data, .empty, .full);
  int checks = 0, failures = 0;
  int ticks = 0;           // heartbeat cycles so far
  int push_tick [1024];
  int nexp = 0;
  bit gaps = 0;
  always @(posedge clk) if (rst_n && tick) ticks++;
  assign pop = head_exp;
  // one flow leaves per cycle: a flow that expired on the same tick as the flow
  // ahead of it is seen one cycle later, which may carry one more tick
  int cyc = 0, last_exp_cyc = -10, last_w = 0;
  always @(posedge clk) cyc++;
  always @(negedge clk) if (rst_n && head_exp) begin
    int w;
    bit ok;
    w = ticks - push_tick[head_data];
    checks++;
    ok = (w == T) || (w > T && last_exp_cyc == cyc - 1 && w <= last_w + 1
                      && push_tick[head_data] == push_tick[int'(head_data) - 1]);
    last_exp_cyc = cyc;
    last_w = w;
    if (int'(head_data) != nexp || !ok) begin
      failures++;
      $display("FAIL flow %0d (exp %0d): waited %0d ticks", head_data, nexp, ticks - push_tick[head_data]);
    end
    nexp++;
  end
  always @(negedge clk) tick = gaps ? ($urandom % 4 != 0) : 1'b1;
  initial begin
    push = 0; push_data = '0; tick = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 2; run++) begin
      gaps = (run == 1);
      for (int i = 0; i < 200; i++) begin
        int n;
        @(negedge clk);
        n = run * 200 + i;
        push = 1; push_data = 10'(n);
        @(posedge clk); #1 push = 0;
        push_tick[n] = ticks;
        repeat ($urandom % 12) @(posedge clk);
      end
      repeat (4 * T) @(posedge clk);
    end
    checks++;
    if (nexp != 400) begin failures++; $display("FAIL %0d of 400 expired", nexp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
