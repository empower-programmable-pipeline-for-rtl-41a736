// block_queue: the Block FIFO of the read scheduler together with its per-flow
// timer built from two clocks.
//
// A dirty flow must wait T cycles after it is enqueued before its packets may be
// released (all speculative packets of the flow that read a stale state have
// then come back over the ring). Flows leave in the order they entered, so one
// timer per flow is not needed: I.clk counts the ticks since the last push
// (saturating at the top of its range; it starts at T), and each pushed entry stores that value as
// its timer offset. D.clk counts down the remaining wait of the head entry; when
// the head leaves, D.clk is loaded with the next entry's offset, less the ticks
// that passed between the head's expiry and its removal (kept in a small
// overdue counter). An entry pushed into an empty queue starts with D.clk = T.
// A flow thus expires exactly T ticks after its push, however late the flows
// ahead of it are removed.
// Both clocks advance only in cycles with tick high (the heartbeat from P_W was
// received), so a delay on the ring postpones every waiting flow by one cycle.
// This follows the published design. Storing the offset in the queue entry (rather than
// in dTable) is this design's choice, so an entry made stale by re-blocking still
// keeps the chain of offsets intact.
// Interface: push (one per cycle) with a DW-bit tag; head_exp is high while the
// head entry's wait is over; pop removes it (only allowed when head_exp).
module block_queue #(
  parameter int DEPTH = 64,
  parameter int DW    = 10,
  parameter int TW    = 10
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [TW-1:0] t_wait,    // T
  input  logic          tick,      // heartbeat received this cycle
  input  logic          push,
  input  logic [DW-1:0] push_data,
  input  logic          pop,
  output logic          head_exp,
  output logic [DW-1:0] head_data,
  output logic          empty,
  output logic          full
);
  localparam int AW = $clog2(DEPTH);
  localparam int CW = $clog2(DEPTH+1);

  logic [DW-1:0] dmem [DEPTH];
  logic [TW-1:0] omem [DEPTH];
  logic [AW-1:0] rd_ptr, wr_ptr, rd_nxt;
  logic [CW-1:0] count;
  logic [TW-1:0] iclk, dclk, over;
  logic          iclk_init;

  function automatic logic [AW-1:0] inc(logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  assign empty     = (count == '0);
  assign full      = (count == CW'(DEPTH));
  assign head_data = dmem[rd_ptr];
  assign head_exp  = !empty && (dclk == '0);
  assign rd_nxt    = inc(rd_ptr);

  logic          do_push, do_pop;
  logic [TW-1:0] push_off;
  assign do_push  = push && !full;
  assign do_pop   = pop && head_exp;
  // ticks since the previous push, this cycle's tick included (saturating at
  // the counter's range, not at T: a flow pushed while an expired head waits
  // to be popped must still wait its full T)
  assign push_off = iclk_init ? t_wait : (tick && iclk == '1) ? iclk : iclk + TW'(tick);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr    <= '0;
      wr_ptr    <= '0;
      count     <= '0;
      iclk      <= '0;
      iclk_init <= 1'b1;
      dclk      <= '0;
      over      <= '0;
    end else begin
      if (do_push) wr_ptr <= inc(wr_ptr);
      if (do_pop)  rd_ptr <= rd_nxt;
      count <= count + CW'(do_push) - CW'(do_pop);

      // I.clk: elapsed ticks since the last push, saturating at all ones
      if (do_push) begin
        iclk      <= '0;
        iclk_init <= 1'b0;
      end else if (tick && !iclk_init && iclk != '1) iclk <= iclk + 1'b1;

      // D.clk: remaining wait of the head entry
      // over: ticks since the head expired; they count towards the next entry
      if (do_pop) begin
        if (count >= CW'(2) || do_push) begin
          logic [TW-1:0] nxt, ov;
          nxt = (count >= CW'(2)) ? omem[rd_nxt] : push_off;
          ov  = over + TW'(tick);
          if (nxt > ov) begin
            dclk <= nxt - ov;
            over <= '0;
          end else begin
            dclk <= '0;
            over <= ov - nxt;
          end
        end else begin
          dclk <= '0;
          over <= '0;
        end
      end else if (empty && do_push) begin
        dclk <= t_wait;
        over <= '0;
      end else if (tick && dclk != '0) begin
        dclk <= dclk - 1'b1;
      end else if (tick && !empty && over != '1) begin
        over <= over + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) begin
      dmem[wr_ptr] <= push_data;
      omem[wr_ptr] <= push_off;
    end
  end

  a_pop_when_expired: assert property (@(posedge clk) disable iff (!rst_n) pop |-> head_exp);
  a_no_overflow:      assert property (@(posedge clk) disable iff (!rst_n) !(push && full));
endmodule
