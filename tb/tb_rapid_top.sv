// tb_rapid_top: end-to-end test of the ring-augmented pipeline at its default
// size (4 stages of 18 cycles, 512-byte PHV, default buffer sizes).
//
// The stateful function is a port-knocking firewall keyed by {src_ip, dst_ip}:
// knocking on ports ...1, ...2, ...3 in order opens a flow (state 3, packets
// pass); a wrong port sends it back to state 0; knocks are dropped.
// Random traffic of 32 flows enters at 10-30% load (heavier load with this
// many state updates overflows PB under STRICT). Four phases:
//  A  STRICT consistency, ending with a back-to-back burst;
//  B  STRICT with a low blocking threshold, with flapping flows that change
//     state on every packet, so flows drop into blocking mode;
//  C  bounded staleness BS(2);
//  D  WEAK consistency.
// A reference model checks every egress packet: per-flow order, the state the
// packet read (under STRICT it must equal the state left by the previous packet
// of its flow, as if packets ran one at a time), the new state and verdict, and
// that no packet is lost. The latency of a lone packet is checked against the
// stage latencies. Each mechanism (writeback, resubmission, parking in PB,
// RB-to-PB moves, Suspend queue, release, cancel_dirty, re-block, blocking
// mode, drop verdict, bounded-staleness pass) must occur at least once.
module tb_rapid_top;
  import rapid_pkg::*;

  localparam int NF  = 32;
  int NPKT_A = 3000;
  // lone packet, in to out: hash 1 + classify 1 + table read 1 + 17 + 18 (P_W stage)
  // + 1 (wr_sched) + 18 + 18 + egress 1; the monitor sees out_valid one edge later
  localparam int LAT = 1 + 1 + 1 + 17 + 18 + 1 + 18 + 18 + 1 + 1;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         in_valid, out_valid, cfg_we, init_done;
  phv_t         in_phv, out_phv;
  cons_e        cons_mode;
  logic [7:0]   bs_k, cfg_addr;
  logic [3:0]   resub_th;
  logic [8:0]   cfg_data;
  logic [103:0] key_mask;
  stats_t       stats;

  rapid_top dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // knocking FSM, the reference for the transition table
  function automatic logic [8:0] knock(logic [7:0] s, logic [3:0] p);
    if (s == 8'd3) return {1'b0, 8'd3};
    if (s < 8'd3 && p == 4'(s + 1)) return {1'b1, s + 8'd1};
    return {1'b1, 8'd0};
  endfunction

  // reference state
  logic [7:0] ref_st  [NF];
  int         sent_seq[NF];
  int         exp_seq [NF];
  int         sent = 0, recv = 0;
  bit         strict_chk = 1;
  int         phase = 0;

  bit trace = $test$plusargs("trace");
  int lone_t0 = -1, lone_lat = -1;
  int cyc = 0;
  always @(posedge clk) cyc++;

  always @(posedge clk) if (rst_n && out_valid) begin
    int f, q;
    logic [8:0] e;
    f = int'(out_phv.src_ip[7:0]);
    q = int'(out_phv.pkt_id[23:0]);
    recv++;
    if (trace) $display("%0d OUT f=%0d q=%0d rs=%0d cur=%0d new=%0d upd=%0d", cyc, f, q, out_phv.resub_n, out_phv.cur_state[7:0], out_phv.new_state[7:0], out_phv.state_upd);
    if (lone_t0 >= 0 && lone_lat < 0) lone_lat = cyc - lone_t0;
    check(f < NF, "flow id in range");
    if (f < NF) begin
      check(q == exp_seq[f], $sformatf("flow %0d order: got %0d expected %0d", f, q, exp_seq[f]));
      exp_seq[f] = q + 1;
      if (strict_chk)
        check(out_phv.cur_state[7:0] == ref_st[f],
              $sformatf("flow %0d pkt %0d read state %0d, serial state %0d", f, q, out_phv.cur_state[7:0], ref_st[f]));
      e = knock(out_phv.cur_state[7:0], out_phv.dst_port[3:0]);
      check(out_phv.new_state[7:0] == e[7:0] && out_phv.drop == e[8], "transition and verdict");
      check(out_phv.state_upd == (out_phv.new_state != out_phv.cur_state), "state_upd flag");
      if (out_phv.state_upd) ref_st[f] = out_phv.new_state[7:0];
    end
  end

  task automatic send(int f, logic [15:0] port);
    phv_t p;
    p = '0;
    p.rest     = ($bits(p.rest))'({($bits(p.rest)/32){32'hA5A5_0000 + 32'(f)}});
    p.src_ip   = 32'h0A00_0000 | 32'(f);
    p.dst_ip   = 32'hC0A8_0101;
    p.src_port = 16'(1000 + f);
    p.dst_port = port;
    p.proto    = 8'd6;
    p.pkt_id   = 32'(sent_seq[f]);
    if (trace) $display("%0d IN  f=%0d q=%0d port=%0d", cyc, f, sent_seq[f], port);
    sent_seq[f]++;
    sent++;
    // in_valid stays high for back-to-back packets; idle() lowers it
    in_valid <= 1'b1;
    in_phv   <= p;
    @(posedge clk);
  endtask

  task automatic idle(int n);
    in_valid <= 1'b0;
    repeat (n) @(posedge clk);
  endtask

  // random traffic; flapping flows change state on every packet
  task automatic traffic(int npkt, int load_pct, int nflap);
    for (int i = 0; i < npkt; i++) begin
      int f, r;
      logic [15:0] port;
      while (($urandom % 100) >= load_pct) idle(1);
      f = int'($urandom % NF);
      if (nflap > 0 && ($urandom % 8) == 0) f = int'($urandom % nflap);
      r = int'($urandom % 10);
      if (f < nflap)       port = (sent_seq[f] % 2 == 0) ? 16'h1001 : 16'h1009;
      else if (r < 3)      port = 16'h1001;
      else if (r < 5)      port = 16'h1002;
      else if (r < 7)      port = 16'h1003;
      else if (r < 8)      port = 16'h1009;
      else                 port = 16'd80;
      send(f, port);
    end
    idle(1);
  endtask

  task automatic drain();
    int last;
    last = -1;
    while (recv != sent || last != recv) begin
      last = recv;
      idle(400);
    end
    idle(400);
  endtask

  stats_t s_a;

  initial begin
    in_valid  = 0;
    in_phv    = '0;
    cfg_we    = 0;
    cfg_addr  = '0;
    cfg_data  = '0;
    cons_mode = CONS_STRICT;
    bs_k      = 8'd2;
    resub_th  = 4'd15;
    key_mask  = {32'hFFFF_FFFF, 32'hFFFF_FFFF, 40'h0};
    for (int f = 0; f < NF; f++) begin
      ref_st[f] = 0; sent_seq[f] = 0; exp_seq[f] = 0;
    end
    repeat (4) @(posedge clk);
    rst_n = 1;
    wait (init_done);
    @(posedge clk);
    // program the port-knocking table
    for (int a = 0; a < 256; a++) begin
      cfg_we   <= 1'b1;
      cfg_addr <= 8'(a);
      cfg_data <= knock({4'd0, 4'(a >> 4)}, 4'(a));
      @(posedge clk);
    end
    cfg_we <= 1'b0;
    idle(5);

    // lone packet latency
    lone_t0 = cyc + 1;
    send(NF-1, 16'd80);
    idle(LAT + 10);
    check(lone_lat == LAT, $sformatf("lone packet latency %0d, expected %0d", lone_lat, LAT));

    // A: strict
    phase = 1;
    if ($value$plusargs("npkt=%d", NPKT_A)) $display("phase A with %0d packets", NPKT_A);
    traffic(NPKT_A, 20, 0);
    // back-to-back burst: RB only drains in free cycles, so flows outlive their
    // Block timer and go through the Suspend queue
    traffic(80, 100, 0);
    drain();
    s_a = stats;
    check(recv == sent, $sformatf("phase A: all packets out (%0d of %0d)", recv, sent));
    // B: strict, blocking-mode downgrade
    phase = 2;
    resub_th = 4'd0;
    traffic(2000, 10, 3);
    // bursts on one flapping flow: packets are still parked when the writeback
    // of the first released one arrives, so the flow is re-blocked
    for (int k = 0; k < 4; k++) begin
      for (int j = 0; j < 6; j++) send(0, (sent_seq[0] % 2 == 0) ? 16'h1001 : 16'h1009);
      idle(300);
    end
    drain();
    check(recv == sent, $sformatf("phase B: all packets out (%0d of %0d)", recv, sent));
    // C: bounded staleness, K = 2
    phase = 3;
    resub_th   = 4'd15;
    cons_mode  = CONS_BS;
    strict_chk = 0;
    traffic(1500, 30, 2);
    drain();
    check(recv == sent, $sformatf("phase C: all packets out (%0d of %0d)", recv, sent));
    // D: weak
    phase = 4;
    cons_mode = CONS_WEAK;
    traffic(1500, 30, 2);
    drain();
    check(recv == sent, $sformatf("phase D: all packets out (%0d of %0d)", recv, sent));

    $display("mechanisms: wb=%0d resub=%0d pb_new=%0d rb_pb=%0d susp=%0d sched=%0d rel=%0d cancel=%0d wr_cancel=%0d reblock=%0d blk=%0d egress_drop=%0d late=%0d drops=%0d/%0d/%0d ovf=%0d/%0d merge=%0d",
      stats.wb, stats.wr_resub, stats.pb_new, stats.rb_pb, stats.susp, stats.sched, stats.rel,
      stats.cancel, stats.wr_cancel, stats.reblock, stats.blk, stats.egress_drop, stats.late,
      stats.rd_drop, stats.ring_drop, stats.wr_lost, stats.rd_ovf, stats.wr_ovf, stats.ring_merge);
    check(stats.wb > 0,        "writebacks happened");
    check(stats.wr_resub > 0,  "resubmissions happened");
    check(stats.rsb == stats.wr_resub, "every resubmitted packet reached P_R");
    check(stats.pb_new > 0,    "new packets parked in PB");
    check(stats.rb_pb > 0,     "resubmitted packets moved RB -> PB");
    check(stats.susp > 0,      "Suspend queue used");
    check(stats.rel > 0,       "packets released from PB");
    check(stats.cancel > 0 && stats.wr_cancel == stats.cancel, "cancel_dirty sent and applied");
    check(stats.reblock > 0,   "flows re-blocked");
    check(s_a.blk == 0 && stats.blk > 0, "blocking mode only in phase B");
    check(stats.egress_drop > 0, "drop verdicts");
    check(stats.wb > stats.wr_resub, "fewer resubmissions than writebacks under BS/WEAK");
    check(stats.late == 0,     "no resubmitted packet arrived after its flow was released");
    check(stats.rd_drop == 0 && stats.ring_drop == 0 && stats.wr_lost == 0, "no buffer overflow");
    check(stats.rd_ovf == 0 && stats.wr_ovf == 0, "no dTable overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: phase %0d sent %0d recv %0d", phase, sent, recv);
    $display("stats: wb=%0d resub=%0d rsb=%0d pb_new=%0d rb_pb=%0d susp=%0d sched=%0d rel=%0d cancel=%0d wr_cancel=%0d reblock=%0d blk=%0d late=%0d drops=%0d/%0d/%0d ovf=%0d/%0d",
      stats.wb, stats.wr_resub, stats.rsb, stats.pb_new, stats.rb_pb, stats.susp, stats.sched, stats.rel,
      stats.cancel, stats.wr_cancel, stats.reblock, stats.blk, stats.late,
      stats.rd_drop, stats.ring_drop, stats.wr_lost, stats.rd_ovf, stats.wr_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
