// rd_sched: the read scheduler at the first processor (P_R) of a stateful
// function. It keeps state consistent while packets run speculatively.
//
// Packets from the upstream pipeline (in_*) and resubmitted packets waiting in
// RB share the hash module (new packets first; RB uses free cycles). One cycle
// later the flow index is searched in dTable, the table of dirty flows:
//  * a new packet of a clean flow is issued into the stage at once (out_*);
//  * a new packet of a dirty flow is parked in PB, at the tail of the flow's
//    list of newly arrived packets;
//  * a resubmitted packet is moved into PB, into the flow's resubmitted list,
//    and the flow's RB counter drops by one.
// A writeback slot from P_W (slot_*) updates the flow state table (st_wr_*) and
// registers the flow in dTable (unless the function runs at weak consistency),
// putting it at the back of the Block queue; the Block queue's two-clock timer
// makes it wait T heartbeat cycles, long enough for every packet that read the
// stale state to come back over the ring (rsb_*; each increments the flow's RB
// counter). At timer expiry a flow whose RB counter is zero becomes schedulable;
// otherwise it waits in the Suspend queue until its counter is zero. A
// schedulable flow has its resubmitted list put in front of its new-packet
// list, is sent as a cancel_dirty to P_W (cancel_*), and joins the circular
// Schedule queue; in free pipeline cycles that queue releases one packet of its
// head flow and sends the flow to the back. A flow whose list runs dry leaves
// dTable. A writeback for a flow already in dTable restarts its timer (back of
// the Block queue) and increments its resubmit_cycle; above resub_th (or when
// a resubmitted packet of the flow has gone round more than resub_th times) the
// flow drops to blocking mode: a cancel_dirty goes out at once (and again after
// each later writeback and at each release), and packets are released one per
// T cycles until PB holds none of the flow's packets, after which the flow
// waits T once more and leaves dTable.
// All of this follows the published design, including the sizes (dTable 64, PB 32,
// RB 16, queues 64). This design's own choices: queue entries carry a 4-bit
// generation so that entries made stale by re-blocking are skipped when they
// reach the head; the blocking-mode timer reuses the Block queue (so it is also
// paused by missing heartbeats); one writeback slot and one cancel_dirty are
// handled per cycle; new packets of dirty flows leave a quarter of PB free for
// resubmitted packets (so a suspended flow can always receive the packets it
// waits for), RB drains in every free cycle, and a full PB or RB drops the
// packet and counts it.
// Timing: out_* is registered; a clean packet leaves two cycles after it enters.
module rd_sched
  import rapid_pkg::*;
#(
  parameter int DT_ENTRIES = 64,
  parameter int PB_DEPTH   = 32,
  parameter int RB_DEPTH   = 16,
  parameter int QDEPTH     = 64,
  parameter int TW         = 10,
  parameter int W_NODE     = 1,   // ring node of P_W
  parameter int R_NODE     = 0,   // ring node of P_R (this processor)
  parameter int FID        = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [TW-1:0]     t_wait,
  input  logic [3:0]        resub_th,
  input  logic [103:0]      key_mask,
  input  logic              in_valid,
  input  phv_t              in_phv,
  output logic              out_valid,
  output phv_t              out_phv,
  output logic              st_wr_en,
  output logic [IDX_W-1:0]  st_wr_idx,
  output logic [STATE_W-1:0] st_wr_state,
  input  logic              slot_valid,
  input  slot_t             slot,
  input  logic              rsb_valid,
  input  phv_t              rsb_phv,
  input  logic              hb,
  output logic              cancel_valid,
  output flit_t             cancel_flit,
  input  logic              cancel_ready,
  output logic [15:0]       c_pb_new,    // new packets parked in PB
  output logic [15:0]       c_rb_pb,     // resubmitted packets moved RB -> PB
  output logic [15:0]       c_rsb,       // resubmitted packets received
  output logic [15:0]       c_wb,        // writebacks received
  output logic [15:0]       c_susp,      // flows sent to the Suspend queue
  output logic [15:0]       c_sched,     // flows made schedulable
  output logic [15:0]       c_release,   // packets released from PB
  output logic [15:0]       c_reblock,   // flows re-blocked by a new writeback
  output logic [15:0]       c_blk,       // flows downgraded to blocking mode
  output logic [15:0]       c_cancel,    // cancel_dirty signals sent
  output logic [15:0]       c_drop,      // packets dropped (PB or RB full)
  output logic [15:0]       c_late,      // resubmitted packets of a flow not waiting for them
  output logic [15:0]       c_ovf        // dTable full or cancel lost
);
  localparam int AW  = $clog2(DT_ENTRIES);
  localparam int PW  = $clog2(PB_DEPTH);
  localparam int GW  = 4;
  localparam int QW  = AW + GW;

  typedef enum logic [1:0] {S_BLOCK, S_SUSP, S_SCHED, S_WAIT} fst_e;

  typedef struct packed {
    logic [PW-1:0] rh, rt;  logic rne;   // resubmitted-packet list
    logic [PW-1:0] lh, lt;  logic lne;   // new-packet list (the release list)
  } lists_t;

  // ---------------- per-flow dTable data ----------------
  fst_e          st   [DT_ENTRIES];
  logic [GW-1:0] gen  [DT_ENTRIES];
  logic [4:0]    rbc  [DT_ENTRIES];
  logic          blk  [DT_ENTRIES];
  logic [3:0]    rcyc [DT_ENTRIES];
  lists_t        lst  [DT_ENTRIES];
  logic [IDX_W-1:0] keyr [DT_ENTRIES];
  logic [DT_ENTRIES-1:0] dvld;

  // ---------------- stage 0: hash input ----------------
  phv_t rb_head;
  logic rb_empty, rb_full, rb_pop, rb_push;
  logic [$clog2(RB_DEPTH+1)-1:0] rb_cnt;
  logic [$clog2(PB_DEPTH+1)-1:0] pb_free;

  sync_fifo #(.W(PHV_W), .DEPTH(RB_DEPTH)) u_rb (
    .clk, .rst_n, .push(rb_push), .wr_data(rsb_phv), .pop(rb_pop), .rd_data(rb_head),
    .full(rb_full), .empty(rb_empty), .count(rb_cnt));

  assign rb_push = rsb_valid && !rb_full;
  // RB always drains in free cycles so a suspended flow can never wait on a
  // resubmitted packet stuck behind a full PB; new packets of dirty flows leave
  // PB_RSV entries to resubmitted packets.
  localparam int PB_RSV = PB_DEPTH / 4;
  assign rb_pop  = !in_valid && !rb_empty;

  phv_t  h0_phv;
  assign h0_phv = in_valid ? in_phv : rb_head;

  logic             h_valid, h_rb;
  phv_t             h_phv;
  logic [IDX_W-1:0] h_hash;

  hash_unit #(.KEY_W(104), .HASH_W(IDX_W)) u_hash (
    .clk, .rst_n, .in_valid(in_valid || rb_pop),
    .in_key({h0_phv.src_ip, h0_phv.dst_ip, h0_phv.src_port, h0_phv.dst_port, h0_phv.proto}),
    .key_mask, .out_valid(h_valid), .out_hash(h_hash));

  always_ff @(posedge clk) begin
    if (in_valid || rb_pop) begin
      h_phv <= h0_phv;
      h_rb  <= !in_valid;
    end
  end

  // ---------------- dTable ----------------
  logic [2:0][IDX_W-1:0] lk_key;
  logic [2:0]            lk_hit;
  logic [2:0][AW-1:0]    lk_idx;
  logic                  ins_en, ins_ok, del_en;
  logic [AW-1:0]         ins_idx, del_idx;
  logic [$clog2(DT_ENTRIES+1)-1:0] dt_used;

  assign lk_key[0] = h_hash;
  assign lk_key[1] = rsb_phv.flow_idx;
  assign lk_key[2] = slot.idx;

  dtable_cam #(.ENTRIES(DT_ENTRIES), .KEY_W(IDX_W), .NLK(3)) u_dt (
    .clk, .rst_n, .lk_key, .lk_hit, .lk_idx, .ins_en, .ins_key(slot.idx), .ins_ok, .ins_idx,
    .del_en, .del_idx, .used(dt_used));

  // ---------------- event: writeback (E2) ----------------
  logic wb_v, e2_hit, e2_ins, e2_reblock, e2_blk_enter, e2_cancel, e2_bq_push;
  logic [AW-1:0] e2_idx;
  assign wb_v         = slot_valid && slot.valid && !slot.cancel;
  assign e2_hit       = wb_v && slot.reg_flow && lk_hit[2];
  assign e2_idx       = lk_idx[2];
  assign ins_en       = wb_v && slot.reg_flow && !lk_hit[2];
  assign e2_ins       = ins_en && ins_ok;
  assign e2_reblock   = e2_hit && !blk[e2_idx];
  assign e2_blk_enter = e2_reblock && ({1'b0, rcyc[e2_idx]} + 5'd1 > {1'b0, resub_th});
  assign e2_cancel    = e2_hit && (blk[e2_idx] || e2_blk_enter);
  // a resubmitted packet that has gone round more than resub_th times also
  // moves its flow to blocking mode; P_W is cancelled when the flow is released
  logic s1_blk_enter;
  assign s1_blk_enter = h_valid && h_rb && lk_hit[0] && !blk[lk_idx[0]]
                        && ({1'b0, h_phv.resub_n} > {5'd0, resub_th});
  assign e2_bq_push   = e2_reblock || e2_ins;

  // ---------------- event: resubmitted packet arrives (E3) ----------------
  logic          inc_en;
  logic [AW-1:0] inc_idx;
  always_comb begin
    inc_en  = 1'b0;
    inc_idx = lk_idx[1];
    if (rb_push) begin
      if (lk_hit[1]) inc_en = 1'b1;
      else if (e2_ins && slot.idx == rsb_phv.flow_idx) begin
        inc_en  = 1'b1;
        inc_idx = ins_idx;
      end
    end
  end

  // ---------------- stage 1: classify hashed packet (E1) ----------------
  logic          s1_issue, a_res, a_lst, dec_en, s1_drop;
  logic [AW-1:0] a_idx;
  logic [PW-1:0] pb_alloc;
  logic          pb_full;
  always_comb begin
    s1_issue = 1'b0; a_res = 1'b0; a_lst = 1'b0; dec_en = 1'b0; s1_drop = 1'b0;
    a_idx    = lk_idx[0];
    if (h_valid) begin
      if (!lk_hit[0]) s1_issue = 1'b1;
      else if (pb_full || (!h_rb && pb_free <= ($clog2(PB_DEPTH+1))'(PB_RSV))) begin
        s1_drop = 1'b1;
        dec_en  = h_rb;
      end else if (h_rb) begin
        dec_en = 1'b1;
        if (st[a_idx] == S_SCHED || st[a_idx] == S_WAIT) a_lst = 1'b1;
        else                                             a_res = 1'b1;
      end else a_lst = 1'b1;
    end
  end

  function automatic logic [4:0] eff_rb(logic [AW-1:0] e);
    return rbc[e] + ((inc_en && inc_idx == e) ? 5'd1 : 5'd0) - ((dec_en && a_idx == e) ? 5'd1 : 5'd0);
  endfunction

  // ---------------- Block queue (E4) ----------------
  logic          bq_push, bq_pop, bq_exp, bq_empty, bq_full;
  logic [QW-1:0] bq_pdata, bq_head;
  logic [AW-1:0] b_idx;
  logic [GW-1:0] b_gen;
  assign b_idx = bq_head[QW-1:GW];
  assign b_gen = bq_head[GW-1:0];

  block_queue #(.DEPTH(QDEPTH), .DW(QW), .TW(TW)) u_bq (
    .clk, .rst_n, .t_wait, .tick(hb), .push(bq_push), .push_data(bq_pdata), .pop(bq_pop),
    .head_exp(bq_exp), .head_data(bq_head), .empty(bq_empty), .full(bq_full));

  // ---------------- Suspend and Schedule queues ----------------
  logic          uq_push, uq_pop, uq_empty, uq_full;
  logic [QW-1:0] uq_pdata, uq_head;
  logic          sq_push, sq_pop, sq_empty, sq_full;
  logic [QW-1:0] sq_pdata, sq_head;
  logic [AW-1:0] u_idx, q_idx;
  logic [$clog2(QDEPTH+1)-1:0] uq_cnt, sq_cnt;
  logic [GW-1:0] u_gen, q_gen;
  assign u_idx = uq_head[QW-1:GW];
  assign u_gen = uq_head[GW-1:0];
  assign q_idx = sq_head[QW-1:GW];
  assign q_gen = sq_head[GW-1:0];

  sync_fifo #(.W(QW), .DEPTH(QDEPTH)) u_suspq (
    .clk, .rst_n, .push(uq_push), .wr_data(uq_pdata), .pop(uq_pop), .rd_data(uq_head),
    .full(uq_full), .empty(uq_empty), .count(uq_cnt));
  sync_fifo #(.W(QW), .DEPTH(QDEPTH)) u_schedq (
    .clk, .rst_n, .push(sq_push), .wr_data(sq_pdata), .pop(sq_pop), .rd_data(sq_head),
    .full(sq_full), .empty(sq_empty), .count(sq_cnt));

  function automatic logic live(logic [AW-1:0] e, logic [GW-1:0] g, fst_e s);
    return dvld[e] && gen[e] == g && st[e] == s;
  endfunction

  // E4: Block queue head whose timer has expired
  logic e4_stale, e4_go, e4_merge, e4_susp, e4_del, e4_cancel, e4_sq;
  // E5: Suspend queue head
  logic e5_stale, e5_go, e5_cancel;
  // E6: Schedule queue head (round robin) in a free pipeline cycle
  logic e6_stale, e6_go, e6_issue, e6_blkq, e6_requeue, e6_del;
  logic cancel_busy;
  lists_t e6_after;

  function automatic logic lists_empty(lists_t l);
    return !l.lne && !l.rne;
  endfunction

  // list update of entry e for this cycle's events, in the order
  // resubmitted append, merge, pop, new append
  logic [PW-1:0] pb_rd_next;
  logic          m_en, p_en;
  logic [AW-1:0] m_idx, p_idx;
  function automatic lists_t lists_next(logic [AW-1:0] e);
    lists_t l = lst[e];
    if (a_res && a_idx == e) begin
      if (l.rne) l.rt = pb_alloc;
      else begin l.rh = pb_alloc; l.rt = pb_alloc; l.rne = 1'b1; end
    end
    if (m_en && m_idx == e && l.rne) begin
      if (l.lne) l.lh = l.rh;
      else begin l.lh = l.rh; l.lt = l.rt; l.lne = 1'b1; end
      l.rne = 1'b0;
    end
    if (p_en && p_idx == e && l.lne) begin
      if (l.lh == l.lt) l.lne = 1'b0;
      else l.lh = pb_rd_next;
    end
    if (a_lst && a_idx == e) begin
      if (l.lne) l.lt = pb_alloc;
      else begin l.lh = pb_alloc; l.lt = pb_alloc; l.lne = 1'b1; end
    end
    return l;
  endfunction

  always_comb begin
    lists_t lb;
    cancel_busy = e2_cancel;
    // E4
    e4_stale = bq_exp && !live(b_idx, b_gen, S_BLOCK) && !live(b_idx, b_gen, S_WAIT);
    e4_go = 1'b0; e4_merge = 1'b0; e4_susp = 1'b0; e4_del = 1'b0; e4_cancel = 1'b0; e4_sq = 1'b0;
    lb = lst[b_idx];
    if (bq_exp && !e4_stale && !(e2_hit && e2_idx == b_idx)) begin
      if (st[b_idx] == S_WAIT && lists_empty(lb) && eff_rb(b_idx) == '0
          && !(a_lst && a_idx == b_idx) && !(a_res && a_idx == b_idx)) begin
        e4_go = 1'b1; e4_del = 1'b1;
      end else if (eff_rb(b_idx) != '0) begin
        e4_go = !uq_full; e4_susp = !uq_full;
      end else if (cancel_ready && !cancel_busy) begin
        e4_go = 1'b1; e4_merge = 1'b1; e4_sq = 1'b1; e4_cancel = 1'b1;
      end
    end
    if (e4_cancel) cancel_busy = 1'b1;
    // E5
    e5_stale = !uq_empty && !live(u_idx, u_gen, S_SUSP);
    e5_go = 1'b0; e5_cancel = 1'b0;
    if (!uq_empty && !e5_stale && !e4_merge && !(e2_hit && e2_idx == u_idx)
        && eff_rb(u_idx) == '0) begin
      if (cancel_ready && !cancel_busy) begin
        e5_go = 1'b1; e5_cancel = 1'b1;
      end
    end
    m_en  = e4_merge || e5_go;
    m_idx = e4_merge ? b_idx : u_idx;
    // E6
    e6_stale = !sq_empty && !live(q_idx, q_gen, S_SCHED);
    e6_go = 1'b0; e6_issue = 1'b0; e6_blkq = 1'b0; e6_requeue = 1'b0; e6_del = 1'b0;
    p_idx = q_idx;
    p_en  = 1'b0;
    if (!sq_empty && !e6_stale && !s1_issue && !m_en && !(e2_hit && e2_idx == q_idx)
        && !(blk[q_idx] && (e2_bq_push || bq_full)) && !e4_del) begin
      e6_go    = 1'b1;
      e6_issue = lst[q_idx].lne;
      p_en     = 1'b1;
    end
    e6_after = lists_next(q_idx);
    if (e6_go) begin
      if (blk[q_idx])                   e6_blkq    = 1'b1;
      else if (lists_empty(e6_after))   e6_del     = 1'b1;
      else                              e6_requeue = 1'b1;
    end
  end

  // queue controls
  assign bq_pop   = bq_exp && (e4_stale || e4_go);
  assign uq_push  = e4_susp;
  assign uq_pdata = bq_head;
  assign uq_pop   = e5_stale || e5_go;
  assign sq_push  = e4_sq || e5_go || e6_requeue;
  assign sq_pdata = e4_sq ? bq_head : (e5_go ? uq_head : sq_head);
  assign sq_pop   = e6_stale || e6_go;
  assign bq_push  = e2_bq_push || e6_blkq;
  assign bq_pdata = e2_ins ? {ins_idx, gen[ins_idx] + 1'b1}
                  : e2_reblock ? {e2_idx, gen[e2_idx] + 1'b1}
                  : {q_idx, q_gen};
  assign del_en   = e4_del || e6_del;
  assign del_idx  = e4_del ? b_idx : q_idx;

  // ---------------- PB ----------------
  logic [1:0]         lnk_en;
  logic [1:0][PW-1:0] lnk_ptr, lnk_nxt;
  phv_t               pb_rd;
  logic [PW-1:0]      pb_rd_ptr;
  assign pb_rd_ptr = lst[q_idx].lh;

  always_comb begin
    lists_t l0, lm, lr;
    lnk_en  = '0;
    lnk_ptr = '0;
    lnk_nxt = '0;
    l0 = lst[a_idx];
    lm = l0;
    lr = lst[m_idx];
    // append link (resubmitted list or new list of entry a_idx)
    if (a_res && l0.rne) begin
      lnk_en[0] = 1'b1; lnk_ptr[0] = l0.rt; lnk_nxt[0] = pb_alloc;
    end
    if (a_lst) begin
      // tail of the new list after this cycle's merge / pop of the same entry
      lm = lst[a_idx];
      if (m_en && m_idx == a_idx && lm.rne) begin
        if (!lm.lne) begin lm.lt = lm.rt; lm.lne = 1'b1; end
      end
      if (p_en && p_idx == a_idx && lm.lne && lm.lh == lm.lt) lm.lne = 1'b0;
      if (lm.lne) begin
        lnk_en[0] = 1'b1; lnk_ptr[0] = lm.lt; lnk_nxt[0] = pb_alloc;
      end
    end
    // merge link: resubmitted tail -> new head
    // (the resubmitted list may gain its first entry in the merge cycle)
    lr = lst[m_idx];
    if (a_res && a_idx == m_idx) begin
      if (!lr.rne) lr.rh = pb_alloc;
      lr.rt  = pb_alloc;
      lr.rne = 1'b1;
    end
    if (m_en && lr.rne) begin
      if (lr.lne) begin
        lnk_en[1] = 1'b1; lnk_ptr[1] = lr.rt; lnk_nxt[1] = lr.lh;
      end
    end
  end

  phv_t pb_wr;
  always_comb begin
    pb_wr = h_phv;
    pb_wr.flow_idx = h_hash;
  end

  phv_buffer #(.DEPTH(PB_DEPTH), .W(PHV_W)) u_pb (
    .clk, .rst_n, .alloc(a_res || a_lst), .wr_data(pb_wr), .alloc_ptr(pb_alloc),
    .full(pb_full), .free_cnt(pb_free), .lnk_en, .lnk_ptr, .lnk_next(lnk_nxt),
    .rd_ptr(pb_rd_ptr), .rd_data(pb_rd), .rd_next(pb_rd_next), .release_en(e6_issue));

  // ---------------- per-entry state update ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dvld <= '0;
      for (int e = 0; e < DT_ENTRIES; e++) begin
        st[e]   <= S_BLOCK;
        gen[e]  <= '0;
        rbc[e]  <= '0;
        blk[e]  <= 1'b0;
        rcyc[e] <= '0;
        lst[e]  <= '0;
        keyr[e] <= '0;
      end
    end else begin
      for (int e = 0; e < DT_ENTRIES; e++) begin
        logic [AW-1:0] ea;
        ea = AW'(e);
        lst[e] <= lists_next(ea);
        rbc[e] <= eff_rb(ea);
        if (e2_ins && ins_idx == ea) begin
          dvld[e] <= 1'b1;
          keyr[e] <= slot.idx;
          st[e]   <= S_BLOCK;
          gen[e]  <= gen[e] + 1'b1;
          blk[e]  <= 1'b0;
          rcyc[e] <= '0;
          lst[e]  <= '0;
          rbc[e]  <= (inc_en && inc_idx == ea) ? 5'd1 : 5'd0;
        end else if (e2_reblock && e2_idx == ea) begin
          st[e]   <= S_BLOCK;
          gen[e]  <= gen[e] + 1'b1;
          rcyc[e] <= rcyc[e] + 1'b1;
          if (e2_blk_enter) blk[e] <= 1'b1;
        end else begin
          if (s1_blk_enter && lk_idx[0] == ea)  blk[e] <= 1'b1;
          if (e4_susp && b_idx == ea)            st[e] <= S_SUSP;
          if ((e4_merge && b_idx == ea) || (e5_go && u_idx == ea)) st[e] <= S_SCHED;
          if (e6_blkq && q_idx == ea)            st[e] <= lists_empty(e6_after) ? S_WAIT : S_BLOCK;
          if ((e4_del && b_idx == ea) || (e6_del && q_idx == ea)) dvld[e] <= 1'b0;
        end
      end
    end
  end

  // ---------------- outputs ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid    <= 1'b0;
      st_wr_en     <= 1'b0;
      cancel_valid <= 1'b0;
    end else begin
      out_valid    <= s1_issue || e6_issue;
      st_wr_en     <= wb_v;
      cancel_valid <= (e2_cancel && cancel_ready) || e4_cancel || e5_cancel;
    end
  end

  always_ff @(posedge clk) begin
    slots_t cs;
    cs = '0;
    out_phv     <= s1_issue ? pb_wr : pb_rd;
    st_wr_idx   <= slot.idx;
    st_wr_state <= slot.state;
    cs[R_NODE].valid  = 1'b1;
    cs[R_NODE].cancel = 1'b1;
    cs[R_NODE].node   = NODE_W'(W_NODE);
    cs[R_NODE].fid    = 8'(FID);
    cs[R_NODE].idx    = e2_cancel ? slot.idx : (e4_cancel ? keyr[b_idx] : keyr[u_idx]);
    cancel_flit.ctrl    <= TAG_CTRL;
    cancel_flit.dst1    <= '0;
    cancel_flit.dst2    <= NODE_W'(1) << W_NODE;
    cancel_flit.payload <= PHV_W'(cs);
  end

  // ---------------- event counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_pb_new <= '0; c_rb_pb <= '0; c_rsb <= '0; c_wb <= '0; c_susp <= '0; c_sched <= '0;
      c_release <= '0; c_reblock <= '0; c_blk <= '0; c_cancel <= '0; c_drop <= '0;
      c_late <= '0; c_ovf <= '0;
    end else begin
      if (a_lst && !h_rb)              c_pb_new  <= c_pb_new + 1'b1;
      if (h_valid && h_rb && lk_hit[0] && !pb_full) c_rb_pb <= c_rb_pb + 1'b1;
      if (rsb_valid)                   c_rsb     <= c_rsb + 1'b1;
      if (wb_v)                        c_wb      <= c_wb + 1'b1;
      if (e4_susp)                     c_susp    <= c_susp + 1'b1;
      if (e4_merge || e5_go)           c_sched   <= c_sched + 1'b1;
      if (e6_issue)                    c_release <= c_release + 1'b1;
      if (e2_reblock)                  c_reblock <= c_reblock + 1'b1;
      if (e2_blk_enter || (s1_blk_enter && !(e2_ins && ins_idx == lk_idx[0])
          && !(e2_reblock && e2_idx == lk_idx[0])))
                                       c_blk     <= c_blk + 1'b1;
      if ((e2_cancel && cancel_ready) || e4_cancel || e5_cancel) c_cancel <= c_cancel + 1'b1;
      if (s1_drop || (rsb_valid && rb_full)) c_drop <= c_drop + 1'b1;
      if ((rb_push && !inc_en) || (rb_push && lk_hit[1] && st[lk_idx[1]] == S_SCHED)
          || (h_valid && h_rb && !lk_hit[0]))
                                       c_late    <= c_late + 1'b1;
      if ((ins_en && !ins_ok) || (e2_cancel && !cancel_ready)) c_ovf <= c_ovf + 1'b1;
    end
  end

  a_one_issue: assert property (@(posedge clk) disable iff (!rst_n) !(s1_issue && e6_issue));
  a_sq_room:   assert property (@(posedge clk) disable iff (!rst_n) sq_push |-> (!sq_full || sq_pop));

  logic unused;
  assign unused = ^{rb_cnt, uq_cnt, sq_cnt, bq_empty, dt_used, uq_full, slot.fid, slot.node, slot.pad, slot.rsv, e6_stale, e4_go};
endmodule
