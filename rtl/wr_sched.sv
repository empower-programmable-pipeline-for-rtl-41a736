// wr_sched: the write scheduler at the last processor (P_W) of a stateful
// function.
//
// Every PHV leaving P_W's match-action stage passes through here (one per cycle,
// one cycle of latency). Its flow index is searched in a key-only dTable of
// flows whose state was changed by an earlier packet still being settled:
//  * a hit on a flow in the Expired condition means the packet read a stale
//    state: it is removed from the pipeline and sent over the ring to P_R
//    (tag PHV, dst2 = P_R's node) for reprocessing;
//  * a hit on a flow still Expiring (bounded staleness) lets the packet pass and
//    counts it; after K such packets the flow is Expired;
//  * a miss lets the packet pass; if the packet changed its flow's state the new
//    state is put on the ring as a writeback slot for P_R, and the flow is
//    registered: Expired at once under STRICT, Expiring with K under BS(K), not
//    at all under WEAK (the writeback then tells P_R not to register it either).
// A cancel_dirty slot from P_R removes the flow (back to Run). The one-flow FSM
// Run -> Expiring -> Expired -> Run and the three consistency levels follow the
// published design. Each cycle P_W also asks its ring node to send the heartbeat for
// P_R (hb_bits). A ring flit that finds the node's local buffer full is lost and
// counted (lost_cnt); dTable overflow is counted (ovf_cnt).
module wr_sched
  import rapid_pkg::*;
#(
  parameter int DT_ENTRIES = 64,
  parameter int R_NODE     = 0,     // ring node of P_R
  parameter int W_NODE     = 1,     // ring node of P_W (this processor)
  parameter int FID        = 0      // stateful function ID
) (
  input  logic              clk,
  input  logic              rst_n,
  input  cons_e             cons_mode,
  input  logic [7:0]        bs_k,
  input  logic              in_valid,
  input  phv_t              in_phv,
  output logic              out_valid,
  output phv_t              out_phv,
  output logic              ring_valid,
  output flit_t             ring_flit,
  input  logic              ring_ready,
  output logic [NODE_W-1:0] hb_bits,
  input  logic              cancel_valid,
  input  slot_t             cancel_slot,
  output logic [15:0]       resub_cnt,
  output logic [15:0]       wb_cnt,
  output logic [15:0]       cancel_cnt,
  output logic [15:0]       lost_cnt,
  output logic [15:0]       ovf_cnt
);
  localparam int AW = $clog2(DT_ENTRIES);

  logic [1:0][IDX_W-1:0] lk_key;
  logic [1:0]            lk_hit;
  logic [1:0][AW-1:0]    lk_idx;
  logic                  ins_en, ins_ok, del_en;
  logic [AW-1:0]         ins_idx;
  logic [$clog2(DT_ENTRIES+1)-1:0] used;

  logic          expired [DT_ENTRIES];
  logic [7:0]    kcnt    [DT_ENTRIES];

  assign lk_key[0] = in_phv.flow_idx;
  assign lk_key[1] = cancel_slot.idx;

  dtable_cam #(.ENTRIES(DT_ENTRIES), .KEY_W(IDX_W), .NLK(2)) u_dt (
    .clk, .rst_n, .lk_key, .lk_hit, .lk_idx,
    .ins_en, .ins_key(in_phv.flow_idx), .ins_ok, .ins_idx,
    .del_en, .del_idx(lk_idx[1]), .used);

  logic is_cancel, pkt_hit, resubmit, bs_pass, writeback, do_reg;
  assign is_cancel = cancel_valid && cancel_slot.valid && cancel_slot.cancel;
  assign del_en    = is_cancel && lk_hit[1];
  assign pkt_hit   = in_valid && lk_hit[0];
  assign resubmit  = pkt_hit && expired[lk_idx[0]];
  assign bs_pass   = pkt_hit && !expired[lk_idx[0]];
  assign writeback = in_valid && !resubmit && in_phv.state_upd;
  assign do_reg    = writeback && !lk_hit[0] && (cons_mode != CONS_WEAK);
  assign ins_en    = do_reg;
  assign hb_bits   = NODE_W'(1) << R_NODE;

  flit_t nf;
  always_comb begin
    slots_t s;
    phv_t   rp;
    s  = '0;
    rp = in_phv;
    nf = '0;
    if (resubmit) begin
      rp.resub_n = in_phv.resub_n + 1'b1;
      nf.ctrl    = TAG_PHV;
      nf.dst2    = NODE_W'(1) << R_NODE;
      nf.payload = rp;
    end else if (writeback) begin
      s[W_NODE].valid    = 1'b1;
      s[W_NODE].cancel   = 1'b0;
      s[W_NODE].reg_flow = (cons_mode != CONS_WEAK);
      s[W_NODE].node     = NODE_W'(R_NODE);
      s[W_NODE].fid      = 8'(FID);
      s[W_NODE].idx      = in_phv.flow_idx;
      s[W_NODE].state    = in_phv.new_state;
      nf.ctrl       = TAG_CTRL;
      nf.dst2       = NODE_W'(1) << R_NODE;
      nf.payload    = PHV_W'(s);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid  <= 1'b0;
      ring_valid <= 1'b0;
      resub_cnt  <= '0;
      wb_cnt     <= '0;
      cancel_cnt <= '0;
      lost_cnt   <= '0;
      ovf_cnt    <= '0;
    end else begin
      out_valid  <= in_valid && !resubmit;
      ring_valid <= (resubmit || writeback) && ring_ready;
      if (resubmit)  resub_cnt  <= resub_cnt + 1'b1;
      if (writeback) wb_cnt     <= wb_cnt + 1'b1;
      if (is_cancel) cancel_cnt <= cancel_cnt + 1'b1;
      if ((resubmit || writeback) && !ring_ready) lost_cnt <= lost_cnt + 1'b1;
      if (do_reg && !ins_ok) ovf_cnt <= ovf_cnt + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    out_phv   <= in_phv;
    ring_flit <= nf;
    // per-flow consistency FSM (Expiring / Expired); Run is "not in dTable"
    if (do_reg && ins_ok) begin
      expired[ins_idx] <= (cons_mode == CONS_STRICT) || (bs_k == '0);
      kcnt[ins_idx]    <= bs_k;
    end
    if (bs_pass) begin
      kcnt[lk_idx[0]] <= kcnt[lk_idx[0]] - 1'b1;
      if (kcnt[lk_idx[0]] <= 8'd1) expired[lk_idx[0]] <= 1'b1;
    end
  end

  logic unused;
  assign unused = ^{used, cancel_slot};
endmodule
