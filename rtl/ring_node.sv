// ring_node: the ring node scheduler attached to one stage processor.
//
// The side ring runs against the pipeline direction and carries flits of
// heartbeat bitmap (dst1), destination bitmap (dst2), tag and 4096-bit payload.
// Each node has two buffers: one for flits from its own processor (local) and
// one for flits from the upstream node.
//
// Control slots are positional: a processor puts its writeback or cancel_dirty
// in the slot numbered by its own ring node, so the control flits of different
// sources never collide and merge by a plain OR.
// Arrival: a flit from upstream first hands this node what is addressed to it:
// its heartbeat bit (dlv_hb), a resubmitted PHV (dlv_phv_*) or the first control
// slot addressed to it (dlv_slot_*). What remains (other nodes' slots or bits)
// goes on; an emptied flit disappears, one holding only heartbeat bits becomes a
// heartbeat-only flit. The delivery outputs are registered.
// Departure, one flit per cycle into a register towards the downstream node:
//  * control flits (writebacks, cancel_dirty) go before resubmitted PHVs;
//  * two control flits are merged into one when their slots fit;
//  * a heartbeat-only flit merges with anything;
//  * otherwise the upstream flit goes first.
// The local processor's heartbeat bits (loc_hb) are OR-ed into the departing
// flit, or sent as a heartbeat-only flit when nothing else leaves. They are
// withheld in a cycle where a local flit is waiting but does not leave, so a
// resubmitted PHV held back by ring traffic costs its destination one heartbeat
// per cycle of delay. When the upstream buffer is empty an arriving flit may
// leave in the same cycle, so a node is crossed in one cycle.
// The priorities, merging and heartbeat rules follow the published design; the choice
// of upstream-first between two PHVs and the one-cycle bypass are this design's.
// Overflow of a buffer is counted in drop_cnt (the ring has no back-pressure
// towards upstream; the local side sees loc_ready).
module ring_node
  import rapid_pkg::*;
#(
  parameter int NODE_ID   = 0,
  parameter int BUF_DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  flit_t             up_in,
  output flit_t             dn_out,
  input  logic              loc_valid,
  input  flit_t             loc_flit,
  output logic              loc_ready,
  input  logic [NODE_W-1:0] loc_hb,
  output logic              dlv_hb,
  output logic              dlv_slot_valid,
  output slot_t             dlv_slot,
  output logic              dlv_phv_valid,
  output logic [PHV_W-1:0]  dlv_phv,
  output logic [15:0]       drop_cnt,
  output logic [15:0]       merge_cnt
);
  localparam int CW = $clog2(BUF_DEPTH+1);


  // ---------------- arrival: take out what is for this node ----------------
  flit_t arr;
  logic  arr_hb, arr_slot_v, arr_phv_v, arr_v;
  slot_t arr_slot;
  always_comb begin
    slots_t s;
    s          = '0;
    arr        = up_in;
    arr_hb     = up_in.dst1[NODE_ID];
    arr_slot_v = 1'b0;
    arr_slot   = '0;
    arr_phv_v  = 1'b0;
    arr.dst1[NODE_ID] = 1'b0;
    if (up_in.ctrl == TAG_PHV && up_in.dst2[NODE_ID]) begin
      arr_phv_v = 1'b1;
      arr.ctrl  = TAG_NONE;
      arr.dst2  = '0;
    end else if (up_in.ctrl == TAG_CTRL) begin
      s = slots_t'(up_in.payload);
      for (int i = 0; i < NSLOT; i++)
        if (s[i].valid && s[i].node == NODE_W'(NODE_ID)) begin
          if (!arr_slot_v) begin
            arr_slot_v = 1'b1;
            arr_slot   = s[i];
          end
          s[i].valid = 1'b0;
        end
      arr.payload       = PHV_W'(s);
      arr.dst2[NODE_ID] = 1'b0;
      if (slot_mask(s) == '0) arr.ctrl = TAG_NONE;
    end
    if (arr.ctrl == TAG_HB) arr.ctrl = TAG_NONE;
    if (arr.ctrl == TAG_NONE) begin
      arr.payload = '0;
      arr.dst2    = '0;
      if (arr.dst1 != '0) arr.ctrl = TAG_HB;
    end
    arr_v = (arr.ctrl != TAG_NONE) || (arr.dst1 != '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dlv_hb         <= 1'b0;
      dlv_slot_valid <= 1'b0;
      dlv_phv_valid  <= 1'b0;
    end else begin
      dlv_hb         <= arr_hb;
      dlv_slot_valid <= arr_slot_v;
      dlv_phv_valid  <= arr_phv_v;
    end
  end
  always_ff @(posedge clk) begin
    if (arr_slot_v) dlv_slot <= arr_slot;
    if (arr_phv_v)  dlv_phv  <= up_in.payload;
  end

  // ---------------- buffers ----------------
  flit_t         ub_head, lb_head;
  logic          ub_empty, ub_full, lb_empty, lb_full;
  logic          ub_push, ub_pop, lb_pop;
  logic [CW-1:0] ub_cnt, lb_cnt;

  sync_fifo #(.W(RING_W), .DEPTH(BUF_DEPTH)) u_upbuf (
    .clk, .rst_n, .push(ub_push), .wr_data(arr), .pop(ub_pop), .rd_data(ub_head),
    .full(ub_full), .empty(ub_empty), .count(ub_cnt));

  sync_fifo #(.W(RING_W), .DEPTH(BUF_DEPTH)) u_locbuf (
    .clk, .rst_n, .push(loc_valid && !lb_full), .wr_data(loc_flit), .pop(lb_pop),
    .rd_data(lb_head), .full(lb_full), .empty(lb_empty), .count(lb_cnt));

  assign loc_ready = !lb_full;

  // ---------------- departure ----------------
  flit_t u, l, o;
  logic  u_v, l_v, take_u, take_l, u_from_buf, merged;
  always_comb begin
    u_from_buf = !ub_empty;
    u   = u_from_buf ? ub_head : arr;
    u_v = u_from_buf ? 1'b1    : arr_v;
    l   = lb_head;
    l_v = !lb_empty;
    take_u = 1'b0;
    take_l = 1'b0;
    merged = 1'b0;
    o      = '0;
    if (u_v && l_v) begin
      if (u.ctrl == TAG_HB || l.ctrl == TAG_HB) begin
        take_u = 1'b1; take_l = 1'b1; merged = 1'b1;
        o = (u.ctrl == TAG_HB) ? l : u;
        o.dst1 = u.dst1 | l.dst1;
      end else if (u.ctrl == TAG_CTRL && l.ctrl == TAG_CTRL) begin
        if ((slot_mask(slots_t'(u.payload)) & slot_mask(slots_t'(l.payload))) == '0) begin
          o.ctrl    = TAG_CTRL;
          o.payload = u.payload | l.payload;
          o.dst1    = u.dst1 | l.dst1;
          o.dst2    = u.dst2 | l.dst2;
          take_u = 1'b1; take_l = 1'b1; merged = 1'b1;
        end else begin
          o = u; take_u = 1'b1;
        end
    end else if (l.ctrl == TAG_CTRL && u.ctrl == TAG_PHV) begin
        o = l; take_l = 1'b1;
      end else begin
        o = u; take_u = 1'b1;
      end
    end else if (u_v) begin
      o = u; take_u = 1'b1;
    end else if (l_v) begin
      o = l; take_l = 1'b1;
    end
    // local heartbeat, withheld while a local flit is held back
    if (!(l_v && !take_l) && loc_hb != '0) begin
      o.dst1 = o.dst1 | loc_hb;
      if (o.ctrl == TAG_NONE) o.ctrl = TAG_HB;
    end
  end

  assign ub_pop  = u_from_buf && take_u;
  assign lb_pop  = take_l;
  assign ub_push = arr_v && (u_from_buf || !take_u) && !ub_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dn_out    <= '0;
      drop_cnt  <= '0;
      merge_cnt <= '0;
    end else begin
      dn_out <= o;
      if ((arr_v && (u_from_buf || !take_u) && ub_full) || (loc_valid && lb_full))
        drop_cnt <= drop_cnt + 1'b1;
      if (merged) merge_cnt <= merge_cnt + 1'b1;
    end
  end
endmodule
