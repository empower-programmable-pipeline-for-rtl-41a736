// rapid_pkg: shared types and constants of the ring-augmented pipeline.
//
// The pipeline carries a 512-byte packet header vector (PHV). Its low bits hold
// the parsed five-tuple and the metadata the stateful function uses (flow index,
// current and new state, flags); the rest is opaque header space.
// The side ring carries 4114-bit flits: an 8-bit heartbeat bitmap (dst1), an
// 8-bit one-hot destination bitmap (dst2), a 2-bit tag and a 4096-bit payload.
// A control payload is cut into sixteen 256-bit slots, each a state writeback or
// a cancel_dirty, so several control signals can share one flit; a source uses
// the slot numbered by its own ring node.
// Flit widths, tags and the 512-byte PHV follow the published design; the PHV field
// layout and the slot layout are this design's own choice.
package rapid_pkg;

  localparam int PHV_W     = 4096;   // 512-byte PHV
  localparam int STATE_W   = 128;    // state value carried by a writeback
  localparam int IDX_W     = 64;     // flow-index hash width (dTable key)
  localparam int NODE_W    = 8;      // ring bitmaps: up to 8 ring nodes
  localparam int SLOT_W    = 256;
  localparam int NSLOT     = PHV_W / SLOT_W;

  // ring tag (ctrl_tag)
  typedef enum logic [1:0] {
    TAG_NONE = 2'b00,   // invalid
    TAG_CTRL = 2'b01,   // state writeback and/or cancel_dirty slots
    TAG_PHV  = 2'b10,   // resubmitted PHV
    TAG_HB   = 2'b11    // heartbeat only
  } tag_e;

  // consistency level of a stateful function
  typedef enum logic [1:0] {
    CONS_STRICT = 2'd0,
    CONS_WEAK   = 2'd1,
    CONS_BS     = 2'd2   // bounded staleness, K packets
  } cons_e;

  localparam int HDR_W = 32+32+16+16+8 + 32 + 8 + IDX_W + 2*STATE_W + 1 + 1 + 6;

  typedef struct packed {
    logic [PHV_W-HDR_W-1:0] rest;     // remaining header bytes, carried untouched
    logic [31:0]        src_ip;
    logic [31:0]        dst_ip;
    logic [15:0]        src_port;
    logic [15:0]        dst_port;
    logic [7:0]         proto;
    logic [31:0]        pkt_id;       // packet tag, carried untouched
    logic [7:0]         resub_n;      // how often this packet was resubmitted
    logic [IDX_W-1:0]   flow_idx;     // hash of the flow key, set at P_R
    logic [STATE_W-1:0] cur_state;    // state read at P_R
    logic [STATE_W-1:0] new_state;    // state computed by the function
    logic               state_upd;    // new_state differs from cur_state
    logic               drop;         // packet is to be dropped at egress
    logic [5:0]         rsv;
  } phv_t;

  typedef struct packed {
    logic               valid;
    logic               cancel;    // 1: cancel_dirty for P_W, 0: writeback for P_R
    logic               reg_flow;  // writeback: register the flow in rd_sched's dTable
    logic [4:0]         rsv;
    logic [7:0]         node;      // destination ring node
    logic [7:0]         fid;       // stateful function ID
    logic [IDX_W-1:0]   idx;       // flow state table index (flow hash)
    logic [STATE_W-1:0] state;     // updated state value
    logic [39:0]        pad;
  } slot_t;

  typedef slot_t [NSLOT-1:0] slots_t;

  typedef struct packed {
    logic [NODE_W-1:0] dst1;     // heartbeat bitmap
    logic [NODE_W-1:0] dst2;     // destination bitmap
    tag_e              ctrl;
    logic [PHV_W-1:0]  payload;
  } flit_t;

  localparam int RING_W = $bits(flit_t);

  // event counters brought out of the top (16 bits, wrapping)
  typedef struct packed {
    logic [15:0] pb_new;      // new packets of dirty flows parked in PB
    logic [15:0] rb_pb;       // resubmitted packets moved from RB to PB
    logic [15:0] rsb;         // resubmitted packets received at P_R
    logic [15:0] wb;          // writebacks received at P_R
    logic [15:0] susp;        // flows put in the Suspend queue
    logic [15:0] sched;       // flows made schedulable
    logic [15:0] rel;         // packets released from PB
    logic [15:0] reblock;     // flows re-blocked by another writeback
    logic [15:0] blk;         // flows downgraded to blocking mode
    logic [15:0] cancel;      // cancel_dirty signals sent by P_R
    logic [15:0] rd_drop;     // packets lost to a full PB or RB
    logic [15:0] late;        // resubmitted packets arriving after their flow was released
    logic [15:0] rd_ovf;      // rd dTable full or cancel_dirty lost
    logic [15:0] wr_resub;    // packets resubmitted by P_W
    logic [15:0] wr_wb;       // writebacks sent by P_W
    logic [15:0] wr_cancel;   // cancel_dirty signals received at P_W
    logic [15:0] wr_lost;     // ring flits lost at P_W (local ring buffer full)
    logic [15:0] wr_ovf;      // wr dTable full
    logic [15:0] ring_drop;   // flits lost in ring buffers
    logic [15:0] ring_merge;  // flits merged by ring nodes
    logic [15:0] egress_drop; // packets dropped by the function's verdict
  } stats_t;

  // valid bits of the slots of a control payload
  function automatic logic [NSLOT-1:0] slot_mask(slots_t s);
    logic [NSLOT-1:0] m;
    for (int i = 0; i < NSLOT; i++) m[i] = s[i].valid;
    return m;
  endfunction

endpackage
