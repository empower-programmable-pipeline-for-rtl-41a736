// rapid_top: a ring-augmented match-action pipeline running one stateful
// function across several stages.
//
// N_STAGES stage processors form the pipeline; the stateful function reads its
// flow state in stage R_STAGE (P_R) and computes the new state in stage W_STAGE
// (P_W). P_R holds the read scheduler (rd_sched) and the flow state table; P_W
// is followed by the write scheduler (wr_sched). Every stage has a ring node;
// the ring runs against the pipeline (node i sends to node i-1, node 0 to node
// N_STAGES-1) and carries state writebacks and resubmitted PHVs from P_W back
// to P_R, cancel_dirty signals from P_R round to P_W, and P_W's heartbeat.
// Packets run speculatively: a packet is never held for an earlier packet of
// its flow. A packet that read a state already being replaced is caught at P_W,
// sent back over the ring, parked at P_R and released, in order, once the new
// state is in the table. See rd_sched and wr_sched for the mechanism.
// The stateful function in P_W is the port-knocking transition table
// (stage_proc): entry {cur_state[3:0], dst_port[3:0]} gives the next state and
// a drop verdict. The verdict is carried out in out_phv.drop for the deparser
// (outside this design) to act on, and counted in stats.egress_drop.
// Interface: one parsed PHV per cycle in and out, never stalled; configuration
// writes the transition table (cfg_*) and selects the consistency level
// (cons_mode, bs_k), the blocking-mode threshold (resub_th) and the flow key
// (key_mask); init_done rises once the tables have cleared after reset.
// Latency of a clean packet: 3 cycles of rd_sched and state read, then
// STAGE_LAT-1 in P_R, STAGE_LAT per other stage and 1 in wr_sched.
// Four stages, 18-cycle stages, 512-byte PHV, 4114-bit ring and the buffer
// sizes follow the published design's prototype. T_WAIT is the published design's
// T = c(m) + m + 2 plus 5 cycles for the hash, issue and buffer registers of
// this design. Placing the function in stages 0 and 1 is this design's choice.
module rapid_top
  import rapid_pkg::*;
#(
  parameter int N_STAGES   = 4,
  parameter int STAGE_LAT  = 18,
  parameter int R_STAGE    = 0,
  parameter int W_STAGE    = 1,
  parameter int DT_ENTRIES = 64,
  parameter int PB_DEPTH   = 32,
  parameter int RB_DEPTH   = 16,
  parameter int QDEPTH     = 64,
  parameter int RBUF_DEPTH = 8,
  parameter int ST_DEPTH   = 4096,
  parameter int M_STAGES   = W_STAGE - R_STAGE + 1,
  parameter int T_WAIT     = M_STAGES * STAGE_LAT + M_STAGES + 2 + 5
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  phv_t         in_phv,
  output logic         out_valid,
  output phv_t         out_phv,
  input  cons_e        cons_mode,
  input  logic [7:0]   bs_k,
  input  logic [3:0]   resub_th,
  input  logic [103:0] key_mask,
  input  logic         cfg_we,
  input  logic [7:0]   cfg_addr,
  input  logic [8:0]   cfg_data,
  output logic         init_done,
  output stats_t       stats
);
  localparam int TW = 10;

  // ---------------- ring ----------------
  flit_t              ring [N_STAGES];
  logic               loc_valid [N_STAGES];
  flit_t              loc_flit  [N_STAGES];
  logic               loc_ready [N_STAGES];
  logic [NODE_W-1:0]  loc_hb    [N_STAGES];
  logic               dlv_hb    [N_STAGES];
  logic               dlv_slot_v[N_STAGES];
  slot_t              dlv_slot  [N_STAGES];
  logic               dlv_phv_v [N_STAGES];
  logic [PHV_W-1:0]   dlv_phv   [N_STAGES];
  logic [15:0]        rn_drop   [N_STAGES];
  logic [15:0]        rn_merge  [N_STAGES];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_node
    ring_node #(.NODE_ID(i), .BUF_DEPTH(RBUF_DEPTH)) u_node (
      .clk, .rst_n, .up_in(ring[(i+1) % N_STAGES]), .dn_out(ring[i]),
      .loc_valid(loc_valid[i]), .loc_flit(loc_flit[i]), .loc_ready(loc_ready[i]),
      .loc_hb(loc_hb[i]), .dlv_hb(dlv_hb[i]), .dlv_slot_valid(dlv_slot_v[i]),
      .dlv_slot(dlv_slot[i]), .dlv_phv_valid(dlv_phv_v[i]), .dlv_phv(dlv_phv[i]),
      .drop_cnt(rn_drop[i]), .merge_cnt(rn_merge[i]));
  end

  // ---------------- pipeline ----------------
  logic sv [N_STAGES+1];     // stage inputs; sv[N_STAGES] is egress
  phv_t sp [N_STAGES+1];
  assign sv[0] = in_valid;
  assign sp[0] = in_phv;

  logic        st_init;
  logic [15:0] rd_c [13];
  logic [15:0] wr_c [5];

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    if (i == R_STAGE) begin : g_pr
      logic             iss_v, wr_en;
      phv_t             iss_phv, rd_phv;
      logic [IDX_W-1:0] wr_idx;
      logic [STATE_W-1:0] wr_state, rd_state;
      logic             rd_v;

      rd_sched #(.DT_ENTRIES(DT_ENTRIES), .PB_DEPTH(PB_DEPTH), .RB_DEPTH(RB_DEPTH),
                 .QDEPTH(QDEPTH), .TW(TW), .W_NODE(W_STAGE), .R_NODE(R_STAGE)) u_rd (
        .clk, .rst_n, .t_wait(TW'(T_WAIT)), .resub_th, .key_mask,
        .in_valid(sv[i]), .in_phv(sp[i]), .out_valid(iss_v), .out_phv(iss_phv),
        .st_wr_en(wr_en), .st_wr_idx(wr_idx), .st_wr_state(wr_state),
        .slot_valid(dlv_slot_v[i]), .slot(dlv_slot[i]),
        .rsb_valid(dlv_phv_v[i]), .rsb_phv(phv_t'(dlv_phv[i])), .hb(dlv_hb[i]),
        .cancel_valid(loc_valid[i]), .cancel_flit(loc_flit[i]), .cancel_ready(loc_ready[i]),
        .c_pb_new(rd_c[0]), .c_rb_pb(rd_c[1]), .c_rsb(rd_c[2]), .c_wb(rd_c[3]),
        .c_susp(rd_c[4]), .c_sched(rd_c[5]), .c_release(rd_c[6]), .c_reblock(rd_c[7]),
        .c_blk(rd_c[8]), .c_cancel(rd_c[9]), .c_drop(rd_c[10]), .c_late(rd_c[11]),
        .c_ovf(rd_c[12]));
      assign loc_hb[i] = '0;

      flow_state_table #(.DEPTH(ST_DEPTH), .STATE_W(STATE_W)) u_st (
        .clk, .rst_n, .rd_en(iss_v), .rd_addr(iss_phv.flow_idx[$clog2(ST_DEPTH)-1:0]),
        .rd_data(rd_state), .wr_en, .wr_addr(wr_idx[$clog2(ST_DEPTH)-1:0]),
        .wr_data(wr_state), .init_done(st_init));

      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) rd_v <= 1'b0;
        else        rd_v <= iss_v;
      end
      always_ff @(posedge clk) rd_phv <= iss_phv;

      phv_t st_phv;
      always_comb begin
        st_phv = rd_phv;
        st_phv.cur_state = rd_state;
        st_phv.new_state = rd_state;
        st_phv.state_upd = 1'b0;
      end

      stage_proc #(.LAT(STAGE_LAT-1), .ACT_EN(1'b0)) u_sp (
        .clk, .rst_n, .in_valid(rd_v), .in_phv(st_phv), .out_valid(sv[i+1]), .out_phv(sp[i+1]),
        .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0));
    end else if (i == W_STAGE) begin : g_pw
      logic fv;
      phv_t fp;
      stage_proc #(.LAT(STAGE_LAT), .ACT_EN(1'b1)) u_sp (
        .clk, .rst_n, .in_valid(sv[i]), .in_phv(sp[i]), .out_valid(fv), .out_phv(fp),
        .cfg_we, .cfg_addr, .cfg_data);

      wr_sched #(.DT_ENTRIES(DT_ENTRIES), .R_NODE(R_STAGE), .W_NODE(W_STAGE)) u_wr (
        .clk, .rst_n, .cons_mode, .bs_k, .in_valid(fv), .in_phv(fp),
        .out_valid(sv[i+1]), .out_phv(sp[i+1]),
        .ring_valid(loc_valid[i]), .ring_flit(loc_flit[i]), .ring_ready(loc_ready[i]),
        .hb_bits(loc_hb[i]), .cancel_valid(dlv_slot_v[i]), .cancel_slot(dlv_slot[i]),
        .resub_cnt(wr_c[0]), .wb_cnt(wr_c[1]), .cancel_cnt(wr_c[2]), .lost_cnt(wr_c[3]),
        .ovf_cnt(wr_c[4]));
    end else begin : g_plain
      stage_proc #(.LAT(STAGE_LAT), .ACT_EN(1'b0)) u_sp (
        .clk, .rst_n, .in_valid(sv[i]), .in_phv(sp[i]), .out_valid(sv[i+1]), .out_phv(sp[i+1]),
        .cfg_we(1'b0), .cfg_addr('0), .cfg_data('0));
      assign loc_valid[i] = 1'b0;
      assign loc_flit[i]  = '0;
      assign loc_hb[i]    = '0;
    end
  end

  // ---------------- egress ----------------
  logic [15:0] eg_drop;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      eg_drop   <= '0;
    end else begin
      out_valid <= sv[N_STAGES];
      if (sv[N_STAGES] && sp[N_STAGES].drop) eg_drop <= eg_drop + 1'b1;
    end
  end
  always_ff @(posedge clk) out_phv <= sp[N_STAGES];

  // table clearing after reset: the state table (ST_DEPTH cycles) outlasts the
  // transition tables (256 cycles)
  assign init_done = st_init;

  always_comb begin
    logic [15:0] rdrop, rmerge;
    rdrop  = '0;
    rmerge = '0;
    for (int i = 0; i < N_STAGES; i++) begin
      rdrop  = rdrop + rn_drop[i];
      rmerge = rmerge + rn_merge[i];
    end
    stats.pb_new      = rd_c[0];
    stats.rb_pb       = rd_c[1];
    stats.rsb         = rd_c[2];
    stats.wb          = rd_c[3];
    stats.susp        = rd_c[4];
    stats.sched       = rd_c[5];
    stats.rel         = rd_c[6];
    stats.reblock     = rd_c[7];
    stats.blk         = rd_c[8];
    stats.cancel      = rd_c[9];
    stats.rd_drop     = rd_c[10];
    stats.late        = rd_c[11];
    stats.rd_ovf      = rd_c[12];
    stats.wr_resub    = wr_c[0];
    stats.wr_wb       = wr_c[1];
    stats.wr_cancel   = wr_c[2];
    stats.wr_lost     = wr_c[3];
    stats.wr_ovf      = wr_c[4];
    stats.ring_drop   = rdrop;
    stats.ring_merge  = rmerge;
    stats.egress_drop = eg_drop;
  end

  initial begin
    assert (R_STAGE < W_STAGE && W_STAGE < N_STAGES && N_STAGES <= NODE_W)
      else $error("rapid_top: need R_STAGE < W_STAGE < N_STAGES <= %0d", NODE_W);
  end
endmodule
