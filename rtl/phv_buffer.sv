// phv_buffer: the PHV Buffer (PB) of the read scheduler.
//
// Holds the packets of dirty flows: packets newly arriving for a flow registered
// in dTable and resubmitted packets moved out of RB. Each flow keeps its packets
// in linked lists; the list heads and tails live in the flow's dTable entry, the
// links live here. The buffer provides:
//  * a free list: alloc returns a free slot (alloc_ptr, valid while !full) and
//    stores wr_data there in the same cycle;
//  * two link write ports (next[lnk_ptr] <= lnk_next), enough for one append and
//    one list merge in the same cycle;
//  * one read port: rd_data and rd_next of slot rd_ptr, combinational, and
//    release frees slot rd_ptr at the clock edge.
// The published design gives the linked-list organisation and the depth (32); the free
// list kept as a bit vector with lowest-first allocation is this design's choice.
module phv_buffer #(
  parameter int DEPTH = 32,
  parameter int W     = 4096
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       alloc,
  input  logic [W-1:0]               wr_data,
  output logic [$clog2(DEPTH)-1:0]   alloc_ptr,
  output logic                       full,
  output logic [$clog2(DEPTH+1)-1:0] free_cnt,
  input  logic [1:0]                 lnk_en,
  input  logic [1:0][$clog2(DEPTH)-1:0] lnk_ptr,
  input  logic [1:0][$clog2(DEPTH)-1:0] lnk_next,
  input  logic [$clog2(DEPTH)-1:0]   rd_ptr,
  output logic [W-1:0]               rd_data,
  output logic [$clog2(DEPTH)-1:0]   rd_next,
  input  logic                       release_en
);
  localparam int AW = $clog2(DEPTH);

  logic [W-1:0]      mem  [DEPTH];
  logic [AW-1:0]     nxt  [DEPTH];
  logic [DEPTH-1:0]  used;

  always_comb begin
    alloc_ptr = '0;
    full      = 1'b1;
    for (int i = DEPTH-1; i >= 0; i--)
      if (!used[i]) begin
        alloc_ptr = AW'(i);
        full      = 1'b0;
      end
    free_cnt = '0;
    for (int i = 0; i < DEPTH; i++) free_cnt = free_cnt + {{($clog2(DEPTH+1)-1){1'b0}}, !used[i]};
  end

  assign rd_data = mem[rd_ptr];
  assign rd_next = nxt[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) used <= '0;
    else begin
      if (release_en)     used[rd_ptr]    <= 1'b0;
      if (alloc && !full) used[alloc_ptr] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc && !full) mem[alloc_ptr] <= wr_data;
    for (int p = 0; p < 2; p++)
      if (lnk_en[p]) nxt[lnk_ptr[p]] <= lnk_next[p];
  end

  a_alloc_not_full:  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);
  a_release_used:    assert property (@(posedge clk) disable iff (!rst_n) release_en |-> used[rd_ptr]);
endmodule
