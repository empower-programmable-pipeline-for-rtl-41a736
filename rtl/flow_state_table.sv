// flow_state_table: the SRAM flow state table kept by the first processor of a
// stateful function (P_R).
//
// DEPTH entries of STATE_W bits, indexed by the low bits of the flow hash (a
// direct-mapped table; hash collisions between flows share an entry). One read
// port with a registered output (one cycle) and one write port used by state
// writebacks arriving over the ring. A read of the address written in the same
// cycle returns the new value (write-first), so a packet admitted together with
// a writeback never sees the stale state. After reset the table clears itself,
// one entry per cycle; init_done rises when all entries read as zero.
// The published design gives the table's role and a 4096-entry size; the direct mapping,
// write-first bypass and self-clearing are this design's choices.
module flow_state_table #(
  parameter int DEPTH   = 4096,
  parameter int STATE_W = 128
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [STATE_W-1:0]       rd_data,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [STATE_W-1:0]       wr_data,
  output logic                     init_done
);
  localparam int AW = $clog2(DEPTH);

  logic [STATE_W-1:0] mem [DEPTH];
  logic [AW-1:0]      clr_addr;
  logic               clearing;

  assign init_done = !clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == AW'(DEPTH-1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)   mem[clr_addr] <= '0;
    else if (wr_en) mem[wr_addr]  <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= (wr_en && !clearing && wr_addr == rd_addr) ? wr_data : mem[rd_addr];
  end
endmodule
