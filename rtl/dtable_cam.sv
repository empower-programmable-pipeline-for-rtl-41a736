// dtable_cam: the key part of dTable, a small content-addressable memory that
// registers "dirty" flows (flows with a state update in flight).
//
// Keys are flow state table indices (a 64-bit flow hash). NLK lookup ports
// search all entries in parallel, combinationally, and return hit and entry
// number. One insert port writes a key into the lowest free entry (its number is
// given combinationally as ins_idx so callers can fill associated data in the
// same cycle); one delete port frees an entry by number. Updates take effect at
// the next clock edge; lookups in the same cycle still see the old contents.
// The published design specifies the CAM, its key and its 64 entries; the lowest-free
// allocation is this design's own choice. Inserting when full is refused
// (ins_ok low) and the caller counts it.
module dtable_cam #(
  parameter int ENTRIES = 64,
  parameter int KEY_W   = 64,
  parameter int NLK     = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [NLK-1:0][KEY_W-1:0]  lk_key,
  output logic [NLK-1:0]             lk_hit,
  output logic [NLK-1:0][$clog2(ENTRIES)-1:0] lk_idx,
  input  logic                       ins_en,
  input  logic [KEY_W-1:0]           ins_key,
  output logic                       ins_ok,
  output logic [$clog2(ENTRIES)-1:0] ins_idx,
  input  logic                       del_en,
  input  logic [$clog2(ENTRIES)-1:0] del_idx,
  output logic [$clog2(ENTRIES+1)-1:0] used
);
  localparam int AW = $clog2(ENTRIES);

  logic [ENTRIES-1:0]  vld;
  logic [KEY_W-1:0]    key [ENTRIES];

  // match vectors, then priority encoders that never read their own result
  logic [NLK-1:0][ENTRIES-1:0] match;
  always_comb begin
    for (int p = 0; p < NLK; p++)
      for (int e = 0; e < ENTRIES; e++)
        match[p][e] = vld[e] && (key[e] == lk_key[p]);
  end

  always_comb begin
    for (int p = 0; p < NLK; p++) begin
      lk_hit[p] = |match[p];
      lk_idx[p] = '0;
      for (int e = ENTRIES-1; e >= 0; e--)
        if (match[p][e]) lk_idx[p] = AW'(e);
    end
  end

  always_comb begin
    ins_ok  = !(&vld);
    ins_idx = '0;
    for (int e = ENTRIES-1; e >= 0; e--)
      if (!vld[e]) ins_idx = AW'(e);
  end

  always_comb begin
    used = '0;
    for (int e = 0; e < ENTRIES; e++) used = used + {{($clog2(ENTRIES+1)-1){1'b0}}, vld[e]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else begin
      if (del_en) vld[del_idx] <= 1'b0;
      if (ins_en && ins_ok) vld[ins_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) if (ins_en && ins_ok) key[ins_idx] <= ins_key;
endmodule
