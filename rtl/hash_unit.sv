// hash_unit: the hash module in front of a stage's match-action unit.
//
// Computes the 64-bit flow index of a PHV from a masked 104-bit five-tuple key
// {src_ip, dst_ip, src_port, dst_port, proto}. The mask chooses the flow
// definition (for example only source and destination address, as in the port
// knocking table). The hash is CRC-64 (ECMA-182 polynomial, zero initial value,
// message bits taken most significant first) over the masked key. The published design
// names the hash modules and the 64-bit index; the CRC is this design's choice.
// Timing: one register stage; out_* follow in_* by one cycle, one key per cycle.
module hash_unit #(
  parameter int          KEY_W  = 104,
  parameter int          HASH_W = 64,
  parameter logic [63:0] POLY   = 64'h42F0_E1EB_A9EA_3693
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [KEY_W-1:0]  in_key,
  input  logic [KEY_W-1:0]  key_mask,
  output logic              out_valid,
  output logic [HASH_W-1:0] out_hash
);
  function automatic logic [HASH_W-1:0] crc(logic [KEY_W-1:0] k);
    logic [HASH_W-1:0] c = '0;
    for (int i = KEY_W-1; i >= 0; i--) begin
      logic fb;
      fb = c[HASH_W-1] ^ k[i];
      c  = {c[HASH_W-2:0], 1'b0} ^ (fb ? POLY[HASH_W-1:0] : '0);
    end
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_hash  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) out_hash <= crc(in_key & key_mask);
    end
  end
endmodule
