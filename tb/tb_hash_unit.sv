// tb_hash_unit: compares the hash with a CRC-64/ECMA-182 reference computed here
// byte-wise through a 256-entry table (a different formulation from the
// bit-serial one in the design), for random keys and masks; checks the
// one-cycle latency and that masked-out fields do not change the hash.
module tb_hash_unit;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, out_valid;
  logic [103:0] in_key, key_mask;
  logic [63:0] out_hash;
  hash_unit dut (.*);
  localparam logic [63:0] POLY = 64'h42F0_E1EB_A9EA_3693;
  logic [63:0] tab [256];
  int checks = 0, failures = 0;
  function automatic logic [63:0] ref_crc(logic [103:0] k);
    logic [63:0] c = '0;
    for (int b = 12; b >= 0; b--) begin
      logic [7:0] byt;
      byt = k[b*8 +: 8];
      c = {c[55:0], 8'h00} ^ tab[c[63:56] ^ byt];
    end
    return c;
  endfunction
  initial begin
    for (int i = 0; i < 256; i++) begin
      logic [63:0] c;
      c = {8'(i), 56'h0};
      for (int j = 0; j < 8; j++) c = c[63] ? {c[62:0], 1'b0} ^ POLY : {c[62:0], 1'b0};
      tab[i] = c;
    end
    in_valid = 0; in_key = '0; key_mask = '1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      logic [103:0] k, m;
      k = {$urandom, $urandom, $urandom, $urandom};
      m = (t % 2) ? '1 : {64'hFFFF_FFFF_FFFF_FFFF, 40'h0};
      @(negedge clk); in_valid = 1; in_key = k; key_mask = m;
      @(negedge clk); in_valid = 0;
      checks++;
      if (!out_valid || out_hash != ref_crc(k & m)) begin
        failures++; $display("FAIL key %h hash %h exp %h", k, out_hash, ref_crc(k & m));
      end
      if (t % 2 == 0) begin
        in_valid = 1; in_key = k ^ {64'h0, 40'hFF_FFFF_FFFF};
        @(negedge clk); in_valid = 0;
        checks++;
        if (out_hash != ref_crc(k & m)) begin failures++; $display("FAIL mask"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
