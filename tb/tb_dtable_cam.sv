// tb_dtable_cam: fills the 64-entry dirty-flow CAM with random 64-bit keys,
// checks lookups (hit, entry number) on two ports, lowest-free allocation,
// refusal when full, and deletion.
module tb_dtable_cam;
  localparam int E = 64, K = 64;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [1:0][K-1:0] lk_key;
  logic [1:0] lk_hit;
  logic [1:0][5:0] lk_idx;
  logic ins_en, ins_ok, del_en;
  logic [K-1:0] ins_key;
  logic [5:0] ins_idx, del_idx;
  logic [6:0] used;
  dtable_cam #(.ENTRIES(E), .KEY_W(K), .NLK(2)) dut (.*);
  int checks = 0, failures = 0;
  logic [K-1:0] keys [E];
  bit present [E];
  task automatic chk(bit ok, string s);
    checks++; if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask
  initial begin
    ins_en = 0; del_en = 0; lk_key = '0; del_idx = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int e = 0; e < E; e++) begin
      keys[e] = {$urandom, $urandom};
      @(negedge clk);
      chk(ins_ok && ins_idx == 6'(e), $sformatf("allocation %0d got %0d", e, ins_idx));
      ins_en = 1; ins_key = keys[e]; lk_key[0] = keys[e];
      #1 chk(!lk_hit[0], "no hit before insert");
      @(posedge clk); #1 ins_en = 0;
      present[e] = 1;
    end
    @(negedge clk);
    chk(!ins_ok && used == 7'(E), "full");
    for (int t = 0; t < 300; t++) begin
      int e;
      e = int'($urandom % E);
      @(negedge clk);
      lk_key[0] = keys[e]; lk_key[1] = {$urandom, $urandom};
      #1;
      chk(lk_hit[0] == present[e] && (!present[e] || lk_idx[0] == 6'(e)), $sformatf("lookup %0d", e));
      chk(!lk_hit[1], "random key misses");
      if (present[e] && ($urandom % 3 == 0)) begin
        del_en = 1; del_idx = 6'(e);
        @(posedge clk); #1 del_en = 0;
        present[e] = 0;
        @(negedge clk);
        lk_key[0] = keys[e]; #1;
        chk(!lk_hit[0], "deleted key misses");
      end
    end
    // re-insert goes to the lowest free entry
    for (int e = 0; e < E; e++) if (!present[e]) begin
      @(negedge clk);
      chk(ins_ok && ins_idx == 6'(e), "lowest free after deletes");
      break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
