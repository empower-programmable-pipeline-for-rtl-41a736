// stage_proc: a pipeline stage processor (match-action unit) of the ring-
// augmented pipeline, reduced to what the stateful functions here need.
//
// A PHV enters every cycle it is valid and leaves LAT cycles later; the stage
// never stalls. When ACT_EN is set the stage applies a stateless transition
// table, the port_FSM table of the port-knocking firewall: the entry at
// {cur_state[3:0], dst_port[3:0]} gives {drop, new_state[7:0]}; new_state is
// written into the PHV, state_upd is set when it differs from cur_state, and
// drop marks packets whose new state is not the "pass" state. The table is
// written by the control plane through cfg_we/cfg_addr/cfg_data and clears to
// zero after reset (clearing takes 256 cycles). The PHVs in flight are kept in
// a LAT-entry circular buffer rather than a shift register.
// The published design gives the 18-cycle stage latency and the port-knocking function;
// the table format and index are this design's own.
module stage_proc
  import rapid_pkg::*;
#(
  parameter int LAT    = 18,
  parameter bit ACT_EN = 1'b1
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  phv_t       in_phv,
  output logic       out_valid,
  output phv_t       out_phv,
  input  logic       cfg_we,
  input  logic [7:0] cfg_addr,
  input  logic [8:0] cfg_data
);
  logic [8:0] ttab [256];
  logic [7:0] clr_addr;
  logic       clearing;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b1;
      clr_addr <= '0;
    end else if (clearing) begin
      clr_addr <= clr_addr + 1'b1;
      if (clr_addr == 8'hff) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)    ttab[clr_addr] <= '0;
    else if (cfg_we) ttab[cfg_addr] <= cfg_data;
  end

  // action applied as the PHV enters the stage
  phv_t act_phv;
  always_comb begin
    logic [8:0] e;
    act_phv = in_phv;
    e = ttab[{in_phv.cur_state[3:0], in_phv.dst_port[3:0]}];
    if (ACT_EN) begin
      act_phv.new_state = {{(STATE_W-8){1'b0}}, e[7:0]};
      act_phv.state_upd = ({{(STATE_W-8){1'b0}}, e[7:0]} != in_phv.cur_state);
      act_phv.drop      = e[8];
    end
  end

  // delay line: a LAT-entry circular buffer; the slot about to be overwritten
  // holds the PHV written LAT cycles ago
  logic [LAT-1:0]         v_sr;
  logic [$clog2(LAT)-1:0] wp;
  phv_t                   dmem [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_sr <= '0;
      wp   <= '0;
    end else begin
      v_sr <= {v_sr[LAT-2:0], in_valid};
      wp   <= (wp == $clog2(LAT)'(LAT-1)) ? '0 : wp + 1'b1;
    end
  end

  always_ff @(posedge clk) dmem[wp] <= act_phv;

  assign out_valid = v_sr[LAT-1];
  assign out_phv   = dmem[wp];
endmodule
