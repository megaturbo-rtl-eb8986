// leaf_stage -- last stage of a tree pipeline (the leaf module).
//
// Holds 2**DEPTH leaves of BINTH rules each. The leaf memory is split into
// BINTH slot RAMs, one per rule position, so all rules of a leaf are read in
// the same cycle and one update rewrites a single rule slot. Cycle 1: both
// lanes read their leaf (lane A on port A, lane B on port B of every slot RAM).
// Cycle 2: one match_unit per slot and lane checks the header, and a one-hot
// selector returns the id of the matching rule; rules of a tree never overlap,
// so at most one slot matches (checked by an assertion). Updates addressed to
// stage DEPTH write rule `slot` of leaf `addr` through port B in a cycle when
// lane B has no packet here; a delete clears the slot. Interface: tok_in per
// lane, res_valid/res per lane, update bus in, upd_ready out. Latency 2 cycles.
// Parallel match units and the result selector follow the published design; the slot
// split of the memory and the rule-id result are this design's choices.
module leaf_stage
  import megaturbo_pkg::*;
#(
  parameter int DEPTH   = DEF_DEPTH,
  parameter int BINTH   = DEF_BINTH,
  parameter int TREE_ID = 0
) (
  input  logic    clk,
  input  logic    rst_n,
  input  tok_t    tok_in    [NUM_LANES],
  output logic    res_valid [NUM_LANES],
  output result_t res       [NUM_LANES],
  input  logic    upd_valid,
  input  upd_t    upd,
  output logic    upd_ready,
  output logic    upd_deferred
);
  localparam int AW = DEPTH;
  localparam int DW = $bits(rule_t);

  logic  wr_en;
  upd_t  wr;
  rule_t rd    [NUM_LANES][BINTH];
  logic  hit   [NUM_LANES][BINTH];
  logic  vld_q [NUM_LANES];
  hdr_t  hdr_q [NUM_LANES];

  update_engine #(.TREE_ID(TREE_ID), .STAGE(DEPTH), .ENTRIES(2**DEPTH)) u_upd (
    .clk, .rst_n, .upd_valid, .upd, .upd_ready,
    .port_busy(tok_in[1].valid), .wr_en, .wr, .deferred(upd_deferred)
  );

  for (genvar s = 0; s < BINTH; s++) begin : g_slot
    logic slot_we;
    assign slot_we = wr_en && (wr.slot == SLOT_W'(s));

    tdp_ram #(.DW(DW), .AW(AW)) u_ram (
      .clk,
      .a_en   (tok_in[0].valid),
      .a_addr (tok_in[0].addr[AW-1:0]),
      .a_rdata(rd[0][s]),
      .b_en   (tok_in[1].valid || slot_we),
      .b_we   (slot_we),
      .b_addr (slot_we ? wr.addr[AW-1:0] : tok_in[1].addr[AW-1:0]),
      .b_wdata(wr.del ? DW'(0) : DW'(wr.rule)),
      .b_rdata(rd[1][s])
    );

    for (genvar l = 0; l < NUM_LANES; l++) begin : g_mu
      match_unit u_mu (.hdr(hdr_q[l]), .rule(rd[l][s]), .match(hit[l][s]));
    end
  end

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    logic                 any;
    logic [RULE_ID_W-1:0] id;
    logic [BINTH-1:0]     hv;

    always_comb begin
      any = 1'b0;
      id  = '0;
      for (int s = 0; s < BINTH; s++) begin
        hv[s] = hit[l][s];
        any   = any | hit[l][s];
        id    = id | (hit[l][s] ? rd[l][s].id : '0);
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        vld_q[l]     <= 1'b0;
        res_valid[l] <= 1'b0;
      end else begin
        vld_q[l]     <= tok_in[l].valid;
        res_valid[l] <= vld_q[l];
      end
      hdr_q[l]   <= tok_in[l].hdr;
      res[l].hit <= any;
      res[l].id  <= id;
    end

    a_one_match: assert property (@(posedge clk) disable iff (!rst_n)
      vld_q[l] |-> $onehot0(hv));
  end
endmodule
