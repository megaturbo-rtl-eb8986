// inter_stage -- one internal level of a tree pipeline (the inter module).
//
// Holds the 2**STAGE nodes of tree level STAGE in a true dual-port RAM. Cycle
// 1: lane A reads its node on port A, lane B on port B. Cycle 2: node_logic
// picks the node's field from the header, compares it with the node's value
// and registers the child address (pointer, or pointer+1) for the next stage.
// The header travels alongside. Updates for this level are written through
// port B by this stage's update engine, in a cycle when lane B has no packet at
// this stage, so reads are never blocked. Interface: tok_in/tok_out per lane,
// update bus in, upd_ready out. Latency 2 cycles. The RAM, node logic and
// update engine per stage follow the published design; the 2-cycle split and the
// address width (STAGE bits) are this design's choices.
module inter_stage
  import megaturbo_pkg::*;
#(
  parameter int STAGE   = 1,
  parameter int TREE_ID = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t tok_in  [NUM_LANES],
  output tok_t tok_out [NUM_LANES],
  input  logic upd_valid,
  input  upd_t upd,
  output logic upd_ready,
  output logic upd_deferred
);
  localparam int AW = STAGE;
  localparam int DW = $bits(node_t);

  logic  wr_en;
  upd_t  wr;
  node_t rd [NUM_LANES];
  tok_t  tok_q [NUM_LANES];
  logic [PTR_W-1:0] nxt [NUM_LANES];
  logic             rgt [NUM_LANES];

  update_engine #(.TREE_ID(TREE_ID), .STAGE(STAGE), .ENTRIES(2**STAGE)) u_upd (
    .clk, .rst_n, .upd_valid, .upd, .upd_ready,
    .port_busy(tok_in[1].valid), .wr_en, .wr, .deferred(upd_deferred)
  );

  tdp_ram #(.DW(DW), .AW(AW)) u_ram (
    .clk,
    .a_en   (tok_in[0].valid),
    .a_addr (tok_in[0].addr[AW-1:0]),
    .a_rdata(rd[0]),
    .b_en   (tok_in[1].valid || wr_en),
    .b_we   (wr_en),
    .b_addr (wr_en ? wr.addr[AW-1:0] : tok_in[1].addr[AW-1:0]),
    .b_wdata(wr.del ? DW'(0) : DW'(wr.node)),
    .b_rdata(rd[1])
  );

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    always_ff @(posedge clk) begin
      if (!rst_n) tok_q[l].valid <= 1'b0;
      else        tok_q[l].valid <= tok_in[l].valid;
      tok_q[l].hdr  <= tok_in[l].hdr;
      tok_q[l].addr <= tok_in[l].addr;
    end

    node_logic u_nl (.hdr(tok_q[l].hdr), .node(rd[l]), .next_addr(nxt[l]), .go_right(rgt[l]));

    always_ff @(posedge clk) begin
      if (!rst_n) tok_out[l].valid <= 1'b0;
      else        tok_out[l].valid <= tok_q[l].valid;
      tok_out[l].hdr  <= tok_q[l].hdr;
      tok_out[l].addr <= nxt[l];
    end
  end

  // A write must never take port B from a lane-B read.
  a_no_port_clash: assert property (@(posedge clk) disable iff (!rst_n)
    !(wr_en && tok_in[1].valid));
endmodule
