// root_stage -- stage 0 of a tree pipeline: the root node held in a register.
//
// The root is a single node, so it is kept in a register rather than a RAM and
// both search lanes read it in the same cycle. Each lane's packet is compared
// with the root (node_logic) and leaves one cycle later with the address of
// its level-1 node. Root updates come through this stage's update engine; a
// register has no port to share, so they are never deferred and take effect in
// the cycle after the write. Interface: tok_in/tok_out per lane, update bus in,
// upd_ready out. Latency 1 cycle. The register root follows the published design; the
// one-cycle timing is this design's choice.
module root_stage
  import megaturbo_pkg::*;
#(
  parameter int TREE_ID = 0
) (
  input  logic clk,
  input  logic rst_n,
  input  tok_t tok_in  [NUM_LANES],
  output tok_t tok_out [NUM_LANES],
  input  logic upd_valid,
  input  upd_t upd,
  output logic upd_ready
);
  node_t root_q;
  logic  wr_en;
  upd_t  wr;
  logic  deferred_unused;
  logic [PTR_W-1:0] nxt [NUM_LANES];
  logic             rgt [NUM_LANES];

  update_engine #(.TREE_ID(TREE_ID), .STAGE(0), .ENTRIES(1)) u_upd (
    .clk, .rst_n, .upd_valid, .upd, .upd_ready,
    .port_busy(1'b0), .wr_en, .wr, .deferred(deferred_unused)
  );

  always_ff @(posedge clk) begin
    if (!rst_n)     root_q <= '0;
    else if (wr_en) root_q <= wr.del ? '0 : wr.node;
  end

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    node_logic u_nl (.hdr(tok_in[l].hdr), .node(root_q), .next_addr(nxt[l]), .go_right(rgt[l]));

    always_ff @(posedge clk) begin
      if (!rst_n) tok_out[l].valid <= 1'b0;
      else        tok_out[l].valid <= tok_in[l].valid;
      tok_out[l].hdr  <= tok_in[l].hdr;
      tok_out[l].addr <= nxt[l];
    end
  end
endmodule
