// tree_pipeline -- one decision tree of the forest mapped onto a pipeline.
//
// Stage 0 is the root register (root_stage), stages 1..DEPTH-1 are inter
// modules holding 2**k nodes each, and stage DEPTH is the leaf module. Every
// packet walks all stages whatever its path, so the latency is fixed at
// 2*DEPTH+1 cycles; a branch that ends early is carried down by pass-through
// nodes. Two search lanes run through the same memories, one on each RAM port,
// so the pipeline accepts two packets per cycle. The update bus is shared by
// all stages; each stage's update engine claims the commands addressed to it,
// and upd_ready is the AND of all engines. upd_deferred reports, per stage,
// that a write waited for a gap in lane B. Stage count and the two lanes per
// dual-port RAM follow the published design; the cycle counts are this design's own.
module tree_pipeline
  import megaturbo_pkg::*;
#(
  parameter int DEPTH   = DEF_DEPTH,
  parameter int BINTH   = DEF_BINTH,
  parameter int TREE_ID = 0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  tok_t             tok_in    [NUM_LANES],
  output logic             res_valid [NUM_LANES],
  output result_t          res       [NUM_LANES],
  input  logic             upd_valid,
  input  upd_t             upd,
  output logic             upd_ready,
  output logic [DEPTH:0]   upd_deferred
);
  tok_t tok [DEPTH+1][NUM_LANES];   // tok[k] enters stage k
  logic [DEPTH:0] rdy;

  assign tok[0] = tok_in;

  root_stage #(.TREE_ID(TREE_ID)) u_root (
    .clk, .rst_n, .tok_in(tok[0]), .tok_out(tok[1]),
    .upd_valid, .upd, .upd_ready(rdy[0])
  );
  assign upd_deferred[0] = 1'b0;

  for (genvar k = 1; k < DEPTH; k++) begin : g_inter
    inter_stage #(.STAGE(k), .TREE_ID(TREE_ID)) u_inter (
      .clk, .rst_n, .tok_in(tok[k]), .tok_out(tok[k+1]),
      .upd_valid, .upd, .upd_ready(rdy[k]), .upd_deferred(upd_deferred[k])
    );
  end

  leaf_stage #(.DEPTH(DEPTH), .BINTH(BINTH), .TREE_ID(TREE_ID)) u_leaf (
    .clk, .rst_n, .tok_in(tok[DEPTH]), .res_valid, .res,
    .upd_valid, .upd, .upd_ready(rdy[DEPTH]), .upd_deferred(upd_deferred[DEPTH])
  );

  assign upd_ready = &rdy;
endmodule
