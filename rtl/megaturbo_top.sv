// megaturbo_top -- the MegaFlow classification engine (top-level classifier).
//
// Commands enter on two lanes. command_split sends searches to the search
// interface and inserts/deletes (host-computed memory writes) to the update
// bus. Each search header is broadcast to NUM_TREES tree pipelines, one per
// tree of the decision forest, plus one guarantee pipeline (tree index
// NUM_TREES), an initially empty tree kept as a fallback home for rules that
// fit nowhere else. All pipelines have the same fixed latency; result_mux
// merges their per-lane results into one final result per packet. Two
// packets are classified per cycle. Updates are written stage by stage into
// idle RAM port cycles and never stall the searches.
//
// Interface: cmd_valid/cmd/cmd_ready per lane; res_valid/res per lane, exactly
// top_latency(DEPTH) = 2*DEPTH+3 cycles after the search command; status
// outputs upd_busy (update bus holding a command), upd_wait (some stage
// holds a write until lane B leaves its RAM port free) and upd_fifo_full.
// Defaults are the main configuration: 8 trees, depth 11, binth 8. The
// command format, update FIFO and latency split are this design's choices.
module megaturbo_top
  import megaturbo_pkg::*;
#(
  parameter int NUM_TREES      = DEF_NUM_TREES,
  parameter int DEPTH          = DEF_DEPTH,
  parameter int BINTH          = DEF_BINTH,
  parameter int UPD_FIFO_DEPTH = 16
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    cmd_valid [NUM_LANES],
  input  cmd_t    cmd       [NUM_LANES],
  output logic    cmd_ready [NUM_LANES],
  output logic    res_valid [NUM_LANES],
  output result_t res       [NUM_LANES],
  output logic    upd_busy,
  output logic    upd_wait,
  output logic    upd_fifo_full
);
  localparam int NUM_PIPES = NUM_TREES + 1;   // trees plus the guarantee pipeline

  tok_t    tok [NUM_LANES];
  logic    upd_valid, upd_ready;
  upd_t    upd;
  logic    p_ready [NUM_PIPES];
  logic    p_wait  [NUM_PIPES];
  logic    p_valid [NUM_PIPES][NUM_LANES];
  result_t p_res   [NUM_PIPES][NUM_LANES];

  command_split #(.FIFO_DEPTH(UPD_FIFO_DEPTH)) u_split (
    .clk, .rst_n, .cmd_valid, .cmd, .cmd_ready, .tok_out(tok),
    .upd_valid, .upd, .upd_ready, .fifo_full(upd_fifo_full)
  );

  for (genvar p = 0; p < NUM_PIPES; p++) begin : g_pipe
    logic [DEPTH:0] deferred;
    tree_pipeline #(.DEPTH(DEPTH), .BINTH(BINTH), .TREE_ID(p)) u_tree (
      .clk, .rst_n, .tok_in(tok), .res_valid(p_valid[p]), .res(p_res[p]),
      .upd_valid, .upd, .upd_ready(p_ready[p]), .upd_deferred(deferred)
    );
    assign p_wait[p] = |deferred;
  end

  always_comb begin
    upd_ready = 1'b1;
    upd_wait  = 1'b0;
    for (int p = 0; p < NUM_PIPES; p++) begin
      upd_ready = upd_ready & p_ready[p];
      upd_wait  = upd_wait | p_wait[p];
    end
  end
  assign upd_busy = upd_valid;

  result_mux #(.NUM_PIPES(NUM_PIPES)) u_mux (
    .clk, .rst_n, .in_valid(p_valid), .in_res(p_res),
    .out_valid(res_valid), .out_res(res)
  );
endmodule
