// result_mux -- final selector over the results of all tree pipelines.
//
// MegaFlow rules never overlap and every rule is stored in exactly one tree,
// so a packet hits in at most one pipeline. The selector therefore needs no
// priority logic: it ORs the hit flags and ORs the rule ids gated by their hit
// flags (an AND-OR one-hot multiplexer), per lane, and registers the result.
// An assertion checks that at most one pipeline hits. All pipelines have the
// same latency, so their results for a packet arrive in the same cycle.
// Latency 1 cycle (this design's choice).
module result_mux
  import megaturbo_pkg::*;
#(
  parameter int NUM_PIPES = DEF_NUM_TREES + 1
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid [NUM_PIPES][NUM_LANES],
  input  result_t in_res   [NUM_PIPES][NUM_LANES],
  output logic    out_valid [NUM_LANES],
  output result_t out_res   [NUM_LANES]
);
  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    result_t              sel;
    logic [NUM_PIPES-1:0] hv;

    always_comb begin
      sel = '0;
      for (int p = 0; p < NUM_PIPES; p++) begin
        hv[p]   = in_res[p][l].hit;
        sel.hit = sel.hit | in_res[p][l].hit;
        sel.id  = sel.id | (in_res[p][l].hit ? in_res[p][l].id : '0);
      end
    end

    always_ff @(posedge clk) begin
      if (!rst_n) out_valid[l] <= 1'b0;
      else        out_valid[l] <= in_valid[0][l];
      out_res[l] <= sel;
    end

    a_one_pipe: assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[0][l] |-> $onehot0(hv));
  end
endmodule
