// command_split -- separates the command stream into searches and updates.
//
// Each of the two lanes delivers at most one command per cycle. A search
// (OP_SEARCH) is always accepted and its header is registered onto that lane's
// search interface, broadcast to every tree pipeline one cycle later. An
// insert or delete is a memory write prepared by the host (tree, stage,
// address, slot, data); it is queued in a FIFO that drives the shared update
// bus. The FIFO takes one write per cycle: when both lanes carry an update,
// lane 0 goes first and lane 1 sees cmd_ready low; when the FIFO is full,
// updates see cmd_ready low. A lane carrying an update leaves its search slot
// empty in that cycle, which is the gap in which the stages write. The FIFO
// (first-word fall-through, FIFO_DEPTH entries) and this arbitration are this
// design's choices; the published design only names the split.
module command_split
  import megaturbo_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic cmd_valid [NUM_LANES],
  input  cmd_t cmd       [NUM_LANES],
  output logic cmd_ready [NUM_LANES],
  output tok_t tok_out   [NUM_LANES],
  output logic upd_valid,
  output upd_t upd,
  input  logic upd_ready,
  output logic fifo_full
);
  localparam int PW = $clog2(FIFO_DEPTH);

  upd_t          fifo [FIFO_DEPTH];
  logic [PW-1:0] wptr, rptr;
  logic [PW:0]   count;
  logic          is_upd [NUM_LANES];
  logic          push, pop;
  upd_t          push_d;

  always_comb begin
    for (int l = 0; l < NUM_LANES; l++)
      is_upd[l] = cmd_valid[l] && (cmd[l].op == OP_INSERT || cmd[l].op == OP_DELETE);
    fifo_full    = (count == (PW+1)'(FIFO_DEPTH));
    cmd_ready[0] = !is_upd[0] || !fifo_full;
    cmd_ready[1] = !is_upd[1] || (!fifo_full && !is_upd[0]);
    push   = 1'b0;
    push_d = cmd[0].upd;
    push_d.del = (cmd[0].op == OP_DELETE);
    if (is_upd[0] && !fifo_full) begin
      push = 1'b1;
    end else if (is_upd[1] && !fifo_full) begin
      push   = 1'b1;
      push_d = cmd[1].upd;
      push_d.del = (cmd[1].op == OP_DELETE);
    end
    upd_valid = (count != '0);
    upd       = fifo[rptr];
    pop       = upd_valid && upd_ready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) begin
        fifo[wptr] <= push_d;
        wptr       <= (wptr == PW'(FIFO_DEPTH-1)) ? '0 : wptr + PW'(1);
      end
      if (pop) rptr <= (rptr == PW'(FIFO_DEPTH-1)) ? '0 : rptr + PW'(1);
      count <= count + (PW+1)'(push) - (PW+1)'(pop);
    end
  end

  for (genvar l = 0; l < NUM_LANES; l++) begin : g_lane
    always_ff @(posedge clk) begin
      if (!rst_n) tok_out[l].valid <= 1'b0;
      else        tok_out[l].valid <= cmd_valid[l] && (cmd[l].op == OP_SEARCH);
      tok_out[l].hdr  <= cmd[l].hdr;
      tok_out[l].addr <= '0;
    end
  end
endmodule
