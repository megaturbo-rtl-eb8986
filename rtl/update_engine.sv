// update_engine -- per-stage engine that applies update commands to its memory.
//
// All engines of all tree pipelines see the same update bus. An engine claims a
// command whose tree, stage and address fall inside its own memory, and keeps
// it in a one-entry buffer. It issues the write (wr_en) in the first cycle in
// which search lane B does not read the stage memory (port_busy low), so the
// write uses an idle slot of port B and no packet is stalled or dropped. A
// command for another engine is not claimed and sees upd_ready high, so the
// bus can AND the readies of all engines; the engine that claims a command
// holds ready low only while its buffer is full and cannot drain this cycle.
// Timing: a command accepted in cycle t is written in cycle t+1 at the
// earliest. The buffer and its bypass of a draining entry are this design's
// choices; the published design gives only the claim-then-write behaviour.
module update_engine
  import megaturbo_pkg::*;
#(
  parameter int TREE_ID = 0,
  parameter int STAGE   = 0,
  parameter int ENTRIES = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic upd_valid,
  input  upd_t upd,
  output logic upd_ready,
  input  logic port_busy,     // lane B reads this memory in this cycle
  output logic wr_en,
  output upd_t wr,
  output logic deferred       // a buffered write waited for lane B this cycle
);
  logic mine;
  logic pend_q;
  upd_t pend_d;

  assign mine = (upd.tree == TREE_W'(TREE_ID)) && (upd.stage == STAGE_W'(STAGE)) &&
                (32'(upd.addr) < ENTRIES);

  assign wr_en     = pend_q && !port_busy;
  assign wr        = pend_d;
  assign deferred  = pend_q && port_busy;
  assign upd_ready = !mine || !pend_q || wr_en;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      pend_q <= 1'b0;
    end else begin
      if (upd_valid && mine && upd_ready) begin
        pend_q <= 1'b1;
        pend_d <= upd;
      end else if (wr_en) begin
        pend_q <= 1'b0;
      end
    end
  end
endmodule
