// tb_root_stage -- the root register stage: after a root write through the
// update bus, each lane's packet leaves one cycle later with the level-1
// address (pointer if field <= value, else pointer+1, computed in the bench).
// The root is rewritten several times while both lanes search every cycle;
// a write is never deferred and takes effect for packets entering the cycle
// after it is issued.
module tb_root_stage;
  import megaturbo_pkg::*;
  logic  clk = 0, rst_n;
  tok_t  tok_in [NUM_LANES], tok_out [NUM_LANES];
  logic  upd_valid, upd_ready;
  upd_t  upd;
  int checks = 0, failures = 0;

  root_stage #(.TREE_ID(3)) dut (.*);
  always #5 clk = ~clk;

  node_t root_m;         // the root as the bench expects it in the current cycle
  int    n_right = 0, n_left = 0;

  function automatic logic [PTR_W-1:0] ref_next(hdr_t h, node_t n);
    logic [31:0] f = (int'(n.field) < NUM_FIELDS) ? h[n.field] : 32'd0;
    return (f <= n.value) ? n.ptr : n.ptr + 1;
  endfunction

  initial begin
    logic [PTR_W-1:0] e [NUM_LANES];
    bit v [NUM_LANES];
    node_t pending;
    bit    have_pending;
    rst_n = 0; upd_valid = 0; upd = '0;
    foreach (tok_in[l]) tok_in[l] = '0;
    root_m = '0; have_pending = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      // a write issued by the engine in the previous cycle is now visible
      if (have_pending) begin root_m = pending; have_pending = 0; end
      upd_valid = (i % 50 == 0);
      upd = '0;
      upd.tree = TREE_W'((i % 150 == 100) ? 2 : 3);   // one in three goes to another tree
      upd.node.field = FID_W'($urandom_range(0, 6));
      upd.node.value = $urandom;
      upd.node.ptr   = PTR_W'($urandom_range(0, 1) * 2);
      for (int l = 0; l < NUM_LANES; l++) begin
        v[l] = $urandom_range(0, 5) != 0;
        tok_in[l].valid = v[l];
        for (int f = 0; f < NUM_FIELDS; f++) tok_in[l].hdr[f] = $urandom;
        tok_in[l].addr = PTR_W'($urandom);
        e[l] = ref_next(tok_in[l].hdr, root_m);
      end
      #1;
      if (upd_valid) begin
        checks++;
        if (!upd_ready) begin failures++; $display("FAIL root update refused"); end
      end
      @(posedge clk); #1;
      for (int l = 0; l < NUM_LANES; l++) begin
        checks++;
        if (tok_out[l].valid !== v[l]) begin failures++; $display("FAIL valid lane %0d", l); end
        if (v[l]) begin
          checks++;
          if (e[l] == root_m.ptr) n_left++; else n_right++;
          if (tok_out[l].addr !== e[l] || tok_out[l].hdr !== tok_in[l].hdr) begin
            failures++; $display("FAIL lane %0d cycle %0d: addr %0d expected %0d", l, i, tok_out[l].addr, e[l]);
          end
        end
      end
      // The engine takes the command at this edge and writes at the next one.
      if (upd_valid && upd.tree == 3) begin
        @(negedge clk); upd_valid = 0;
        for (int l = 0; l < NUM_LANES; l++) tok_in[l].valid = 0;
        @(posedge clk);
        pending = upd.node; have_pending = 1;
      end
    end
    checks++;
    if (n_left == 0 || n_right == 0) begin failures++; $display("FAIL a branch never taken"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
