// tb_inter_stage -- one internal level (STAGE 3, 8 nodes, tree 1). Nodes are
// written through the update bus, then both lanes search every cycle with
// random node addresses; each output address (2 cycles later) is checked
// against the bench's node table. Then writes are sent while lane B is busy:
// they must wait (deferred) until lane B leaves a gap, lane A must keep
// reading the old contents of nodes that are not being written, and the new
// contents must be seen afterwards.
module tb_inter_stage;
  import megaturbo_pkg::*;
  localparam int S = 3, N = 8, LAT = 2;
  logic clk = 0, rst_n;
  tok_t tok_in [NUM_LANES], tok_out [NUM_LANES];
  logic upd_valid, upd_ready, upd_deferred;
  upd_t upd;
  int checks = 0, failures = 0;
  int cyc = 0;

  inter_stage #(.STAGE(S), .TREE_ID(1)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  node_t tbl [N];
  typedef struct { int issued; logic [PTR_W-1:0] exp; hdr_t hdr; } e_t;
  e_t q [NUM_LANES][$];
  int n_def = 0;

  function automatic logic [PTR_W-1:0] ref_next(hdr_t h, node_t n);
    logic [31:0] f = (int'(n.field) < NUM_FIELDS) ? h[n.field] : 32'd0;
    return (f <= n.value) ? n.ptr : n.ptr + 1;
  endfunction

  task automatic check_out();
    for (int l = 0; l < NUM_LANES; l++) if (tok_out[l].valid) begin
      e_t e;
      checks++;
      if (q[l].size() == 0) begin failures++; $display("FAIL extra output"); continue; end
      e = q[l].pop_front();
      if (tok_out[l].addr !== e.exp || tok_out[l].hdr !== e.hdr || cyc - e.issued != LAT) begin
        failures++;
        $display("FAIL lane %0d: addr %0d exp %0d, latency %0d", l, tok_out[l].addr, e.exp, cyc - e.issued);
      end
    end
  endtask
  always @(negedge clk) if (rst_n) begin check_out(); if (upd_deferred) n_def++; end

  task automatic send(int l, int addr);
    e_t e;
    tok_in[l].valid = 1;
    for (int f = 0; f < NUM_FIELDS; f++) tok_in[l].hdr[f] = $urandom;
    tok_in[l].addr = PTR_W'(addr) | (PTR_W'($urandom) << S);   // upper bits are not used
    e.issued = cyc; e.exp = ref_next(tok_in[l].hdr, tbl[addr]); e.hdr = tok_in[l].hdr;
    q[l].push_back(e);
  endtask

  function automatic upd_t mk(int addr, int tree);
    upd_t u = '0;
    u.tree = TREE_W'(tree); u.stage = STAGE_W'(S); u.addr = PTR_W'(addr);
    u.node.field = FID_W'($urandom_range(0, 5));
    u.node.value = $urandom;
    u.node.ptr = PTR_W'($urandom_range(0, 14));
    return u;
  endfunction

  initial begin
    rst_n = 0; upd_valid = 0; upd = '0;
    foreach (tok_in[l]) tok_in[l] = '0;
    foreach (tbl[i]) tbl[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // load, lanes idle
    for (int a = 0; a < N; a++) begin
      automatic upd_t u = mk(a, 1);
      @(negedge clk); upd_valid = 1; upd = u;
      @(posedge clk); tbl[a] = u.node;
    end
    @(negedge clk); upd_valid = 0; upd = mk(0, 5);   // foreign command on the bus, not valid
    repeat (2) @(posedge clk);
    // full-rate search
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      send(0, $urandom_range(0, N - 1));
      send(1, $urandom_range(0, N - 1));
    end
    // writes to nodes 6 and 7 while lane B is busy; lanes search nodes 0..5
    begin
      upd_t u6 = mk(6, 1), u7 = mk(7, 1);
      @(negedge clk);
      upd_valid = 1; upd = u6;
      send(0, $urandom_range(0, 5)); send(1, $urandom_range(0, 5));
      for (int i = 0; i < 40; i++) begin
        @(negedge clk);
        #0;
        if (upd_valid && upd == u6 && upd_ready && i > 0) begin upd = u7; end
        else if (upd_valid && upd == u7 && upd_ready) upd_valid = 0;
        send(0, $urandom_range(0, 5));
        if (i % 10 == 9) tok_in[1].valid = 0;   // a gap in lane B
        else send(1, $urandom_range(0, 5));
      end
      @(negedge clk); upd_valid = 0;
      tok_in[0].valid = 0; tok_in[1].valid = 0;
      repeat (4) @(posedge clk);
      tbl[6] = u6.node; tbl[7] = u7.node;
      for (int i = 0; i < 20; i++) begin
        @(negedge clk);
        send(0, 6 + (i % 2)); send(1, 7 - (i % 2));
      end
      @(negedge clk); tok_in[0].valid = 0; tok_in[1].valid = 0;
      repeat (LAT + 2) @(posedge clk);
    end
    checks++;
    if (n_def == 0) begin failures++; $display("FAIL no deferred write"); end
    checks++;
    if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("FAIL missing outputs"); end
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
