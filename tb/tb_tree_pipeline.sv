// tb_tree_pipeline -- the worked two-field example: ten non-overlapping rules
// on 4-bit fields X and Y, split into two trees of depth 2 with binth 2 (the
// first tree splits on X at 7, then 3 and 11; the second, holding the three
// rules kicked out of the first, splits on Y at 13, then Y at 7 and X at 9).
// Both trees are written through the shared update bus into two pipelines
// (TREE_ID 0 and 1). Then all 256 (X, Y) packets are searched on both lanes
// and the merged result is compared with a direct scan of the rule table;
// latency must be 2*DEPTH+1. Finally a rule is deleted and re-inserted while
// lane A keeps searching, and the table is checked again.
// Rule 5 (Y = 100x) sits in leaf 1, the Y > 7 child of the second tree's left
// node, which is where its Y range leads; the rest of the layout is as in the
// example.
module tb_tree_pipeline;
  import megaturbo_pkg::*;
  localparam int D = 2, B = 2;
  localparam int LAT = tree_latency(D);

  logic    clk = 0, rst_n;
  tok_t    tok_in [NUM_LANES];
  logic    rv [2][NUM_LANES];
  result_t rr [2][NUM_LANES];
  logic    upd_valid;
  upd_t    upd;
  logic    rdy [2];
  logic [D:0] dfr [2];
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  for (genvar t = 0; t < 2; t++) begin : g_t
    tree_pipeline #(.DEPTH(D), .BINTH(B), .TREE_ID(t)) dut (
      .clk, .rst_n, .tok_in, .res_valid(rv[t]), .res(rr[t]),
      .upd_valid, .upd, .upd_ready(rdy[t]), .upd_deferred(dfr[t]));
  end

  // Rule table: X prefix, X length, Y prefix, Y length (4-bit fields).
  int rx [11] = '{0, 4'b0000, 4'b0000, 4'b0100, 4'b0000, 0,       4'b1000, 4'b1000, 4'b1010, 4'b1100, 4'b1100};
  int lx [11] = '{0, 3,       2,       2,       1,       0,       2,       2,       3,       2,       2};
  int ry [11] = '{0, 4'b0000, 4'b0010, 4'b0000, 4'b1110, 4'b1000, 4'b0000, 4'b0100, 4'b1110, 4'b0000, 4'b1100};
  int ly [11] = '{0, 3,       3,       1,       3,       3,       3,       3,       3,       1,       2};
  bit present [11];

  function automatic int table_lookup(int x, int y);
    for (int r = 1; r <= 10; r++)
      if (present[r] && ((x >> (4 - lx[r])) == (rx[r] >> (4 - lx[r]))) &&
                        ((y >> (4 - ly[r])) == (ry[r] >> (4 - ly[r]))))
        return r;
    return 0;
  endfunction

  function automatic upd_t node_w(int tree, int stage, int addr, int field, int value, int ptr);
    upd_t u = '0;
    u.tree = TREE_W'(tree); u.stage = STAGE_W'(stage); u.addr = PTR_W'(addr);
    u.node.field = FID_W'(field); u.node.value = 32'(value) << 28; u.node.ptr = PTR_W'(ptr);
    return u;
  endfunction

  function automatic upd_t rule_w(int tree, int leaf, int slot, int r);
    upd_t u = '0;
    u.tree = TREE_W'(tree); u.stage = STAGE_W'(D); u.addr = PTR_W'(leaf); u.slot = SLOT_W'(slot);
    u.rule.valid = 1'b1;
    u.rule.value[0] = 32'(rx[r]) << 28; u.rule.len[0] = PLEN_W'(lx[r]);
    u.rule.value[1] = 32'(ry[r]) << 28; u.rule.len[1] = PLEN_W'(ly[r]);
    u.rule.id = RULE_ID_W'(r);
    return u;
  endfunction

  task automatic write(upd_t u);
    @(negedge clk);
    upd_valid = 1; upd = u;
    #1 while (!(rdy[0] && rdy[1])) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk);
    upd_valid = 0;
  endtask

  typedef struct { int issued; int exp; } e_t;
  e_t q [NUM_LANES][$];

  task automatic check_out();
    for (int l = 0; l < NUM_LANES; l++) begin
      checks++;
      if (rv[0][l] !== rv[1][l]) begin failures++; $display("FAIL pipelines out of step"); end
      if (rv[0][l]) begin
        e_t e;
        int got;
        got = rr[0][l].hit ? int'(rr[0][l].id) : (rr[1][l].hit ? int'(rr[1][l].id) : 0);
        if (rr[0][l].hit && rr[1][l].hit) got = -1;
        if (q[l].size() == 0) begin failures++; $display("FAIL extra result"); continue; end
        e = q[l].pop_front();
        checks++;
        if (got != e.exp || cyc - e.issued != LAT) begin
          failures++;
          $display("FAIL lane %0d: got rule %0d after %0d cycles, expected rule %0d after %0d", l, got, cyc - e.issued, e.exp, LAT);
        end
      end
    end
  endtask
  always @(negedge clk) if (rst_n) check_out();

  task automatic search(int l, int x, int y);
    tok_in[l].valid = 1;
    tok_in[l].hdr = '0;
    tok_in[l].hdr[0] = 32'(x) << 28;
    tok_in[l].hdr[1] = 32'(y) << 28;
    tok_in[l].addr = '0;
  endtask

  task automatic sweep();
    for (int i = 0; i < 256; i += 2) begin
      e_t e;
      @(negedge clk);
      search(0, i >> 4, i & 15);
      search(1, (i + 1) >> 4, (i + 1) & 15);
      e.issued = cyc; e.exp = table_lookup(i >> 4, i & 15); q[0].push_back(e);
      e.exp = table_lookup((i + 1) >> 4, (i + 1) & 15); q[1].push_back(e);
    end
    @(negedge clk);
    tok_in[0].valid = 0; tok_in[1].valid = 0;
    repeat (LAT + 2) @(posedge clk);
  endtask

  int n_hits = 0;

  initial begin
    rst_n = 0; upd_valid = 0; upd = '0;
    foreach (tok_in[l]) tok_in[l] = '0;
    foreach (present[r]) present[r] = (r != 0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // First tree: root X<=7 ptr 0; stage 1: X<=3 ptr 0, X<=11 ptr 2.
    write(node_w(0, 0, 0, 0, 7, 0));
    write(node_w(0, 1, 0, 0, 3, 0));
    write(node_w(0, 1, 1, 0, 11, 2));
    write(rule_w(0, 0, 0, 1));  write(rule_w(0, 0, 1, 2));
    write(rule_w(0, 1, 0, 3));
    write(rule_w(0, 2, 0, 6));  write(rule_w(0, 2, 1, 7));
    write(rule_w(0, 3, 0, 9));  write(rule_w(0, 3, 1, 10));
    // Second tree: root Y<=13 ptr 0; stage 1: Y<=7 ptr 0, X<=9 ptr 2.
    write(node_w(1, 0, 0, 1, 13, 0));
    write(node_w(1, 1, 0, 1, 7, 0));
    write(node_w(1, 1, 1, 0, 9, 2));
    write(rule_w(1, 1, 0, 5));      // Y = 100x is above 7: right child, leaf 1
    write(rule_w(1, 2, 0, 4));
    write(rule_w(1, 3, 0, 8));
    repeat (3) @(posedge clk);
    sweep();
    // Delete rule 7 (tree 0, leaf 2, slot 1) and rule 8 (tree 1, leaf 3).
    begin
      upd_t u = rule_w(0, 2, 1, 7);
      u.del = 1; write(u);
      u = rule_w(1, 3, 0, 8);
      u.del = 1; write(u);
      present[7] = 0; present[8] = 0;
    end
    repeat (3) @(posedge clk);
    sweep();
    // Re-insert rule 8 while lane A searches every cycle (lane B idle).
    fork
      begin
        write(rule_w(1, 3, 0, 8));
      end
      begin
        for (int i = 0; i < 8; i++) begin
          e_t e;
          @(negedge clk);
          search(0, 4'b0001, 4'b0000);
          e.issued = cyc; e.exp = 1; q[0].push_back(e);
        end
        @(negedge clk) tok_in[0].valid = 0;
      end
    join
    present[8] = 1;
    repeat (LAT + 3) @(posedge clk);
    sweep();
    checks++;
    if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("FAIL missing results"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
