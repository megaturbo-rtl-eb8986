// tb_leaf_stage -- the leaf module (DEPTH 3: 8 leaves, BINTH 4 slots, tree 0).
// Rules are built from random headers and written into random free slots;
// then both lanes search every cycle, each packet at the leaf of its own rule
// (expect that rule's id) or at a random leaf with a random header (expect a
// miss), with the result checked 2 cycles later. Some rules are then deleted
// while lane B is busy, so the deletes wait for lane-B gaps, and their
// packets must miss afterwards while the other rules still hit.
module tb_leaf_stage;
  import megaturbo_pkg::*;
  localparam int D = 3, B = 4, L = 8, LAT = 2;
  logic    clk = 0, rst_n;
  tok_t    tok_in [NUM_LANES];
  logic    res_valid [NUM_LANES];
  result_t res [NUM_LANES];
  logic    upd_valid, upd_ready, upd_deferred;
  upd_t    upd;
  int checks = 0, failures = 0;
  int cyc = 0;

  leaf_stage #(.DEPTH(D), .BINTH(B), .TREE_ID(0)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  hdr_t  hdrs [$];
  int    leaf_of [$], slot_of [$];
  bit    live [$];
  bit    used [L][B];
  typedef struct { int issued; bit hit; int id; } e_t;
  e_t q [NUM_LANES][$];
  int n_def = 0, n_hit = 0, n_del_miss = 0;

  task automatic check_out();
    for (int l = 0; l < NUM_LANES; l++) if (res_valid[l]) begin
      e_t e;
      checks++;
      if (q[l].size() == 0) begin failures++; $display("FAIL extra result"); continue; end
      e = q[l].pop_front();
      if (res[l].hit !== e.hit || (e.hit && int'(res[l].id) != e.id) || cyc - e.issued != LAT) begin
        failures++;
        $display("FAIL lane %0d: hit %0d id %0d, expected %0d id %0d (latency %0d)", l, res[l].hit, res[l].id, e.hit, e.id, cyc - e.issued);
      end
    end
  endtask
  always @(negedge clk) if (rst_n) begin check_out(); if (upd_deferred) n_def++; end

  function automatic rule_t rule_for(hdr_t h, int id);
    rule_t r;
    r.valid = 1;
    for (int f = 0; f < NUM_FIELDS; f++) begin
      int len = (f == 0) ? 16 + int'($urandom_range(0, 16)) : int'($urandom_range(0, 32));
      r.len[f] = PLEN_W'(len);
      r.value[f] = h[f] & ~(32'hffff_ffff >> len);
    end
    r.id = RULE_ID_W'(id);
    return r;
  endfunction

  // Search on lane l: rule k's own packet, or a random packet at a random leaf.
  task automatic send(int l, int k);
    e_t e;
    tok_in[l].valid = 1;
    e.issued = cyc;
    if (k >= 0) begin
      tok_in[l].hdr = hdrs[k]; tok_in[l].addr = PTR_W'(leaf_of[k]);
      e.hit = live[k]; e.id = k + 1;
      if (live[k]) n_hit++; else n_del_miss++;
    end else begin
      for (int f = 0; f < NUM_FIELDS; f++) tok_in[l].hdr[f] = $urandom;
      tok_in[l].addr = PTR_W'($urandom_range(0, L - 1));
      e.hit = 0; e.id = 0;
    end
    q[l].push_back(e);
  endtask

  task automatic write(upd_t u);
    @(negedge clk); upd_valid = 1; upd = u;
    #1 while (!upd_ready) begin @(negedge clk); #1; end
    @(posedge clk);
    @(negedge clk); upd_valid = 0;
  endtask

  initial begin
    rst_n = 0; upd_valid = 0; upd = '0;
    foreach (tok_in[l]) tok_in[l] = '0;
    foreach (used[a, s]) used[a][s] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < 24; k++) begin
      automatic hdr_t h;
      automatic upd_t u = '0;
      automatic int a, s;
      for (int f = 0; f < NUM_FIELDS; f++) h[f] = $urandom;
      do begin a = $urandom_range(0, L - 1); s = $urandom_range(0, B - 1); end while (used[a][s]);
      used[a][s] = 1;
      u.tree = '0; u.stage = STAGE_W'(D); u.addr = PTR_W'(a); u.slot = SLOT_W'(s);
      u.rule = rule_for(h, k + 1);
      write(u);
      hdrs.push_back(h); leaf_of.push_back(a); slot_of.push_back(s); live.push_back(1);
    end
    // a command for another tree is ignored
    begin
      automatic upd_t u = '0;
      u.tree = 1; u.stage = STAGE_W'(D); u.addr = PTR_W'(leaf_of[0]); u.slot = SLOT_W'(slot_of[0]); u.del = 1;
      write(u);
    end
    repeat (2) @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      send(0, ($urandom_range(0, 3) == 0) ? -1 : int'($urandom_range(0, hdrs.size() - 1)));
      send(1, ($urandom_range(0, 3) == 0) ? -1 : int'($urandom_range(0, hdrs.size() - 1)));
    end
    // delete rules 0..5 while lane B is busy except every 8th cycle
    fork
      for (int k = 0; k < 6; k++) begin
        automatic upd_t u = '0;
        u.tree = '0; u.stage = STAGE_W'(D); u.addr = PTR_W'(leaf_of[k]); u.slot = SLOT_W'(slot_of[k]); u.del = 1;
        write(u);
      end
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        send(0, 6 + int'($urandom_range(0, hdrs.size() - 7)));
        if (i % 8 == 7) tok_in[1].valid = 0;
        else send(1, 6 + int'($urandom_range(0, hdrs.size() - 7)));
      end
    join
    @(negedge clk); tok_in[0].valid = 0; tok_in[1].valid = 0;
    repeat (3) @(posedge clk);
    for (int k = 0; k < 6; k++) live[k] = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      send(0, i % hdrs.size()); send(1, (i * 7) % hdrs.size());
    end
    @(negedge clk); tok_in[0].valid = 0; tok_in[1].valid = 0;
    repeat (LAT + 2) @(posedge clk);
    checks += 3;
    if (n_def == 0)      begin failures++; $display("FAIL no deferred write"); end
    if (n_del_miss == 0) begin failures++; $display("FAIL no deleted rule searched"); end
    if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("FAIL missing results"); end
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
