// tb_megaturbo_top -- end-to-end test of the classification engine at its
// default size (8 trees + guarantee pipeline, depth 11, binth 8).
//
// The testbench keeps its own model of every node and rule it writes (entries
// never written read as zero, as in the RAMs) and computes each search result
// by walking that model: field select, threshold compare, child address
// masked to the next level's width, then a prefix match of every rule of the
// leaf. Phases:
//   A  load: a random upper tree plus random deeper nodes per pipeline, written
//      through both lanes at once (lane 1 is held back when lane 0 also
//      updates), then a few hundred rules placed in the leaf each rule's own
//      header reaches; a rule that finds no free slot in any tree goes to the
//      guarantee pipeline.
//   B  full rate: both lanes search every cycle; every result is checked, and
//      one result per lane per cycle with a fixed latency is required.
//   C  mixed: searches on both lanes while lane 1 now and then carries an
//      insert or delete of rules that are not searched in this phase; then a
//      burst of updates on lane 0 against a busy lane 1 until the update FIFO
//      fills; then lane 1 pauses so the writes drain.
//   D  verify: inserted rules hit, deleted rules miss, the rest is unchanged.
//   E  update rate: back-to-back updates with both lanes free.
// Mechanisms counted (each must occur): dual-lane search cycles, lane-1 update
// held back by lane 0, writes waiting for a lane-B gap, update FIFO full,
// hits in the guarantee pipeline, hits in several trees, pass-through nodes,
// left and right branches, deleted rule seen missing.
module tb_megaturbo_top;
  import megaturbo_pkg::*;

  localparam int D   = DEF_DEPTH;
  localparam int B   = DEF_BINTH;
  localparam int NT  = DEF_NUM_TREES;
  localparam int NP  = NT + 1;
  localparam int LAT = top_latency(D);

  logic    clk = 1'b0;
  logic    rst_n;
  logic    cmd_valid [NUM_LANES];
  cmd_t    cmd       [NUM_LANES];
  logic    cmd_ready [NUM_LANES];
  logic    res_valid [NUM_LANES];
  result_t res       [NUM_LANES];
  logic    upd_busy, upd_wait, upd_fifo_full;

  megaturbo_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ---------------------------------------------------------------- model
  node_t nodes [int];
  rule_t rules [int];
  function automatic int nkey(int p, int k, int a); return (p << 24) | (k << 16) | a; endfunction
  function automatic int rkey(int p, int a, int s); return (p << 24) | (a << 4) | s; endfunction
  function automatic node_t nget(int p, int k, int a);
    return nodes.exists(nkey(p, k, a)) ? nodes[nkey(p, k, a)] : '0;
  endfunction
  function automatic rule_t rget(int p, int a, int s);
    return rules.exists(rkey(p, a, s)) ? rules[rkey(p, a, s)] : '0;
  endfunction

  int n_pass = 0, n_left = 0, n_right = 0;

  function automatic int walk(hdr_t h, int p, bit count);
    int a = 0;
    for (int k = 0; k < D; k++) begin
      node_t n = nget(p, k, a);
      logic [31:0] fv = (int'(n.field) < NUM_FIELDS) ? h[n.field] : 32'd0;
      int nxt;
      if (count && int'(n.field) >= NUM_FIELDS) n_pass++;
      if (fv <= n.value) begin nxt = int'(n.ptr);     if (count) n_left++;  end
      else               begin nxt = int'(n.ptr) + 1; if (count) n_right++; end
      a = nxt & ((1 << (k + 1)) - 1);
    end
    return a;
  endfunction

  function automatic bit rmatch(hdr_t h, rule_t r);
    if (!r.valid) return 0;
    for (int f = 0; f < NUM_FIELDS; f++)
      if (r.len[f] != 0 && (h[f] >> (32 - int'(r.len[f]))) != (r.value[f] >> (32 - int'(r.len[f]))))
        return 0;
    return 1;
  endfunction

  // Expected result; pipe of the hit in `hp`, number of hits in `nh`.
  function automatic result_t expect_of(hdr_t h, bit count, output int hp, output int nh);
    result_t e = '0;
    hp = -1; nh = 0;
    for (int p = 0; p < NP; p++) begin
      int a = walk(h, p, count);
      for (int s = 0; s < B; s++) begin
        rule_t r = rget(p, a, s);
        if (rmatch(h, r)) begin e.hit = 1; e.id = r.id; hp = p; nh++; end
      end
    end
    return e;
  endfunction

  // ---------------------------------------------------------------- counters
  int c_dual = 0, c_lane1_held = 0, c_wait = 0, c_full = 0, c_guar = 0, c_del_miss = 0;
  int tree_hits [NP];
  int ambiguous = 0;

  always @(negedge clk) begin
    if (rst_n) begin
      if (upd_wait) c_wait++;
      if (upd_fifo_full) c_full++;
    end
  end

  // ---------------------------------------------------------------- checker
  typedef struct { int issued; result_t exp; bit chk; int hp; bit want_del_miss; } exp_t;
  exp_t q [NUM_LANES][$];
  int   n_res [NUM_LANES];
  int   lat_bad = 0;
  int   phase = 0;    // A=1 .. E=5, shown in failure messages

  task automatic check_results();
    for (int l = 0; l < NUM_LANES; l++) begin
      if (rst_n && res_valid[l]) begin
        n_res[l]++;
        if (q[l].size() == 0) begin
          failures++; $display("FAIL lane %0d: unexpected result at cycle %0d", l, cyc);
        end else begin
          exp_t e = q[l].pop_front();
          checks++;
          if (cyc - e.issued != LAT) begin
            failures++; lat_bad++;
            if (lat_bad < 5) $display("FAIL lane %0d: latency %0d, expected %0d", l, cyc - e.issued, LAT);
          end
          if (e.chk) begin
            checks++;
            if (res[l].hit !== e.exp.hit || (e.exp.hit && res[l].id !== e.exp.id)) begin
              failures++;
              if (failures < 10) $display("FAIL phase %0d lane %0d cycle %0d: got hit=%0d id=%0d, expected hit=%0d id=%0d",
                                          phase, l, cyc, res[l].hit, res[l].id, e.exp.hit, e.exp.id);
            end else begin
              if (e.exp.hit) begin
                tree_hits[e.hp]++;
                if (e.hp == NT) c_guar++;
              end
              if (e.want_del_miss && !res[l].hit) c_del_miss++;
            end
          end
        end
      end
    end
  endtask

  always @(negedge clk) check_results();

  // ---------------------------------------------------------------- driver
  // One cycle: present up to one command per lane at the falling edge, read
  // cmd_ready, then wait for the rising edge that takes them.
  task automatic drive(input bit v0, input cmd_t c0, input bit v1, input cmd_t c1,
                       output bit a0, output bit a1);
    @(negedge clk);
    cmd_valid[0] = v0; cmd[0] = c0;
    cmd_valid[1] = v1; cmd[1] = c1;
    #1;
    a0 = v0 && cmd_ready[0];
    a1 = v1 && cmd_ready[1];
    if (v0 && v1 && c0.op != OP_SEARCH && c1.op != OP_SEARCH && a0 && !a1) c_lane1_held++;
    if (v0 && v1 && c0.op == OP_SEARCH && c1.op == OP_SEARCH) c_dual++;
    @(posedge clk);
  endtask

  function automatic cmd_t search_cmd(hdr_t h);
    cmd_t c = '0;
    c.op = OP_SEARCH; c.hdr = h;
    return c;
  endfunction

  // Record the expectation of a search accepted in the cycle that ends now.
  task automatic expect_search(int l, hdr_t h, bit want_del_miss);
    exp_t e;
    int nh;
    e.issued = cyc;
    e.exp = expect_of(h, 1'b1, e.hp, nh);
    e.chk = (nh <= 1);
    if (nh > 1) ambiguous++;
    e.want_del_miss = want_del_miss;
    q[l].push_back(e);
  endtask

  // Apply an accepted update to the model.
  function automatic void model_upd(upd_t u);
    if (int'(u.stage) == D) rules[rkey(u.tree, u.addr, u.slot)] = u.del ? '0 : u.rule;
    else                    nodes[nkey(u.tree, u.stage, u.addr)] = u.del ? '0 : u.node;
  endfunction

  function automatic hdr_t rand_hdr();
    hdr_t h;
    for (int f = 0; f < NUM_FIELDS; f++) h[f] = $urandom;
    return h;
  endfunction

  int next_id = 1;

  // A rule that matches header h with long enough prefixes to stay unique.
  function automatic rule_t rule_for(hdr_t h);
    rule_t r;
    r.valid = 1'b1;
    for (int f = 0; f < NUM_FIELDS; f++) begin
      int len = (f < 2) ? 12 + int'($urandom_range(0, 20)) : int'($urandom_range(0, 32));
      r.len[f]   = PLEN_W'(len);
      r.value[f] = (len == 0) ? 32'd0 : (h[f] & ~(32'hffff_ffff >> len));
    end
    r.id = RULE_ID_W'(next_id++);
    return r;
  endfunction

  // Find a place for a rule matching h: the trees in a random order, then the
  // guarantee pipeline. Returns 0 when every candidate leaf is full.
  function automatic bit place(hdr_t h, bit force_guarantee, output upd_t u);
    int start = $urandom_range(0, NT - 1);
    u = '0;
    for (int i = 0; i <= NT; i++) begin
      int p = (i == NT) ? NT : (start + i) % NT;
      int a;
      if (force_guarantee && p != NT) continue;
      a = walk(h, p, 1'b0);
      for (int s = 0; s < B; s++)
        if (!rget(p, a, s).valid) begin
          u.tree = TREE_W'(p); u.stage = STAGE_W'(D); u.addr = PTR_W'(a);
          u.slot = SLOT_W'(s); u.rule = rule_for(h);
          return 1;
        end
    end
    return 0;
  endfunction

  function automatic cmd_t upd_cmd(upd_t u);
    cmd_t c = '0;
    c.op  = u.del ? OP_DELETE : OP_INSERT;
    c.upd = u;
    return c;
  endfunction

  // Send a list of updates, two lanes at once, until all are accepted.
  task automatic send_updates(ref upd_t ul[$]);
    bit a0, a1;
    while (ul.size() > 0) begin
      cmd_t c0 = upd_cmd(ul[0]);
      cmd_t c1 = (ul.size() > 1) ? upd_cmd(ul[1]) : '0;
      drive(1'b1, c0, ul.size() > 1, c1, a0, a1);
      if (a1) begin model_upd(ul[1]); ul.delete(1); end
      if (a0) begin model_upd(ul[0]); ul.delete(0); end
    end
  endtask

  task automatic idle(int n);
    bit a0, a1;
    repeat (n) drive(1'b0, '0, 1'b0, '0, a0, a1);
  endtask

  task automatic drain();
    bit a0, a1;
    do drive(1'b0, '0, 1'b0, '0, a0, a1); while (upd_busy || upd_wait);
    idle(LAT + 2);
  endtask

  hdr_t stable [$];   // headers searched in phases B and C
  hdr_t fresh  [$];   // headers whose rules are inserted in phase C
  hdr_t doomed [$];   // headers whose rules are deleted in phase C
  upd_t doomed_u [$];

  // ---------------------------------------------------------------- stimulus
  task automatic stimulus();
    upd_t ul [$];
    upd_t u;
    bit a0, a1;
    int t0;

    rst_n = 1'b0;
    cmd_valid[0] = 1'b0; cmd_valid[1] = 1'b0;
    cmd[0] = '0; cmd[1] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- A: nodes
    phase = 1;
    for (int p = 0; p < NT; p++) begin
      for (int k = 0; k < D; k++) begin
        int cnt = (k < 4) ? (1 << k) : 6;
        for (int i = 0; i < cnt; i++) begin
          int a = (k < 4) ? i : int'($urandom_range(0, (1 << k) - 1));
          u = '0;
          u.tree = TREE_W'(p); u.stage = STAGE_W'(k); u.addr = PTR_W'(a);
          u.node.field = ($urandom_range(0, 9) == 0) ? FID_W'(NUM_FIELDS + $urandom_range(0, 2))
                                                     : FID_W'($urandom_range(0, NUM_FIELDS - 1));
          u.node.value = $urandom;
          u.node.ptr   = PTR_W'($urandom_range(0, (1 << (k + 1)) - 2));
          ul.push_back(u);
        end
      end
    end
    send_updates(ul);
    drain();

    // ---- A: rules
    for (int i = 0; i < 400; i++) begin
      hdr_t h = rand_hdr();
      if (place(h, (i % 16) == 0, u)) begin
        ul.push_back(u); model_upd(u);      // model now, so place() sees the slot used
        if (i % 4 == 3) begin doomed.push_back(h); doomed_u.push_back(u); end
        else stable.push_back(h);
      end
    end
    foreach (ul[i]) rules.delete(rkey(ul[i].tree, ul[i].addr, ul[i].slot));
    send_updates(ul);
    drain();
    for (int i = 0; i < 80; i++) fresh.push_back(rand_hdr());

    // ---- B: full rate, both lanes every cycle
    phase = 2;
    begin
      int n0 = n_res[0], n1 = n_res[1];
      for (int i = 0; i < 400; i++) begin
        hdr_t h0 = ($urandom_range(0, 3) == 0) ? rand_hdr() : stable[$urandom_range(0, stable.size() - 1)];
        hdr_t h1 = ($urandom_range(0, 3) == 0) ? rand_hdr() : stable[$urandom_range(0, stable.size() - 1)];
        drive(1'b1, search_cmd(h0), 1'b1, search_cmd(h1), a0, a1);
        if (!a0 || !a1) begin failures++; $display("FAIL search not accepted"); end
        expect_search(0, h0, 0); expect_search(1, h1, 0);
      end
      idle(LAT + 2);
      checks++;
      if (n_res[0] - n0 != 400 || n_res[1] - n1 != 400) begin
        failures++; $display("FAIL full-rate phase returned %0d/%0d results, expected 400 per lane",
                             n_res[0] - n0, n_res[1] - n1);
      end
    end

    // ---- C: mixed searches and updates on lane 1
    phase = 3;
    begin
      int fi = 0, di = 0;
      for (int i = 0; i < 600; i++) begin
        hdr_t h0 = stable[$urandom_range(0, stable.size() - 1)];
        bit   want_upd = ($urandom_range(0, 3) == 0) && (fi < fresh.size() || di < doomed.size());
        if (want_upd) begin
          upd_t uu;
          bit   ok = 1;
          if (di < doomed.size() && (fi >= fresh.size() || $urandom_range(0, 1) == 0)) begin
            uu = doomed_u[di]; uu.del = 1'b1; uu.rule = '0;
          end else begin
            ok = place(fresh[fi], 1'b0, uu);
          end
          if (!ok) begin fi++; continue; end
          drive(1'b1, search_cmd(h0), 1'b1, upd_cmd(uu), a0, a1);
          expect_search(0, h0, 0);
          if (a1) begin
            model_upd(uu);
            if (uu.del) di++; else fi++;
          end
        end else begin
          hdr_t h1 = stable[$urandom_range(0, stable.size() - 1)];
          drive(1'b1, search_cmd(h0), 1'b1, search_cmd(h1), a0, a1);
          expect_search(0, h0, 0); expect_search(1, h1, 0);
        end
      end
      // Burst of updates on lane 0 while lane 1 keeps its port busy.
      for (int i = 0; i < 40; i++) begin
        upd_t uu = '0;
        int   tries = 0;
        uu.tree = TREE_W'(NT); uu.stage = STAGE_W'(D); uu.addr = PTR_W'((1 << D) - 1 - i);
        uu.slot = SLOT_W'(B - 1); uu.del = 1'b1;      // clears unused slots: no search sees them
        // Lane 1 keeps searching; after 8 refused cycles it pauses so that
        // the held writes find free port-B cycles and the FIFO drains.
        do begin
          hdr_t h1 = stable[$urandom_range(0, stable.size() - 1)];
          bit   s1 = (tries < 8);
          drive(1'b1, upd_cmd(uu), s1, search_cmd(h1), a0, a1);
          if (s1) expect_search(1, h1, 0);
          tries++;
        end while (!a0);
        model_upd(uu);
      end
      drain();
    end

    // ---- D: verify the updates of phase C
    phase = 4;
    begin
      int k = 0;
      foreach (fresh[i]) begin
        drive(1'b1, search_cmd(fresh[i]), 1'b0, '0, a0, a1);
        expect_search(0, fresh[i], 0);
      end
      foreach (doomed[i]) begin
        drive(1'b0, '0, 1'b1, search_cmd(doomed[i]), a0, a1);
        expect_search(1, doomed[i], 1);
      end
      foreach (stable[i]) begin
        if (k++ > 200) break;
        drive(1'b1, search_cmd(stable[i]), 1'b0, '0, a0, a1);
        expect_search(0, stable[i], 0);
      end
      idle(LAT + 2);
    end

    // ---- E: update rate with both lanes free
    phase = 5;
    for (int i = 0; i < 200; i++) begin
      u = '0;
      u.tree = TREE_W'(i % NP); u.stage = STAGE_W'(D); u.addr = PTR_W'((1 << D) - 1 - (i / NP));
      u.slot = SLOT_W'(B - 2); u.del = 1'b1;
      ul.push_back(u);
    end
    t0 = cyc;
    while (ul.size() > 0) begin
      drive(1'b1, upd_cmd(ul[0]), 1'b0, '0, a0, a1);
      if (a0) begin model_upd(ul[0]); ul.delete(0); end
    end
    drain();
    checks++;
    $display("update rate: 200 writes in %0d cycles", cyc - t0 - LAT - 2);
    if (cyc - t0 - LAT - 2 > 210) begin failures++; $display("FAIL update rate too low"); end

    // ---- mechanism coverage
    begin
      int trees_hit = 0;
      for (int p = 0; p < NT; p++) if (tree_hits[p] > 0) trees_hit++;
      $display("dual-lane cycles %0d, lane-1 update held %0d, write waits %0d, fifo full %0d",
               c_dual, c_lane1_held, c_wait, c_full);
      $display("guarantee hits %0d, trees hit %0d, pass-through %0d, left %0d, right %0d, deleted-miss %0d, ambiguous %0d",
               c_guar, trees_hit, n_pass, n_left, n_right, c_del_miss, ambiguous);
      checks += 10;
      if (c_dual == 0)       begin failures++; $display("FAIL no dual-lane search"); end
      if (c_lane1_held == 0) begin failures++; $display("FAIL lane-1 update never held"); end
      if (c_wait == 0)       begin failures++; $display("FAIL no write waited for a gap"); end
      if (c_full == 0)       begin failures++; $display("FAIL update FIFO never full"); end
      if (c_guar == 0)       begin failures++; $display("FAIL no guarantee pipeline hit"); end
      if (trees_hit < 2)     begin failures++; $display("FAIL hits in fewer than 2 trees"); end
      if (n_pass == 0)       begin failures++; $display("FAIL no pass-through node"); end
      if (n_left == 0 || n_right == 0) begin failures++; $display("FAIL a branch never taken"); end
      if (c_del_miss == 0)   begin failures++; $display("FAIL no deleted rule checked"); end
      if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("FAIL results missing"); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial stimulus();

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog in phase %0d", phase);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
