// tb_workload_100k -- a 100,000-rule MegaFlow cache on the default engine
// (8 trees + guarantee pipeline, depth 11, binth 8).
//
// Rule set: rule r lives in leaf j = r mod 2048 and is the n-th rule of that
// leaf, n = r / 2048 (0..48). It goes to tree n mod 8, slot n / 8, so every
// tree holds rules and slot 7 of every leaf stays free. Its source-IP field is
// an exact 32-bit value inside leaf j's range (j << 21 upward, unique per
// rule), so no two rules overlap; the other four fields get random prefixes.
// All nine pipelines get the same complete tree of depth 11 that halves the
// source-IP range at every level (node i of level k has threshold
// ((2i+1) << (31-k)) - 1 and pointer 2i), so leaf j covers source IPs
// [j << 21, (j+1) << 21). Expected results come from a hash of the exact
// source-IP values, not from the trees.
// Phases: load 16,383 nodes and 100,000 rules; search at full rate (two lanes,
// every cycle) and measure packets per cycle and latency; replace rules at the
// highest rate (lane 1 idle, as for an update-throughput measurement) and
// measure writes per cycle; check that replaced rules miss, new rules hit and
// untouched rules still hit.
module tb_workload_100k;
  import megaturbo_pkg::*;

  localparam int D      = DEF_DEPTH;
  localparam int NT     = DEF_NUM_TREES;
  localparam int NLEAF  = 1 << D;
  localparam int NR     = 100000;
  localparam int NREP   = 2000;      // rules replaced in the update phase
  localparam int NSRCH  = 20000;     // search cycles at full rate
  localparam int LAT    = top_latency(D);

  logic    clk = 1'b0;
  logic    rst_n;
  logic    cmd_valid [NUM_LANES];
  cmd_t    cmd       [NUM_LANES];
  logic    cmd_ready [NUM_LANES];
  logic    res_valid [NUM_LANES];
  result_t res       [NUM_LANES];
  logic    upd_busy, upd_wait, upd_fifo_full;

  megaturbo_top dut (.*);

  always #2 clk = ~clk;   // 4 ns: the 250 MHz target

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // ------------------------------------------------------------ rule model
  rule_t rl [NR + NREP];
  bit    live [NR + NREP];
  int    by_src [int];           // exact source IP -> rule index

  function automatic bit rmatch(hdr_t h, rule_t r);
    for (int f = 0; f < NUM_FIELDS; f++)
      if (r.len[f] != 0 && (h[f] >> (32 - int'(r.len[f]))) != (r.value[f] >> (32 - int'(r.len[f]))))
        return 0;
    return 1;
  endfunction

  function automatic result_t lookup(hdr_t h);
    result_t e = '0;
    if (by_src.exists(int'(h[0]))) begin
      int r = by_src[int'(h[0])];
      if (live[r] && rmatch(h, rl[r])) begin e.hit = 1; e.id = rl[r].id; end
    end
    return e;
  endfunction

  function automatic rule_t make_rule(int leaf, int n, int id);
    rule_t r;
    r.valid = 1'b1;
    r.value[0] = (32'(leaf) << 21) | (32'(n) << 14) | 32'($urandom_range(0, 16383));
    r.len[0] = 6'd32;
    for (int f = 1; f < NUM_FIELDS; f++) begin
      int len = $urandom_range(0, 32);
      r.len[f]   = PLEN_W'(len);
      r.value[f] = (len == 0) ? 32'd0 : ($urandom & ~(32'hffff_ffff >> len));
    end
    r.id = RULE_ID_W'(id);
    return r;
  endfunction

  // A header that matches rule r (random bits below every prefix).
  function automatic hdr_t hdr_of(rule_t r);
    hdr_t h;
    for (int f = 0; f < NUM_FIELDS; f++)
      h[f] = r.value[f] | ($urandom & (32'hffff_ffff >> int'(r.len[f])));
    return h;
  endfunction

  // ------------------------------------------------------------ checker
  typedef struct { int issued; result_t exp; } exp_t;
  exp_t q [NUM_LANES][$];
  int   n_res = 0, n_hit = 0, lat_bad = 0;

  task automatic check_results();
    for (int l = 0; l < NUM_LANES; l++) if (rst_n && res_valid[l]) begin
      exp_t e;
      n_res++;
      checks++;
      if (q[l].size() == 0) begin failures++; $display("FAIL unexpected result"); continue; end
      e = q[l].pop_front();
      if (cyc - e.issued != LAT) begin
        failures++; lat_bad++;
        if (lat_bad < 5) $display("FAIL latency %0d", cyc - e.issued);
      end
      if (res[l].hit !== e.exp.hit || (e.exp.hit && res[l].id !== e.exp.id)) begin
        failures++;
        if (failures < 10) $display("FAIL lane %0d: got %0d/%0d expected %0d/%0d", l, res[l].hit, res[l].id, e.exp.hit, e.exp.id);
      end else if (e.exp.hit) n_hit++;
    end
  endtask
  always @(negedge clk) check_results();

  // ------------------------------------------------------------ driver
  task automatic drive(input bit v0, input cmd_t c0, input bit v1, input cmd_t c1,
                       output bit a0, output bit a1);
    @(negedge clk);
    cmd_valid[0] = v0; cmd[0] = c0;
    cmd_valid[1] = v1; cmd[1] = c1;
    #1;
    a0 = v0 && cmd_ready[0];
    a1 = v1 && cmd_ready[1];
    @(posedge clk);
  endtask

  function automatic cmd_t search_cmd(hdr_t h);
    cmd_t c = '0;
    c.op = OP_SEARCH; c.hdr = h;
    return c;
  endfunction

  function automatic cmd_t rule_cmd(int leaf, int tree, int slot, rule_t r, bit del);
    cmd_t c = '0;
    c.op = del ? OP_DELETE : OP_INSERT;
    c.upd.tree = TREE_W'(tree); c.upd.stage = STAGE_W'(D);
    c.upd.addr = PTR_W'(leaf); c.upd.slot = SLOT_W'(slot); c.upd.rule = r;
    return c;
  endfunction

  task automatic send_lane0(cmd_t c);
    bit a0, a1;
    do drive(1'b1, c, 1'b0, '0, a0, a1); while (!a0);
  endtask

  task automatic drain();
    bit a0, a1;
    do drive(1'b0, '0, 1'b0, '0, a0, a1); while (upd_busy || upd_wait);
    repeat (LAT + 2) drive(1'b0, '0, 1'b0, '0, a0, a1);
  endtask

  task automatic search_pair(hdr_t h0, hdr_t h1);
    bit a0, a1;
    exp_t e;
    drive(1'b1, search_cmd(h0), 1'b1, search_cmd(h1), a0, a1);
    checks++;
    if (!a0 || !a1) begin failures++; $display("FAIL search refused"); end
    e.issued = cyc;
    e.exp = lookup(h0); q[0].push_back(e);
    e.exp = lookup(h1); q[1].push_back(e);
  endtask

  function automatic hdr_t pick();
    hdr_t h;
    if ($urandom_range(0, 9) == 0) begin
      for (int f = 0; f < NUM_FIELDS; f++) h[f] = $urandom;
      return h;
    end
    return hdr_of(rl[$urandom_range(0, NR - 1)]);
  endfunction

  task automatic run();
    int t0, t1, r0, h0;
    rst_n = 1'b0;
    cmd_valid[0] = 1'b0; cmd_valid[1] = 1'b0; cmd[0] = '0; cmd[1] = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    // ---- load the trees (all nine pipelines) and the rules
    for (int p = 0; p <= NT; p++)
      for (int k = 0; k < D; k++)
        for (int i = 0; i < (1 << k); i++) begin
          cmd_t c = '0;
          c.op = OP_INSERT;
          c.upd.tree = TREE_W'(p); c.upd.stage = STAGE_W'(k); c.upd.addr = PTR_W'(i);
          c.upd.node.field = '0;
          c.upd.node.value = 32'((64'(2 * i + 1) << (31 - k)) - 1);
          c.upd.node.ptr   = PTR_W'(2 * i);
          send_lane0(c);
        end
    for (int r = 0; r < NR; r++) begin
      int leaf = r % NLEAF, n = r / NLEAF;
      rl[r] = make_rule(leaf, n, r + 1);
      live[r] = 1'b1;
      by_src[int'(rl[r].value[0])] = r;
      send_lane0(rule_cmd(leaf, n % NT, n / NT, rl[r], 1'b0));
    end
    drain();
    $display("loaded %0d rules and %0d nodes in %0d cycles", NR, (NT + 1) * (NLEAF - 1), cyc);

    // ---- classification throughput
    r0 = n_res; h0 = n_hit;
    t0 = cyc;
    for (int i = 0; i < NSRCH; i++) search_pair(pick(), pick());
    t1 = cyc;
    drain();
    checks++;
    $display("classified %0d packets in %0d cycles: %0d.%02d per cycle, %0d MPPS at 250 MHz (%0d hits)",
             n_res - r0, t1 - t0, (n_res - r0) / (t1 - t0), ((n_res - r0) * 100 / (t1 - t0)) % 100,
             (n_res - r0) * 250 / (t1 - t0), n_hit - h0);
    if (n_res - r0 != 2 * NSRCH || (n_res - r0) * 250 / (t1 - t0) < 500) begin
      failures++; $display("FAIL classification rate");
    end

    // ---- update throughput: replace NREP rules (delete + insert), lane 1 idle
    t0 = cyc;
    for (int i = 0; i < NREP; i++) begin
      int r = i * 37 % NR;            // spread over leaves and trees
      int leaf = r % NLEAF, n = r / NLEAF;
      int nr = NR + i;
      send_lane0(rule_cmd(leaf, n % NT, n / NT, '0, 1'b1));
      live[r] = 1'b0;
      rl[nr] = make_rule(leaf, 49 + (i % 8), nr + 1);
      live[nr] = 1'b1;
      by_src[int'(rl[nr].value[0])] = nr;
      send_lane0(rule_cmd(leaf, i % (NT + 1), 7, rl[nr], 1'b0));
    end
    drain();
    t1 = cyc - LAT - 2;
    checks++;
    $display("%0d rule updates (%0d writes) in %0d cycles: %0d M updates/s at 250 MHz",
             NREP, 2 * NREP, t1 - t0, NREP * 250 / (t1 - t0));
    if (t1 - t0 > 2 * NREP + 20) begin failures++; $display("FAIL update rate"); end

    // ---- verify: replaced rules miss, new rules hit, others unchanged
    for (int i = 0; i < NREP; i++) begin
      int r = i * 37 % NR;
      search_pair(hdr_of(rl[r]), hdr_of(rl[NR + i]));
    end
    for (int i = 0; i < 2000; i++) search_pair(pick(), pick());
    drain();
    checks++;
    if (q[0].size() != 0 || q[1].size() != 0) begin failures++; $display("FAIL results missing"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial run();

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
