// tb_command_split -- searches pass to the search lanes one cycle later with
// the root address; inserts and deletes enter the update FIFO in order (lane
// 0 before lane 1 in the same cycle, delete flag from the opcode); lane 1 is
// refused when lane 0 also updates; updates are refused when the FIFO is full;
// the FIFO drains in order when the bus takes them.
module tb_command_split;
  import megaturbo_pkg::*;
  localparam int FD = 4;
  logic clk = 0, rst_n;
  logic cmd_valid [NUM_LANES];
  cmd_t cmd       [NUM_LANES];
  logic cmd_ready [NUM_LANES];
  tok_t tok_out   [NUM_LANES];
  logic upd_valid, upd_ready, fifo_full;
  upd_t upd;
  int checks = 0, failures = 0;

  command_split #(.FIFO_DEPTH(FD)) dut (.*);
  always #5 clk = ~clk;

  upd_t exp_q [$];
  int n_full = 0, n_held = 0;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic cmd_t rnd_cmd(op_e op);
    cmd_t c;
    for (int f = 0; f < NUM_FIELDS; f++) c.hdr[f] = $urandom;
    c.op = op;
    c.upd = '0;
    c.upd.tree = TREE_W'($urandom); c.upd.addr = PTR_W'($urandom); c.upd.node.value = $urandom;
    return c;
  endfunction

  // Consumer side: the bus takes the head when upd_ready is set; check order.
  task automatic consume();
    if (upd_valid && upd_ready) begin
      checks++;
      if (exp_q.size() == 0 || upd !== exp_q[0]) begin failures++; $display("FAIL update order"); end
      if (exp_q.size() > 0) void'(exp_q.pop_front());
    end
  endtask

  initial begin
    rst_n = 0; upd_ready = 0;
    foreach (cmd_valid[l]) begin cmd_valid[l] = 0; cmd[l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1500; i++) begin
      cmd_t c [NUM_LANES];
      bit   v [NUM_LANES];
      bit   s [NUM_LANES];
      @(negedge clk);
      // readiness of the consumer changes at the negedge, after the check above
      upd_ready = (i < 300) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 1) == 0);
      for (int l = 0; l < NUM_LANES; l++) begin
        automatic int r = $urandom_range(0, 5);
        c[l] = rnd_cmd(r < 3 ? OP_SEARCH : (r == 3 ? OP_DELETE : OP_INSERT));
        v[l] = $urandom_range(0, 4) != 0;
        cmd_valid[l] = v[l]; cmd[l] = c[l];
      end
      #1;
      consume();
      for (int l = 0; l < NUM_LANES; l++) begin
        s[l] = v[l] && c[l].op == OP_SEARCH;
        if (s[l]) chk(cmd_ready[l], "search always accepted");
        if (v[l] && !s[l] && cmd_ready[l]) begin
          automatic upd_t u = c[l].upd;
          u.del = (c[l].op == OP_DELETE);
          exp_q.push_back(u);
        end
      end
      if (fifo_full) n_full++;
      if (v[0] && v[1] && !s[0] && !s[1] && cmd_ready[0] && !cmd_ready[1] && !fifo_full) n_held++;
      if (v[0] && v[1] && !s[0] && !s[1] && !fifo_full) chk(cmd_ready[0] && !cmd_ready[1], "lane 0 update first");
      if (fifo_full) for (int l = 0; l < NUM_LANES; l++) if (v[l] && !s[l]) chk(!cmd_ready[l], "refused when full");
      @(posedge clk); #1;
      for (int l = 0; l < NUM_LANES; l++) begin
        chk(tok_out[l].valid === s[l], "search valid one cycle later");
        if (s[l]) chk(tok_out[l].hdr === c[l].hdr && tok_out[l].addr == '0, "search header and root address");
      end
    end
    @(negedge clk);
    foreach (cmd_valid[l]) cmd_valid[l] = 0;
    upd_ready = 1;
    #1 consume();
    repeat (FD + 2) begin @(negedge clk); #1 consume(); end
    #1 chk(exp_q.size() == 0 && !upd_valid, "FIFO drained");
    chk(n_full > 0, "FIFO full seen");
    chk(n_held > 0, "lane 1 update held back");
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
