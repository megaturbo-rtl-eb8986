// tb_update_engine -- claim and write timing of one stage's update engine
// (tree 2, stage 3, 8 entries). Commands for another tree, stage or an address
// past the memory are not claimed and see ready high. A claimed command is
// written the next cycle when lane B is idle; while lane B is busy the write
// waits (deferred), ready drops if another command for this engine arrives,
// and the write goes out in the first idle cycle with the claimed data.
module tb_update_engine;
  import megaturbo_pkg::*;
  logic clk = 0, rst_n;
  logic upd_valid, upd_ready, port_busy, wr_en, deferred;
  upd_t upd, wr;
  int checks = 0, failures = 0;

  update_engine #(.TREE_ID(2), .STAGE(3), .ENTRIES(8)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic upd_t mk(int tree, int stage, int addr);
    upd_t u = '0;
    u.tree = TREE_W'(tree); u.stage = STAGE_W'(stage); u.addr = PTR_W'(addr);
    u.node.value = $urandom; u.node.ptr = PTR_W'($urandom);
    return u;
  endfunction

  int n_def = 0;
  always @(negedge clk) if (rst_n && deferred) n_def++;

  initial begin
    upd_t u, u2;
    rst_n = 0; upd_valid = 0; upd = '0; port_busy = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Not ours: other tree, other stage, address out of range.
    for (int i = 0; i < 3; i++) begin
      @(negedge clk);
      upd_valid = 1;
      upd = (i == 0) ? mk(1, 3, 2) : (i == 1) ? mk(2, 4, 2) : mk(2, 3, 8);
      #1 chk(upd_ready, "ready high for a foreign command");
      @(posedge clk); #1;
      chk(!wr_en, "foreign command not written");
    end
    // Ours, lane B idle: written in the next cycle.
    @(negedge clk);
    u = mk(2, 3, 5); upd = u; upd_valid = 1;
    #1 chk(upd_ready, "ready for own command");
    @(negedge clk);
    upd_valid = 0;
    #1 chk(wr_en && wr == u, "write one cycle after claim");
    @(negedge clk);
    #1 chk(!wr_en, "single write");
    // Ours, lane B busy: held until it is idle.
    port_busy = 1;
    u = mk(2, 3, 1); upd = u; upd_valid = 1;
    @(negedge clk);
    u2 = mk(2, 3, 7); upd = u2;
    #1 chk(!wr_en && deferred, "write held while lane B busy");
    chk(!upd_ready, "second command refused while buffer full");
    repeat (3) begin @(negedge clk); #1 chk(!wr_en, "still held"); end
    port_busy = 0;
    #1 chk(wr_en && wr == u, "held write issued in the idle cycle");
    chk(upd_ready, "buffer drains and accepts the next command");
    @(negedge clk);
    upd_valid = 0;
    #1 chk(wr_en && wr == u2, "second write follows");
    @(negedge clk);
    #1 chk(!wr_en, "no more writes");
    chk(n_def >= 4, "deferred flag seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
