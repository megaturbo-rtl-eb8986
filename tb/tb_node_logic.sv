// tb_node_logic -- random and corner checks of the node decision: field
// select, unsigned "field <= value" goes to the pointer, otherwise pointer+1,
// and field identifiers past the last field act as pass-through (always the
// pointer). Expected values come from a bit-serial comparison in the bench.
module tb_node_logic;
  import megaturbo_pkg::*;
  hdr_t             hdr;
  node_t            node;
  logic [PTR_W-1:0] next_addr;
  logic             go_right;
  int checks = 0, failures = 0;

  node_logic dut (.*);

  // Greater-than decided from the most significant differing bit.
  function automatic bit gt(logic [31:0] a, logic [31:0] b);
    for (int i = 31; i >= 0; i--) if (a[i] != b[i]) return a[i];
    return 0;
  endfunction

  task automatic one();
    logic [31:0] f;
    bit r;
    #1;
    f = (int'(node.field) < NUM_FIELDS) ? hdr[node.field] : 32'd0;
    r = gt(f, node.value);
    checks++;
    if (go_right !== r || next_addr !== (r ? node.ptr + 16'd1 : node.ptr)) begin
      failures++;
      $display("FAIL field=%0d f=%h value=%h ptr=%0d: got %0d/%0d", node.field, f, node.value, node.ptr, go_right, next_addr);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      for (int f = 0; f < NUM_FIELDS; f++) hdr[f] = $urandom;
      node.field = FID_W'($urandom_range(0, 7));
      node.ptr   = PTR_W'($urandom);
      case (i % 4)
        0: node.value = $urandom;
        1: node.value = (int'(node.field) < NUM_FIELDS) ? hdr[node.field] : $urandom;        // equal
        2: node.value = (int'(node.field) < NUM_FIELDS) ? hdr[node.field] - 1 : 32'd0;      // just below
        default: node.value = {1'b0, 31'($urandom)};
      endcase
      one();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
