// tb_result_mux -- the final selector: per lane, at most one pipeline hits;
// the output (one cycle later) is that pipeline's rule id, or a miss.
module tb_result_mux;
  import megaturbo_pkg::*;
  localparam int NP = 5;
  logic    clk = 0, rst_n;
  logic    in_valid [NP][NUM_LANES];
  result_t in_res   [NP][NUM_LANES];
  logic    out_valid [NUM_LANES];
  result_t out_res   [NUM_LANES];
  int checks = 0, failures = 0;

  result_mux #(.NUM_PIPES(NP)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    bit      v [NUM_LANES];
    result_t e [NUM_LANES];
    rst_n = 0;
    foreach (in_valid[p, l]) begin in_valid[p][l] = 0; in_res[p][l] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      for (int l = 0; l < NUM_LANES; l++) begin
        automatic int w = $urandom_range(0, NP);          // NP = no hit
        v[l] = $urandom_range(0, 3) != 0;
        e[l] = '0;
        for (int p = 0; p < NP; p++) begin
          in_valid[p][l]  = v[l];
          in_res[p][l].hit = (p == w);
          in_res[p][l].id  = RULE_ID_W'($urandom);
          if (p == w) begin e[l].hit = 1; e[l].id = in_res[p][l].id; end
        end
      end
      @(posedge clk); #1;
      for (int l = 0; l < NUM_LANES; l++) begin
        checks++;
        if (out_valid[l] !== v[l]) begin failures++; $display("FAIL valid lane %0d", l); end
        if (v[l]) begin
          checks++;
          if (out_res[l].hit !== e[l].hit || (e[l].hit && out_res[l].id !== e[l].id)) begin
            failures++; $display("FAIL lane %0d got %0d/%0d exp %0d/%0d", l, out_res[l].hit, out_res[l].id, e[l].hit, e[l].id);
          end
        end
      end
    end
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
