// tb_match_unit -- prefix matching of one rule. Rules are built to match a
// header (random prefix lengths, 0 = wildcard, 32 = exact), then perturbed in
// one bit inside or outside the prefix, or invalidated. The expected result is
// computed bit by bit in the bench.
module tb_match_unit;
  import megaturbo_pkg::*;
  hdr_t  hdr;
  rule_t rule;
  logic  match;
  int checks = 0, failures = 0;

  match_unit dut (.*);

  function automatic bit ref_match(hdr_t h, rule_t r);
    if (!r.valid) return 0;
    for (int f = 0; f < NUM_FIELDS; f++)
      for (int b = 0; b < int'(r.len[f]); b++)
        if (h[f][31-b] != r.value[f][31-b]) return 0;
    return 1;
  endfunction

  int n_hit = 0;

  initial begin
    for (int i = 0; i < 4000; i++) begin
      for (int f = 0; f < NUM_FIELDS; f++) begin
        hdr[f]        = $urandom;
        rule.len[f]   = PLEN_W'($urandom_range(0, 32));
        rule.value[f] = hdr[f] ^ ($urandom & ~(32'hffff_ffff << (32 - int'(rule.len[f]))) & 32'hffff_ffff);
        if (rule.len[f] == 0) rule.value[f] = $urandom;
      end
      rule.valid = ($urandom_range(0, 7) != 0);
      rule.id    = RULE_ID_W'($urandom);
      if (i % 3 == 1) begin
        automatic int f = $urandom_range(0, NUM_FIELDS - 1);
        automatic int b = $urandom_range(0, 31);
        rule.value[f][b] = ~rule.value[f][b];
      end
      #1;
      checks++;
      if (ref_match(hdr, rule)) n_hit++;
      if (match !== ref_match(hdr, rule)) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d got %0d", i, match);
      end
    end
    checks++;
    if (n_hit < 1000) begin failures++; $display("FAIL too few matching cases (%0d)", n_hit); end
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
