// match_unit -- checks one leaf rule against a packet header (combinational).
//
// A rule matches when its valid bit is set and, for every field, the header
// and the rule value agree on the top `len` bits (len = 0 is a wildcard,
// len = FIELD_W an exact match). One match unit sits on every rule slot of a
// leaf, for each search lane. Combinational, no clock. A valid bit and a
// value and prefix length per field follow the published design; carrying
// short fields MSB-aligned in 32-bit slots is this design's choice.
module match_unit
  import megaturbo_pkg::*;
(
  input  hdr_t  hdr,
  input  rule_t rule,
  output logic  match
);
  always_comb begin
    match = rule.valid;
    for (int f = 0; f < NUM_FIELDS; f++)
      if (((hdr[f] ^ rule.value[f]) & prefix_mask(rule.len[f])) != '0) match = 1'b0;
  end
endmodule
