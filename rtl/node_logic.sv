// node_logic -- decision of one internal tree node (combinational).
//
// Selects header field `node.field`, compares it unsigned with the node's
// threshold and returns the child address: node.ptr when field <= value
// (left child), node.ptr + 1 otherwise (right child, stored right after its
// sibling). This is the field MUX, CMP, ADD 1 and address MUX of the inter
// module. A field identifier of NUM_FIELDS or more selects a zero field, so such
// a node always takes its pointer: this is how a branch that has already ended
// is carried down to the leaf stage (a pass-through node; this encoding is this
// design's choice). No clock; the caller registers the result.
module node_logic
  import megaturbo_pkg::*;
(
  input  hdr_t             hdr,
  input  node_t            node,
  output logic [PTR_W-1:0] next_addr,
  output logic             go_right
);
  logic [FIELD_W-1:0] fval;

  always_comb begin
    fval = '0;
    for (int f = 0; f < NUM_FIELDS; f++)
      if (node.field == FID_W'(f)) fval = hdr[f];
    go_right  = (fval > node.value);
    next_addr = go_right ? node.ptr + PTR_W'(1) : node.ptr;
  end
endmodule
