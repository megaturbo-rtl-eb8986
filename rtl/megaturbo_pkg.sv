// megaturbo_pkg -- types and constants shared by the MegaFlow classifier engine.
//
// The engine classifies packet headers against a forest of binary decision
// trees. Each header is NUM_FIELDS fields of FIELD_W bits; fields shorter than
// FIELD_W (ports, protocol) are carried MSB-aligned so that both threshold
// comparison and prefix matching work on the full slot. An internal node holds
// a field identifier, a threshold and a pointer to its left child (the right
// child sits at pointer+1). A leaf rule holds a valid bit, a value and a prefix
// length per field, and a rule id that is returned on a match.
//
// The tree depth (11), leaf size binth (8) and tree count (8) of the main
// configuration are defaults of the modules; the field layout (five 32-bit
// fields), pointer, id and command widths are this design's own choices.
package megaturbo_pkg;

  localparam int NUM_FIELDS = 5;     // src IP, dst IP, src port, dst port, protocol
  localparam int FIELD_W    = 32;
  localparam int FID_W      = 3;     // field identifier width
  localparam int PLEN_W     = 6;     // prefix length 0..FIELD_W
  localparam int PTR_W      = 16;    // node/leaf address, enough for DEPTH <= 16
  localparam int RULE_ID_W  = 17;    // 131072 rule ids, above a 100K ruleset
  localparam int TREE_W     = 4;     // up to 16 pipelines
  localparam int STAGE_W    = 5;     // stage 0 = root, DEPTH = leaf stage
  localparam int SLOT_W     = 4;     // rule slot inside a leaf, BINTH <= 16
  localparam int NUM_LANES  = 2;     // two search lanes share each dual-port RAM

  // Defaults of the main configuration.
  localparam int DEF_DEPTH     = 11;
  localparam int DEF_BINTH     = 8;
  localparam int DEF_NUM_TREES = 8;

  typedef logic [NUM_FIELDS-1:0][FIELD_W-1:0] hdr_t;

  typedef struct packed {
    logic [FID_W-1:0]   field;   // which header field to test
    logic [FIELD_W-1:0] value;   // threshold: field <= value goes left
    logic [PTR_W-1:0]   ptr;     // left child address in the next stage
  } node_t;

  typedef struct packed {
    logic                                valid;
    logic [NUM_FIELDS-1:0][FIELD_W-1:0]  value;
    logic [NUM_FIELDS-1:0][PLEN_W-1:0]   len;
    logic [RULE_ID_W-1:0]                id;
  } rule_t;

  typedef enum logic [1:0] {
    OP_SEARCH = 2'd0,
    OP_INSERT = 2'd1,
    OP_DELETE = 2'd2
  } op_e;

  // One memory write, addressed to a tree, a stage and an entry. Internal
  // stages take `node`, the leaf stage takes `rule` into rule slot `slot`.
  // A delete writes a zero node, or clears the slot's rule.
  typedef struct packed {
    logic [TREE_W-1:0]  tree;
    logic [STAGE_W-1:0] stage;
    logic [PTR_W-1:0]   addr;
    logic [SLOT_W-1:0]  slot;
    logic               del;
    node_t              node;
    rule_t              rule;
  } upd_t;

  typedef struct packed {
    op_e  op;
    hdr_t hdr;   // used by OP_SEARCH
    upd_t upd;   // used by OP_INSERT / OP_DELETE (upd.del is set by the split)
  } cmd_t;

  // A packet travelling down one search lane of a tree pipeline.
  typedef struct packed {
    logic             valid;
    hdr_t             hdr;
    logic [PTR_W-1:0] addr;
  } tok_t;

  typedef struct packed {
    logic                 hit;
    logic [RULE_ID_W-1:0] id;
  } result_t;

  // Cycles from a tree pipeline's input to its result: root 1, inter 2 each,
  // leaf 2.
  function automatic int tree_latency(int depth);
    return 2 * depth + 1;
  endfunction

  // Cycles from a command at the top to its result: command split register,
  // tree pipeline, result selector register.
  function automatic int top_latency(int depth);
    return tree_latency(depth) + 2;
  endfunction

  // Mask that keeps the top `len` bits of a field.
  function automatic logic [FIELD_W-1:0] prefix_mask(logic [PLEN_W-1:0] len);
    return ~({FIELD_W{1'b1}} >> len);
  endfunction

endpackage
