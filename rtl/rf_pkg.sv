// rf_pkg: types, constants and model-generation functions shared by the
// locked random-forest accelerator.
//
// The accelerator hard-wires a trained random forest into logic: every tree
// node becomes one FSM state whose feature index, threshold and branch
// targets are constants.  The locking scheme (random logic locking) places a
// key-gate on the decision output of a random subset of nodes; the gate is an
// XOR when the corresponding bit of the correct key is 1 and an XNOR when it
// is 0, so with the correct key every locked decision is inverted and the
// generator compensates by swapping that node's branch targets.
//
// The trained model itself is not part of this RTL.  In its place the
// functions below define a deterministic stand-in forest from a seed: trees
// are stored in heap order (node i has children 2i+1 and 2i+2), which gives
// exactly (N-1)/2 internal nodes and (N+1)/2 leaves for an odd node count N,
// the same node/leaf relation as the trees of a scikit-learn forest.  Feature
// index, threshold, leaf label, "locked or buffer" and the correct key bit of
// each node are drawn from a 32-bit integer hash of (seed, node, field).  A
// real model is dropped in by replacing node_feature/node_threshold/
// node_label/node_left/node_right with its tables.
package rf_pkg;

  // Key-gate kinds: a plain buffer (node left unlocked), XOR or XNOR.
  typedef enum logic [1:0] {
    GATE_BUF  = 2'd0,
    GATE_XOR  = 2'd1,
    GATE_XNOR = 2'd2
  } gate_kind_t;

  // Default configuration: the MNIST forest with three trees.
  localparam int unsigned MNIST_FEATURES = 784;  // 28 x 28 pixels
  localparam int unsigned MNIST_CLASSES  = 10;
  localparam int unsigned DEF_LOCK_PCT   = 85;   // share of nodes with a key-gate
  localparam int unsigned DEF_FEAT_W     = 8;    // grey-scale pixel
  localparam int unsigned DEF_MODEL_SEED = 32'd1;
  localparam int unsigned VOTE_SEED_OFS  = 32'd1000;

  // Tree sizes travel as a packed vector of 16-bit node counts, tree 0 in
  // the lowest bits; MAX_TREES bounds it for the helper below.
  localparam int unsigned MAX_TREES = 64;
  typedef bit [MAX_TREES-1:0][15:0] node_counts_t;

  // Number of nodes of trees 0 .. t-1 (first key bit of tree t).
  function automatic int unsigned nodes_before(input node_counts_t nodes, input int unsigned t);
    int unsigned s;
    s = 0;
    for (int unsigned i = 0; i < MAX_TREES; i++) if (i < t) s += int'(nodes[i]);
    return s;
  endfunction

  // Field selectors for the hash.
  localparam int unsigned F_FEATURE = 0;
  localparam int unsigned F_THRESH  = 1;
  localparam int unsigned F_LABEL   = 2;
  localparam int unsigned F_LOCKED  = 3;
  localparam int unsigned F_KEY     = 4;

  // 32-bit integer mixer (murmur3 finaliser style).
  function automatic logic [31:0] mix(input logic [31:0] seed, input logic [31:0] idx,
                                      input logic [31:0] field);
    logic [31:0] x;
    x = seed * 32'h9E37_79B1 ^ idx * 32'h85EB_CA6B ^ field * 32'hC2B2_AE35;
    x = x ^ (x >> 16);
    x = x * 32'h7FEB_352D;
    x = x ^ (x >> 15);
    x = x * 32'h846C_A68B;
    x = x ^ (x >> 16);
    return x;
  endfunction

  // ---- stand-in tree structure (heap order) ------------------------------
  function automatic bit node_is_leaf(input int unsigned n_nodes, input int unsigned idx);
    return idx >= (n_nodes - 1) / 2;
  endfunction

  function automatic int unsigned node_left(input int unsigned idx);
    return 2 * idx + 1;
  endfunction

  function automatic int unsigned node_right(input int unsigned idx);
    return 2 * idx + 2;
  endfunction

  function automatic int unsigned node_feature(input int unsigned seed, input int unsigned idx,
                                               input int unsigned n_features);
    return mix(seed, idx, F_FEATURE) % n_features;
  endfunction

  function automatic int unsigned node_threshold(input int unsigned seed, input int unsigned idx,
                                                 input int unsigned feat_w);
    return mix(seed, idx, F_THRESH) % (1 << feat_w);
  endfunction

  function automatic int unsigned node_label(input int unsigned seed, input int unsigned idx,
                                             input int unsigned n_classes);
    return mix(seed, idx, F_LABEL) % n_classes;
  endfunction

  // Random logic locking: a node (or voter input) gets a key-gate with
  // probability lock_pct percent, otherwise a buffer.
  function automatic bit node_locked(input int unsigned seed, input int unsigned idx,
                                     input int unsigned lock_pct);
    return (mix(seed, idx, F_LOCKED) % 100) < lock_pct;
  endfunction

  // Bit idx of the (randomly generated) correct key for the given seed.
  function automatic bit correct_key_bit(input int unsigned seed, input int unsigned idx);
    logic [31:0] h;
    h = mix(seed, idx, F_KEY);
    return h[7];
  endfunction

  // Gate kind the locking step chooses: XOR for a key bit of 1, XNOR for 0.
  function automatic gate_kind_t gate_for(input bit locked, input bit key_bit);
    if (!locked) return GATE_BUF;
    return key_bit ? GATE_XOR : GATE_XNOR;
  endfunction

endpackage
