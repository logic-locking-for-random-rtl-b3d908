// locked_tree_fsm: one decision tree of the random forest, built as a
// finite-state machine and protected by random logic locking.
//
// Every tree node is one FSM state (node index = state, root = 0).  In each
// clock cycle the FSM evaluates the node it is in: a single comparator checks
// "feature <= threshold" for that node's feature and threshold, the decision
// passes through that node's key-gate, and a multiplexer picks the next state
// from the node's two branch targets.  On reaching a leaf the leaf's class
// label is stored in the label register, `done` pulses, and the FSM returns to
// its idle (reset) state.
//
// Locking: a node either has a buffer or an XOR/XNOR key-gate, chosen at
// random when the design is locked (LOCK_PCT percent of the nodes get one).
// The gate kind follows the node's bit of the correct key (1 -> XOR,
// 0 -> XNOR), so with the correct key a locked node always inverts its
// comparator output; the stored branch targets of a locked node are
// therefore swapped.  With a wrong key bit the locked node branches the
// wrong way.  The key has one bit per node (N_NODES bits, bit i for node i);
// bits of leaves and of unlocked nodes have no effect.
//
// Node constants (feature index, threshold, targets, label, gate kind) come
// from the stand-in model functions of rf_pkg for tree seed SEED, and are
// elaborated into a constant table, which synthesis folds into logic just as
// a case statement over the states would.
//
// Memory interface: rd_addr is driven combinationally from the next state, so
// the feature of a node is read from the synchronous feature RAM while the
// FSM moves into that node and rd_data holds it during the node's cycle.
//
// Timing: `start` is taken in idle; the FSM then spends one cycle in every
// node on the root-to-leaf path (internal nodes and the leaf), and `done`
// and `label` are valid in the cycle after the leaf: start-to-done latency is
// (internal nodes on the path) + 2 cycles.  `label` holds until the next leaf.
module locked_tree_fsm
  import rf_pkg::*;
#(
  parameter int unsigned N_NODES    = 485,   // nodes (internal + leaves), odd
  parameter int unsigned N_FEATURES = 784,
  parameter int unsigned N_CLASSES  = 10,
  parameter int unsigned FEAT_W     = 8,
  parameter int unsigned LOCK_PCT   = 85,
  parameter int unsigned SEED       = 1,
  parameter int unsigned ADDR_W     = 14,
  parameter int unsigned STATE_W    = $clog2(N_NODES),
  parameter int unsigned LABEL_W    = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,        // begin inference (taken when idle)
  input  logic [ADDR_W-1:0]  sample_base,  // address of feature 0 of the sample
  input  logic [N_NODES-1:0] key,          // this tree's key bits
  output logic [ADDR_W-1:0]  rd_addr,      // feature RAM read address
  input  logic [FEAT_W-1:0]  rd_data,      // feature RAM data (1-cycle latency)
  output logic               busy,
  output logic               done,         // one-cycle pulse: label valid
  output logic [LABEL_W-1:0] label
);

  localparam int unsigned FIDX_W = (N_FEATURES > 1) ? $clog2(N_FEATURES) : 1;

  typedef struct packed {
    logic               leaf;
    logic [FIDX_W-1:0]  feat;
    logic [FEAT_W-1:0]  thr;
    logic [STATE_W-1:0] tgt_t;   // next state when the gated decision is 1
    logic [STATE_W-1:0] tgt_f;   // next state when the gated decision is 0
    logic [LABEL_W-1:0] label;
    gate_kind_t         kind;
  } node_t;

  // ---- constant node table ------------------------------------------------
  node_t tbl [N_NODES];

  for (genvar i = 0; i < N_NODES; i++) begin : g_node
    localparam bit         LEAF   = node_is_leaf(N_NODES, i);
    localparam bit         LOCKED = !LEAF && node_locked(SEED, i, LOCK_PCT);
    localparam gate_kind_t KIND   = gate_for(LOCKED, correct_key_bit(SEED, i));
    localparam int unsigned L_CH  = LEAF ? 0 : node_left(i);
    localparam int unsigned R_CH  = LEAF ? 0 : node_right(i);
    assign tbl[i] = '{
      leaf:  LEAF,
      feat:  FIDX_W'(node_feature(SEED, i, N_FEATURES)),
      thr:   FEAT_W'(node_threshold(SEED, i, FEAT_W)),
      tgt_t: STATE_W'(LOCKED ? R_CH : L_CH),
      tgt_f: STATE_W'(LOCKED ? L_CH : R_CH),
      label: LABEL_W'(node_label(SEED, i, N_CLASSES)),
      kind:  KIND
    };
  end

  // ---- FSM ------------------------------------------------------------------
  typedef enum logic {S_IDLE, S_WALK} fsm_t;

  fsm_t               fsm_q, fsm_d;
  logic [STATE_W-1:0] node_q, node_d;
  logic [ADDR_W-1:0]  base_q;
  node_t              cur;
  logic               cmp, decision;

  assign cur = tbl[node_q];
  assign cmp = (rd_data <= cur.thr);

  key_gate u_key_gate (
    .kind    (cur.kind),
    .din     (cmp),
    .key_bit (key[node_q]),
    .dout    (decision)
  );

  always_comb begin
    fsm_d  = fsm_q;
    node_d = node_q;
    unique case (fsm_q)
      S_IDLE: if (start) begin
        fsm_d  = S_WALK;
        node_d = '0;
      end
      S_WALK: begin
        if (cur.leaf) fsm_d = S_IDLE;
        else          node_d = decision ? cur.tgt_t : cur.tgt_f;
      end
      default: fsm_d = S_IDLE;
    endcase
  end

  // Fetch the feature of the node entered next.
  assign rd_addr = ((fsm_q == S_IDLE) ? sample_base : base_q)
                   + ADDR_W'(tbl[node_d].feat);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fsm_q  <= S_IDLE;
      node_q <= '0;
      base_q <= '0;
      done   <= 1'b0;
      label  <= '0;
    end else begin
      fsm_q  <= fsm_d;
      node_q <= node_d;
      done   <= (fsm_q == S_WALK) && cur.leaf;
      if (fsm_q == S_IDLE && start) base_q <= sample_base;
      if (fsm_q == S_WALK && cur.leaf) label <= cur.label;
    end
  end

  assign busy = (fsm_q == S_WALK);

endmodule
