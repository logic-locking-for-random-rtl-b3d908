// locked_rf_top: random-forest inference accelerator protected by random
// logic locking.
//
// The forest's trees are hard-wired as finite-state machines (one state per
// node) whose decisions pass through XOR/XNOR key-gates; the majority voter
// that combines the trees' labels is locked the same way.  Only the correct
// secret key makes the accelerator classify as the trained model does; any
// other key silently produces wrong classes.
//
// Data path: the host streams the features of up to N_SAMPLES samples
// (in_valid/in_ready/in_data, one feature per beat, samples back to back)
// into one feature RAM per tree.  A `start` request then classifies each
// stored sample: all trees walk from their root to a leaf, one node per
// cycle, each reading its node's feature from its own RAM copy; the voter
// takes their labels, and the result is offered on res_valid/res_ready with
// the class in res_label and the sample number in res_index.
//
// TREE_NODES packs the node count of each tree in 16 bits, tree 0 lowest.
// Key layout (KEY_W = sum of TREE_NODES + N_TREES bits): tree 0's key (one
// bit per node) in the lowest TREE_NODES[0] bits, then tree 1's, and so on,
// and the voting key (one bit per tree) in the top N_TREES bits.  The key is
// a static input; how it is stored on the device is outside this design.
//
// Default parameters are the three-tree MNIST forest (trees of 485, 493 and
// 501 nodes, 784 8-bit features, 10 classes, 85 % of the nodes locked).  The
// tree contents are the seeded stand-in model of rf_pkg.
module locked_rf_top
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES                 = 3,
  parameter bit [N_TREES-1:0][15:0] TREE_NODES  = {16'd501, 16'd493, 16'd485},
  parameter int unsigned N_FEATURES              = MNIST_FEATURES,
  parameter int unsigned N_CLASSES               = MNIST_CLASSES,
  parameter int unsigned FEAT_W                  = DEF_FEAT_W,
  parameter int unsigned LOCK_PCT                = DEF_LOCK_PCT,
  parameter int unsigned N_SAMPLES               = 16,
  parameter int unsigned MODEL_SEED              = DEF_MODEL_SEED,
  localparam int unsigned LABEL_W  = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1,
  localparam int unsigned CNT_W    = $clog2(N_SAMPLES + 1),
  localparam int unsigned ADDR_W   = $clog2(N_SAMPLES * N_FEATURES),
  localparam int unsigned KEY_W    = nodes_before(node_counts_t'(TREE_NODES), N_TREES) + N_TREES
) (
  input  logic               clk,
  input  logic               rst_n,
  // secret key
  input  logic [KEY_W-1:0]   key,
  // sample stream from the host
  input  logic               in_valid,
  output logic               in_ready,
  input  logic [FEAT_W-1:0]  in_data,
  output logic [CNT_W-1:0]   n_loaded,
  // inference request
  input  logic               start,
  output logic               standby,
  // result stream to the host
  output logic               res_valid,
  input  logic               res_ready,
  output logic [LABEL_W-1:0] res_label,
  output logic [CNT_W-1:0]   res_index
);

  logic                              wr_en;
  logic [ADDR_W-1:0]                 wr_addr;
  logic [FEAT_W-1:0]                 wr_data;
  logic                              clear;
  logic                              tree_start;
  logic [ADDR_W-1:0]                 sample_base;
  logic [N_TREES-1:0]                tree_done;
  logic [N_TREES-1:0][LABEL_W-1:0]   tree_label;
  logic                              vote_valid, vote_done;

  sample_loader #(
    .N_SAMPLES  (N_SAMPLES),
    .N_FEATURES (N_FEATURES),
    .FEAT_W     (FEAT_W),
    .ADDR_W     (ADDR_W),
    .CNT_W      (CNT_W)
  ) u_loader (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .enable   (standby),
    .clear,
    .n_loaded,
    .wr_en, .wr_addr, .wr_data
  );

  for (genvar t = 0; t < N_TREES; t++) begin : g_tree
    localparam int unsigned NN  = int'(TREE_NODES[t]);
    localparam int unsigned OFS = nodes_before(node_counts_t'(TREE_NODES), t);

    logic [ADDR_W-1:0] rd_addr;
    logic [FEAT_W-1:0] rd_data;

    feature_ram #(
      .DEPTH  (N_SAMPLES * N_FEATURES),
      .WIDTH  (FEAT_W),
      .ADDR_W (ADDR_W)
    ) u_ram (
      .clk,
      .wr_en, .wr_addr, .wr_data,
      .rd_addr, .rd_data
    );

    locked_tree_fsm #(
      .N_NODES    (NN),
      .N_FEATURES (N_FEATURES),
      .N_CLASSES  (N_CLASSES),
      .FEAT_W     (FEAT_W),
      .LOCK_PCT   (LOCK_PCT),
      .SEED       (MODEL_SEED + t),
      .ADDR_W     (ADDR_W)
    ) u_tree (
      .clk, .rst_n,
      .start       (tree_start),
      .sample_base,
      .key         (key[OFS +: NN]),
      .rd_addr, .rd_data,
      .busy        (),
      .done        (tree_done[t]),
      .label       (tree_label[t])
    );
  end

  locked_voter #(
    .N_TREES   (N_TREES),
    .N_CLASSES (N_CLASSES),
    .LOCK_PCT  (LOCK_PCT),
    .SEED      (MODEL_SEED + VOTE_SEED_OFS)
  ) u_voter (
    .clk, .rst_n,
    .valid_in  (vote_valid),
    .labels    (tree_label),
    .key       (key[KEY_W-1 -: N_TREES]),
    .valid_out (vote_done),
    .label_out (res_label)
  );

  rf_ctrl #(
    .N_TREES    (N_TREES),
    .N_SAMPLES  (N_SAMPLES),
    .N_FEATURES (N_FEATURES),
    .ADDR_W     (ADDR_W),
    .CNT_W      (CNT_W)
  ) u_ctrl (
    .clk, .rst_n,
    .start, .standby,
    .n_loaded, .clear,
    .tree_start, .sample_base, .tree_done,
    .vote_valid, .vote_done,
    .res_valid, .res_ready, .res_index
  );

endmodule
