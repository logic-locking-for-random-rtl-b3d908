// rf_dataset_bench: test harness that runs one configuration of the locked
// random-forest accelerator (one dataset's forest shape) and reports.
//
// It streams NS random samples, classifies them with the correct key and
// compares each label with a software walk of the plain trees plus majority
// vote.  It then repeats the batch under N_KEYS random key guesses (every
// key bit flipped with probability 1/2) and measures how often the locked
// design still agrees with the correct classification; the agreement must
// drop below 100 %.  `finished` rises when done; `checks`/`failures` count.
module rf_dataset_bench
  import rf_pkg::*;
#(
  parameter string       NAME                 = "MNIST",
  parameter int unsigned N_TREES              = 3,
  parameter bit [N_TREES-1:0][15:0] TREE_NODES = {16'd501, 16'd493, 16'd485},
  parameter int unsigned N_FEATURES           = 784,
  parameter int unsigned N_CLASSES            = 10,
  parameter int unsigned NS                   = 4,
  parameter int unsigned N_KEYS               = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned FW = 8, MSEED = 1;
  localparam int unsigned KEY_W = nodes_before(node_counts_t'(TREE_NODES), N_TREES) + N_TREES;
  localparam int unsigned LW = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1;
  localparam int unsigned CW = $clog2(NS + 1);

  logic [KEY_W-1:0] key, good_key;
  logic in_valid = 0, in_ready;
  logic [FW-1:0] in_data = '0;
  logic [CW-1:0] n_loaded;
  logic start = 0, standby;
  logic res_valid, res_ready = 0;
  logic [LW-1:0] res_label;
  logic [CW-1:0] res_index;

  locked_rf_top #(
    .N_TREES    (N_TREES),
    .TREE_NODES (TREE_NODES),
    .N_FEATURES (N_FEATURES),
    .N_CLASSES  (N_CLASSES),
    .N_SAMPLES  (NS)
  ) dut (.*);

  logic [FW-1:0] samples [NS][N_FEATURES];
  int expected [NS];

  function automatic int ref_forest(input int s);
    int cnt [16];
    int best, n, seed;
    for (int c = 0; c < 16; c++) cnt[c] = 0;
    for (int t = 0; t < N_TREES; t++) begin
      seed = MSEED + t;
      n = 0;
      while (!node_is_leaf(int'(TREE_NODES[t]), n))
        n = (samples[s][node_feature(seed, n, N_FEATURES)] <= FW'(node_threshold(seed, n, FW)))
            ? node_left(n) : node_right(n);
      cnt[node_label(seed, n, N_CLASSES)]++;
    end
    best = 0;
    for (int c = 1; c < N_CLASSES; c++) if (cnt[c] > cnt[best]) best = c;
    return best;
  endfunction

  task automatic load();
    for (int i = 0; i < NS * N_FEATURES; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = samples[i / N_FEATURES][i % N_FEATURES];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
  endtask

  // Classify the stored batch; returns how many labels match `expected`.
  task automatic classify(output int agree);
    agree = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    for (int s = 0; s < NS; s++) begin
      while (!res_valid) @(negedge clk);
      if (int'(res_label) == expected[s] && int'(res_index) == s) agree++;
      res_ready = 1;
      @(negedge clk); res_ready = 0;
    end
  endtask

  initial begin
    int ofs, agree, total_agree;
    finished = 0; checks = 0; failures = 0;
    ofs = 0;
    for (int t = 0; t < N_TREES; t++) begin
      for (int i = 0; i < int'(TREE_NODES[t]); i++) good_key[ofs + i] = correct_key_bit(MSEED + t, i);
      ofs += int'(TREE_NODES[t]);
    end
    for (int t = 0; t < N_TREES; t++) good_key[ofs + t] = correct_key_bit(MSEED + VOTE_SEED_OFS, t);
    for (int s = 0; s < NS; s++)
      for (int f = 0; f < N_FEATURES; f++) samples[s][f] = FW'($urandom);
    for (int s = 0; s < NS; s++) expected[s] = ref_forest(s);
    key = good_key;
    @(posedge rst_n);
    // correct key
    load();
    classify(agree);
    checks += NS;
    failures += NS - agree;
    // random key guesses
    total_agree = 0;
    for (int k = 0; k < N_KEYS; k++) begin
      key = good_key;
      for (int i = 0; i < KEY_W; i++) if ($urandom_range(1) != 0) key[i] = ~key[i];
      load();
      classify(agree);
      total_agree += agree;
    end
    checks++;
    if (N_KEYS > 0 && total_agree == N_KEYS * NS) failures++;
    $display("%s: T=%0d trees %0d..%0d nodes, L=%0d, %0d classes: correct key %0d/%0d match, %0d random keys agree on %0d of %0d (%0d%%)",
             NAME, N_TREES, TREE_NODES[0], TREE_NODES[N_TREES-1], N_FEATURES, N_CLASSES, NS - (failures - (N_KEYS > 0 && total_agree == N_KEYS * NS)),
             NS, N_KEYS, total_agree, N_KEYS * NS, (N_KEYS > 0) ? 100 * total_agree / (N_KEYS * NS) : 0);
    finished = 1;
  end
endmodule
