// tb_locked_tree_fsm: runs one locked tree (MNIST size: 485 nodes, 784
// features) on random samples and compares its label and latency with a
// software walk of the unlocked tree.  With the correct key every sample
// must match; with keys that differ in locked nodes the tree must go wrong
// on some samples; flipping key bits of unlocked nodes must change nothing.
module tb_locked_tree_fsm;
  import rf_pkg::*;

  localparam int unsigned NN = 485, NF = 784, NC = 10, FW = 8, PCT = 85, SEED = 7;
  localparam int unsigned NS = 4, AW = $clog2(NS * NF), LW = $clog2(NC);

  logic clk = 0, rst_n = 0, start = 0;
  logic [AW-1:0] sample_base = '0, rd_addr;
  logic [NN-1:0] key;
  logic [FW-1:0] rd_data;
  logic busy, done;
  logic [LW-1:0] label;

  logic [FW-1:0] mem [NS * NF];
  int checks = 0, failures = 0;

  locked_tree_fsm #(.N_NODES(NN), .N_FEATURES(NF), .N_CLASSES(NC), .FEAT_W(FW),
                    .LOCK_PCT(PCT), .SEED(SEED), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;
  always_ff @(posedge clk) rd_data <= mem[rd_addr];

  // Software walk of the plain (unlocked) tree; returns label and the
  // number of internal nodes on the path.
  task automatic ref_walk(input int s, output int lab, output int depth);
    int n;
    n = 0; depth = 0;
    while (!node_is_leaf(NN, n)) begin
      if (mem[s * NF + node_feature(SEED, n, NF)] <= FW'(node_threshold(SEED, n, FW)))
        n = node_left(n);
      else
        n = node_right(n);
      depth++;
    end
    lab = node_label(SEED, n, NC);
  endtask

  task automatic run(input int s, output int lab, output int cycles);
    @(negedge clk);
    sample_base = AW'(s * NF); start = 1;
    @(negedge clk); start = 0;
    cycles = 1;
    while (!done) begin @(negedge clk); cycles++; end
    lab = int'(label);
  endtask

  int n_locked = 0;
  logic [NN-1:0] good_key;

  initial begin
    for (int i = 0; i < NN; i++) begin
      good_key[i] = correct_key_bit(SEED, i);
      if (!node_is_leaf(NN, i) && node_locked(SEED, i, PCT)) n_locked++;
    end
    key = good_key;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // -- correct key: label and latency -----------------------------------
    for (int round = 0; round < 25; round++) begin
      for (int a = 0; a < NS * NF; a++) mem[a] = FW'($urandom);
      for (int s = 0; s < NS; s++) begin
        int lab, depth, got, cyc;
        ref_walk(s, lab, depth);
        run(s, got, cyc);
        checks++;
        if (got != lab || cyc != depth + 2) begin
          failures++;
          $display("FAIL sample %0d: label %0d exp %0d, cycles %0d exp %0d", s, got, lab, cyc, depth + 2);
        end
      end
    end
    // -- wrong keys on locked nodes: the tree must misclassify sometimes ----
    begin
      int wrong, total;
      wrong = 0; total = 0;
      for (int k = 0; k < 10; k++) begin
        key = good_key;
        for (int i = 0; i < NN; i++) if ($urandom_range(1) != 0) key[i] = ~key[i];
        for (int s = 0; s < NS; s++) begin
          for (int a = s * NF; a < (s + 1) * NF; a++) mem[a] = FW'($urandom);
          begin
            int lab, depth, got, cyc;
            ref_walk(s, lab, depth);
            run(s, got, cyc);
            total++;
            if (got != lab) wrong++;
          end
        end
      end
      checks++;
      if (wrong == 0) begin failures++; $display("FAIL random keys never corrupted the label"); end
      $display("random keys: %0d of %0d labels wrong, %0d of %0d internal nodes locked",
               wrong, total, n_locked, (NN - 1) / 2);
    end
    // -- flipping bits of unlocked nodes and leaves changes nothing --------
    key = good_key;
    for (int i = 0; i < NN; i++)
      if (node_is_leaf(NN, i) || !node_locked(SEED, i, PCT)) key[i] = ~key[i];
    for (int s = 0; s < NS; s++) begin
      int lab, depth, got, cyc;
      ref_walk(s, lab, depth);
      run(s, got, cyc);
      checks++;
      if (got != lab) begin failures++; $display("FAIL buffer key bit changed label"); end
    end
    // -- a single wrong bit at the root (locked in this tree) -------------
    if (node_locked(SEED, 0, PCT)) begin
      int bad;
      bad = 0;
      key = good_key; key[0] = ~key[0];
      for (int s = 0; s < NS; s++) begin
        int lab, depth, got, cyc, n;
        ref_walk(s, lab, depth);
        run(s, got, cyc);
        // the walk now enters the other subtree of the root
        n = (mem[s * NF + node_feature(SEED, 0, NF)] <= FW'(node_threshold(SEED, 0, FW))) ? 2 : 1;
        while (!node_is_leaf(NN, n))
          n = (mem[s * NF + node_feature(SEED, n, NF)] <= FW'(node_threshold(SEED, n, FW)))
              ? node_left(n) : node_right(n);
        checks++;
        if (got != node_label(SEED, n, NC)) begin failures++; bad++; end
      end
      if (bad != 0) $display("FAIL wrong root key bit did not take the other subtree");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
