// tb_locked_rf_top: end-to-end test of the locked random-forest accelerator
// at its default size (three MNIST-size trees of 485/493/501 nodes, 784
// features, 10 classes, 16-sample memory, 85 % locking).
//
// A software model walks the plain, unlocked trees and takes the majority
// vote.  Batches of random samples are streamed in, classified and compared
// with that model, including each result's latency (deepest tree path + 5
// cycles from the request or from the previous result being taken).  The
// test makes these mechanisms happen and counts them, failing if one never
// occurs: start ignored with an empty memory, input stalled because the
// memory is full, input stalled during inference, result stalled by the
// host, trees finishing at different cycles, a voting tie, a partly sent
// sample dropped, and a wrong key corrupting results.
module tb_locked_rf_top;
  import rf_pkg::*;

  localparam int unsigned NT = 3, NF = 784, NC = 10, FW = 8, PCT = 85, NS = 16, MSEED = 1;
  localparam int unsigned NODES [NT] = '{485, 493, 501};
  localparam int unsigned KEY_W = 485 + 493 + 501 + NT;
  localparam int unsigned LW = $clog2(NC), CW = $clog2(NS + 1);

  logic clk = 0, rst_n = 0;
  logic [KEY_W-1:0] key;
  logic in_valid = 0, in_ready;
  logic [FW-1:0] in_data = '0;
  logic [CW-1:0] n_loaded;
  logic start = 0, standby;
  logic res_valid, res_ready = 0;
  logic [LW-1:0] res_label;
  logic [CW-1:0] res_index;

  locked_rf_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  // mechanism counters
  int n_empty_start = 0, n_full_stall = 0, n_busy_stall = 0, n_res_stall = 0;
  int n_skew = 0, n_tie = 0, n_partial = 0, n_wrong_key_bad = 0;

  logic [FW-1:0] samples [NS][NF];
  logic [KEY_W-1:0] good_key;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at cycle %0d", what, cycle); end
  endtask

  // Plain walk of tree t; returns label, sets depth (internal nodes on path).
  function automatic int ref_tree(input int t, input int s, output int depth);
    int n, seed;
    seed = MSEED + t;
    n = 0; depth = 0;
    while (!node_is_leaf(NODES[t], n)) begin
      n = (samples[s][node_feature(seed, n, NF)] <= FW'(node_threshold(seed, n, FW)))
          ? node_left(n) : node_right(n);
      depth++;
    end
    return node_label(seed, n, NC);
  endfunction

  // Majority vote, ties to the lowest class; returns label, sets max depth.
  function automatic int ref_forest(input int s, output int max_depth, output bit tie,
                                    output bit skew);
    int cnt [NC];
    int best, d, lab;
    int depths [NT];
    for (int c = 0; c < NC; c++) cnt[c] = 0;
    max_depth = 0;
    for (int t = 0; t < NT; t++) begin
      lab = ref_tree(t, s, d);
      depths[t] = d;
      cnt[lab]++;
      if (d > max_depth) max_depth = d;
    end
    best = 0;
    for (int c = 1; c < NC; c++) if (cnt[c] > cnt[best]) best = c;
    tie = 0;
    for (int c = 0; c < NC; c++) if (c != best && cnt[c] == cnt[best]) tie = 1;
    skew = (depths[0] != depths[1]) || (depths[1] != depths[2]);
    return best;
  endfunction

  // Stream n full samples plus `extra` features of a partial one.
  task automatic load(input int n, input int extra);
    for (int s = 0; s < n; s++)
      for (int f = 0; f < NF; f++) samples[s][f] = FW'($urandom);
    for (int i = 0; i < n * NF + extra; i++) begin
      @(negedge clk);
      in_valid = 1;
      in_data  = (i < n * NF) ? samples[i / NF][i % NF] : FW'($urandom);
      @(posedge clk);
      while (!in_ready) @(posedge clk);
    end
    @(negedge clk); in_valid = 0;
    chk(n_loaded == CW'(n), "complete samples counted");
    if (extra > 0) n_partial++;
  endtask

  // Request inference and collect n results; `check` compares with the model.
  task automatic classify(input int n, input int ready_pct, input bit check, output int n_bad);
    int got, acc_cycle;
    n_bad = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; acc_cycle = cycle;
    // the host keeps offering data while the accelerator is busy
    in_valid = 1; in_data = 8'h5A;
    for (int s = 0; s < n; s++) begin
      int exp, md;
      bit tie, skew;
      exp = ref_forest(s, md, tie, skew);
      while (!res_valid) begin
        @(negedge clk);
        if (!in_ready) n_busy_stall++;
      end
      if (check) begin
        chk(cycle - acc_cycle == md + 5, $sformatf("latency of sample %0d (%0d cycles)", s, cycle - acc_cycle));
        chk(res_index == CW'(s), "result index");
        chk(int'(res_label) == exp, $sformatf("label of sample %0d: %0d exp %0d", s, res_label, exp));
        if (tie) n_tie++;
        if (skew) n_skew++;
      end
      if (int'(res_label) != exp) n_bad++;
      // host takes the result after a random wait
      while ($urandom_range(99) >= ready_pct) begin
        @(negedge clk);
        n_res_stall++;
        chk(res_valid && res_index == CW'(s), "result held while host not ready");
      end
      res_ready = 1;
      @(negedge clk); res_ready = 0; acc_cycle = cycle;
      if (!in_ready && s != n - 1) n_busy_stall++;
    end
    in_valid = 0;
    @(negedge clk);
    chk(standby && n_loaded == 0, "back in standby with memory cleared");
  endtask

  int bad;

  initial begin
    for (int i = 0; i < KEY_W; i++) good_key[i] = 1'b0;
    begin
      int ofs;
      ofs = 0;
      for (int t = 0; t < NT; t++) begin
        for (int i = 0; i < NODES[t]; i++) good_key[ofs + i] = correct_key_bit(MSEED + t, i);
        ofs += NODES[t];
      end
      for (int t = 0; t < NT; t++) good_key[ofs + t] = correct_key_bit(MSEED + VOTE_SEED_OFS, t);
    end
    key = good_key;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. start with nothing loaded is ignored
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    chk(standby, "empty start ignored");
    if (standby) n_empty_start++;

    // 2. full memory, then keep offering data: stalls
    load(NS, 0);
    @(negedge clk); in_valid = 1;
    repeat (5) begin @(posedge clk); #1; if (!in_ready) n_full_stall++; end
    @(negedge clk); in_valid = 0;
    classify(NS, 40, 1, bad);

    // 3. a few samples and a partial one, host always ready
    load(5, 100);
    classify(5, 100, 1, bad);

    // 4. second full batch
    load(NS, 0);
    classify(NS, 70, 1, bad);

    // 5. wrong key: random bits flipped
    key = good_key;
    for (int i = 0; i < KEY_W; i++) if ($urandom_range(1) != 0) key[i] = ~key[i];
    load(NS, 0);
    classify(NS, 100, 0, bad);
    n_wrong_key_bad = bad;
    $display("wrong key: %0d of %0d results differ from the model", bad, NS);

    // 6. correct key again: same samples classify correctly
    key = good_key;
    load(NS, 0);
    classify(NS, 100, 1, bad);

    $display("mechanisms: empty_start=%0d full_stall=%0d busy_stall=%0d result_stall=%0d tree_skew=%0d tie=%0d partial_drop=%0d wrong_key_bad=%0d",
             n_empty_start, n_full_stall, n_busy_stall, n_res_stall, n_skew, n_tie, n_partial,
             n_wrong_key_bad);
    chk(n_empty_start > 0, "mechanism: empty start");
    chk(n_full_stall > 0, "mechanism: memory-full stall");
    chk(n_busy_stall > 0, "mechanism: busy stall");
    chk(n_res_stall > 0, "mechanism: result back-pressure");
    chk(n_skew > 0, "mechanism: trees finishing at different cycles");
    chk(n_tie > 0, "mechanism: voting tie");
    chk(n_partial > 0, "mechanism: partial sample dropped");
    chk(n_wrong_key_bad > 0, "mechanism: wrong key corrupts results");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
