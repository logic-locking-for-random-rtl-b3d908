// tb_rf_ctrl: drives the controller with model trees that finish after
// random delays, a one-cycle model voter and a host that is randomly not
// ready.  Checks the batch sequence: start ignored without samples, one
// tree start per sample at the right sample address, voting exactly one
// cycle after the last tree is done, results in order and held under
// back-pressure, loader clear after the last result, return to standby.
module tb_rf_ctrl;
  localparam int unsigned NT = 3, NS = 5, NF = 7;
  localparam int unsigned AW = $clog2(NS * NF), CW = $clog2(NS + 1);

  logic clk = 0, rst_n = 0;
  logic start = 0, standby, clear;
  logic [CW-1:0] n_loaded = '0;
  logic tree_start;
  logic [AW-1:0] sample_base;
  logic [NT-1:0] tree_done = '0;
  logic vote_valid, vote_done = 0;
  logic res_valid, res_ready = 0;
  logic [CW-1:0] res_index;

  int checks = 0, failures = 0;
  int ready_pct = 50;

  rf_ctrl #(.N_TREES(NT), .N_SAMPLES(NS), .N_FEATURES(NF)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Model trees: each finishes 2..12 cycles after tree_start.
  int remaining [NT];
  int starts = 0, last_done_cycle = -10, cycle = 0;
  bit all_done_seen = 0;
  always @(posedge clk) begin
    cycle++;
    vote_done <= vote_valid;
    for (int t = 0; t < NT; t++) begin
      tree_done[t] <= 1'b0;
      if (tree_start) remaining[t] = $urandom_range(2, 12);
      else if (remaining[t] > 0) begin
        remaining[t]--;
        if (remaining[t] == 0) begin
          tree_done[t] <= 1'b1;
          last_done_cycle = cycle;
        end
      end
    end
    res_ready <= ($urandom_range(99) < ready_pct);
  end

  // Protocol checks.
  int exp_idx = 0, results = 0, clears = 0, votes = 0;
  logic res_valid_q = 0, res_ready_q = 0;
  logic [CW-1:0] res_index_q;
  always @(posedge clk) if (rst_n) begin
    if (tree_start) begin
      chk(sample_base == AW'(starts * NF), "sample address");
      starts++;
    end
    if (vote_valid) begin
      votes++;
      chk(last_done_cycle == cycle - 1, "vote one cycle after last tree done");
      for (int t = 0; t < NT; t++) chk(remaining[t] == 0, "vote before all trees done");
    end
    if (res_valid_q && !res_ready_q)
      chk(res_valid && res_index == res_index_q, "result held under back-pressure");
    if (res_valid && res_ready) begin
      chk(res_index == CW'(exp_idx), "result order");
      exp_idx++;
      results++;
    end
    if (clear) begin
      clears++;
      chk(res_valid && res_ready && exp_idx == int'(n_loaded), "clear with last result");
    end
    res_valid_q <= res_valid;
    res_ready_q <= res_ready;
    res_index_q <= res_index;
  end

  task automatic run_batch(input int n, input int pct);
    ready_pct = pct;
    exp_idx = 0; starts = 0;
    @(negedge clk); n_loaded = CW'(n); start = 1;
    @(negedge clk); start = 0;
    chk(!standby, "left standby");
    while (!clear) @(negedge clk);
    @(negedge clk);
    chk(standby, "back in standby");
    chk(starts == n && exp_idx == n, "every sample classified once");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // start without samples is ignored
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (3) @(negedge clk);
    chk(standby && starts == 0, "start ignored with no samples");
    run_batch(NS, 30);
    run_batch(2, 100);
    run_batch(1, 10);
    chk(clears == 3, "one clear per batch");
    chk(votes == NS + 3, "one vote per sample");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
