// tb_rf_workloads: runs the accelerator in the configurations evaluated for
// the locked forest: the three-tree forests of the five datasets (MNIST,
// Accdel, Activities, Wearable, Wireless; tree sizes, feature and class
// counts as evaluated) and the single-tree MNIST configuration with the
// random key-guessing experiment (100 random keys).  Each configuration must
// classify exactly like the unlocked model under the correct key and lose
// agreement under random keys.
module tb_rf_workloads;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int NB = 6;
  logic fin [NB];
  int   chk [NB];
  int   fail [NB];

  rf_dataset_bench #(.NAME("MNIST"), .N_TREES(3), .TREE_NODES({16'd501, 16'd493, 16'd485}),
                     .N_FEATURES(784), .N_CLASSES(10), .NS(4), .N_KEYS(10))
    b_mnist (.clk, .rst_n, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]));
  rf_dataset_bench #(.NAME("Accdel"), .N_TREES(3), .TREE_NODES({16'd475, 16'd471, 16'd483}),
                     .N_FEATURES(4), .N_CLASSES(14), .NS(16), .N_KEYS(100))
    b_accdel (.clk, .rst_n, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]));
  rf_dataset_bench #(.NAME("Activities"), .N_TREES(3), .TREE_NODES({16'd223, 16'd189, 16'd215}),
                     .N_FEATURES(18), .N_CLASSES(5), .NS(16), .N_KEYS(100))
    b_act (.clk, .rst_n, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]));
  rf_dataset_bench #(.NAME("Wearable"), .N_TREES(3), .TREE_NODES({16'd517, 16'd413, 16'd389}),
                     .N_FEATURES(54), .N_CLASSES(5), .NS(16), .N_KEYS(100))
    b_wear (.clk, .rst_n, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]));
  rf_dataset_bench #(.NAME("Wireless"), .N_TREES(3), .TREE_NODES({16'd395, 16'd489, 16'd441}),
                     .N_FEATURES(8), .N_CLASSES(5), .NS(16), .N_KEYS(100))
    b_wless (.clk, .rst_n, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]));
  rf_dataset_bench #(.NAME("MNIST-DT"), .N_TREES(1), .TREE_NODES({16'd485}),
                     .N_FEATURES(784), .N_CLASSES(10), .NS(4), .N_KEYS(100))
    b_dt (.clk, .rst_n, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]));

  initial begin
    int checks, failures;
    bit all;
    repeat (3) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int i = 0; i < NB; i++) all &= fin[i];
    end while (!all);
    checks = 0; failures = 0;
    for (int i = 0; i < NB; i++) begin checks += chk[i]; failures += fail[i]; end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("TB_RESULT checks=0 failures=1");
    $finish;
  end
endmodule
