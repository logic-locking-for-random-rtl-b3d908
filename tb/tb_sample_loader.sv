// tb_sample_loader: streams samples with random gaps and checks every
// memory write, the sample count, back-pressure when the memory is full or
// the accelerator is busy, and restart after `clear`.
module tb_sample_loader;
  localparam int unsigned NS = 3, NF = 5, FW = 8;
  localparam int unsigned AW = $clog2(NS * NF), CW = $clog2(NS + 1);

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready;
  logic [FW-1:0] in_data = '0;
  logic enable = 1, clear = 0;
  logic [CW-1:0] n_loaded;
  logic wr_en;
  logic [AW-1:0] wr_addr;
  logic [FW-1:0] wr_data;
  int checks = 0, failures = 0;
  int exp_addr = 0;
  int stalls = 0;

  sample_loader #(.N_SAMPLES(NS), .N_FEATURES(NF), .FEAT_W(FW)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // Every write must go to the next address with the data offered.
  always @(posedge clk) if (rst_n && wr_en) begin
    chk(wr_addr == AW'(exp_addr), "write address");
    chk(wr_data == in_data, "write data");
    exp_addr++;
  end

  task automatic send(input logic [FW-1:0] d);
    @(negedge clk);
    while ($urandom_range(2) == 0) begin in_valid = 0; @(negedge clk); end
    in_valid = 1; in_data = d;
    @(posedge clk);
    while (!in_ready) begin stalls++; @(posedge clk); end
    @(negedge clk); in_valid = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // two full samples and one more beat
    for (int i = 0; i < 2 * NF; i++) begin
      send(FW'(i + 1));
      chk(n_loaded == CW'((i + 1) / NF), "n_loaded while streaming");
    end
    // not enabled: ready must drop and nothing be written
    @(negedge clk); enable = 0; in_valid = 1; in_data = 8'hAA;
    repeat (3) begin @(posedge clk); #1; chk(!in_ready && !wr_en, "blocked while busy"); end
    @(negedge clk); in_valid = 0; enable = 1;
    // fill the third sample, then memory is full
    for (int i = 0; i < NF; i++) send(FW'(8'h40 + i));
    chk(n_loaded == CW'(NS), "n_loaded full");
    @(negedge clk); in_valid = 1;
    repeat (3) begin @(posedge clk); #1; chk(!in_ready && !wr_en, "blocked when full"); end
    @(negedge clk); in_valid = 0;
    // clear restarts at address 0
    clear = 1; @(negedge clk); clear = 0;
    chk(n_loaded == 0, "cleared count");
    exp_addr = 0;
    send(8'h11); send(8'h22);
    chk(n_loaded == 0, "partial sample not counted");
    chk(exp_addr == 2, "writes after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
