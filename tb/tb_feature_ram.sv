// tb_feature_ram: writes random words, reads them back through the
// synchronous read port and checks data and one-cycle read latency, and that
// a read of a word being written returns the old contents.
module tb_feature_ram;
  localparam int unsigned DEPTH = 100, WIDTH = 8, AW = $clog2(DEPTH);

  logic clk = 0;
  logic wr_en = 0;
  logic [AW-1:0] wr_addr = '0, rd_addr = '0;
  logic [WIDTH-1:0] wr_data = '0, rd_data;
  logic [WIDTH-1:0] model [DEPTH];
  int checks = 0, failures = 0;

  feature_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [WIDTH-1:0] exp, input string what);
    checks++;
    if (rd_data !== exp) begin
      failures++;
      $display("FAIL %s: got %0h exp %0h", what, rd_data, exp);
    end
  endtask

  initial begin
    // fill
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(a); wr_data = WIDTH'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    // random reads: data appears one edge after the address
    for (int i = 0; i < 200; i++) begin
      int a;
      a = $urandom_range(DEPTH - 1);
      rd_addr = AW'(a);
      @(posedge clk); #1;
      check(model[a], "read");
    end
    // read during write: old data, then new data
    @(negedge clk);
    rd_addr = 7; wr_en = 1; wr_addr = 7; wr_data = ~model[7];
    @(posedge clk); #1;
    check(model[7], "read-during-write old");
    model[7] = ~model[7];
    wr_en = 0;
    @(posedge clk); #1;
    check(model[7], "read after write");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
