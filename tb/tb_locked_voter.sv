// tb_locked_voter: drives random tree labels (with many ties) into two
// voters, three trees / ten classes with the default 85 % locking and five
// trees / fourteen classes with every input locked, and compares the voted
// class with a software majority count (ties to the lowest class).  It also
// checks the one-cycle latency and that a wrong key bit on a locked input
// turns that tree's single vote into votes for all other classes.
module tb_locked_voter;
  import rf_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- instance A: 3 trees, 10 classes, 85 % locking, seed 1001 ---------
  localparam int unsigned TA = 3, CA = 10, PA = 85, SA = 1001, LA = 4;
  logic              va_in = 0, va_out;
  logic [TA-1:0][LA-1:0] la;
  logic [TA-1:0]     ka;
  logic [LA-1:0]     oa;
  locked_voter #(.N_TREES(TA), .N_CLASSES(CA), .LOCK_PCT(PA), .SEED(SA)) dut_a (
    .clk, .rst_n, .valid_in(va_in), .labels(la), .key(ka), .valid_out(va_out), .label_out(oa));

  // ---- instance B: 5 trees, 14 classes, all locked, seed 77 -------------
  localparam int unsigned TB = 5, CB = 14, PB = 100, SB = 77, LB = 4;
  logic              vb_in = 0, vb_out;
  logic [TB-1:0][LB-1:0] lb;
  logic [TB-1:0]     kb;
  logic [LB-1:0]     ob;
  locked_voter #(.N_TREES(TB), .N_CLASSES(CB), .LOCK_PCT(PB), .SEED(SB)) dut_b (
    .clk, .rst_n, .valid_in(vb_in), .labels(lb), .key(kb), .valid_out(vb_out), .label_out(ob));

  // Reference: votes per class; a tree whose key bit is wrong on a locked
  // input votes for every class but its own.
  function automatic int ref_vote(input int n_trees, input int n_classes, input int labs[],
                                  input bit inverted[]);
    int cnt [16];
    int best;
    for (int c = 0; c < 16; c++) cnt[c] = 0;
    for (int j = 0; j < n_trees; j++)
      for (int c = 0; c < n_classes; c++)
        if ((labs[j] == c) != inverted[j]) cnt[c]++;
    best = 0;
    for (int c = 1; c < n_classes; c++) if (cnt[c] > cnt[best]) best = c;
    return best;
  endfunction

  initial begin
    logic [TA-1:0] good_a;
    logic [TB-1:0] good_b;
    for (int j = 0; j < TA; j++) good_a[j] = correct_key_bit(SA, j);
    for (int j = 0; j < TB; j++) good_b[j] = correct_key_bit(SB, j);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 600; it++) begin
      int labs_a[], labs_b[];
      bit inv_a[], inv_b[];
      int ea, eb;
      bit use_wrong;
      labs_a = new[TA]; labs_b = new[TB];
      inv_a = new[TA]; inv_b = new[TB];
      use_wrong = (it >= 300);
      @(negedge clk);
      for (int j = 0; j < TA; j++) begin
        labs_a[j] = $urandom_range(CA - 1);
        la[j] = LA'(labs_a[j]);
        ka[j] = good_a[j];
        inv_a[j] = 0;
        if (use_wrong && $urandom_range(1) == 1) begin
          ka[j] = ~good_a[j];
          inv_a[j] = node_locked(SA, j, PA);
        end
      end
      for (int j = 0; j < TB; j++) begin
        labs_b[j] = $urandom_range(3);   // few classes in use: many ties
        lb[j] = LB'(labs_b[j]);
        kb[j] = good_b[j];
        inv_b[j] = 0;
        if (use_wrong && $urandom_range(1) == 1) begin
          kb[j] = ~good_b[j];
          inv_b[j] = 1;
        end
      end
      ea = ref_vote(TA, CA, labs_a, inv_a);
      eb = ref_vote(TB, CB, labs_b, inv_b);
      va_in = 1; vb_in = 1;
      @(negedge clk);
      va_in = 0; vb_in = 0;
      checks += 2;
      if (!va_out || int'(oa) != ea) begin
        failures++;
        $display("FAIL A it=%0d got %0d exp %0d valid=%0d", it, oa, ea, va_out);
      end
      if (!vb_out || int'(ob) != eb) begin
        failures++;
        $display("FAIL B it=%0d got %0d exp %0d valid=%0d", it, ob, eb, vb_out);
      end
      @(negedge clk);
      checks++;
      if (va_out || vb_out) begin failures++; $display("FAIL valid_out held"); end
    end
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
