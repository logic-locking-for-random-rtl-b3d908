// locked_voter: majority voting over the class labels of the trees, locked
// with one key-gate per tree.
//
// For every tree j and class c the voter forms the vote "tree j chose c";
// the number of votes per class is counted and the class with most votes is
// the forest's result (ties go to the lowest class index).  The voting key
// has one bit per tree.  Tree j's votes pass through key-gates driven by key
// bit j; the gate kind is fixed at locking time (XOR for a correct key bit of
// 1, XNOR for 0, or a buffer for a tree left unlocked, LOCK_PCT percent
// being locked).  Behind a locked gate the comparators produce the inverted
// vote "tree j did not choose c", which the correct key bit restores; with a
// wrong bit tree j votes for every class except its own.
//
// Timing: `valid_in` with `labels` in one cycle gives `valid_out` and the
// registered `label_out` in the next.  `label_out` holds until the next vote.
// The trees' labels are packed, tree 0 in the lowest bits.
module locked_voter
  import rf_pkg::*;
#(
  parameter int unsigned N_TREES   = 3,
  parameter int unsigned N_CLASSES = 10,
  parameter int unsigned LOCK_PCT  = 85,
  parameter int unsigned SEED      = 1001,
  parameter int unsigned LABEL_W   = (N_CLASSES > 1) ? $clog2(N_CLASSES) : 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              valid_in,
  input  logic [N_TREES-1:0][LABEL_W-1:0]   labels,
  input  logic [N_TREES-1:0]                key,      // voting key, bit j for tree j
  output logic                              valid_out,
  output logic [LABEL_W-1:0]                label_out
);

  localparam int unsigned CNT_W = $clog2(N_TREES + 1);

  logic [N_TREES-1:0][N_CLASSES-1:0] vote;

  for (genvar j = 0; j < N_TREES; j++) begin : g_tree
    localparam bit         LOCKED = node_locked(SEED, j, LOCK_PCT);
    localparam gate_kind_t KIND   = gate_for(LOCKED, correct_key_bit(SEED, j));
    for (genvar c = 0; c < N_CLASSES; c++) begin : g_class
      logic raw;
      // Locked trees carry the inverted vote up to their key-gate.
      assign raw = LOCKED ? (labels[j] != LABEL_W'(c)) : (labels[j] == LABEL_W'(c));
      key_gate u_key_gate (
        .kind    (KIND),
        .din     (raw),
        .key_bit (key[j]),
        .dout    (vote[j][c])
      );
    end
  end

  logic [N_CLASSES-1:0][CNT_W-1:0] count;
  logic [LABEL_W-1:0]              best;

  always_comb begin
    logic [CNT_W-1:0] best_cnt;
    for (int c = 0; c < N_CLASSES; c++) begin
      count[c] = '0;
      for (int j = 0; j < N_TREES; j++) count[c] = count[c] + CNT_W'(vote[j][c]);
    end
    best     = '0;
    best_cnt = count[0];
    for (int c = 1; c < N_CLASSES; c++) begin
      if (count[c] > best_cnt) begin
        best     = LABEL_W'(c);
        best_cnt = count[c];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_out <= 1'b0;
      label_out <= '0;
    end else begin
      valid_out <= valid_in;
      if (valid_in) label_out <= best;
    end
  end

endmodule
