// rf_ctrl: runtime sequencer of the locked random-forest accelerator.
//
// The accelerator works in batches.  In standby the host streams samples
// into the feature memories.  A `start` request (ignored while no complete
// sample is stored) classifies every stored sample in turn:
//   TREES  - all tree FSMs are started on the sample and the controller
//            waits until each has reported its label (trees finish at
//            different times, depending on their path lengths);
//   VOTE   - the tree FSMs are back in reset and the majority voter is
//            given their labels;
//   RESULT - the voted class is offered on the result stream until the
//            host takes it (res_valid & res_ready); a host that is not
//            ready stalls the accelerator.
// After the last sample the controller clears the loader and returns to
// standby until the next request.
//
// Timing per sample: 1 cycle to start the trees, the longest tree latency,
// 1 cycle of voting, then at least 1 cycle on the result stream.
module rf_ctrl #(
  parameter int unsigned N_TREES    = 3,
  parameter int unsigned N_SAMPLES  = 16,
  parameter int unsigned N_FEATURES = 784,
  parameter int unsigned ADDR_W     = $clog2(N_SAMPLES * N_FEATURES),
  parameter int unsigned CNT_W      = $clog2(N_SAMPLES + 1)
) (
  input  logic               clk,
  input  logic               rst_n,
  // request
  input  logic               start,
  output logic               standby,     // idle, loader enabled
  // loader
  input  logic [CNT_W-1:0]   n_loaded,
  output logic               clear,       // batch finished
  // trees
  output logic               tree_start,
  output logic [ADDR_W-1:0]  sample_base,
  input  logic [N_TREES-1:0] tree_done,
  // voter
  output logic               vote_valid,
  input  logic               vote_done,
  // result stream
  output logic               res_valid,
  input  logic               res_ready,
  output logic [CNT_W-1:0]   res_index    // sample the result belongs to
);

  typedef enum logic [2:0] {
    C_IDLE, C_START, C_TREES, C_VOTE, C_WAITV, C_RESULT
  } state_t;

  state_t             state_q;
  logic [N_TREES-1:0] pending_q;   // trees still walking
  logic [CNT_W-1:0]   n_batch_q;   // samples in this batch
  logic [CNT_W-1:0]   idx_q;
  logic [ADDR_W-1:0]  base_q;
  logic               last;

  assign last        = (idx_q + 1'b1 == n_batch_q);
  assign standby     = (state_q == C_IDLE);
  assign tree_start  = (state_q == C_START);
  assign vote_valid  = (state_q == C_VOTE);
  assign res_valid   = (state_q == C_RESULT);
  assign res_index   = idx_q;
  assign sample_base = base_q;
  assign clear       = (state_q == C_RESULT) && res_ready && last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q   <= C_IDLE;
      pending_q <= '0;
      n_batch_q <= '0;
      idx_q     <= '0;
      base_q    <= '0;
    end else begin
      unique case (state_q)
        C_IDLE: if (start && n_loaded != '0) begin
          n_batch_q <= n_loaded;
          idx_q     <= '0;
          base_q    <= '0;
          state_q   <= C_START;
        end
        C_START: begin
          pending_q <= '1;
          state_q   <= C_TREES;
        end
        C_TREES: begin
          pending_q <= pending_q & ~tree_done;
          if ((pending_q & ~tree_done) == '0) state_q <= C_VOTE;
        end
        C_VOTE:  state_q <= C_WAITV;
        C_WAITV: if (vote_done) state_q <= C_RESULT;
        C_RESULT: if (res_ready) begin
          if (last) begin
            state_q <= C_IDLE;
          end else begin
            idx_q   <= idx_q + 1'b1;
            base_q  <= base_q + ADDR_W'(N_FEATURES);
            state_q <= C_START;
          end
        end
        default: state_q <= C_IDLE;
      endcase
    end
  end

  // Result stream rule: a result, once offered, stays until it is taken.
  logic             res_wait_q;
  logic [CNT_W-1:0] res_index_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_wait_q  <= 1'b0;
      res_index_q <= '0;
    end else begin
      if (res_wait_q) begin
        a_res_hold: assert (res_valid && res_index == res_index_q)
          else $error("result withdrawn before it was taken");
      end
      res_wait_q  <= res_valid && !res_ready;
      res_index_q <= res_index;
    end
  end

endmodule
