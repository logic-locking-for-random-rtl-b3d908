// feature_ram: block RAM holding the feature vectors of the inference samples.
//
// Samples are stored back to back, sample s occupying words
// s*N_FEATURES .. s*N_FEATURES+N_FEATURES-1, one feature per word.  The
// accelerator keeps one copy of this memory per decision tree so that every
// tree FSM can fetch the feature of its current node in the same cycle; all
// copies are written together while samples are streamed in.
//
// One write port and one read port, both synchronous: rd_data holds the word
// at the rd_addr sampled on the previous rising edge (one cycle of read
// latency, as an FPGA block RAM has).  A read of a word written in the same
// cycle returns the old contents.  The contents are not reset.
module feature_ram #(
  parameter int unsigned DEPTH  = 16 * 784,  // words (samples x features)
  parameter int unsigned WIDTH  = 8,         // bits per feature
  parameter int unsigned ADDR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              wr_en,
  input  logic [ADDR_W-1:0] wr_addr,
  input  logic [WIDTH-1:0]  wr_data,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic [WIDTH-1:0]  rd_data
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    rd_data <= mem[rd_addr];
  end

endmodule
